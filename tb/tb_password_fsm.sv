// tb_password_fsm: self-checking testbench of the password state machine.
//
// A reference model counts how many code digits in a row have been matched
// (0..3) and predicts the outputs from that count: 0 -> 000, 1 -> 001,
// 2 -> 011, 3 -> 111, with a count of 3 always followed by 0. Inputs change
// on the falling clock edge and outputs are compared just after each rising
// edge, which also checks the one-clock latency from digit to output. The
// test runs the code 5,2,7 directly, wrong digits at every position, a
// repeated code, an asynchronous reset between clock edges, and a long run of
// random digits biased towards the code digits.
module tb_password_fsm;
  import password_pkg::*;

  logic       clk;
  logic       rst;
  digit_t     digit;
  logic [2:0] y;

  int checks   = 0;
  int failures = 0;
  int cycles;
  int matched  = 0;   // reference: digits matched so far
  int unlocks  = 0;

  password_fsm dut (.clk(clk), .rst(rst), .digit(digit), .y(y));

  initial begin
    clk    = 1'b0;
    cycles = 0;
    forever begin
      #5 clk = ~clk;
      if (clk) cycles++;
    end
  end

  function automatic logic [2:0] expect_y(int m);
    case (m)
      0:       return 3'b000;
      1:       return 3'b001;
      2:       return 3'b011;
      default: return 3'b111;
    endcase
  endfunction

  function automatic digit_t code_at(int m);
    case (m)
      0:       return 4'd5;
      1:       return 4'd2;
      default: return 4'd7;
    endcase
  endfunction

  task automatic check(string what, logic [2:0] exp);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: y=%b expected %b (t=%0t)", what, y, exp, $time);
    end
  endtask

  // Apply one digit for one clock and compare against the model
  task automatic step(digit_t d);
    @(negedge clk);
    digit = d;
    // outputs must not react before the clock edge
    #1 check("before edge", expect_y(matched));
    if (matched == 3)              matched = 0;
    else if (d == code_at(matched)) matched++;
    else                           matched = 0;
    if (matched == 3) unlocks++;
    @(posedge clk);
    #1 check("after edge", expect_y(matched));
  endtask

  task automatic wrong_digit(int m);
    digit_t d;
    do d = digit_t'($urandom_range(0, 15)); while (d == code_at(m));
    step(d);
  endtask

  initial begin
    rst   = 1'b1;
    digit = '0;
    repeat (2) @(posedge clk);
    #1 check("in reset", 3'b000);
    @(negedge clk) rst = 1'b0;

    // Idle with wrong digits: stays in A
    repeat (4) wrong_digit(0);
    // The code 5, 2, 7
    step(4'd5); step(4'd2); step(4'd7);
    if (y !== 3'b111) $display("FAIL code 527 did not unlock");
    // D goes back to A whatever the input (even the first digit again)
    step(4'd5);
    step(4'd2); step(4'd7);
    // Wrong second digit, wrong third digit
    step(4'd5); wrong_digit(1);
    step(4'd5); step(4'd2); wrong_digit(2);
    // Digit held for two clocks (5,5) is a wrong second digit
    step(4'd5); step(4'd5); step(4'd2);
    // Only the low three bits match (X3 set): must be rejected
    step(4'd13); step(4'd5); step(4'd10); step(4'd5); step(4'd2); step(4'd15);
    // Code in wrong order
    step(4'd7); step(4'd2); step(4'd5);

    // Asynchronous reset between edges from state C
    step(4'd5); step(4'd2);
    @(negedge clk);
    #2 rst = 1'b1;
    #1 check("async reset", 3'b000);
    matched = 0;
    @(posedge clk) #1 check("held in reset", 3'b000);
    @(negedge clk) rst = 1'b0;
    digit = 4'd0;

    // Random digits biased towards the code
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 3) != 0) step(code_at(matched == 3 ? 0 : matched));
      else                           step(digit_t'($urandom_range(0, 15)));
    end

    checks++;
    if (unlocks < 10) begin
      failures++;
      $display("FAIL only %0d unlocks seen", unlocks);
    end
    $display("unlocks=%0d cycles=%0d", unlocks, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
