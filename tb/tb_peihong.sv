// tb_peihong: end-to-end testbench of the password lock at its pin interface.
//
// Drives the bits X0..X3 of the top level the way a keypad user would, one
// digit per clock, and checks Y0..Y2 after every rising edge against a
// reference model that counts consecutive correct digits of the code 5, 2, 7.
// It counts how often each behaviour of the lock occurs and fails if one
// never does:
//   unlock        the full code reaches state D (Y0=Y1=Y2=1)
//   idle_reject   a wrong first digit leaves the lock idle
//   reject_b      a wrong second digit after "5" drops Y0
//   reject_c      a wrong third digit after "5","2" drops Y0 and Y1
//   d_return      the lock leaves D on the next edge
//   async_reset   RESET between clock edges clears the outputs at once
// The top has no parameters, so this test runs the design as built.
module tb_peihong;

  logic CLK, RESET, X0, X1, X2, X3;
  logic Y0, Y1, Y2;

  int checks   = 0;
  int failures = 0;
  int matched  = 0;
  int n_unlock = 0, n_idle_reject = 0, n_reject_b = 0, n_reject_c = 0;
  int n_d_return = 0, n_async_reset = 0;

  peihong dut (.*);

  initial begin
    CLK = 1'b0;
    forever #5 CLK = ~CLK;
  end

  function automatic logic [3:0] code_at(int m);
    case (m)
      0:       return 4'd5;
      1:       return 4'd2;
      default: return 4'd7;
    endcase
  endfunction

  function automatic logic [2:0] expect_y(int m);
    case (m)
      0:       return 3'b000;
      1:       return 3'b001;
      2:       return 3'b011;
      default: return 3'b111;
    endcase
  endfunction

  task automatic check(string what, logic [2:0] exp);
    checks++;
    if ({Y2, Y1, Y0} !== exp) begin
      failures++;
      $display("FAIL %s: Y2..Y0=%b expected %b (t=%0t)", what, {Y2, Y1, Y0}, exp, $time);
    end
  endtask

  task automatic key(logic [3:0] d);
    @(negedge CLK);
    {X3, X2, X1, X0} = d;
    if (matched == 3) begin
      n_d_return++;
      matched = 0;
    end else if (d == code_at(matched)) begin
      matched++;
      if (matched == 3) n_unlock++;
    end else begin
      case (matched)
        0: n_idle_reject++;
        1: n_reject_b++;
        default: n_reject_c++;
      endcase
      matched = 0;
    end
    @(posedge CLK);
    #1 check("after edge", expect_y(matched));
  endtask

  task automatic mechanism(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end else
      $display("%-12s %0d", name, n);
  endtask

  initial begin
    RESET = 1'b1;
    {X3, X2, X1, X0} = 4'd0;
    repeat (2) @(posedge CLK);
    #1 check("reset", 3'b000);
    @(negedge CLK) RESET = 1'b0;

    // A user enters the code: Y0, then Y1, then Y2 light up
    key(4'd0);
    key(4'd5); key(4'd2); key(4'd7);
    key(4'd0);
    // Mistakes at each position
    key(4'd9);
    key(4'd5); key(4'd7);
    key(4'd5); key(4'd2); key(4'd2);
    key(4'd5); key(4'd2); key(4'd7);
    key(4'd5);

    // Reset pressed in the middle of entry
    key(4'd2); key(4'd5); key(4'd2);
    #2 RESET = 1'b1;
    #1 check("async reset", 3'b000);
    n_async_reset++;
    matched = 0;
    @(negedge CLK) RESET = 1'b0;

    // Random keying, biased towards the right digit
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(0, 2) != 0) key(code_at(matched == 3 ? 0 : matched));
      else                           key(4'($urandom_range(0, 15)));
    end

    mechanism("unlock",      n_unlock);
    mechanism("idle_reject", n_idle_reject);
    mechanism("reject_b",    n_reject_b);
    mechanism("reject_c",    n_reject_c);
    mechanism("d_return",    n_d_return);
    mechanism("async_reset", n_async_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge CLK);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
