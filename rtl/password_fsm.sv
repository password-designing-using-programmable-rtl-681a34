// password_fsm: the password-checking state machine of the electronic lock.
//
// One 4-bit digit (bit i = input Xi) is sampled on every rising clock edge.
// The machine expects the three code digits in order, one per clock:
//   A --DIGIT0--> B --DIGIT1--> C --DIGIT2--> D
// Any other digit in A, B or C sends it back to A (A simply stays in A), and
// D goes back to A on the next edge whatever the input, so the full-code
// state lasts one clock period. Reset is asynchronous and active high and
// forces state A.
//
// It is a Moore machine: the outputs are decoded from the state alone, so
// they change one clock edge after the digit that caused them is sampled.
//   state A: y = 3'b000   B: y = 3'b001   C: y = 3'b011   D: y = 3'b111
// y[0] is Y0 (first digit accepted), y[1] is Y1, y[2] is Y2 (code complete).
//
// The states, their encodings, their outputs, the transition conditions and
// the asynchronous high reset are those of the original design. The code
// digits are parameters whose defaults are its code 5, 2, 7; making them
// parameters, and returning from D unconditionally, are this design's reading.
module password_fsm
  import password_pkg::*;
#(
  parameter digit_t DIGIT0 = CODE_DIGIT0,
  parameter digit_t DIGIT1 = CODE_DIGIT1,
  parameter digit_t DIGIT2 = CODE_DIGIT2
) (
  input  logic               clk,
  input  logic               rst,    // asynchronous, active high
  input  digit_t             digit,  // {X3, X2, X1, X0}
  output logic [NUM_OUT-1:0] y       // {Y2, Y1, Y0}
);

  state_e state, state_next;

  // State register
  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= ST_A;
    else     state <= state_next;
  end

  // Next-state logic: advance on the expected digit, otherwise back to A
  always_comb begin
    state_next = ST_A;
    unique case (state)
      ST_A: if (digit == DIGIT0) state_next = ST_B;
      ST_B: if (digit == DIGIT1) state_next = ST_C;
      ST_C: if (digit == DIGIT2) state_next = ST_D;
      ST_D: state_next = ST_A;
      default: state_next = ST_A;
    endcase
  end

  // Output decode (Moore)
  always_comb begin
    unique case (state)
      ST_A:    y = 3'b000;
      ST_B:    y = 3'b001;
      ST_C:    y = 3'b011;
      ST_D:    y = 3'b111;
      default: y = 3'b000;
    endcase
  end

  // The outputs turn on in order Y0, Y1, Y2 and never skip one
  a_thermometer: assert property (@(posedge clk) disable iff (rst)
    y inside {3'b000, 3'b001, 3'b011, 3'b111});
  // The state only moves one step forward per clock, or back to A
  a_step: assert property (@(posedge clk) disable iff (rst)
    state_next == ST_A || state_next == state_e'(state + 3'd1));

endmodule
