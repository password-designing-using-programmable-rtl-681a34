// peihong: top level of the password lock, with the pin interface of the
// programmable logic device it was built for.
//
// Inputs are the clock, an active-high asynchronous reset and the four code
// bits X0..X3 (X0 the least significant). They are gathered into one 4-bit
// digit for the password state machine, whose three outputs drive Y0, Y1 and
// Y2. Entering 5, 2 and 7 on three consecutive rising clock edges turns on
// Y0, then Y0+Y1, then Y0+Y1+Y2, each one clock edge after its digit is
// sampled; Y0..Y2 all drop on the edge after the full code, or after any
// wrong digit.
//
// The entity name and the port names follow the original design. On the
// 22V10 device it was fitted to, the pins were CLK 1, RESET 3, X0..X3 5..8,
// Y0 19, Y1 18, Y2 17; those belong to the device mapping, not to this RTL.
module peihong
  import password_pkg::*;
(
  input  logic CLK,
  input  logic RESET,
  input  logic X0,
  input  logic X1,
  input  logic X2,
  input  logic X3,
  output logic Y0,
  output logic Y1,
  output logic Y2
);

  digit_t             digit;
  logic [NUM_OUT-1:0] y;

  assign digit = {X3, X2, X1, X0};

  password_fsm u_fsm (
    .clk  (CLK),
    .rst  (RESET),
    .digit(digit),
    .y    (y)
  );

  assign Y0 = y[0];
  assign Y1 = y[1];
  assign Y2 = y[2];

endmodule
