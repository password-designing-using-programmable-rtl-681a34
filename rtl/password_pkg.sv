// password_pkg: types and constants shared by the 3-digit password lock.
//
// The lock is a four-state machine. Its state register is three bits wide and
// the states are binary coded: A = 000 (idle, nothing entered), B = 001 (first
// digit right), C = 010 (first two digits right), D = 011 (whole code right).
// Both the width and the codes follow the original design; the two upper
// codes (100..111) are unused and lead back to A.
//
// A digit is four bits, bit i being input Xi, and the default code is 5, 2, 7
// (0101, 0010, 0111).
package password_pkg;

  localparam int unsigned DIGIT_W = 4;
  localparam int unsigned STATE_W = 3;
  localparam int unsigned NUM_OUT = 3;

  typedef logic [DIGIT_W-1:0] digit_t;

  typedef enum logic [STATE_W-1:0] {
    ST_A = 3'b000,  // idle: Y2..Y0 = 000
    ST_B = 3'b001,  // "5" seen: Y0 on
    ST_C = 3'b010,  // "5","2" seen: Y0, Y1 on
    ST_D = 3'b011   // "5","2","7" seen: Y0, Y1, Y2 on
  } state_e;

  localparam digit_t CODE_DIGIT0 = 4'd5;
  localparam digit_t CODE_DIGIT1 = 4'd2;
  localparam digit_t CODE_DIGIT2 = 4'd7;

endpackage
