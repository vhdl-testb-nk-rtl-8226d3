// codelock_pkg: types and constants shared by the code lock and its testbenches.
//
// The keypad is a 3x4 matrix. Its three column lines are K[1:3] and its four row
// lines R[1:4], numbered left to right the way the lock's ports are written:
// K[1] is the leftmost bit of the K vector and K[3] the rightmost. On the keypad
// face, column K3 holds keys 1/4/7/*, K2 holds 2/5/8/0 and K1 holds 3/6/9/#;
// row R4 holds 1/2/3 and row R1 holds */0/#. A pressed key drives its column
// and its row line to 1, so key "1" reads as K = 3'b001, R = 4'b0001.
package codelock_pkg;

  typedef logic [1:3] keycol_t;   // column lines K1..K3
  typedef logic [1:4] keyrow_t;   // row lines R1..R4

  // Key "1": column K3, row R4.
  localparam keycol_t KEY1_COL = 3'b001;
  localparam keyrow_t KEY1_ROW = 4'b0001;

  // No key pressed.
  localparam keycol_t NO_COL = 3'b000;
  localparam keyrow_t NO_ROW = 4'b0000;

endpackage
