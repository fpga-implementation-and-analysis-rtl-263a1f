// des_sbox: one DES substitution box, S1..S8 chosen by the BOX parameter.
//
// A 6-bit group b1..b6 (b1 = MSB of `b`) selects a table row from the outer
// bits b1b6 (0..3) and a column from the inner bits b2..b5 (0..15); the 4-bit
// entry there is the output. Purely combinational: a 64x4 ROM per box, the
// tables being those of the DES standard as listed in des_pkg.
module des_sbox
  import des_pkg::*;
#(
  parameter int unsigned BOX = 1   // 1..8: which of S1..S8
) (
  input  logic [5:0] b,
  output logic [3:0] s
);
  logic [1:0] row;
  logic [3:0] col;

  assign row = {b[5], b[0]};
  assign col = b[4:1];
  assign s   = SBOX_TAB[BOX-1][{row, col}];

  initial assert (BOX >= 1 && BOX <= 8) else $error("des_sbox: BOX must be 1..8");
endmodule
