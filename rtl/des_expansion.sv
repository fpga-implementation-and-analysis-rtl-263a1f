// des_expansion: the DES E bit-selection, expanding the 32-bit right half to
// 48 bits by repeating the edge bits of every 4-bit group (output bits 1..3
// are input bits 32, 1, 2; the last two are 32 and 1). Pure wiring.
module des_expansion
  import des_pkg::*;
(
  input  logic [31:0] r,
  output logic [47:0] e
);
  assign e = perm_e(r);
endmodule
