// twofish_gf_mul: multiplies a byte by the constant C in GF(2^8) with the
// reduction polynomial POLY. With the MDS polynomial (default) the MDS matrix
// needs C = 01, 5B and EF; with the Reed-Solomon polynomial 9'h14D the key
// matrix needs 01, 02, 03, 19, 1E, 3D, 47, 55, 56, 58, 5A, 68, 82, 87, 9E,
// A1, A4, AE, C1, C6, DB, E5, F3 and FC. A fixed XOR network, combinational.
module twofish_gf_mul
  import twofish_pkg::*;
#(
  parameter logic [7:0] C    = 8'hEF,
  parameter logic [8:0] POLY = MDS_POLY
) (
  input  logic [7:0] a,
  output logic [7:0] p
);
  assign p = gf_mul(a, C, POLY);
endmodule
