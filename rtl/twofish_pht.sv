// twofish_pht: 32-bit pseudo-Hadamard transform,
//   a' = a + b    mod 2^32
//   b' = a + 2b   mod 2^32
// computed as a' = a + b and b' = a' + b with two ripple adders.
// Combinational.
module twofish_pht (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] a_out,
  output logic [31:0] b_out
);
  twofish_add32 u_a (.a(a),     .b(b), .s(a_out));
  twofish_add32 u_b (.a(a_out), .b(b), .s(b_out));
endmodule
