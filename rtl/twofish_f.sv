// twofish_f: the Twofish F function of one round.
//
//   t0 = h(r0),  t1 = h(ROL(r1, 8))          (both with key words S0, S1)
//   (p0, p1) = PHT(t0, t1)
//   f0 = p0 + k_even,  f1 = p1 + k_odd       (mod 2^32)
// where k_even/k_odd are the round sub-keys K_{2r+8}/K_{2r+9}.
// Combinational.
module twofish_f
  import twofish_pkg::*;
(
  input  logic [31:0] r0,
  input  logic [31:0] r1,
  input  logic [31:0] s_first,
  input  logic [31:0] s_second,
  input  logic [31:0] k_even,
  input  logic [31:0] k_odd,
  output logic [31:0] f0,
  output logic [31:0] f1
);
  logic [31:0] t0, t1, p0, p1;

  twofish_h u_h0 (.x(r0),           .s_first(s_first), .s_second(s_second), .z(t0));
  twofish_h u_h1 (.x(rol32(r1, 8)), .s_first(s_first), .s_second(s_second), .z(t1));

  twofish_pht u_pht (.a(t0), .b(t1), .a_out(p0), .b_out(p1));

  twofish_add32 u_k0 (.a(p0), .b(k_even), .s(f0));
  twofish_add32 u_k1 (.a(p1), .b(k_odd),  .s(f1));
endmodule
