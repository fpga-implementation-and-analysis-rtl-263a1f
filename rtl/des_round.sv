// des_round: one combinational DES Feistel round.
//
//   l_out = r_in
//   r_out = l_in xor P(S(E(r_in) xor k))
//
// E expansion, key addition, the S-box bank and the P permutation form the
// f-function; the final XOR with the left half is the round's mixing step.
// Decryption uses the same round with the sub-keys taken in reverse order.
module des_round
  import des_pkg::*;
(
  input  logic [31:0] l_in,
  input  logic [31:0] r_in,
  input  logic [47:0] k,      // round sub-key K_n
  output logic [31:0] l_out,
  output logic [31:0] r_out,
  output logic [31:0] f_out   // f(R, K), brought out for observation
);
  logic [47:0] e, x;
  logic [31:0] s;

  des_expansion u_e   (.r(r_in), .e(e));
  des_add_key   u_add (.e(e), .k(k), .x(x));
  des_sbox_bank u_s   (.x(x), .y(s));

  assign f_out = perm_p(s);
  assign l_out = r_in;
  assign r_out = l_in ^ f_out;
endmodule
