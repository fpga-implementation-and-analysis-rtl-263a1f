// twofish_s_keys: derives the two S-box key words of a 128-bit key.
// S0 is the Reed-Solomon code of key bytes 0..7 (words M0, M1) and S1 that of
// bytes 8..15 (words M2, M3). In the h-function of the rounds S0 is XORed in
// first and S1 second. The words depend on the key only, so they stay fixed
// for every block encrypted or decrypted under it. Combinational.
module twofish_s_keys (
  input  logic [3:0][31:0] m,     // key words M0..M3
  output logic [31:0]      s0,
  output logic [31:0]      s1
);
  twofish_rs u_rs0 (.m({m[1], m[0]}), .s(s0));
  twofish_rs u_rs1 (.m({m[3], m[2]}), .s(s1));
endmodule
