// twofish_dec_round: one Twofish decryption round, the inverse of
// twofish_enc_round, combinational.
//
// Inputs in1..in4 are (R_{r,0}, R_{r,1}, R_{r+1,0}, R_{r+1,1}), the output
// words of encryption round r in the order that round produced them after its
// swap. With (F0, F1) = F(in1, in2) the round restores R_{r,2} and R_{r,3}:
//   out1 = ROL(in3, 1) xor F0
//   out2 = ROR(in4 xor F1, 1)
//   out3 = in1,  out4 = in2
// so feeding the outputs back with the sub-keys of round r-1 undoes the
// previous round. key_up/key_down are K_{2r+8}/K_{2r+9} of round r.
module twofish_dec_round
  import twofish_pkg::*;
(
  input  logic [31:0] in1,
  input  logic [31:0] in2,
  input  logic [31:0] in3,
  input  logic [31:0] in4,
  input  logic [31:0] s_first,
  input  logic [31:0] s_second,
  input  logic [31:0] key_up,
  input  logic [31:0] key_down,
  output logic [31:0] out1,
  output logic [31:0] out2,
  output logic [31:0] out3,
  output logic [31:0] out4
);
  logic [31:0] f0, f1;

  twofish_f u_f (
    .r0(in1), .r1(in2), .s_first(s_first), .s_second(s_second),
    .k_even(key_up), .k_odd(key_down), .f0(f0), .f1(f1)
  );

  assign out1 = rol32(in3, 1) ^ f0;
  assign out2 = ror32(in4 ^ f1, 1);
  assign out3 = in1;
  assign out4 = in2;
endmodule
