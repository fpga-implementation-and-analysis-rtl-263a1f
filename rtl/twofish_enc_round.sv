// twofish_enc_round: one Twofish encryption round, combinational.
//
// Inputs in1..in4 are the round's words R0..R3. With (F0, F1) = F(R0, R1):
//   out1 = ROR(R2 xor F0, 1)
//   out2 = ROL(R3, 1) xor F1
//   out3 = R0,  out4 = R1
// i.e. the right half is mixed and the halves are exchanged. s_first/s_second
// are the S-box key words S0/S1; key_up/key_down are K_{2r+8}/K_{2r+9}.
module twofish_enc_round
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

  assign out1 = ror32(in3 ^ f0, 1);
  assign out2 = rol32(in4, 1) ^ f1;
  assign out3 = in1;
  assign out4 = in2;
endmodule
