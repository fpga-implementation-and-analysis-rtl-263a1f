// twofish_add32: 32-bit addition modulo 2^32 as a ripple chain of
// twofish_adder cells; the carry out of bit 31 is dropped. Combinational.
module twofish_add32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] s
);
  logic [32:0] c;

  assign c[0] = 1'b0;
  for (genvar i = 0; i < 32; i++) begin : g_bit
    twofish_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
endmodule
