// twofish_mds: multiplies the byte vector (y0..y3) of a 32-bit word by the
// Twofish MDS matrix over GF(2^8) (polynomial x^8+x^6+x^5+x^3+1):
//   z0 = 01 y0 ^ EF y1 ^ 5B y2 ^ 5B y3
//   z1 = 5B y0 ^ EF y1 ^ EF y2 ^ 01 y3
//   z2 = EF y0 ^ 5B y1 ^ 01 y2 ^ EF y3
//   z3 = EF y0 ^ 01 y1 ^ EF y2 ^ 5B y3
// Only multiplications by 5B and EF need logic; one of each per input byte.
// y0 and z0 are the least significant bytes. Combinational.
module twofish_mds (
  input  logic [31:0] y,
  output logic [31:0] z
);
  logic [7:0] y_b [4], m5b [4], mef [4];

  for (genvar j = 0; j < 4; j++) begin : g_mul
    assign y_b[j] = y[8*j +: 8];
    twofish_gf_mul #(.C(8'h5B)) u_5b (.a(y_b[j]), .p(m5b[j]));
    twofish_gf_mul #(.C(8'hEF)) u_ef (.a(y_b[j]), .p(mef[j]));
  end

  assign z[7:0]   = y_b[0] ^ mef[1] ^ m5b[2] ^ m5b[3];
  assign z[15:8]  = m5b[0] ^ mef[1] ^ mef[2] ^ y_b[3];
  assign z[23:16] = mef[0] ^ m5b[1] ^ y_b[2] ^ mef[3];
  assign z[31:24] = mef[0] ^ y_b[1] ^ mef[2] ^ m5b[3];
endmodule
