// twofish_rs: the Twofish Reed-Solomon key matrix. Eight key bytes m0..m7
// (m0 in bits 7:0) are multiplied by the 4x8 matrix
//   01 A4 55 87 5A 58 DB 9E
//   A4 56 82 F3 1E C6 68 E5
//   02 A1 FC C1 47 AE 3D 19
//   A4 55 87 5A 58 DB 9E 03
// over GF(2^8) with polynomial x^8+x^6+x^3+x^2+1, giving the bytes s0..s3 of
// one S-box key word (s0 in bits 7:0). Combinational.
module twofish_rs
  import twofish_pkg::*;
(
  input  logic [63:0] m,
  output logic [31:0] s
);
  // Row-major, entry (r, c) at bits 255-8(8r+c) -: 8.
  localparam logic [255:0] RS_FLAT = {
    64'h01A4_5587_5A58_DB9E,
    64'hA456_82F3_1EC6_68E5,
    64'h02A1_FCC1_47AE_3D19,
    64'hA455_875A_58DB_9E03
  };

  logic [7:0] prod [4][8];

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 8; c++) begin : g_col
      twofish_gf_mul #(.C(RS_FLAT[255 - 8*(8*r + c) -: 8]), .POLY(RS_POLY)) u_mul (.a(m[8*c +: 8]), .p(prod[r][c]));
    end
    assign s[8*r +: 8] = prod[r][0] ^ prod[r][1] ^ prod[r][2] ^ prod[r][3]
                       ^ prod[r][4] ^ prod[r][5] ^ prod[r][6] ^ prod[r][7];
  end
endmodule
