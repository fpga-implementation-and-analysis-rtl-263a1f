// twofish_h: the Twofish h-function for a 128-bit key (two key words).
//
// Each byte x_j of the input passes through its key-dependent S-box: a fixed
// permutation, XOR with byte j of s_first, a second permutation, XOR with byte
// j of s_second and a third permutation:
//   S-box 0: q0, q0, q1     S-box 1: q1, q0, q0
//   S-box 2: q0, q1, q1     S-box 3: q1, q1, q0
// and the four S-box outputs are mixed by the MDS matrix.
// In the round function s_first/s_second are the S-box key words S0/S1; the
// key schedule uses the same unit with the key words (M2, M0) or (M3, M1).
// Combinational.
module twofish_h (
  input  logic [31:0] x,
  input  logic [31:0] s_first,
  input  logic [31:0] s_second,
  output logic [31:0] z
);
  localparam int unsigned Q_A [4] = '{0, 1, 0, 1};
  localparam int unsigned Q_B [4] = '{0, 0, 1, 1};
  localparam int unsigned Q_C [4] = '{1, 0, 1, 0};

  logic [7:0]  a [4], b [4], c [4];
  logic [31:0] y;

  for (genvar j = 0; j < 4; j++) begin : g_sbox
    twofish_q #(.QSEL(Q_A[j])) u_qa (.x(x[8*j +: 8]), .y(a[j]));
    twofish_q #(.QSEL(Q_B[j])) u_qb (.x(a[j] ^ s_first[8*j +: 8]), .y(b[j]));
    twofish_q #(.QSEL(Q_C[j])) u_qc (.x(b[j] ^ s_second[8*j +: 8]), .y(c[j]));
    assign y[8*j +: 8] = c[j];
  end

  twofish_mds u_mds (.y(y), .z(z));
endmodule
