// twofish_keysched: one step of the Twofish expanded-key schedule for a
// 128-bit key, producing the pair K_{2i}, K_{2i+1} for an index i (0..19).
//
// With rho = 0x01010101, Me = (M0, M2) and Mo = (M1, M3):
//   A = h(2i * rho, Me)
//   B = ROL(h((2i+1) * rho, Mo), 8)
//   K_{2i} = A + B,  K_{2i+1} = ROL(A + 2B, 9)       (PHT, mod 2^32)
// Indices 0..3 give the whitening keys K0..K7, index r+4 the sub-keys
// K_{2r+8}, K_{2r+9} of round r. Combinational.
module twofish_keysched
  import twofish_pkg::*;
(
  input  logic [3:0][31:0] m,       // key words M0..M3
  input  logic [4:0]       idx,     // i
  output logic [31:0]      k_even,  // K_{2i}
  output logic [31:0]      k_odd    // K_{2i+1}
);
  logic [7:0]  e_byte, o_byte;
  logic [31:0] a, b_raw, b, p0, p1;

  assign e_byte = {2'b00, idx, 1'b0};
  assign o_byte = {2'b00, idx, 1'b1};

  twofish_h u_he (.x({4{e_byte}}), .s_first(m[2]), .s_second(m[0]), .z(a));
  twofish_h u_ho (.x({4{o_byte}}), .s_first(m[3]), .s_second(m[1]), .z(b_raw));

  assign b = rol32(b_raw, 8);

  twofish_pht u_pht (.a(a), .b(b), .a_out(p0), .b_out(p1));

  assign k_even = p0;
  assign k_odd  = rol32(p1, 9);
endmodule
