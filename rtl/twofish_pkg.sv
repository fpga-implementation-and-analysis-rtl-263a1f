// twofish_pkg: constants and small functions shared by the Twofish modules.
//
// Holds the 4-bit t-boxes t0..t3 of the fixed permutations q0 and q1, the two
// GF(2^8) reduction polynomials (x^8+x^6+x^5+x^3+1 for the MDS matrix and
// x^8+x^6+x^3+x^2+1 for the Reed-Solomon key matrix), a constant-multiplier
// function and 32-bit rotations.
//
// Word convention used by every Twofish module here: a 32-bit word holds
// bytes y0..y3 with y0 in bits 7:0 (y3 is the most significant byte), and a
// 128-bit block or key is read as 16 bytes, byte 0 in bits 127:120, packed
// little-endian into words: P_i = byte(4i) + 2^8 byte(4i+1) + ... .
package twofish_pkg;

  typedef logic [31:0] word_t;

  localparam logic [8:0] MDS_POLY = 9'h169;
  localparam logic [8:0] RS_POLY  = 9'h14D;

  // T_TAB[q][t][x]: t-box t (0..3) of permutation q (0 = q0, 1 = q1).
  localparam logic [3:0] T_TAB [2][4][16] = '{
    '{'{4'h8, 4'h1, 4'h7, 4'hD, 4'h6, 4'hF, 4'h3, 4'h2, 4'h0, 4'hB, 4'h5, 4'h9, 4'hE, 4'hC, 4'hA, 4'h4},
      '{4'hE, 4'hC, 4'hB, 4'h8, 4'h1, 4'h2, 4'h3, 4'h5, 4'hF, 4'h4, 4'hA, 4'h6, 4'h7, 4'h0, 4'h9, 4'hD},
      '{4'hB, 4'hA, 4'h5, 4'hE, 4'h6, 4'hD, 4'h9, 4'h0, 4'hC, 4'h8, 4'hF, 4'h3, 4'h2, 4'h4, 4'h7, 4'h1},
      '{4'hD, 4'h7, 4'hF, 4'h4, 4'h1, 4'h2, 4'h6, 4'hE, 4'h9, 4'hB, 4'h3, 4'h0, 4'h8, 4'h5, 4'hC, 4'hA}},
    '{'{4'h2, 4'h8, 4'hB, 4'hD, 4'hF, 4'h7, 4'h6, 4'hE, 4'h3, 4'h1, 4'h9, 4'h4, 4'h0, 4'hA, 4'hC, 4'h5},
      '{4'h1, 4'hE, 4'h2, 4'hB, 4'h4, 4'hC, 4'h3, 4'h7, 4'h6, 4'hD, 4'hA, 4'h5, 4'hF, 4'h9, 4'h0, 4'h8},
      '{4'h4, 4'hC, 4'h7, 4'h5, 4'h1, 4'h6, 4'h9, 4'hA, 4'h0, 4'hE, 4'hD, 4'h8, 4'h2, 4'hB, 4'h3, 4'hF},
      '{4'hB, 4'h9, 4'h5, 4'h1, 4'hC, 4'h3, 4'hD, 4'hE, 4'h6, 4'h4, 4'h7, 4'hF, 4'h2, 4'h0, 4'h8, 4'hA}}
  };

  // Product a * c in GF(2^8) modulo poly (shift-and-add; c is a constant
  // wherever this is used, so it synthesises to an XOR network).
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] c, logic [8:0] poly);
    logic [8:0] acc, sh;
    acc = '0;
    sh  = {1'b0, a};
    for (int i = 0; i < 8; i++) begin
      if (c[i]) acc ^= sh;
      sh = sh << 1;
      if (sh[8]) sh ^= poly;
    end
    return acc[7:0];
  endfunction

  function automatic word_t rol32(word_t x, int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic word_t ror32(word_t x, int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  // 16 bytes, byte 0 at bits 127:120, into four little-endian words.
  function automatic logic [3:0][31:0] bytes_to_words(logic [127:0] b);
    logic [3:0][31:0] w;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        w[i][8*j +: 8] = b[127 - 8*(4*i+j) -: 8];
    return w;
  endfunction

  function automatic logic [127:0] words_to_bytes(logic [3:0][31:0] w);
    logic [127:0] b;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        b[127 - 8*(4*i+j) -: 8] = w[i][8*j +: 8];
    return b;
  endfunction

endpackage
