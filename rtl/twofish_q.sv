// twofish_q: the fixed 8-bit permutation q0 (QSEL = 0) or q1 (QSEL = 1).
//
// The byte is split into nibbles a (high) and b (low) and mixed twice:
//   a' = a xor b,  b' = a xor ROR4(b,1) xor (8a mod 16)
// the first time before t-boxes t0 (on a') and t1 (on b'), the second time
// before t2 and t3. The result is 16*t3 + t2. q0 and q1 differ only in
// the contents of their t-boxes. Combinational.
module twofish_q
  import twofish_pkg::*;
#(
  parameter int unsigned QSEL = 0
) (
  input  logic [7:0] x,
  output logic [7:0] y
);
  logic [3:0] a0, b0, a1, b1, a2, b2, a3, b3, a4, b4;

  always_comb begin
    a0 = x[7:4];
    b0 = x[3:0];
    a1 = a0 ^ b0;
    b1 = a0 ^ {b0[0], b0[3:1]} ^ {a0[0], 3'b000};
    a2 = T_TAB[QSEL][0][a1];
    b2 = T_TAB[QSEL][1][b1];
    a3 = a2 ^ b2;
    b3 = a2 ^ {b2[0], b2[3:1]} ^ {a2[0], 3'b000};
    a4 = T_TAB[QSEL][2][a3];
    b4 = T_TAB[QSEL][3][b3];
  end

  assign y = {b4, a4};

  initial assert (QSEL <= 1) else $error("twofish_q: QSEL must be 0 or 1");
endmodule
