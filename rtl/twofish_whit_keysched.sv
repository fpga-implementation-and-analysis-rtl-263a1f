// twofish_whit_keysched: the eight whitening key words K0..K7 of a 128-bit
// key, from four twofish_keysched steps with i = 0..3. K0..K3 whiten the
// input block and K4..K7 the output block. Combinational.
module twofish_whit_keysched (
  input  logic [3:0][31:0] m,     // key words M0..M3
  output logic [7:0][31:0] k      // K0..K7
);
  for (genvar i = 0; i < 4; i++) begin : g_pair
    twofish_keysched u_ks (.m(m), .idx(5'(i)), .k_even(k[2*i]), .k_odd(k[2*i+1]));
  end
endmodule
