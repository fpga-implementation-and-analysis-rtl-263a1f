// des_sbox_bank: the eight DES S-boxes side by side, 48 bits in, 32 bits out.
//
// Input group B_i (DES bits 6i-5..6i) feeds S_i, whose 4-bit result becomes
// output bits 4i-3..4i, so B_1 and S_1 occupy the most significant end.
// Combinational.
module des_sbox_bank (
  input  logic [47:0] x,   // K_n xor E(R), B1..B8 from the MSB down
  output logic [31:0] y    // S1(B1)..S8(B8)
);
  for (genvar i = 0; i < 8; i++) begin : g_box
    des_sbox #(.BOX(i + 1)) u_box (
      .b (x[47-6*i -: 6]),
      .s (y[31-4*i -: 4])
    );
  end
endmodule
