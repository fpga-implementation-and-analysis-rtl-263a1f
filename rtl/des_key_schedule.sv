// des_key_schedule: DES sub-key generation with a 16:1 sub-key multiplexer.
//
// On `load` the 64-bit key passes through PC-1 (dropping the eight parity
// bits) and the 56-bit result C0D0 is stored. Each sub-key K_n is then pure
// wiring of that register: C0 and D0 rotated left by the cumulative shift of
// rounds 1..n (1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1), then PC-2. A 48-bit 16:1
// multiplexer picks K_{sel+1}. `key_ready` is set by `load` and stays set.
//
// Timing: the key register updates on the clock edge where `load` is high;
// `subkey` follows `sel` combinationally one cycle later onward.
module des_key_schedule
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst,        // synchronous, active high
  input  logic        load,
  input  logic [63:0] key,        // DES bit 1 = key[63]
  input  logic [3:0]  sel,        // 0..15 selects K1..K16
  output logic [47:0] subkey,
  output logic        key_ready
);
  logic [55:0] cd;
  logic [47:0] ks [16];

  always_ff @(posedge clk) begin
    if (rst) begin
      cd        <= '0;
      key_ready <= 1'b0;
    end else if (load) begin
      cd        <= perm_pc1(key);
      key_ready <= 1'b1;
    end
  end

  for (genvar n = 0; n < 16; n++) begin : g_sub
    localparam int unsigned SH = cum_shift(n + 1);
    assign ks[n] = perm_pc2({rol28(cd[55:28], SH), rol28(cd[27:0], SH)});
  end

  assign subkey = ks[sel];
endmodule
