// twofish_cipher: iterative Twofish block cipher for 128-bit keys, one round
// per clock, encrypting or decrypting 128-bit blocks.
//
// Interface:
//   key_in, data_in   16 bytes each, byte 0 in bits 127:120 (the order in
//                     which test vectors are written)
//   encrypt           1 = encrypt, 0 = decrypt; sampled with start
//   start             accepted when the core is idle
//   data_out          result block, valid while done is high
//   busy              high from the accepted start until the result is stored
//   done              high from the end of an operation until the next start
//
// Operation: the accepted start stores key and block. The key words M0..M3
// feed, without further registers, the S-box key words S0/S1 (twofish_s_keys),
// the whitening keys K0..K7 (twofish_whit_keysched) and, each round, the pair
// of round sub-keys (twofish_keysched with i = r+4). The next cycle whitens
// the block (K0..K3 when encrypting, K4..K7 when decrypting); then 16 cycles
// run one round each (twofish_enc_round for r = 0..15, or twofish_dec_round
// for r = 15..0); the last cycle undoes the final swap, applies the other
// whitening half and stores data_out. Latency: 19 cycles (start, whitening,
// 16 rounds, output); done is high after the 18th edge following the edge
// that accepts start. Reset is synchronous and active high.
module twofish_cipher
  import twofish_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         encrypt,
  input  logic [127:0] key_in,
  input  logic [127:0] data_in,
  output logic [127:0] data_out,
  output logic         busy,
  output logic         done
);
  typedef enum logic [1:0] {S_IDLE, S_WHITEN, S_ROUND, S_FINISH} state_t;

  state_t           state;
  logic             enc_q;
  logic [3:0]       rc;           // rounds done so far
  logic [3:0]       rnd;          // round being computed
  logic [3:0][31:0] m_q;          // key words M0..M3
  logic [3:0][31:0] d_q;          // input block words
  logic [3:0][31:0] st;           // round state
  logic [31:0]      s0, s1;
  logic [7:0][31:0] kw;           // K0..K7
  logic [31:0]      k_up, k_down;
  logic [3:0][31:0] enc_o, dec_o;
  logic [3:0][31:0] w_in, w_out;  // whitening keys of this direction

  twofish_s_keys        u_skeys (.m(m_q), .s0(s0), .s1(s1));
  twofish_whit_keysched u_wkeys (.m(m_q), .k(kw));

  assign rnd = enc_q ? rc : 4'd15 - rc;

  twofish_keysched u_rkeys (
    .m(m_q), .idx({1'b0, rnd} + 5'd4), .k_even(k_up), .k_odd(k_down)
  );

  twofish_enc_round u_enc (
    .in1(st[0]), .in2(st[1]), .in3(st[2]), .in4(st[3]),
    .s_first(s0), .s_second(s1), .key_up(k_up), .key_down(k_down),
    .out1(enc_o[0]), .out2(enc_o[1]), .out3(enc_o[2]), .out4(enc_o[3])
  );

  twofish_dec_round u_dec (
    .in1(st[0]), .in2(st[1]), .in3(st[2]), .in4(st[3]),
    .s_first(s0), .s_second(s1), .key_up(k_up), .key_down(k_down),
    .out1(dec_o[0]), .out2(dec_o[1]), .out3(dec_o[2]), .out4(dec_o[3])
  );

  assign w_in  = enc_q ? kw[3:0] : kw[7:4];
  assign w_out = enc_q ? kw[7:4] : kw[3:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      enc_q    <= 1'b1;
      rc       <= '0;
      m_q      <= '0;
      d_q      <= '0;
      st       <= '0;
      data_out <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          m_q   <= bytes_to_words(key_in);
          d_q   <= bytes_to_words(data_in);
          enc_q <= encrypt;
          busy  <= 1'b1;
          done  <= 1'b0;
          state <= S_WHITEN;
        end
        S_WHITEN: begin
          st    <= d_q ^ w_in;
          rc    <= '0;
          state <= S_ROUND;
        end
        S_ROUND: begin
          st <= enc_q ? enc_o : dec_o;
          rc <= rc + 4'd1;
          if (rc == 4'd15) state <= S_FINISH;
        end
        S_FINISH: begin
          data_out <= words_to_bytes({st[1] ^ w_out[3], st[0] ^ w_out[2],
                                      st[3] ^ w_out[1], st[2] ^ w_out[0]});
          busy     <= 1'b0;
          done     <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_busy_done: assert property (@(posedge clk) disable iff (rst) !(busy && done));
endmodule
