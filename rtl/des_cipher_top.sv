// des_cipher_top: iterative DES encryption/decryption core, one round per clock.
//
// Interface (names as on the block symbol of the implemented core):
//   data_in, key_in   64-bit block and key, DES bit 1 at the MSB
//   function_select   1 = encrypt, 0 = decrypt
//   lddata            load request; accepted when the core is not busy
//   data_out          result block, valid while des_out_rdy is high
//   core_busy         high while the 16 rounds run
//   des_out_rdy       high from the end of an operation until the next load
//
// Operation: in the cycle lddata is accepted the key is stored (after PC-1)
// in the key schedule and the block (after IP) in the half registers; a 4-bit
// round counter is cleared. In each of the next 16 cycles one round runs; the
// sub-key is selected by key_select, which equals the round counter when
// encrypting and 15 minus it when decrypting, so decryption applies K16..K1.
// The 16th round writes IP^-1(R16 L16) to data_out and raises des_out_rdy.
// Latency: 17 clock cycles, the load cycle and 16 round cycles. des_out_rdy
// rises on the 16th edge after the edge that accepts lddata, and a new block
// can be loaded from then on.
// Reset is synchronous and active high.
module des_cipher_top (
  input  logic        clock,
  input  logic        reset,
  input  logic        function_select,
  input  logic        lddata,
  input  logic [63:0] data_in,
  input  logic [63:0] key_in,
  output logic [63:0] data_out,
  output logic        core_busy,
  output logic        des_out_rdy
);
  logic [3:0]  round_counter;
  logic [3:0]  key_select;
  logic        encrypt_q;
  logic        accept, last;
  logic [47:0] key_round;
  logic        key_ready;

  assign accept     = lddata && !core_busy;
  assign last       = core_busy && (round_counter == 4'd15);
  assign key_select = encrypt_q ? round_counter : 4'd15 - round_counter;

  always_ff @(posedge clock) begin
    if (reset) begin
      round_counter <= '0;
      encrypt_q     <= 1'b1;
      core_busy     <= 1'b0;
      des_out_rdy   <= 1'b0;
    end else if (accept) begin
      round_counter <= '0;
      encrypt_q     <= function_select;
      core_busy     <= 1'b1;
      des_out_rdy   <= 1'b0;
    end else if (core_busy) begin
      round_counter <= round_counter + 4'd1;
      if (last) begin
        core_busy   <= 1'b0;
        des_out_rdy <= 1'b1;
      end
    end
  end

  des_key_schedule u_keys (
    .clk(clock), .rst(reset), .load(accept), .key(key_in),
    .sel(key_select), .subkey(key_round), .key_ready(key_ready)
  );

  des_datapath u_data (
    .clk(clock), .rst(reset), .ce(1'b1), .load(accept), .step(core_busy),
    .last(last), .data_in(data_in), .subkey(key_round),
    .data_out(data_out), .l_q(), .r_q()
  );

  // A round may only run once the key register holds the loaded key.
  a_key_before_round: assert property (@(posedge clock) disable iff (reset)
    core_busy |-> key_ready);
endmodule
