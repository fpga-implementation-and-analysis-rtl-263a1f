// des_core: DES core with single, double and triple DES modes.
//
// Ports follow the core's pin list: CLK, RESET (synchronous, active high),
// CEN (clock enable: while low the core ignores its inputs, holds its state,
// and its outputs are to be ignored), START (begins an operation when the core
// is idle), ED (1 = encrypt, 0 = decrypt), MODE (0 single, 1 double, 2 triple
// DES; 3 is treated as single), K1..K3 (64-bit keys), D (input block), Q
// (output block) and READY (Q is valid; high from the end of an operation
// until the next START).
//
// The core chains one to three DES passes through a shared iterative data path
// (des_datapath) and key schedule (des_key_schedule):
//   single  E: E(K1)                 D: D(K1)
//   double  E: E(K1) then E(K2)      D: D(K2) then D(K1)
//   triple  E: E(K1) D(K2) E(K3)     D: D(K3) E(K2) D(K1)   (EDE)
// Each pass takes a load cycle, which stores its key and block, and 16 round
// cycles; the block of a later pass is the output of the pass before.
// Latency: the START cycle plus 17 enabled cycles per pass (18, 35 or 52
// cycles in all); READY is high after the last of them.
module des_core (
  input  logic        CLK,
  input  logic        RESET,
  input  logic        CEN,
  input  logic        START,
  input  logic        ED,
  input  logic [1:0]  MODE,
  input  logic [63:0] K1,
  input  logic [63:0] K2,
  input  logic [63:0] K3,
  input  logic [63:0] D,
  output logic [63:0] Q,
  output logic        READY
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ROUND} state_t;

  state_t      state;
  logic [1:0]  pass;        // current pass, 0..npass-1
  logic [1:0]  npass;       // passes of the operation
  logic        ed_q;
  logic [1:0]  mode_q;
  logic [3:0]  rc;
  logic        pass_enc;    // direction of the current pass
  logic [63:0] pass_key;
  logic [63:0] pass_data;
  logic [3:0]  key_sel;
  logic [47:0] subkey;
  logic        key_ready;
  logic        do_load, do_step, last;

  // Key and direction of each pass.
  always_comb begin
    pass_key = K1;
    pass_enc = ed_q;
    unique case (mode_q)
      2'd1: begin
        pass_key = (ed_q ^ (pass == 2'd1)) ? K1 : K2;
      end
      2'd2: begin
        unique case (pass)
          2'd0:    pass_key = ed_q ? K1 : K3;
          2'd1:    pass_key = K2;
          default: pass_key = ed_q ? K3 : K1;
        endcase
        pass_enc = (pass == 2'd1) ? !ed_q : ed_q;
      end
      default: ;
    endcase
  end

  assign pass_data = (pass == 2'd0) ? D : Q;
  assign do_load   = (state == S_LOAD);
  assign do_step   = (state == S_ROUND);
  assign last      = do_step && (rc == 4'd15);
  assign key_sel   = pass_enc ? rc : 4'd15 - rc;

  always_ff @(posedge CLK) begin
    if (RESET) begin
      state  <= S_IDLE;
      pass   <= '0;
      npass  <= 2'd1;
      ed_q   <= 1'b1;
      mode_q <= '0;
      rc     <= '0;
      READY  <= 1'b0;
    end else if (CEN) begin
      unique case (state)
        S_IDLE: if (START) begin
          state  <= S_LOAD;
          pass   <= '0;
          ed_q   <= ED;
          mode_q <= MODE;
          npass  <= (MODE == 2'd1) ? 2'd2 : (MODE == 2'd2) ? 2'd3 : 2'd1;
          READY  <= 1'b0;
        end
        S_LOAD: begin
          state <= S_ROUND;
          rc    <= '0;
        end
        S_ROUND: begin
          rc <= rc + 4'd1;
          if (last) begin
            if (pass == npass - 2'd1) begin
              state <= S_IDLE;
              READY <= 1'b1;
            end else begin
              state <= S_LOAD;
              pass  <= pass + 2'd1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  des_key_schedule u_keys (
    .clk(CLK), .rst(RESET), .load(do_load && CEN), .key(pass_key),
    .sel(key_sel), .subkey(subkey), .key_ready(key_ready)
  );

  des_datapath u_data (
    .clk(CLK), .rst(RESET), .ce(CEN), .load(do_load), .step(do_step),
    .last(last), .data_in(pass_data), .subkey(subkey),
    .data_out(Q), .l_q(), .r_q()
  );

  a_key_before_round: assert property (@(posedge CLK) disable iff (RESET)
    do_step |-> key_ready);
endmodule
