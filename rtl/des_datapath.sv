// des_datapath: the DES data path, iterated one round per clock.
//
// `load` passes the 64-bit input block through the initial permutation IP
// and stores its halves in the left- and right-half registers (L0, R0). Each
// cycle with `step` high runs one Feistel round (des_round) with the sub-key
// presented on `subkey` and writes L_n, R_n back. When `step` and `last` are
// high together, the round's result is also swapped to R16 L16, passed through
// IP^-1 and captured in the output register `data_out`, which holds until the
// next such capture.
//
// `load` takes priority over `step`. Registers are cleared by the synchronous,
// active-high reset; `ce` low freezes every register.
module des_datapath
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        load,
  input  logic        step,
  input  logic        last,
  input  logic [63:0] data_in,
  input  logic [47:0] subkey,
  output logic [63:0] data_out,
  output logic [31:0] l_q,       // current left half
  output logic [31:0] r_q        // current right half
);
  logic [63:0] ip_blk;
  logic [31:0] l_nxt, r_nxt, f_unused;

  assign ip_blk = perm_ip(data_in);

  des_round u_round (
    .l_in (l_q), .r_in (r_q), .k (subkey),
    .l_out(l_nxt), .r_out(r_nxt), .f_out(f_unused)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      l_q      <= '0;
      r_q      <= '0;
      data_out <= '0;
    end else if (ce) begin
      if (load) begin
        l_q <= ip_blk[63:32];
        r_q <= ip_blk[31:0];
      end else if (step) begin
        l_q <= l_nxt;
        r_q <= r_nxt;
        if (last) data_out <= perm_fp({r_nxt, l_nxt});
      end
    end
  end
endmodule
