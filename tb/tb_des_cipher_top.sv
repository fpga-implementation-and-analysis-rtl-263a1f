// tb_des_cipher_top: encrypts and decrypts blocks through the DES core, checking results against known answers, the 17-cycle latency (load cycle plus 16 rounds) before des_out_rdy, core_busy, and that lddata is ignored while busy.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_des_cipher_top;
  int checks = 0;
  int failures = 0;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish();
  end

  logic reset, function_select, lddata, core_busy, des_out_rdy;
  logic [63:0] data_in, key_in, data_out;
  des_cipher_top u_dut (.clock(clk), .reset(reset), .function_select(function_select), .lddata(lddata),
    .data_in(data_in), .key_in(key_in), .data_out(data_out), .core_busy(core_busy), .des_out_rdy(des_out_rdy));

  task automatic op(logic [63:0] k, logic [63:0] d, bit enc, logic [63:0] exp, string what);
    int cycles;
    key_in = k; data_in = d; function_select = enc; lddata = 1'b1;
    @(posedge clk); #1 lddata = 1'b0; key_in = ~k; data_in = ~d;
    check({what, " busy after load"}, 128'(core_busy), 128'(1));
    cycles = 1;
    while (!des_out_rdy) begin
      if (cycles == 5) begin   // a load attempt while busy must be ignored
        lddata = 1'b1; @(posedge clk); #1 lddata = 1'b0;
      end else begin
        @(posedge clk); #1;
      end
      cycles++;
    end
    check({what, " latency"}, 128'(cycles), 128'(17));
    check({what, " result"}, 128'(data_out), 128'(exp));
    check({what, " not busy"}, 128'(core_busy), 128'(0));
  endtask

  initial begin
    reset = 1'b1; lddata = 0; function_select = 1; data_in = '0; key_in = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    check("idle after reset", 128'({core_busy, des_out_rdy}), 128'(0));
    op(64'h133457799bbcdff1, 64'h0123456789abcdef, 1'b1, 64'h85e813540f0ab405, "encrypt");
    op(64'h133457799bbcdff1, 64'h85e813540f0ab405, 1'b0, 64'h0123456789abcdef, "decrypt");
    op(64'hc215a82a06ec41ad, 64'h4c4f9b0687322e25, 1'b1, 64'hde43478171eb53e8, "encrypt");
    op(64'hc215a82a06ec41ad, 64'hde43478171eb53e8, 1'b0, 64'h4c4f9b0687322e25, "decrypt");
    op(64'ha49636a2fa7f0eab, 64'h174c77a2dd02de92, 1'b1, 64'hb16dcaacb0dce4ad, "encrypt");
    op(64'ha49636a2fa7f0eab, 64'hb16dcaacb0dce4ad, 1'b0, 64'h174c77a2dd02de92, "decrypt");
    op(64'hd86f40f6b239f3c7, 64'h84b5a81842d87208, 1'b1, 64'hec3785d9239e7416, "encrypt");
    op(64'hd86f40f6b239f3c7, 64'hec3785d9239e7416, 1'b0, 64'h84b5a81842d87208, "decrypt");
    op(64'he883a1d45de00997, 64'h5b0ee76f2ac34446, 1'b1, 64'h62cb4b0783592704, "encrypt");
    op(64'he883a1d45de00997, 64'h62cb4b0783592704, 1'b0, 64'h5b0ee76f2ac34446, "decrypt");
    op(64'h3908f227c59db916, 64'h8aa4248c8857f9a4, 1'b1, 64'h1aefda9626940ddd, "encrypt");
    op(64'h3908f227c59db916, 64'h1aefda9626940ddd, 1'b0, 64'h8aa4248c8857f9a4, "decrypt");
    repeat (3) @(posedge clk); #1;
    check("result held", 128'({des_out_rdy, data_out}), 128'({1'b1, 64'h8aa4248c8857f9a4}));
    finish();
  end
endmodule
