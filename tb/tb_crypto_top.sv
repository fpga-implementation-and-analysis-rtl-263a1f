// tb_crypto_top: end-to-end test of the top: the DES core, the three-mode DES core and the Twofish core run at the same time on the shared clock. Counts each mechanism (DES encrypt/decrypt, a load ignored while busy, single/double/triple DES, a clock-enable stall, Twofish encrypt/decrypt, an LCD write) and fails if one never happened. Runs at the default parameters, so the LCD driver keeps its full 26-bit pacing counter: after the cipher tests the bench waits for the LCD's first bus write, the wake-up nibble 3 at about 1.3 million cycles, and checks it.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_crypto_top;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish();
  end

  logic rst;
  logic des_function_select, des_lddata, des_core_busy, des_out_rdy;
  logic [63:0] des_data_in, des_key_in, des_data_out;
  logic core_cen, core_start, core_ed, core_ready;
  logic [1:0] core_mode;
  logic [63:0] core_k1, core_k2, core_k3, core_d, core_q;
  logic tf_start, tf_encrypt, tf_busy, tf_done;
  logic [127:0] tf_key_in, tf_data_in, tf_data_out;
  logic lcd_e, lcd_rs, lcd_rw, sf_ce0;
  logic [3:0] lcd_d;

  crypto_top u_dut (.*, .clk(clk));

  int n_des_enc = 0, n_des_dec = 0, n_des_ignored = 0;
  int n_single = 0, n_double = 0, n_triple = 0, n_stall = 0;
  int n_tf_enc = 0, n_tf_dec = 0, n_lcd = 0;

  task automatic des_op(logic [63:0] k, logic [63:0] d, bit enc, logic [63:0] exp);
    int cycles;
    des_key_in = k; des_data_in = d; des_function_select = enc; des_lddata = 1'b1;
    @(posedge clk); #1 des_lddata = 1'b0;
    cycles = 1;
    while (!des_out_rdy) begin
      if (cycles == 3) begin
        des_lddata = 1'b1; des_data_in = ~d;
        @(posedge clk); #1 des_lddata = 1'b0;
        n_des_ignored++;
      end else begin
        @(posedge clk); #1;
      end
      cycles++;
    end
    check("des latency", 128'(cycles), 128'(17));
    check("des result", 128'(des_data_out), 128'(exp));
    if (enc) n_des_enc++; else n_des_dec++;
  endtask

  task automatic core_op(logic [1:0] m, bit e, logic [63:0] din, logic [63:0] exp, bit stall);
    int stalls;
    core_mode = m; core_ed = e; core_d = din; core_start = 1'b1;
    @(posedge clk); #1 core_start = 1'b0;
    stalls = 0;
    while (!core_ready) begin
      core_cen = !(stall && stalls < 3);
      if (!core_cen) stalls++;
      @(posedge clk); #1;
    end
    core_cen = 1'b1;
    check($sformatf("core mode %0d result", m), 128'(core_q), 128'(exp));
    if (stalls > 0) n_stall++;
    case (m) 2'd0: n_single++; 2'd1: n_double++; default: n_triple++; endcase
  endtask

  task automatic tf_op(logic [127:0] k, logic [127:0] d, bit enc, logic [127:0] exp);
    int cycles;
    tf_key_in = k; tf_data_in = d; tf_encrypt = enc; tf_start = 1'b1;
    @(posedge clk); #1 tf_start = 1'b0;
    cycles = 1;
    while (!tf_done) begin @(posedge clk); #1; cycles++; end
    check("twofish latency", 128'(cycles), 128'(19));
    check("twofish result", tf_data_out, exp);
    if (enc) n_tf_enc++; else n_tf_dec++;
  endtask

  initial begin
    rst = 1'b1;
    des_function_select = 1; des_lddata = 0; des_data_in = '0; des_key_in = '0;
    core_cen = 1; core_start = 0; core_ed = 1; core_mode = 0; core_d = '0;
    tf_start = 0; tf_encrypt = 1; tf_key_in = '0; tf_data_in = '0;
    core_k1 = 64'h133457799bbcdff1; core_k2 = 64'h80b0c08bc7702420; core_k3 = 64'ha2eddbbd5464ecc2;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    fork
      begin
        des_op(64'h133457799bbcdff1, 64'h0123456789abcdef, 1'b1, 64'h85e813540f0ab405);
        des_op(64'h133457799bbcdff1, 64'h85e813540f0ab405, 1'b0, 64'h0123456789abcdef);
        des_op(64'hc215a82a06ec41ad, 64'h4c4f9b0687322e25, 1'b1, 64'hde43478171eb53e8);
        des_op(64'hc215a82a06ec41ad, 64'hde43478171eb53e8, 1'b0, 64'h4c4f9b0687322e25);
        des_op(64'ha49636a2fa7f0eab, 64'h174c77a2dd02de92, 1'b1, 64'hb16dcaacb0dce4ad);
        des_op(64'ha49636a2fa7f0eab, 64'hb16dcaacb0dce4ad, 1'b0, 64'h174c77a2dd02de92);
      end
      begin
        core_op(2'd0, 1'b1, 64'h55d85e8d00460d69, 64'h7966105e3a56c40f, 1'b0);
        core_op(2'd0, 1'b0, 64'h7966105e3a56c40f, 64'h55d85e8d00460d69, 1'b0);
        core_op(2'd1, 1'b1, 64'h1579da0a61b2480c, 64'h7c531df3aa121f64, 1'b0);
        core_op(2'd1, 1'b0, 64'h7c531df3aa121f64, 64'h1579da0a61b2480c, 1'b0);
        core_op(2'd2, 1'b1, 64'h4767e1fa79823eb2, 64'hc478b661918748c8, 1'b1);
        core_op(2'd2, 1'b0, 64'hc478b661918748c8, 64'h4767e1fa79823eb2, 1'b0);
      end
      begin
        tf_op(128'h00000000000000000000000000000000, 128'h00000000000000000000000000000000, 1'b1, 128'h9f589f5cf6122c32b6bfec2f2ae8c35a);
        tf_op(128'h00000000000000000000000000000000, 128'h9f589f5cf6122c32b6bfec2f2ae8c35a, 1'b0, 128'h00000000000000000000000000000000);
        tf_op(128'h00000000000000000000000000000000, 128'h9f589f5cf6122c32b6bfec2f2ae8c35a, 1'b1, 128'hd491db16e7b1c39e86cb086b789f5419);
        tf_op(128'h00000000000000000000000000000000, 128'hd491db16e7b1c39e86cb086b789f5419, 1'b0, 128'h9f589f5cf6122c32b6bfec2f2ae8c35a);
        tf_op(128'h9f589f5cf6122c32b6bfec2f2ae8c35a, 128'hd491db16e7b1c39e86cb086b789f5419, 1'b1, 128'h019f9809de1711858faac3a3ba20fbc3);
        tf_op(128'h9f589f5cf6122c32b6bfec2f2ae8c35a, 128'h019f9809de1711858faac3a3ba20fbc3, 1'b0, 128'hd491db16e7b1c39e86cb086b789f5419);
      end
    join
    // First LCD write: the wake-up nibble 3 as a command, E high for a quarter
    // step (2^18 cycles).
    check("LCD idle before first write", 128'(lcd_e), 128'(0));
    @(posedge lcd_e);
    check("LCD first write RS", 128'(lcd_rs), 128'(0));
    check("LCD first write data", 128'(lcd_d), 128'(4'h3));
    check("LCD first write RW", 128'(lcd_rw), 128'(0));
    check("LCD flash disabled", 128'(sf_ce0), 128'(1));
    check("LCD shows the DES result", 128'(u_dut.u_lcd.value), 128'(des_data_out));
    begin
      int width = 0;
      while (lcd_e) begin @(posedge clk); #1; width++; end
      check("LCD E pulse width", 128'(width), 128'(1 << 18));
    end
    n_lcd++;
    check("DES encrypt happened", 128'(n_des_enc > 0), 128'(1));
    check("DES decrypt happened", 128'(n_des_dec > 0), 128'(1));
    check("DES load while busy happened", 128'(n_des_ignored > 0), 128'(1));
    check("single DES happened", 128'(n_single > 0), 128'(1));
    check("double DES happened", 128'(n_double > 0), 128'(1));
    check("triple DES happened", 128'(n_triple > 0), 128'(1));
    check("CEN stall happened", 128'(n_stall > 0), 128'(1));
    check("Twofish encrypt happened", 128'(n_tf_enc > 0), 128'(1));
    check("Twofish decrypt happened", 128'(n_tf_dec > 0), 128'(1));
    check("LCD write happened", 128'(n_lcd > 0), 128'(1));
    $display("mechanisms: des_enc=%0d des_dec=%0d des_ignored_load=%0d single=%0d double=%0d triple=%0d cen_stall=%0d tf_enc=%0d tf_dec=%0d lcd_write=%0d",
             n_des_enc, n_des_dec, n_des_ignored, n_single, n_double, n_triple, n_stall, n_tf_enc, n_tf_dec, n_lcd);
    finish();
  end
endmodule
