// tb_des_datapath: runs the DES data path for whole blocks, feeding the sub-keys from the testbench in encryption and decryption order, and checks the output register.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_des_datapath;
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish();
  end

  logic rst, load, step, last;
  logic [63:0] data_in, data_out;
  logic [47:0] subkey;
  logic [31:0] l_q, r_q;
  des_datapath u_dut (.clk(clk), .rst(rst), .ce(1'b1), .load(load), .step(step), .last(last),
    .data_in(data_in), .subkey(subkey), .data_out(data_out), .l_q(l_q), .r_q(r_q));
  logic [47:0] sk [16];

  task automatic run(logic [63:0] blk, bit enc);
    data_in = blk; load = 1'b1; step = 1'b0; last = 1'b0;
    @(posedge clk); #1 load = 1'b0;
    for (int n = 0; n < 16; n++) begin
      subkey = enc ? sk[n] : sk[15-n]; step = 1'b1; last = (n == 15);
      @(posedge clk); #1;
    end
    step = 1'b0; last = 1'b0;
  endtask

  initial begin
    sk[0] = 48'h1b02effc7072;
    sk[1] = 48'h79aed9dbc9e5;
    sk[2] = 48'h55fc8a42cf99;
    sk[3] = 48'h72add6db351d;
    sk[4] = 48'h7cec07eb53a8;
    sk[5] = 48'h63a53e507b2f;
    sk[6] = 48'hec84b7f618bc;
    sk[7] = 48'hf78a3ac13bfb;
    sk[8] = 48'he0dbebede781;
    sk[9] = 48'hb1f347ba464f;
    sk[10] = 48'h215fd3ded386;
    sk[11] = 48'h7571f59467e9;
    sk[12] = 48'h97c5d1faba41;
    sk[13] = 48'h5f43b7f2e73a;
    sk[14] = 48'hbf918d3d3f0a;
    sk[15] = 48'hcb3d8b0e17f5;
    rst = 1'b1; load = 0; step = 0; last = 0; data_in = '0; subkey = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    data_in = 64'h0123456789ABCDEF; load = 1'b1;
    @(posedge clk); #1 load = 1'b0;
    check("L0 after IP", 128'(l_q), 128'(32'hCC00CCFF));
    check("R0 after IP", 128'(r_q), 128'(32'hF0AAF0AA));
    run(64'h0123456789ABCDEF, 1'b1);
    check("L16", 128'(l_q), 128'(32'h43423234));
    check("R16", 128'(r_q), 128'(32'h0A4CD995));
    check("cipher", 128'(data_out), 128'(64'h85E813540F0AB405));
    run(64'h85E813540F0AB405, 1'b0);
    check("decipher", 128'(data_out), 128'(64'h0123456789ABCDEF));
    run(64'h5c9bcf35873be078, 1'b1); check("random cipher", 128'(data_out), 128'(64'he48067bc8672a9a8));
    run(64'hb0a844e52587be6b, 1'b1); check("random cipher", 128'(data_out), 128'(64'h63fabfd6f471c190));
    run(64'hea0575438b0d590b, 1'b1); check("random cipher", 128'(data_out), 128'(64'h85195ce6a630886e));
    finish();
  end
endmodule
