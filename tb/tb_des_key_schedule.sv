// tb_des_key_schedule: loads the worked-example key 133457799BBCDFF1 and a random key and reads K1..K16 through the 16:1 sub-key multiplexer.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_des_key_schedule;
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish();
  end

  logic rst, load, key_ready;
  logic [63:0] key;
  logic [3:0] sel;
  logic [47:0] subkey;
  des_key_schedule u_dut (.clk(clk), .rst(rst), .load(load), .key(key), .sel(sel), .subkey(subkey), .key_ready(key_ready));
  logic [47:0] exp_k [2][16];
  logic [63:0] keys [2];
  initial begin
    keys[0] = 64'h133457799bbcdff1;
    exp_k[0][0] = 48'h1b02effc7072;
    exp_k[0][1] = 48'h79aed9dbc9e5;
    exp_k[0][2] = 48'h55fc8a42cf99;
    exp_k[0][3] = 48'h72add6db351d;
    exp_k[0][4] = 48'h7cec07eb53a8;
    exp_k[0][5] = 48'h63a53e507b2f;
    exp_k[0][6] = 48'hec84b7f618bc;
    exp_k[0][7] = 48'hf78a3ac13bfb;
    exp_k[0][8] = 48'he0dbebede781;
    exp_k[0][9] = 48'hb1f347ba464f;
    exp_k[0][10] = 48'h215fd3ded386;
    exp_k[0][11] = 48'h7571f59467e9;
    exp_k[0][12] = 48'h97c5d1faba41;
    exp_k[0][13] = 48'h5f43b7f2e73a;
    exp_k[0][14] = 48'hbf918d3d3f0a;
    exp_k[0][15] = 48'hcb3d8b0e17f5;
    keys[1] = 64'hf3b7a50df373ca53;
    exp_k[1][0] = 48'h3efcd8a75192;
    exp_k[1][1] = 48'hc579d58f2bc2;
    exp_k[1][2] = 48'h17eff574c351;
    exp_k[1][3] = 48'hdf75a353844e;
    exp_k[1][4] = 48'hfb87edccb588;
    exp_k[1][5] = 48'hd9d28f28766d;
    exp_k[1][6] = 48'h319bfe7ad8a2;
    exp_k[1][7] = 48'hb478e7844d3b;
    exp_k[1][8] = 48'h5cbf56a55d90;
    exp_k[1][9] = 48'h66fc5fc90273;
    exp_k[1][10] = 48'h6fe566d7ca0c;
    exp_k[1][11] = 48'heacdbb1017dc;
    exp_k[1][12] = 48'hfda33b99b0a5;
    exp_k[1][13] = 48'ha79e9b626ea1;
    exp_k[1][14] = 48'h7f3ad63a291f;
    exp_k[1][15] = 48'h315f7da60537;
    rst = 1'b1; load = 1'b0; key = '0; sel = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check("key_ready after reset", 128'(key_ready), 128'(0));
    for (int j = 0; j < 2; j++) begin
      key = keys[j]; load = 1'b1;
      @(posedge clk); #1 load = 1'b0; key = ~keys[j];
      check("key_ready", 128'(key_ready), 128'(1));
      for (int n = 0; n < 16; n++) begin
        sel = 4'(n); #1;
        check($sformatf("K%0d key %0d", n + 1, j), 128'(subkey), 128'(exp_k[j][n]));
      end
    end
    finish();
  end
endmodule
