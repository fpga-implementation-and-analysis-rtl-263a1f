// tb_twofish_whit_keysched: checks the whitening keys K0..K7 of several keys.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_whit_keysched;
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

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    finish();
  end

  logic [3:0][31:0] m;
  logic [7:0][31:0] k;
  twofish_whit_keysched u_dut (.m(m), .k(k));
  initial begin
    m = {32'h00000000, 32'h00000000, 32'h00000000, 32'h00000000}; #1;
    check("K0", 128'(k[0]), 128'(32'h52c54dde));
    check("K1", 128'(k[1]), 128'(32'h11f0626d));
    check("K2", 128'(k[2]), 128'(32'h7cac9d4a));
    check("K3", 128'(k[3]), 128'(32'h4d1b4aaa));
    check("K4", 128'(k[4]), 128'(32'hb7b83a10));
    check("K5", 128'(k[5]), 128'(32'h1e7d0beb));
    check("K6", 128'(k[6]), 128'(32'hee9c341f));
    check("K7", 128'(k[7]), 128'(32'hcfe14be4));
    m = {32'h452dac80, 32'h724a34c2, 32'h874ea04f, 32'hee332e0c}; #1;
    check("K0", 128'(k[0]), 128'(32'h01661ca0));
    check("K1", 128'(k[1]), 128'(32'h3281f9ae));
    check("K2", 128'(k[2]), 128'(32'h8277dfcc));
    check("K3", 128'(k[3]), 128'(32'hfcfeb196));
    check("K4", 128'(k[4]), 128'(32'h622eb0d3));
    check("K5", 128'(k[5]), 128'(32'h09adc979));
    check("K6", 128'(k[6]), 128'(32'h7ea3a885));
    check("K7", 128'(k[7]), 128'(32'h3b7d098d));
    m = {32'h3e798330, 32'hfa8d81bb, 32'h04030940, 32'hfe04cd58}; #1;
    check("K0", 128'(k[0]), 128'(32'he86418fe));
    check("K1", 128'(k[1]), 128'(32'h48b4cab7));
    check("K2", 128'(k[2]), 128'(32'h06fbdb50));
    check("K3", 128'(k[3]), 128'(32'h4ef754af));
    check("K4", 128'(k[4]), 128'(32'h0658a3e2));
    check("K5", 128'(k[5]), 128'(32'had9e95a3));
    check("K6", 128'(k[6]), 128'(32'h10c1d5df));
    check("K7", 128'(k[7]), 128'(32'hf8072d74));
    m = {32'h4e81f864, 32'he3d58b7e, 32'ha86ea6d1, 32'ha81b72ef}; #1;
    check("K0", 128'(k[0]), 128'(32'hcc8e5578));
    check("K1", 128'(k[1]), 128'(32'h46945bc7));
    check("K2", 128'(k[2]), 128'(32'hcabba152));
    check("K3", 128'(k[3]), 128'(32'h8f5a3d6e));
    check("K4", 128'(k[4]), 128'(32'hbd5e5018));
    check("K5", 128'(k[5]), 128'(32'h0954e5aa));
    check("K6", 128'(k[6]), 128'(32'h1b2ffff6));
    check("K7", 128'(k[7]), 128'(32'h37a0c88a));
    finish();
  end
endmodule
