// tb_des_expansion: checks the DES E expansion against the worked example E(R0) and random words.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_des_expansion;
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

  logic [31:0] r;
  logic [47:0] e;
  des_expansion u_dut (.r(r), .e(e));
  initial begin
    r = 32'hf0aaf0aa; #1; check("E", 128'(e), 128'(48'h7a15557a1555));
    r = 32'h98289fcd; #1; check("E", 128'(e), 128'(48'hcf01514ffe5b));
    r = 32'h7f26144b; #1; check("E", 128'(e), 128'(48'hbfe90c0a8256));
    r = 32'h9474031b; #1; check("E", 128'(e), 128'(48'hca83a80068f7));
    r = 32'hcc011cdd; #1; check("E", 128'(e), 128'(48'he580028f96fb));
    r = 32'h74c9df6a; #1; check("E", 128'(e), 128'(48'h3a9653efeb54));
    r = 32'h119a72d1; #1; check("E", 128'(e), 128'(48'h8a3cf43a56a2));
    r = 32'hd70820fe; #1; check("E", 128'(e), 128'(48'h6ae8501017fd));
    r = 32'h17f5e837; #1; check("E", 128'(e), 128'(48'h8affabf501ae));
    r = 32'hf1d69ed6; #1; check("E", 128'(e), 128'(48'h7a3ead4fd6ad));
    r = 32'h451abd81; #1; check("E", 128'(e), 128'(48'ha0a8f55fbc02));
    r = 32'h795e8229; #1; check("E", 128'(e), 128'(48'hbf2afd404152));
    r = 32'hb2715945; #1; check("E", 128'(e), 128'(48'hda43a2af2a0b));
    r = 32'haa05e11a; #1; check("E", 128'(e), 128'(48'h55400bf028f5));
    r = 32'h10a3d6b2; #1; check("E", 128'(e), 128'(48'h0a1507ead5a4));
    r = 32'h0f88080b; #1; check("E", 128'(e), 128'(48'h85fc50050056));
    r = 32'hbb2d420f; #1; check("E", 128'(e), 128'(48'hdf695aa0405f));
    r = 32'hb394fb36; #1; check("E", 128'(e), 128'(48'h5a7ca97f69ad));
    r = 32'h4f426dcb; #1; check("E", 128'(e), 128'(48'ha5ea0435be56));
    r = 32'ha5aa3c81; #1; check("E", 128'(e), 128'(48'hd0bd541f9403));
    r = 32'h93f448b3; #1; check("E", 128'(e), 128'(48'hca7fa82515a7));
    r = 32'h00000001; #1; check("E", 128'(e), 128'(48'h800000000002));
    r = 32'h00000002; #1; check("E", 128'(e), 128'(48'h000000000004));
    r = 32'h00000004; #1; check("E", 128'(e), 128'(48'h000000000008));
    r = 32'h00000008; #1; check("E", 128'(e), 128'(48'h000000000050));
    r = 32'h00000010; #1; check("E", 128'(e), 128'(48'h0000000000a0));
    r = 32'h00000020; #1; check("E", 128'(e), 128'(48'h000000000100));
    r = 32'h00000040; #1; check("E", 128'(e), 128'(48'h000000000200));
    r = 32'h00000080; #1; check("E", 128'(e), 128'(48'h000000001400));
    r = 32'h00000100; #1; check("E", 128'(e), 128'(48'h000000002800));
    r = 32'h00000200; #1; check("E", 128'(e), 128'(48'h000000004000));
    r = 32'h00000400; #1; check("E", 128'(e), 128'(48'h000000008000));
    r = 32'h00000800; #1; check("E", 128'(e), 128'(48'h000000050000));
    r = 32'h00001000; #1; check("E", 128'(e), 128'(48'h0000000a0000));
    r = 32'h00002000; #1; check("E", 128'(e), 128'(48'h000000100000));
    r = 32'h00004000; #1; check("E", 128'(e), 128'(48'h000000200000));
    r = 32'h00008000; #1; check("E", 128'(e), 128'(48'h000001400000));
    r = 32'h00010000; #1; check("E", 128'(e), 128'(48'h000002800000));
    r = 32'h00020000; #1; check("E", 128'(e), 128'(48'h000004000000));
    r = 32'h00040000; #1; check("E", 128'(e), 128'(48'h000008000000));
    r = 32'h00080000; #1; check("E", 128'(e), 128'(48'h000050000000));
    r = 32'h00100000; #1; check("E", 128'(e), 128'(48'h0000a0000000));
    r = 32'h00200000; #1; check("E", 128'(e), 128'(48'h000100000000));
    r = 32'h00400000; #1; check("E", 128'(e), 128'(48'h000200000000));
    r = 32'h00800000; #1; check("E", 128'(e), 128'(48'h001400000000));
    r = 32'h01000000; #1; check("E", 128'(e), 128'(48'h002800000000));
    r = 32'h02000000; #1; check("E", 128'(e), 128'(48'h004000000000));
    r = 32'h04000000; #1; check("E", 128'(e), 128'(48'h008000000000));
    r = 32'h08000000; #1; check("E", 128'(e), 128'(48'h050000000000));
    r = 32'h10000000; #1; check("E", 128'(e), 128'(48'h0a0000000000));
    r = 32'h20000000; #1; check("E", 128'(e), 128'(48'h100000000000));
    r = 32'h40000000; #1; check("E", 128'(e), 128'(48'h200000000000));
    r = 32'h80000000; #1; check("E", 128'(e), 128'(48'h400000000001));
    finish();
  end
endmodule
