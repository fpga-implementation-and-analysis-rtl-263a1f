// tb_twofish_h: checks the h-function (key-dependent S-boxes and MDS) for random inputs and key words.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_h;
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

  logic [31:0] x, s_first, s_second, z;
  twofish_h u_dut (.x(x), .s_first(s_first), .s_second(s_second), .z(z));
  initial begin
    x = 32'h38703800; s_first = 32'h1a26f889; s_second = 32'h3a12917c; #1; check("h", 128'(z), 128'(32'h62c258a4));
    x = 32'h78572976; s_first = 32'h325b55dd; s_second = 32'h5675f6ad; #1; check("h", 128'(z), 128'(32'h892c71e3));
    x = 32'h3451d013; s_first = 32'h7b8f2ab5; s_second = 32'h9fc2d0a1; #1; check("h", 128'(z), 128'(32'h10525911));
    x = 32'hfc394724; s_first = 32'he67a9b75; s_second = 32'h9c3a23cd; #1; check("h", 128'(z), 128'(32'h86455a7e));
    x = 32'hd726c86b; s_first = 32'h007d1034; s_second = 32'h7abec539; #1; check("h", 128'(z), 128'(32'hd71e56ba));
    x = 32'he8c14743; s_first = 32'ha72991b9; s_second = 32'h5810d60e; #1; check("h", 128'(z), 128'(32'hb5fb5e90));
    x = 32'hccb573d9; s_first = 32'ha4a45eff; s_second = 32'h15b40aeb; #1; check("h", 128'(z), 128'(32'hce5298a1));
    x = 32'hd5ab8b4d; s_first = 32'ha91c2439; s_second = 32'h1eb20109; #1; check("h", 128'(z), 128'(32'h932f6f1e));
    x = 32'he8e72789; s_first = 32'h63771407; s_second = 32'hc8450070; #1; check("h", 128'(z), 128'(32'h68517fd5));
    x = 32'hb6246771; s_first = 32'hc0093492; s_second = 32'h330698a1; #1; check("h", 128'(z), 128'(32'h242928d3));
    x = 32'h7a605a91; s_first = 32'he39639be; s_second = 32'h2db3997f; #1; check("h", 128'(z), 128'(32'h4629b176));
    x = 32'h6f15b6ad; s_first = 32'hca04c79f; s_second = 32'ha2c68e45; #1; check("h", 128'(z), 128'(32'h138cbe6b));
    x = 32'h551fd8f9; s_first = 32'h16353d03; s_second = 32'hcd02c5e1; #1; check("h", 128'(z), 128'(32'h697baa41));
    x = 32'hf237e45a; s_first = 32'hf8be8831; s_second = 32'hb8c9817a; #1; check("h", 128'(z), 128'(32'h81771bca));
    x = 32'h6555abfe; s_first = 32'h7691b06f; s_second = 32'h66c1494e; #1; check("h", 128'(z), 128'(32'h9d16b8fe));
    x = 32'hbe4c5ce6; s_first = 32'hf26149ed; s_second = 32'h15bd448f; #1; check("h", 128'(z), 128'(32'h120bcbcc));
    finish();
  end
endmodule
