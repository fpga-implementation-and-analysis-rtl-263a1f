// tb_twofish_pht: checks the pseudo-Hadamard transform, including wrap-around modulo 2^32.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_pht;
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

  logic [31:0] a, b, a_out, b_out;
  twofish_pht u_dut (.a(a), .b(b), .a_out(a_out), .b_out(b_out));
  initial begin
    a = 32'hffffffff; b = 32'h00000001; #1; check("a'", 128'(a_out), 128'(32'h00000000)); check("b'", 128'(b_out), 128'(32'h00000001));
    a = 32'h80000000; b = 32'h80000000; #1; check("a'", 128'(a_out), 128'(32'h00000000)); check("b'", 128'(b_out), 128'(32'h80000000));
    a = 32'h7fffffff; b = 32'h7fffffff; #1; check("a'", 128'(a_out), 128'(32'hfffffffe)); check("b'", 128'(b_out), 128'(32'h7ffffffd));
    a = 32'hb98c67c2; b = 32'h28aaca51; #1; check("a'", 128'(a_out), 128'(32'he2373213)); check("b'", 128'(b_out), 128'(32'h0ae1fc64));
    a = 32'h2b855c1f; b = 32'hfe3c9c8f; #1; check("a'", 128'(a_out), 128'(32'h29c1f8ae)); check("b'", 128'(b_out), 128'(32'h27fe953d));
    a = 32'h20859634; b = 32'h070d7109; #1; check("a'", 128'(a_out), 128'(32'h2793073d)); check("b'", 128'(b_out), 128'(32'h2ea07846));
    a = 32'h26b1cffc; b = 32'h973f7986; #1; check("a'", 128'(a_out), 128'(32'hbdf14982)); check("b'", 128'(b_out), 128'(32'h5530c308));
    a = 32'he7a46309; b = 32'h77216e9e; #1; check("a'", 128'(a_out), 128'(32'h5ec5d1a7)); check("b'", 128'(b_out), 128'(32'hd5e74045));
    a = 32'hce76e9f4; b = 32'ha7e6529b; #1; check("a'", 128'(a_out), 128'(32'h765d3c8f)); check("b'", 128'(b_out), 128'(32'h1e438f2a));
    a = 32'h256badf9; b = 32'h9c9011ef; #1; check("a'", 128'(a_out), 128'(32'hc1fbbfe8)); check("b'", 128'(b_out), 128'(32'h5e8bd1d7));
    a = 32'hd39630d6; b = 32'h988af3fb; #1; check("a'", 128'(a_out), 128'(32'h6c2124d1)); check("b'", 128'(b_out), 128'(32'h04ac18cc));
    a = 32'hfaf55496; b = 32'h796f74ad; #1; check("a'", 128'(a_out), 128'(32'h7464c943)); check("b'", 128'(b_out), 128'(32'hedd43df0));
    a = 32'ha842bc19; b = 32'heffddeea; #1; check("a'", 128'(a_out), 128'(32'h98409b03)); check("b'", 128'(b_out), 128'(32'h883e79ed));
    a = 32'h59b44e92; b = 32'h27e9e06f; #1; check("a'", 128'(a_out), 128'(32'h819e2f01)); check("b'", 128'(b_out), 128'(32'ha9880f70));
    a = 32'h8c74fc1e; b = 32'h8c5c715f; #1; check("a'", 128'(a_out), 128'(32'h18d16d7d)); check("b'", 128'(b_out), 128'(32'ha52ddedc));
    finish();
  end
endmodule
