// tb_des_round: checks one DES Feistel round: the worked example round 1 (f = 234AA9BB, R1 = EF4A6544) and random rounds.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_des_round;
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

  logic [31:0] l_in, r_in, l_out, r_out, f_out;
  logic [47:0] k;
  des_round u_dut (.l_in(l_in), .r_in(r_in), .k(k), .l_out(l_out), .r_out(r_out), .f_out(f_out));
  initial begin
    l_in = 32'hCC00CCFF; r_in = 32'hF0AAF0AA; k = 48'h1B02EFFC7072; #1;
    check("f worked example", 128'(f_out), 128'(32'h234AA9BB));
    check("R1 worked example", 128'(r_out), 128'(32'hEF4A6544));
    check("L1 worked example", 128'(l_out), 128'(32'hF0AAF0AA));
    l_in = 32'h9e1a8ef4; r_in = 32'ha7abe1c2; k = 48'hbd62ad1b72db; #1;
    check("R'", 128'(r_out), 128'(32'hfc49874c)); check("L'", 128'(l_out), 128'(32'ha7abe1c2));
    l_in = 32'h0dd27a65; r_in = 32'h74e69a5d; k = 48'hdef8e647cb8f; #1;
    check("R'", 128'(r_out), 128'(32'hd64f5376)); check("L'", 128'(l_out), 128'(32'h74e69a5d));
    l_in = 32'hc7ac1491; r_in = 32'hf3aed0b6; k = 48'hae3adfe01893; #1;
    check("R'", 128'(r_out), 128'(32'h5fb42353)); check("L'", 128'(l_out), 128'(32'hf3aed0b6));
    l_in = 32'hcc4169a3; r_in = 32'h8f2c6ec8; k = 48'h65e76472f1a3; #1;
    check("R'", 128'(r_out), 128'(32'ha85e2fd3)); check("L'", 128'(l_out), 128'(32'h8f2c6ec8));
    l_in = 32'h66237a04; r_in = 32'h64e50cad; k = 48'h7b451a81682c; #1;
    check("R'", 128'(r_out), 128'(32'hafaed2b8)); check("L'", 128'(l_out), 128'(32'h64e50cad));
    l_in = 32'ha260cd0b; r_in = 32'h66836886; k = 48'h30cb0fef7928; #1;
    check("R'", 128'(r_out), 128'(32'hc3b53aa7)); check("L'", 128'(l_out), 128'(32'h66836886));
    l_in = 32'h113db17d; r_in = 32'hfc132d0d; k = 48'h70cc3571810a; #1;
    check("R'", 128'(r_out), 128'(32'h9ee501cc)); check("L'", 128'(l_out), 128'(32'hfc132d0d));
    l_in = 32'h298cb3a5; r_in = 32'h1c2442f9; k = 48'h99c9570dc195; #1;
    check("R'", 128'(r_out), 128'(32'hcd8a7d57)); check("L'", 128'(l_out), 128'(32'h1c2442f9));
    l_in = 32'h0d75985d; r_in = 32'h1a358ca0; k = 48'h9118000f49c8; #1;
    check("R'", 128'(r_out), 128'(32'hfa4fbb75)); check("L'", 128'(l_out), 128'(32'h1a358ca0));
    l_in = 32'h26b94c7f; r_in = 32'h895fd7b3; k = 48'hf2ee19f9919c; #1;
    check("R'", 128'(r_out), 128'(32'h761dc15c)); check("L'", 128'(l_out), 128'(32'h895fd7b3));
    l_in = 32'h5d158a2f; r_in = 32'h9d1de2a0; k = 48'h1200068739fa; #1;
    check("R'", 128'(r_out), 128'(32'h4ee58109)); check("L'", 128'(l_out), 128'(32'h9d1de2a0));
    l_in = 32'hdfd43f37; r_in = 32'h353c631c; k = 48'h60509d33a01c; #1;
    check("R'", 128'(r_out), 128'(32'h89f59894)); check("L'", 128'(l_out), 128'(32'h353c631c));
    l_in = 32'h2607679d; r_in = 32'ha268aa87; k = 48'hf4994093f6de; #1;
    check("R'", 128'(r_out), 128'(32'h3c8bf43c)); check("L'", 128'(l_out), 128'(32'ha268aa87));
    l_in = 32'h58ee8571; r_in = 32'h9a2ef80f; k = 48'h79615d39d0a8; #1;
    check("R'", 128'(r_out), 128'(32'ha882b46f)); check("L'", 128'(l_out), 128'(32'h9a2ef80f));
    l_in = 32'h1f7296ab; r_in = 32'h1d87cec3; k = 48'h7cf2d953ee26; #1;
    check("R'", 128'(r_out), 128'(32'h99592e19)); check("L'", 128'(l_out), 128'(32'h1d87cec3));
    l_in = 32'hfe3bfada; r_in = 32'hfa529ba3; k = 48'h7afb774b15d7; #1;
    check("R'", 128'(r_out), 128'(32'he5d51c51)); check("L'", 128'(l_out), 128'(32'hfa529ba3));
    l_in = 32'h7bdc968b; r_in = 32'h4fd58dbe; k = 48'h24e415fc899e; #1;
    check("R'", 128'(r_out), 128'(32'h7743291e)); check("L'", 128'(l_out), 128'(32'h4fd58dbe));
    l_in = 32'h1a28f7b3; r_in = 32'hbfeaa155; k = 48'hbd8757b6fb7e; #1;
    check("R'", 128'(r_out), 128'(32'h8d1b0259)); check("L'", 128'(l_out), 128'(32'hbfeaa155));
    l_in = 32'h43c71b9a; r_in = 32'h7a86f7a2; k = 48'hb12ad42fddbb; #1;
    check("R'", 128'(r_out), 128'(32'hfc40f713)); check("L'", 128'(l_out), 128'(32'h7a86f7a2));
    l_in = 32'h29540a6e; r_in = 32'h842e7fc2; k = 48'h348805e999f3; #1;
    check("R'", 128'(r_out), 128'(32'he54d6554)); check("L'", 128'(l_out), 128'(32'h842e7fc2));
    finish();
  end
endmodule
