// tb_twofish_s_keys: checks the S-box key words S0, S1 of several 128-bit keys.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_s_keys;
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
  logic [31:0] s0, s1;
  twofish_s_keys u_dut (.m(m), .s0(s0), .s1(s1));
  initial begin
    m = {32'h00000000, 32'h00000000, 32'h00000000, 32'h00000000}; #1; check("S0", 128'(s0), 128'(32'h00000000)); check("S1", 128'(s1), 128'(32'h00000000));
    m = {32'h452dac80, 32'h724a34c2, 32'h874ea04f, 32'hee332e0c}; #1; check("S0", 128'(s0), 128'(32'h44b7f059)); check("S1", 128'(s1), 128'(32'h19610a0a));
    m = {32'h3e798330, 32'hfa8d81bb, 32'h04030940, 32'hfe04cd58}; #1; check("S0", 128'(s0), 128'(32'h3e03f8e8)); check("S1", 128'(s1), 128'(32'h04b69430));
    m = {32'h4e81f864, 32'he3d58b7e, 32'ha86ea6d1, 32'ha81b72ef}; #1; check("S0", 128'(s0), 128'(32'hb16bbf5c)); check("S1", 128'(s1), 128'(32'h26220eba));
    finish();
  end
endmodule
