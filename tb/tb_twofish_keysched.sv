// tb_twofish_keysched: checks the expanded key pairs K_2i, K_2i+1 for all indices 0..19 of two keys.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_keysched;
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
  logic [4:0] idx;
  logic [31:0] k_even, k_odd;
  twofish_keysched u_dut (.m(m), .idx(idx), .k_even(k_even), .k_odd(k_odd));
  initial begin
    m = {32'h00000000, 32'h00000000, 32'h00000000, 32'h00000000};
    idx = 5'd0; #1; check("K0", 128'(k_even), 128'(32'h52c54dde)); check("K1", 128'(k_odd), 128'(32'h11f0626d));
    idx = 5'd1; #1; check("K2", 128'(k_even), 128'(32'h7cac9d4a)); check("K3", 128'(k_odd), 128'(32'h4d1b4aaa));
    idx = 5'd2; #1; check("K4", 128'(k_even), 128'(32'hb7b83a10)); check("K5", 128'(k_odd), 128'(32'h1e7d0beb));
    idx = 5'd3; #1; check("K6", 128'(k_even), 128'(32'hee9c341f)); check("K7", 128'(k_odd), 128'(32'hcfe14be4));
    idx = 5'd4; #1; check("K8", 128'(k_even), 128'(32'hf98ffef9)); check("K9", 128'(k_odd), 128'(32'h9c5b3c17));
    idx = 5'd5; #1; check("K10", 128'(k_even), 128'(32'h15a48310)); check("K11", 128'(k_odd), 128'(32'h342a4d81));
    idx = 5'd6; #1; check("K12", 128'(k_even), 128'(32'h424d89fe)); check("K13", 128'(k_odd), 128'(32'hc14724a7));
    idx = 5'd7; #1; check("K14", 128'(k_even), 128'(32'h311b834c)); check("K15", 128'(k_odd), 128'(32'hfde87320));
    idx = 5'd8; #1; check("K16", 128'(k_even), 128'(32'h3302778f)); check("K17", 128'(k_odd), 128'(32'h26cd67b4));
    idx = 5'd9; #1; check("K18", 128'(k_even), 128'(32'h7a6c6362)); check("K19", 128'(k_odd), 128'(32'hc2baf60e));
    idx = 5'd10; #1; check("K20", 128'(k_even), 128'(32'h3411b994)); check("K21", 128'(k_odd), 128'(32'hd972c87f));
    idx = 5'd11; #1; check("K22", 128'(k_even), 128'(32'h84adb1ea)); check("K23", 128'(k_odd), 128'(32'ha7dee434));
    idx = 5'd12; #1; check("K24", 128'(k_even), 128'(32'h54d2960f)); check("K25", 128'(k_odd), 128'(32'ha2f7caa8));
    idx = 5'd13; #1; check("K26", 128'(k_even), 128'(32'ha6b8ff8c)); check("K27", 128'(k_odd), 128'(32'h8014c425));
    idx = 5'd14; #1; check("K28", 128'(k_even), 128'(32'h6a748d1c)); check("K29", 128'(k_odd), 128'(32'hedbaf720));
    idx = 5'd15; #1; check("K30", 128'(k_even), 128'(32'h928ef78c)); check("K31", 128'(k_odd), 128'(32'h0338ee13));
    idx = 5'd16; #1; check("K32", 128'(k_even), 128'(32'h9949d6be)); check("K33", 128'(k_odd), 128'(32'hc8314176));
    idx = 5'd17; #1; check("K34", 128'(k_even), 128'(32'h07c07d68)); check("K35", 128'(k_odd), 128'(32'hecae7ea7));
    idx = 5'd18; #1; check("K36", 128'(k_even), 128'(32'h1fe71844)); check("K37", 128'(k_odd), 128'(32'h85c05c89));
    idx = 5'd19; #1; check("K38", 128'(k_even), 128'(32'hf298311e)); check("K39", 128'(k_odd), 128'(32'h696ea672));
    m = {32'h452dac80, 32'h724a34c2, 32'h874ea04f, 32'hee332e0c};
    idx = 5'd0; #1; check("K0", 128'(k_even), 128'(32'h01661ca0)); check("K1", 128'(k_odd), 128'(32'h3281f9ae));
    idx = 5'd1; #1; check("K2", 128'(k_even), 128'(32'h8277dfcc)); check("K3", 128'(k_odd), 128'(32'hfcfeb196));
    idx = 5'd2; #1; check("K4", 128'(k_even), 128'(32'h622eb0d3)); check("K5", 128'(k_odd), 128'(32'h09adc979));
    idx = 5'd3; #1; check("K6", 128'(k_even), 128'(32'h7ea3a885)); check("K7", 128'(k_odd), 128'(32'h3b7d098d));
    idx = 5'd4; #1; check("K8", 128'(k_even), 128'(32'ha910dc21)); check("K9", 128'(k_odd), 128'(32'hbf193779));
    idx = 5'd5; #1; check("K10", 128'(k_even), 128'(32'h92592ef7)); check("K11", 128'(k_odd), 128'(32'h56332579));
    idx = 5'd6; #1; check("K12", 128'(k_even), 128'(32'hf580addf)); check("K13", 128'(k_odd), 128'(32'hb57ac7b4));
    idx = 5'd7; #1; check("K14", 128'(k_even), 128'(32'hc315d460)); check("K15", 128'(k_odd), 128'(32'h9bfe6504));
    idx = 5'd8; #1; check("K16", 128'(k_even), 128'(32'hf020f4b9)); check("K17", 128'(k_odd), 128'(32'h33a1448c));
    idx = 5'd9; #1; check("K18", 128'(k_even), 128'(32'h48c489be)); check("K19", 128'(k_odd), 128'(32'h42caba3f));
    idx = 5'd10; #1; check("K20", 128'(k_even), 128'(32'h8ad819cc)); check("K21", 128'(k_odd), 128'(32'hc982ce98));
    idx = 5'd11; #1; check("K22", 128'(k_even), 128'(32'h87347dac)); check("K23", 128'(k_odd), 128'(32'hb4a896c8));
    idx = 5'd12; #1; check("K24", 128'(k_even), 128'(32'h58b00a6f)); check("K25", 128'(k_odd), 128'(32'h3d24fd04));
    idx = 5'd13; #1; check("K26", 128'(k_even), 128'(32'he5799c89)); check("K27", 128'(k_odd), 128'(32'hedb67dd6));
    idx = 5'd14; #1; check("K28", 128'(k_even), 128'(32'h7dbea7e0)); check("K29", 128'(k_odd), 128'(32'h25d1e1a5));
    idx = 5'd15; #1; check("K30", 128'(k_even), 128'(32'hb2177125)); check("K31", 128'(k_odd), 128'(32'h823bca5d));
    idx = 5'd16; #1; check("K32", 128'(k_even), 128'(32'h209bc2d0)); check("K33", 128'(k_odd), 128'(32'h49c0dbd7));
    idx = 5'd17; #1; check("K34", 128'(k_even), 128'(32'he7a02c11)); check("K35", 128'(k_odd), 128'(32'he0dd229c));
    idx = 5'd18; #1; check("K36", 128'(k_even), 128'(32'hfe1c0382)); check("K37", 128'(k_odd), 128'(32'h472741a1));
    idx = 5'd19; #1; check("K38", 128'(k_even), 128'(32'h303407ed)); check("K39", 128'(k_odd), 128'(32'h5ff8c32d));
    finish();
  end
endmodule
