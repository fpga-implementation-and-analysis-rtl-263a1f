// tb_twofish_f: checks the F function for random round inputs, S-box key words and sub-keys.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_f;
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

  logic [31:0] r0, r1, s_first, s_second, k_even, k_odd, f0, f1;
  twofish_f u_dut (.r0(r0), .r1(r1), .s_first(s_first), .s_second(s_second), .k_even(k_even), .k_odd(k_odd), .f0(f0), .f1(f1));
  initial begin
    r0 = 32'h2188287e; r1 = 32'h057a40b2; s_first = 32'h03a56cc1; s_second = 32'hcca2a92b; k_even = 32'hf88c422b; k_odd = 32'hb9f3635c; #1;
    check("f0", 128'(f0), 128'(32'h0c1a5dc2)); check("f1", 128'(f1), 128'(32'h9b15596d));
    r0 = 32'ha6511445; r1 = 32'h1a4f44f9; s_first = 32'h86ce03f9; s_second = 32'hbfdefc15; k_even = 32'hef02090b; k_odd = 32'h23a5ef88; #1;
    check("f0", 128'(f0), 128'(32'hb3bb6607)); check("f1", 128'(f1), 128'(32'h5adc0dfe));
    r0 = 32'h6f0e2289; r1 = 32'hfc8e80b3; s_first = 32'hdf2a8b79; s_second = 32'h31dec4f4; k_even = 32'hd37ee915; k_odd = 32'hdfb85c0d; #1;
    check("f0", 128'(f0), 128'(32'h9826446e)); check("f1", 128'(f1), 128'(32'h4ba8cd51));
    r0 = 32'h3606defc; r1 = 32'h072a98d2; s_first = 32'h40783f0a; s_second = 32'h3678bc8d; k_even = 32'h4affdcd1; k_odd = 32'h804c25d6; #1;
    check("f0", 128'(f0), 128'(32'hedd807f5)); check("f1", 128'(f1), 128'(32'hb679a89b));
    r0 = 32'h3d93fd4c; r1 = 32'hc38084a0; s_first = 32'h9620bf0d; s_second = 32'h53740902; k_even = 32'h4265bb31; k_odd = 32'h8b5ab3ee; #1;
    check("f0", 128'(f0), 128'(32'h2fddb9ee)); check("f1", 128'(f1), 128'(32'hfeaba750));
    r0 = 32'h6b446806; r1 = 32'hd58dcdb4; s_first = 32'h218e0b7b; s_second = 32'h0f977044; k_even = 32'he8f6e0bd; k_odd = 32'hbd6b881a; #1;
    check("f0", 128'(f0), 128'(32'hd0143748)); check("f1", 128'(f1), 128'(32'h00a88af5));
    r0 = 32'h5a9196f0; r1 = 32'he5cfedfa; s_first = 32'h754a09cd; s_second = 32'ha997f351; k_even = 32'h9556585e; k_odd = 32'hd0a6ec17; #1;
    check("f0", 128'(f0), 128'(32'ha5e5605f)); check("f1", 128'(f1), 128'(32'hfde08fbe));
    r0 = 32'he77ffe48; r1 = 32'h844a7034; s_first = 32'h6bae4b5b; s_second = 32'hd3bf6d01; k_even = 32'heaefc4d2; k_odd = 32'he0cfab4c; #1;
    check("f0", 128'(f0), 128'(32'h55f7cf83)); check("f1", 128'(f1), 128'(32'hedeae4b8));
    r0 = 32'h806c10b5; r1 = 32'h2179b37d; s_first = 32'h8825ae56; s_second = 32'h26debfdb; k_even = 32'h86048719; k_odd = 32'h82b33599; #1;
    check("f0", 128'(f0), 128'(32'h2d067146)); check("f1", 128'(f1), 128'(32'h03dc826a));
    r0 = 32'h04c9d78d; r1 = 32'hdf703017; s_first = 32'h70ac06ac; s_second = 32'hc6c91b92; k_even = 32'h2ee0289d; k_odd = 32'h9bca3cb7; #1;
    check("f0", 128'(f0), 128'(32'haeb56790)); check("f1", 128'(f1), 128'(32'hc8644333));
    r0 = 32'h0101b811; r1 = 32'hc6aa7d55; s_first = 32'hcc966f46; s_second = 32'h265974a7; k_even = 32'h2c1eea1f; k_odd = 32'h243d3570; #1;
    check("f0", 128'(f0), 128'(32'h659828a2)); check("f1", 128'(f1), 128'(32'h843183e5));
    r0 = 32'h7936d536; r1 = 32'h9e7d6b37; s_first = 32'hb9a6442e; s_second = 32'h1ece615d; k_even = 32'h8e752fdf; k_odd = 32'h0fcf31ca; #1;
    check("f0", 128'(f0), 128'(32'h25cd52b4)); check("f1", 128'(f1), 128'(32'ha1296525));
    finish();
  end
endmodule
