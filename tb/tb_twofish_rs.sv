// tb_twofish_rs: checks the Reed-Solomon key matrix for unit bytes (each gives one matrix column) and random key bytes.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_rs;
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

  logic [63:0] m;
  logic [31:0] s;
  twofish_rs u_dut (.m(m), .s(s));
  initial begin
    m = 64'h0000000000000001; #1; check("rs", 128'(s), 128'(32'ha402a401));
    m = 64'h0000000000000100; #1; check("rs", 128'(s), 128'(32'h55a156a4));
    m = 64'h0000000000010000; #1; check("rs", 128'(s), 128'(32'h87fc8255));
    m = 64'h0000000001000000; #1; check("rs", 128'(s), 128'(32'h5ac1f387));
    m = 64'h0000000100000000; #1; check("rs", 128'(s), 128'(32'h58471e5a));
    m = 64'h0000010000000000; #1; check("rs", 128'(s), 128'(32'hdbaec658));
    m = 64'h0001000000000000; #1; check("rs", 128'(s), 128'(32'h9e3d68db));
    m = 64'h0100000000000000; #1; check("rs", 128'(s), 128'(32'h0319e59e));
    m = 64'h6af257488d959c31; #1; check("rs", 128'(s), 128'(32'h777962a3));
    m = 64'hea59679aed3a32a8; #1; check("rs", 128'(s), 128'(32'he76c5e1c));
    m = 64'h9f27f52c449274d2; #1; check("rs", 128'(s), 128'(32'haa90f6d3));
    m = 64'h0b0f873b2114e068; #1; check("rs", 128'(s), 128'(32'h7bba70e4));
    m = 64'hb5a432cf86e3e726; #1; check("rs", 128'(s), 128'(32'he9488cbd));
    m = 64'hf02905313d0a270b; #1; check("rs", 128'(s), 128'(32'h00703483));
    m = 64'hf81e54dd1c0502c6; #1; check("rs", 128'(s), 128'(32'hef111e9d));
    m = 64'h430b91ed2954ba5c; #1; check("rs", 128'(s), 128'(32'h0bab38e9));
    finish();
  end
endmodule
