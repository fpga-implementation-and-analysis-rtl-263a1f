// tb_twofish_mds: checks the MDS matrix product for unit bytes (each gives one matrix column) and random words.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_mds;
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

  logic [31:0] y, z;
  twofish_mds u_dut (.y(y), .z(z));
  initial begin
    y = 32'h00000001; #1; check("mds", 128'(z), 128'(32'hefef5b01));
    y = 32'h00000100; #1; check("mds", 128'(z), 128'(32'h015befef));
    y = 32'h00010000; #1; check("mds", 128'(z), 128'(32'hef01ef5b));
    y = 32'h01000000; #1; check("mds", 128'(z), 128'(32'h5bef015b));
    y = 32'hf4de2c08; #1; check("mds", 128'(z), 128'(32'hd944fdad));
    y = 32'h5822cb77; #1; check("mds", 128'(z), 128'(32'h015c9561));
    y = 32'h727d8349; #1; check("mds", 128'(z), 128'(32'h7a427913));
    y = 32'hcefe2a1f; #1; check("mds", 128'(z), 128'(32'h2409b3a2));
    y = 32'hefe09f07; #1; check("mds", 128'(z), 128'(32'h52100248));
    y = 32'hb91ee9e5; #1; check("mds", 128'(z), 128'(32'hc6f2d4cc));
    y = 32'hfcf00fec; #1; check("mds", 128'(z), 128'(32'hd90eceb2));
    y = 32'h597a1ecf; #1; check("mds", 128'(z), 128'(32'h279b04a8));
    y = 32'hf47aebdd; #1; check("mds", 128'(z), 128'(32'ha59c573a));
    y = 32'hf979d04a; #1; check("mds", 128'(z), 128'(32'h31012c66));
    y = 32'h5d58c705; #1; check("mds", 128'(z), 128'(32'h5d22ae94));
    y = 32'h149e259b; #1; check("mds", 128'(z), 128'(32'hdc59d557));
    finish();
  end
endmodule
