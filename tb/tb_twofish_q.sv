// tb_twofish_q: checks q0 and q1: published first entries q0(00)=A9, q1(00)=75, that each is a permutation of 0..255, and spot values.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_q;
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

  logic [7:0] x, y0, y1;
  twofish_q #(.QSEL(0)) u_q0 (.x(x), .y(y0));
  twofish_q #(.QSEL(1)) u_q1 (.x(x), .y(y1));
  initial begin
    logic [255:0] seen0, seen1;
    x = 8'h00; #1;
    check("q0(00)", 128'(y0), 128'(8'hA9));
    check("q1(00)", 128'(y1), 128'(8'h75));
    seen0 = '0; seen1 = '0;
    for (int i = 0; i < 256; i++) begin
      x = 8'(i); #1; seen0[y0] = 1'b1; seen1[y1] = 1'b1;
    end
    check("q0 permutation", 128'(&seen0), 128'(1));
    check("q1 permutation", 128'(&seen1), 128'(1));
    x = 8'hda; #1; check("q0", 128'(y0), 128'(8'h22)); check("q1", 128'(y1), 128'(8'hdf));
    x = 8'h31; #1; check("q0", 128'(y0), 128'(8'h01)); check("q1", 128'(y1), 128'(8'h84));
    x = 8'hce; #1; check("q0", 128'(y0), 128'(8'h8a)); check("q1", 128'(y1), 128'(8'h43));
    x = 8'h3d; #1; check("q0", 128'(y0), 128'(8'h0c)); check("q1", 128'(y1), 128'(8'h74));
    x = 8'hd1; #1; check("q0", 128'(y0), 128'(8'hc7)); check("q1", 128'(y1), 128'(8'h2e));
    x = 8'h66; #1; check("q0", 128'(y0), 128'(8'hbf)); check("q1", 128'(y1), 128'(8'hc3));
    x = 8'hbd; #1; check("q0", 128'(y0), 128'(8'h0e)); check("q1", 128'(y1), 128'(8'h7f));
    x = 8'hcd; #1; check("q0", 128'(y0), 128'(8'h1f)); check("q1", 128'(y1), 128'(8'h4d));
    x = 8'h3a; #1; check("q0", 128'(y0), 128'(8'ha5)); check("q1", 128'(y1), 128'(8'h4c));
    x = 8'h33; #1; check("q0", 128'(y0), 128'(8'h2e)); check("q1", 128'(y1), 128'(8'h14));
    x = 8'h84; #1; check("q0", 128'(y0), 128'(8'h06)); check("q1", 128'(y1), 128'(8'h3d));
    x = 8'h7e; #1; check("q0", 128'(y0), 128'(8'h86)); check("q1", 128'(y1), 128'(8'h7a));
    x = 8'h5b; #1; check("q0", 128'(y0), 128'(8'h56)); check("q1", 128'(y1), 128'(8'hcb));
    x = 8'hbb; #1; check("q0", 128'(y0), 128'(8'h1a)); check("q1", 128'(y1), 128'(8'h57));
    x = 8'h07; #1; check("q0", 128'(y0), 128'(8'h76)); check("q1", 128'(y1), 128'(8'hc8));
    x = 8'hfd; #1; check("q0", 128'(y0), 128'(8'h5e)); check("q1", 128'(y1), 128'(8'h09));
    finish();
  end
endmodule
