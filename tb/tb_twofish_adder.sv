// tb_twofish_adder: checks the full adder exhaustively.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_adder;
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

  logic a, b, cin, s, cout;
  twofish_adder u_dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i); #1;
      check($sformatf("fa %0d", i), 128'({cout, s}), 128'(2'(a) + 2'(b) + 2'(cin)));
    end
    finish();
  end
endmodule
