// tb_des_sbox: checks all eight DES S-boxes: the worked example S1(011011)=0101, that every row of every box is a permutation of 0..15, and spot entries.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_des_sbox;
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

  logic [5:0] b;
  logic [3:0] s [8];
  for (genvar i = 0; i < 8; i++) begin : g_dut
    des_sbox #(.BOX(i + 1)) u_dut (.b(b), .s(s[i]));
  end

  initial begin
    logic [15:0] seen;
    b = 6'b011011; #1;
    check("S1(011011)", 128'(s[0]), 128'(4'b0101));
    for (int box = 0; box < 8; box++)
      for (int row = 0; row < 4; row++) begin
        seen = '0;
        for (int col = 0; col < 16; col++) begin
          b = {row[1], col[3:0], row[0]}; #1;
          seen[s[box]] = 1'b1;
        end
        check($sformatf("S%0d row %0d is a permutation", box + 1, row), 128'(seen), 128'(16'hFFFF));
      end
    b = 6'd19; #1; check("S6(19)", 128'(s[5]), 128'(4'd1));
    b = 6'd6; #1; check("S7(6)", 128'(s[6]), 128'(4'd14));
    b = 6'd12; #1; check("S2(12)", 128'(s[1]), 128'(4'd3));
    b = 6'd7; #1; check("S6(7)", 128'(s[5]), 128'(4'd2));
    b = 6'd4; #1; check("S4(4)", 128'(s[3]), 128'(4'd14));
    b = 6'd55; #1; check("S2(55)", 128'(s[1]), 128'(4'd12));
    b = 6'd8; #1; check("S7(8)", 128'(s[6]), 128'(4'd15));
    b = 6'd11; #1; check("S4(11)", 128'(s[3]), 128'(4'd15));
    b = 6'd7; #1; check("S7(7)", 128'(s[6]), 128'(4'd7));
    b = 6'd28; #1; check("S2(28)", 128'(s[1]), 128'(4'd5));
    b = 6'd50; #1; check("S1(50)", 128'(s[0]), 128'(4'd12));
    b = 6'd28; #1; check("S1(28)", 128'(s[0]), 128'(4'd0));
    b = 6'd17; #1; check("S1(17)", 128'(s[0]), 128'(4'd10));
    b = 6'd53; #1; check("S5(53)", 128'(s[4]), 128'(4'd0));
    b = 6'd15; #1; check("S3(15)", 128'(s[2]), 128'(4'd10));
    b = 6'd23; #1; check("S5(23)", 128'(s[4]), 128'(4'd10));
    b = 6'd24; #1; check("S2(24)", 128'(s[1]), 128'(4'd12));
    b = 6'd12; #1; check("S6(12)", 128'(s[5]), 128'(4'd6));
    b = 6'd7; #1; check("S2(7)", 128'(s[1]), 128'(4'd7));
    b = 6'd63; #1; check("S4(63)", 128'(s[3]), 128'(4'd14));
    b = 6'd40; #1; check("S7(40)", 128'(s[6]), 128'(4'd12));
    b = 6'd58; #1; check("S8(58)", 128'(s[7]), 128'(4'd3));
    b = 6'd38; #1; check("S6(38)", 128'(s[5]), 128'(4'd5));
    b = 6'd23; #1; check("S4(23)", 128'(s[3]), 128'(4'd12));
    finish();
  end
endmodule
