// tb_lcd_des: checks the LCD driver by decoding its bus. The counter is
// shortened (CNT_W = 10, a step is 16 cycles); only the pacing changes with it.
// How it works: a monitor takes {lcd_rs, lcd_d} on every falling edge of
// lcd_e, as the LCD controller would. Each taken nibble is compared with the
// expected stream:
//   - the wake-up nibbles 3, 3, 3, 2;
//   - the commands 28, 06, 0C, 01 and 80;
//   - 16 hex characters of the value;
//   - then, for each refresh pass, 80 and 16 more characters.
// The monitor also checks these bus rules:
//   - lcd_e is high for exactly one quarter step (4 cycles);
//   - rs and data do not change while lcd_e is high;
//   - lcd_rw stays 0 and sf_ce0 stays 1.
// The value is changed in the middle of the first line. The test checks that
// the first pass still shows the old value and the second pass the new one.
// A final reset must clear the outputs. Expected values are written here from
// the LCD command set and ASCII.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_lcd_des;
  int checks = 0;
  int failures = 0;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
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

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish();
  end

  logic        rst;
  logic [63:0] value;
  logic        lcd_e, lcd_rs, lcd_rw, sf_ce0;
  logic [3:0]  lcd_d;

  lcd_des #(.CNT_W(10)) u_dut (.*);

  // Expected stream of {rs, nibble}.
  logic [4:0] exp_q[$];

  function automatic logic [7:0] hex_char(logic [3:0] d);
    return (d < 4'd10) ? 8'h30 + 8'(d) : 8'h41 + 8'(d) - 8'd10;
  endfunction

  task automatic push_byte(bit rs, logic [7:0] b);
    exp_q.push_back({rs, b[7:4]});
    exp_q.push_back({rs, b[3:0]});
  endtask

  task automatic push_line(logic [63:0] v);
    push_byte(1'b0, 8'h80);
    for (int i = 15; i >= 0; i--) push_byte(1'b1, hex_char(v[4*i +: 4]));
  endtask

  // Bus monitor.
  int       taken = 0;
  int       e_width = 0;
  logic     e_prev = 1'b0;
  logic [4:0] held;
  always @(posedge clk) begin
    if (!rst) begin
      if (lcd_rw !== 1'b0) check("lcd_rw low", 64'(lcd_rw), 64'd0);
      if (sf_ce0 !== 1'b1) check("sf_ce0 high", 64'(sf_ce0), 64'd1);
      if (lcd_e) begin
        if (!e_prev) held = {lcd_rs, lcd_d};
        else if ({lcd_rs, lcd_d} !== held)
          check("data stable while E high", 64'({lcd_rs, lcd_d}), 64'(held));
        e_width++;
      end else if (e_prev) begin
        check("E pulse width", 64'(e_width), 64'd4);
        e_width = 0;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected write %h", {lcd_rs, lcd_d});
        end else begin
          check($sformatf("write %0d", taken), 64'({lcd_rs, lcd_d}), 64'(exp_q.pop_front()));
        end
        taken++;
      end
      e_prev = lcd_e;
    end
  end

  localparam logic [63:0] V1 = 64'h85e813540f0ab405;
  localparam logic [63:0] V2 = 64'h0123456789abcdef;

  initial begin
    rst = 1'b1;
    value = V1;
    exp_q.push_back(5'h03); exp_q.push_back(5'h03);
    exp_q.push_back(5'h03); exp_q.push_back(5'h02);
    push_byte(1'b0, 8'h28); push_byte(1'b0, 8'h06);
    push_byte(1'b0, 8'h0c); push_byte(1'b0, 8'h01);
    push_line(V1);
    push_line(V2);
    push_line(V2);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // Outputs idle during the power-on wait.
    repeat (8) @(posedge clk);
    #1 check("idle E", 64'(lcd_e), 64'd0);
    // Change the value in the middle of the first line.
    wait (taken == 14 + 2 + 16);
    #1 value = V2;
    wait (exp_q.size() == 0);
    check("writes taken", 64'(taken), 64'(4 + 8 + 3 * 34));
    // Stay until the middle of the next pass, which must not write anything
    // before its address command.
    repeat (200) @(posedge clk);
    #1 rst = 1'b1;
    @(posedge clk); #1;
    check("reset clears E", 64'(lcd_e), 64'd0);
    check("reset clears RS", 64'(lcd_rs), 64'd0);
    check("reset clears data", 64'(lcd_d), 64'd0);
    check("reset clears counter", 64'(u_dut.cnt), 64'd0);
    finish();
  end
endmodule
