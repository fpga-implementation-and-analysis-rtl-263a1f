// tb_des_core: runs the three-mode DES core in single, double and triple DES, both directions, checks results, latency (a start cycle plus 17 cycles per pass) and that CEN low freezes it.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_des_core;
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

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish();
  end

  logic rst, cen, start, ed, ready;
  logic [1:0] mode;
  logic [63:0] k1, k2, k3, d, q;
  des_core u_dut (.CLK(clk), .RESET(rst), .CEN(cen), .START(start), .ED(ed), .MODE(mode),
    .K1(k1), .K2(k2), .K3(k3), .D(d), .Q(q), .READY(ready));

  int n_single = 0, n_double = 0, n_triple = 0, n_stall = 0;

  task automatic op(logic [1:0] m, bit e, logic [63:0] din, logic [63:0] exp, bit stall);
    int cycles, stalls;
    mode = m; ed = e; d = din; start = 1'b1;
    @(posedge clk); #1 start = 1'b0; mode = ~m; ed = ~e;
    cycles = 1; stalls = 0;
    while (!ready) begin
      if (stall && cycles == 9 && stalls < 4) begin
        cen = 1'b0; stalls++;
      end else begin
        cen = 1'b1; cycles++;
      end
      @(posedge clk); #1;
    end
    cen = 1'b1;
    if (stalls > 0) n_stall++;
    check($sformatf("mode %0d ed %0d latency", m, e), 128'(cycles), 128'(1 + 17 * (m == 2'd2 ? 3 : m == 2'd1 ? 2 : 1)));
    check($sformatf("mode %0d ed %0d result", m, e), 128'(q), 128'(exp));
    case (m) 2'd0: n_single++; 2'd1: n_double++; default: n_triple++; endcase
  endtask

  initial begin
    rst = 1'b1; cen = 1'b1; start = 0; ed = 1; mode = 0; d = '0;
    k1 = 64'h133457799bbcdff1; k2 = 64'h80b0c08bc7702420; k3 = 64'ha2eddbbd5464ecc2;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    op(2'd0, 1'b1, 64'h0123456789abcdef, 64'h85e813540f0ab405, 1'b0);
    op(2'd0, 1'b0, 64'h85e813540f0ab405, 64'h0123456789abcdef, 1'b1);
    op(2'd0, 1'b1, 64'h9cfc865239194242, 64'h9f8bbb2a15a83f70, 1'b1);
    op(2'd0, 1'b0, 64'h9f8bbb2a15a83f70, 64'h9cfc865239194242, 1'b0);
    op(2'd1, 1'b1, 64'h0123456789abcdef, 64'h02805dc3f0b56107, 1'b0);
    op(2'd1, 1'b0, 64'h02805dc3f0b56107, 64'h0123456789abcdef, 1'b1);
    op(2'd1, 1'b1, 64'hc9d488b1cfbf3360, 64'h66dafced6d1e5374, 1'b1);
    op(2'd1, 1'b0, 64'h66dafced6d1e5374, 64'hc9d488b1cfbf3360, 1'b0);
    op(2'd2, 1'b1, 64'h0123456789abcdef, 64'hf2fd676978c6f473, 1'b0);
    op(2'd2, 1'b0, 64'hf2fd676978c6f473, 64'h0123456789abcdef, 1'b1);
    op(2'd2, 1'b1, 64'hc2216b02fc241d0b, 64'hf99137417c0de9f1, 1'b1);
    op(2'd2, 1'b0, 64'hf99137417c0de9f1, 64'hc2216b02fc241d0b, 1'b0);
    check("single runs", 128'(n_single > 0), 128'(1));
    check("double runs", 128'(n_double > 0), 128'(1));
    check("triple runs", 128'(n_triple > 0), 128'(1));
    check("CEN stalls", 128'(n_stall > 0), 128'(1));
    finish();
  end
endmodule
