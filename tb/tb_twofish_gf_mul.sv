// tb_twofish_gf_mul: checks constant multipliers over GF(2^8) for the MDS constants 5B, EF, 01 (polynomial 169) and some Reed-Solomon constants (polynomial 14D).
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_gf_mul;
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

  logic [7:0] a;
  logic [7:0] p_m5b;
  twofish_gf_mul #(.C(8'h5B), .POLY(9'h169)) u_m5b (.a(a), .p(p_m5b));
  logic [7:0] p_mef;
  twofish_gf_mul #(.C(8'hEF), .POLY(9'h169)) u_mef (.a(a), .p(p_mef));
  logic [7:0] p_m01;
  twofish_gf_mul #(.C(8'h01), .POLY(9'h169)) u_m01 (.a(a), .p(p_m01));
  logic [7:0] p_ra4;
  twofish_gf_mul #(.C(8'hA4), .POLY(9'h14D)) u_ra4 (.a(a), .p(p_ra4));
  logic [7:0] p_r55;
  twofish_gf_mul #(.C(8'h55), .POLY(9'h14D)) u_r55 (.a(a), .p(p_r55));
  logic [7:0] p_r87;
  twofish_gf_mul #(.C(8'h87), .POLY(9'h14D)) u_r87 (.a(a), .p(p_r87));
  logic [7:0] p_r03;
  twofish_gf_mul #(.C(8'h03), .POLY(9'h14D)) u_r03 (.a(a), .p(p_r03));
  logic [7:0] p_r02;
  twofish_gf_mul #(.C(8'h02), .POLY(9'h14D)) u_r02 (.a(a), .p(p_r02));
  logic [7:0] p_r9e;
  twofish_gf_mul #(.C(8'h9E), .POLY(9'h14D)) u_r9e (.a(a), .p(p_r9e));
  initial begin
    a = 8'h01; #1;
    check("5B*01", 128'(p_m5b), 128'(8'h5b));
    check("EF*01", 128'(p_mef), 128'(8'hef));
    check("01*01", 128'(p_m01), 128'(8'h01));
    check("rs A4*01", 128'(p_ra4), 128'(8'ha4));
    check("rs 55*01", 128'(p_r55), 128'(8'h55));
    check("rs 87*01", 128'(p_r87), 128'(8'h87));
    check("rs 03*01", 128'(p_r03), 128'(8'h03));
    check("rs 02*01", 128'(p_r02), 128'(8'h02));
    check("rs 9E*01", 128'(p_r9e), 128'(8'h9e));
    a = 8'h80; #1;
    check("5B*80", 128'(p_m5b), 128'(8'ha0));
    check("EF*80", 128'(p_mef), 128'(8'he0));
    check("01*80", 128'(p_m01), 128'(8'h80));
    check("rs A4*80", 128'(p_ra4), 128'(8'h0d));
    check("rs 55*80", 128'(p_r55), 128'(8'hf7));
    check("rs 87*80", 128'(p_r87), 128'(8'h69));
    check("rs 03*80", 128'(p_r03), 128'(8'hcd));
    check("rs 02*80", 128'(p_r02), 128'(8'h4d));
    check("rs 9E*80", 128'(p_r9e), 128'(8'h62));
    a = 8'hff; #1;
    check("5B*ff", 128'(p_m5b), 128'(8'h2e));
    check("EF*ff", 128'(p_mef), 128'(8'he5));
    check("01*ff", 128'(p_m01), 128'(8'hff));
    check("rs A4*ff", 128'(p_ra4), 128'(8'h6a));
    check("rs 55*ff", 128'(p_r55), 128'(8'h52));
    check("rs 87*ff", 128'(p_r87), 128'(8'h33));
    check("rs 03*ff", 128'(p_r03), 128'(8'h4c));
    check("rs 02*ff", 128'(p_r02), 128'(8'hb3));
    check("rs 9E*ff", 128'(p_r9e), 128'(8'h36));
    a = 8'h07; #1;
    check("5B*07", 128'(p_m5b), 128'(8'he8));
    check("EF*07", 128'(p_mef), 128'(8'h5f));
    check("01*07", 128'(p_m01), 128'(8'h07));
    check("rs A4*07", 128'(p_ra4), 128'(8'hab));
    check("rs 55*07", 128'(p_r55), 128'(8'he6));
    check("rs 87*07", 128'(p_r87), 128'(8'h42));
    check("rs 03*07", 128'(p_r03), 128'(8'h09));
    check("rs 02*07", 128'(p_r02), 128'(8'h0e));
    check("rs 9E*07", 128'(p_r9e), 128'(8'h0d));
    a = 8'hca; #1;
    check("5B*ca", 128'(p_m5b), 128'(8'h4c));
    check("EF*ca", 128'(p_mef), 128'(8'h29));
    check("01*ca", 128'(p_m01), 128'(8'hca));
    check("rs A4*ca", 128'(p_ra4), 128'(8'hbc));
    check("rs 55*ca", 128'(p_r55), 128'(8'hb2));
    check("rs 87*ca", 128'(p_r87), 128'(8'hf9));
    check("rs 03*ca", 128'(p_r03), 128'(8'h13));
    check("rs 02*ca", 128'(p_r02), 128'(8'hd9));
    check("rs 9E*ca", 128'(p_r9e), 128'(8'hab));
    a = 8'h47; #1;
    check("5B*47", 128'(p_m5b), 128'(8'hb8));
    check("EF*47", 128'(p_mef), 128'(8'h2f));
    check("01*47", 128'(p_m01), 128'(8'h47));
    check("rs A4*47", 128'(p_ra4), 128'(8'h0b));
    check("rs 55*47", 128'(p_r55), 128'(8'h3b));
    check("rs 87*47", 128'(p_r87), 128'(8'hd0));
    check("rs 03*47", 128'(p_r03), 128'(8'hc9));
    check("rs 02*47", 128'(p_r02), 128'(8'h8e));
    check("rs 9E*47", 128'(p_r9e), 128'(8'h3c));
    a = 8'h78; #1;
    check("5B*78", 128'(p_m5b), 128'(8'h66));
    check("EF*78", 128'(p_mef), 128'(8'h5a));
    check("01*78", 128'(p_m01), 128'(8'h78));
    check("rs A4*78", 128'(p_ra4), 128'(8'hcc));
    check("rs 55*78", 128'(p_r55), 128'(8'h43));
    check("rs 87*78", 128'(p_r87), 128'(8'h18));
    check("rs 03*78", 128'(p_r03), 128'(8'h88));
    check("rs 02*78", 128'(p_r02), 128'(8'hf0));
    check("rs 9E*78", 128'(p_r9e), 128'(8'h59));
    a = 8'h42; #1;
    check("5B*42", 128'(p_m5b), 128'(8'he6));
    check("EF*42", 128'(p_mef), 128'(8'hc7));
    check("01*42", 128'(p_m01), 128'(8'h42));
    check("rs A4*42", 128'(p_ra4), 128'(8'ha5));
    check("rs 55*42", 128'(p_r55), 128'(8'h77));
    check("rs 87*42", 128'(p_r87), 128'(8'hd1));
    check("rs 03*42", 128'(p_r03), 128'(8'hc6));
    check("rs 02*42", 128'(p_r02), 128'(8'h84));
    check("rs 9E*42", 128'(p_r9e), 128'(8'h40));
    a = 8'h31; #1;
    check("5B*31", 128'(p_m5b), 128'(8'h67));
    check("EF*31", 128'(p_mef), 128'(8'hcb));
    check("01*31", 128'(p_m01), 128'(8'h31));
    check("rs A4*31", 128'(p_ra4), 128'(8'hdc));
    check("rs 55*31", 128'(p_r55), 128'(8'hf9));
    check("rs 87*31", 128'(p_r87), 128'(8'h4c));
    check("rs 03*31", 128'(p_r03), 128'(8'h53));
    check("rs 02*31", 128'(p_r02), 128'(8'h62));
    check("rs 9E*31", 128'(p_r9e), 128'(8'h7f));
    a = 8'hb1; #1;
    check("5B*b1", 128'(p_m5b), 128'(8'hc7));
    check("EF*b1", 128'(p_mef), 128'(8'h2b));
    check("01*b1", 128'(p_m01), 128'(8'hb1));
    check("rs A4*b1", 128'(p_ra4), 128'(8'hd1));
    check("rs 55*b1", 128'(p_r55), 128'(8'h0e));
    check("rs 87*b1", 128'(p_r87), 128'(8'h25));
    check("rs 03*b1", 128'(p_r03), 128'(8'h9e));
    check("rs 02*b1", 128'(p_r02), 128'(8'h2f));
    check("rs 9E*b1", 128'(p_r9e), 128'(8'h1d));
    a = 8'h9a; #1;
    check("5B*9a", 128'(p_m5b), 128'(8'h08));
    check("EF*9a", 128'(p_mef), 128'(8'h45));
    check("01*9a", 128'(p_m01), 128'(8'h9a));
    check("rs A4*9a", 128'(p_ra4), 128'(8'h34));
    check("rs 55*9a", 128'(p_r55), 128'(8'h0b));
    check("rs 87*9a", 128'(p_r87), 128'(8'he9));
    check("rs 03*9a", 128'(p_r03), 128'(8'he3));
    check("rs 02*9a", 128'(p_r02), 128'(8'h79));
    check("rs 9E*9a", 128'(p_r9e), 128'(8'hc5));
    finish();
  end
endmodule
