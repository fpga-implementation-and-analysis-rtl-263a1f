// tb_des_sbox_bank: drives the DES S-box bank with the first-round value K1 xor E(R0) of the standard worked example and with random values.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_des_sbox_bank;
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

  logic [47:0] x;
  logic [31:0] y;
  des_sbox_bank u_dut (.x(x), .y(y));
  initial begin
    x = 48'h6117ba866527; #1; check("S(x)", 128'(y), 128'(32'h5c82b597));
    x = 48'hc7a2b2f14c94; #1; check("S(x)", 128'(y), 128'(32'h533103f3));
    x = 48'h14f43e7d1bfb; #1; check("S(x)", 128'(y), 128'(32'h7e146675));
    x = 48'h4cdd930d6eaf; #1; check("S(x)", 128'(y), 128'(32'h68c7b45d));
    x = 48'h7ebf86734721; #1; check("S(x)", 128'(y), 128'(32'h8f73e462));
    x = 48'h57eee00902c7; #1; check("S(x)", 128'(y), 128'(32'hcf5ac098));
    x = 48'h72e6babced20; #1; check("S(x)", 128'(y), 128'(32'h0142d867));
    x = 48'h9be449b64a08; #1; check("S(x)", 128'(y), 128'(32'h8f262fc6));
    x = 48'h12bdfaecbd38; #1; check("S(x)", 128'(y), 128'(32'hdf324c6f));
    x = 48'h830e1e398f10; #1; check("S(x)", 128'(y), 128'(32'h455f6e9a));
    x = 48'h2a3a6b0a18e8; #1; check("S(x)", 128'(y), 128'(32'hf861c4b9));
    x = 48'h5790c1d3fcff; #1; check("S(x)", 128'(y), 128'(32'hc07dcd5b));
    x = 48'heeea26e87555; #1; check("S(x)", 128'(y), 128'(32'h01803256));
    x = 48'h6bf47d2caf82; #1; check("S(x)", 128'(y), 128'(32'h99227222));
    x = 48'hf6460a097c97; #1; check("S(x)", 128'(y), 128'(32'h67b6cefb));
    x = 48'h13deab1031d0; #1; check("S(x)", 128'(y), 128'(32'hdea14f7a));
    x = 48'h8edec3baea9e; #1; check("S(x)", 128'(y), 128'(32'hc4588337));
    x = 48'hca0292b1d3f2; #1; check("S(x)", 128'(y), 128'(32'hc03273a6));
    x = 48'hd17fe01f5057; #1; check("S(x)", 128'(y), 128'(32'h9acac1db));
    x = 48'h57125051c1cc; #1; check("S(x)", 128'(y), 128'(32'hcb31357b));
    x = 48'h59a5b1fee08f; #1; check("S(x)", 128'(y), 128'(32'hc07933b4));
    finish();
  end
endmodule
