// tb_twofish_cipher: encrypts and decrypts blocks through the iterative Twofish core: the zero-key known answer 9F589F5C..., a chain of follow-on vectors and random blocks; checks the 19-cycle latency (load, whitening, 16 rounds, output) and the busy/done handshake.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_cipher;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    finish();
  end

  logic rst, start, encrypt, busy, done;
  logic [127:0] key_in, data_in, data_out;
  twofish_cipher u_dut (.clk(clk), .rst(rst), .start(start), .encrypt(encrypt), .key_in(key_in),
    .data_in(data_in), .data_out(data_out), .busy(busy), .done(done));

  task automatic op(logic [127:0] k, logic [127:0] d, bit enc, logic [127:0] exp, string what);
    int cycles;
    key_in = k; data_in = d; encrypt = enc; start = 1'b1;
    @(posedge clk); #1 start = 1'b0; key_in = ~k; data_in = ~d; encrypt = ~enc;
    check({what, " busy"}, 128'({busy, done}), 128'(2'b10));
    cycles = 1;
    while (!done) begin @(posedge clk); #1; cycles++; end
    check({what, " latency"}, 128'(cycles), 128'(19));
    check({what, " result"}, data_out, exp);
    check({what, " idle"}, 128'(busy), 128'(0));
  endtask

  initial begin
    rst = 1'b1; start = 0; encrypt = 1; key_in = '0; data_in = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    op(128'h00000000000000000000000000000000, 128'h00000000000000000000000000000000, 1'b1, 128'h9f589f5cf6122c32b6bfec2f2ae8c35a, "encrypt");
    op(128'h00000000000000000000000000000000, 128'h9f589f5cf6122c32b6bfec2f2ae8c35a, 1'b0, 128'h00000000000000000000000000000000, "decrypt");
    op(128'h00000000000000000000000000000000, 128'h9f589f5cf6122c32b6bfec2f2ae8c35a, 1'b1, 128'hd491db16e7b1c39e86cb086b789f5419, "encrypt");
    op(128'h00000000000000000000000000000000, 128'hd491db16e7b1c39e86cb086b789f5419, 1'b0, 128'h9f589f5cf6122c32b6bfec2f2ae8c35a, "decrypt");
    op(128'h9f589f5cf6122c32b6bfec2f2ae8c35a, 128'hd491db16e7b1c39e86cb086b789f5419, 1'b1, 128'h019f9809de1711858faac3a3ba20fbc3, "encrypt");
    op(128'h9f589f5cf6122c32b6bfec2f2ae8c35a, 128'h019f9809de1711858faac3a3ba20fbc3, 1'b0, 128'hd491db16e7b1c39e86cb086b789f5419, "decrypt");
    op(128'hd491db16e7b1c39e86cb086b789f5419, 128'h019f9809de1711858faac3a3ba20fbc3, 1'b1, 128'h6363977de839486297e661c6c9d668eb, "encrypt");
    op(128'hd491db16e7b1c39e86cb086b789f5419, 128'h6363977de839486297e661c6c9d668eb, 1'b0, 128'h019f9809de1711858faac3a3ba20fbc3, "decrypt");
    op(128'hb037fb3a5732d5e1b4baa22367fd58fb, 128'h0dd6210312a0bde1416e290e15aad761, 1'b1, 128'h4969efa1c24d71537bae9797fa1e7b38, "encrypt");
    op(128'hb037fb3a5732d5e1b4baa22367fd58fb, 128'h4969efa1c24d71537bae9797fa1e7b38, 1'b0, 128'h0dd6210312a0bde1416e290e15aad761, "decrypt");
    op(128'hde81abf848993eb14b0b752f28447200, 128'h435df654f8fc8c523e08f7e14f375b2e, 1'b1, 128'ha3846a9d8f508545bf4d44f8cc1fe09c, "encrypt");
    op(128'hde81abf848993eb14b0b752f28447200, 128'ha3846a9d8f508545bf4d44f8cc1fe09c, 1'b0, 128'h435df654f8fc8c523e08f7e14f375b2e, "decrypt");
    finish();
  end
endmodule
