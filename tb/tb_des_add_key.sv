// tb_des_add_key: checks the 48-bit key mixing XOR with the worked example and random values.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_des_add_key;
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

  logic [47:0] e, k, x;
  des_add_key u_dut (.e(e), .k(k), .x(x));
  initial begin
    e = 48'h7a15557a1555; k = 48'h1b02effc7072; #1; check("xor", 128'(x), 128'(48'h6117ba866527));
    e = 48'hae65fe3b890b; k = 48'h7215d269a9a5; #1; check("xor", 128'(x), 128'(48'hdc702c5220ae));
    e = 48'hb77448db40af; k = 48'he31562c33a4f; #1; check("xor", 128'(x), 128'(48'h54612a187ae0));
    e = 48'h58d5ab2cd31e; k = 48'hf0ce05c6af07; #1; check("xor", 128'(x), 128'(48'ha81baeea7c19));
    e = 48'h5aff7631a992; k = 48'h9c652b0537e6; #1; check("xor", 128'(x), 128'(48'hc69a5d349e74));
    e = 48'h7e621df9fd78; k = 48'h37dc0f17a300; #1; check("xor", 128'(x), 128'(48'h49be12ee5e78));
    e = 48'h4995c4aaeac1; k = 48'hbd05211c70cf; #1; check("xor", 128'(x), 128'(48'hf490e5b69a0e));
    e = 48'h65dc3f63af83; k = 48'heab46415479c; #1; check("xor", 128'(x), 128'(48'h8f685b76e81f));
    e = 48'h7f1bdf1582b0; k = 48'h2a9614a0f9e7; #1; check("xor", 128'(x), 128'(48'h558dcbb57b57));
    e = 48'h66d272fdf202; k = 48'h47208ca81811; #1; check("xor", 128'(x), 128'(48'h21f2fe55ea13));
    e = 48'h230de2257159; k = 48'h6e36d1bc52d9; #1; check("xor", 128'(x), 128'(48'h4d3b33992380));
    e = 48'h8cdbdd2e1609; k = 48'hb4d647469a4d; #1; check("xor", 128'(x), 128'(48'h380d9a688c44));
    e = 48'hfc896a50df4d; k = 48'haec65bd86d40; #1; check("xor", 128'(x), 128'(48'h524f3188b20d));
    e = 48'h6164e25a7605; k = 48'h3b12f52ddf5d; #1; check("xor", 128'(x), 128'(48'h5a761777a958));
    e = 48'h153e26a2c0bd; k = 48'h26bb2d1c9af0; #1; check("xor", 128'(x), 128'(48'h33850bbe5a4d));
    e = 48'ha8943b618676; k = 48'h03163bbbe9ea; #1; check("xor", 128'(x), 128'(48'hab8200da6f9c));
    e = 48'hd4c27c26847f; k = 48'h2eae96d0cc5f; #1; check("xor", 128'(x), 128'(48'hfa6ceaf64820));
    e = 48'h482c43435cc5; k = 48'h254b010c4759; #1; check("xor", 128'(x), 128'(48'h6d67424f1b9c));
    e = 48'h88da6b4013ef; k = 48'h9c1c5e8766ed; #1; check("xor", 128'(x), 128'(48'h14c635c77502));
    e = 48'h519090fbbd11; k = 48'h2020f3fe39c0; #1; check("xor", 128'(x), 128'(48'h71b0630584d1));
    e = 48'hdbf4b0c4312d; k = 48'hf34183f73f16; #1; check("xor", 128'(x), 128'(48'h28b533330e3b));
    finish();
  end
endmodule
