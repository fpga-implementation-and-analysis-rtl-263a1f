// tb_twofish_enc_round: checks one encryption round for random words and keys, and the word routing out3 = in1, out4 = in2.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_enc_round;
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

  logic [31:0] in1, in2, in3, in4, s_first, s_second, key_up, key_down, out1, out2, out3, out4;
  twofish_enc_round u_dut (.in1(in1), .in2(in2), .in3(in3), .in4(in4), .s_first(s_first), .s_second(s_second),
    .key_up(key_up), .key_down(key_down), .out1(out1), .out2(out2), .out3(out3), .out4(out4));
  initial begin
    in1 = 32'h537390e5; in2 = 32'haead44b0; in3 = 32'h84b28054; in4 = 32'h87ddaeb7; s_first = 32'h8e317041; s_second = 32'h7b8444d1; key_up = 32'hc8c614b2; key_down = 32'hc6c80e2b; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h8bb42da0, 32'hb56a5d67, 32'h537390e5, 32'haead44b0}));
    in1 = 32'h1b29fc99; in2 = 32'he21b37ca; in3 = 32'h8f6f915f; in4 = 32'h0e8bec94; s_first = 32'h3f9d52f9; s_second = 32'h30f97058; key_up = 32'h46e40990; key_down = 32'h0acd8be1; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h687887cb, 32'h340d3e64, 32'h1b29fc99, 32'he21b37ca}));
    in1 = 32'hc5b2e75a; in2 = 32'h1905d591; in3 = 32'h81f98b52; in4 = 32'h73c1cd2c; s_first = 32'h8fcd7f40; s_second = 32'h072235c2; key_up = 32'hc28ee907; key_down = 32'he4ddf9b9; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'hc5a18e0e, 32'hfc67007b, 32'hc5b2e75a, 32'h1905d591}));
    in1 = 32'he998d0ee; in2 = 32'h1038f0b5; in3 = 32'h7178ba0a; in4 = 32'h535b6a43; s_first = 32'h9ccea098; s_second = 32'hf92e2339; key_up = 32'h816bee06; key_down = 32'h9b2bd6c0; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h7b00f02a, 32'ha9f6c002, 32'he998d0ee, 32'h1038f0b5}));
    in1 = 32'h831d03bf; in2 = 32'h330c16a3; in3 = 32'hb156d1ad; in4 = 32'h46f5a1b4; s_first = 32'h73ccef03; s_second = 32'h8216858f; key_up = 32'h888564e8; key_down = 32'hceaf4915; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h0be719f7, 32'h3d21729f, 32'h831d03bf, 32'h330c16a3}));
    in1 = 32'h7a609683; in2 = 32'h81fc069e; in3 = 32'hf10637ce; in4 = 32'h3f665ede; s_first = 32'hb2fff17b; s_second = 32'h85f1115b; key_up = 32'he064a114; key_down = 32'he040015c; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'hd4b7cbc3, 32'hb943bf39, 32'h7a609683, 32'h81fc069e}));
    in1 = 32'hf132bf2d; in2 = 32'hed84e91e; in3 = 32'h4274a3eb; in4 = 32'hec3b9605; s_first = 32'h8f3c4be3; s_second = 32'he48b9662; key_up = 32'hf179f2d2; key_down = 32'h33dcd77f; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h717fd311, 32'ha5b600fb, 32'hf132bf2d, 32'hed84e91e}));
    in1 = 32'hd70a39d1; in2 = 32'h729135bd; in3 = 32'h231b3e14; in4 = 32'h6aa8b9e0; s_first = 32'h1f229dd0; s_second = 32'h6471fde4; key_up = 32'h712ea6b3; key_down = 32'h50e40d54; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h49842188, 32'hd709f65f, 32'hd70a39d1, 32'h729135bd}));
    in1 = 32'h12926185; in2 = 32'habd0d7fb; in3 = 32'h3d9a8079; in4 = 32'h6da79a87; s_first = 32'h12b80aed; s_second = 32'h3672d6ae; key_up = 32'hab6286cd; key_down = 32'h4d82feac; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h6da5b1a8, 32'h9f215057, 32'h12926185, 32'habd0d7fb}));
    in1 = 32'hc8b007ee; in2 = 32'h1f525265; in3 = 32'he5a3863e; in4 = 32'hc6e50df2; s_first = 32'h2789d059; s_second = 32'hf0836085; key_up = 32'hb753a1ee; key_down = 32'ha4b9a9c4; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h98a0c61d, 32'ha60e5bb0, 32'hc8b007ee, 32'h1f525265}));
    in1 = 32'ha906922f; in2 = 32'h5dbe3023; in3 = 32'h249a4584; in4 = 32'h40cbacd0; s_first = 32'he2015522; s_second = 32'h23231e1e; key_up = 32'hf7b103df; key_down = 32'h77bd891f; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'hfb90db7a, 32'hf9edd38a, 32'ha906922f, 32'h5dbe3023}));
    in1 = 32'h3836e865; in2 = 32'hbf268ea0; in3 = 32'hf3d74f82; in4 = 32'h18189af4; s_first = 32'h65f42986; s_second = 32'he28af604; key_up = 32'h7cbd1f5a; key_down = 32'h29acf1a5; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h8fe91ac4, 32'h9a69c9c2, 32'h3836e865, 32'hbf268ea0}));
    finish();
  end
endmodule
