// tb_twofish_dec_round: checks that the decryption round undoes the encryption round for random words and keys.
// Ends with one TB_RESULT line; a watchdog stops a run that hangs.
module tb_twofish_dec_round;
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
  twofish_dec_round u_dut (.in1(in1), .in2(in2), .in3(in3), .in4(in4), .s_first(s_first), .s_second(s_second),
    .key_up(key_up), .key_down(key_down), .out1(out1), .out2(out2), .out3(out3), .out4(out4));
  initial begin
    in1 = 32'hfd68373b; in2 = 32'haaf719f3; in3 = 32'hcba2d8e9; in4 = 32'h412d7dd4; s_first = 32'h2955d6f0; s_second = 32'hb4d19ec1; key_up = 32'h6e7836a4; key_down = 32'hfe7b8ae4; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'hd51b1815, 32'h3945336b, 32'hfd68373b, 32'haaf719f3}));
    in1 = 32'h83feb17b; in2 = 32'h67601367; in3 = 32'hae8e942e; in4 = 32'hd0e33d4a; s_first = 32'h321c5296; s_second = 32'h5b4b1b75; key_up = 32'h518ae452; key_down = 32'h179a071e; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h56d050cd, 32'h6bd8c676, 32'h83feb17b, 32'h67601367}));
    in1 = 32'hb8dee081; in2 = 32'h5daf106d; in3 = 32'hf1607bd6; in4 = 32'h414c893a; s_first = 32'h8dd63cb9; s_second = 32'h756b7289; key_up = 32'h70c1dca1; key_down = 32'hb401ba85; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h04fcd555, 32'h5685d624, 32'hb8dee081, 32'h5daf106d}));
    in1 = 32'h04a10547; in2 = 32'h626467ba; in3 = 32'hb74cf7a2; in4 = 32'h2db83a2d; s_first = 32'h9fb9af50; s_second = 32'h4ba2e161; key_up = 32'h83239ef5; key_down = 32'hf5f554ed; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h54dd0ba5, 32'h84768b8c, 32'h04a10547, 32'h626467ba}));
    in1 = 32'h10755c97; in2 = 32'h1ce3bc0c; in3 = 32'hab7f32cd; in4 = 32'h999d2177; s_first = 32'hc9d22950; s_second = 32'h3a828159; key_up = 32'hf8c110fb; key_down = 32'he05b3e13; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'hfc2e6a59, 32'heb25f8a1, 32'h10755c97, 32'h1ce3bc0c}));
    in1 = 32'h1ad2d5f1; in2 = 32'h15850a03; in3 = 32'hcd74158b; in4 = 32'h15ddb450; s_first = 32'h0a227385; s_second = 32'he7e8f9f6; key_up = 32'hc76c603f; key_down = 32'h2e7a26e9; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h43fc0527, 32'h459c945c, 32'h1ad2d5f1, 32'h15850a03}));
    in1 = 32'h453bf491; in2 = 32'hc17a9262; in3 = 32'hffa10682; in4 = 32'ha20bdca8; s_first = 32'h6c18d982; s_second = 32'hd97e967b; key_up = 32'he9526a69; key_down = 32'had0c9bb6; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h212a8d9b, 32'hd1dcec53, 32'h453bf491, 32'hc17a9262}));
    in1 = 32'hd1a89b37; in2 = 32'hf22d2882; in3 = 32'h5dfc001b; in4 = 32'hb267e42b; s_first = 32'h263cfa5e; s_second = 32'h895e8b6b; key_up = 32'heb4ed2e3; key_down = 32'h83c8cb28; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h42343354, 32'h67ec326a, 32'hd1a89b37, 32'hf22d2882}));
    in1 = 32'h9212824c; in2 = 32'h7e9ee51d; in3 = 32'h5d992d04; in4 = 32'h6219c076; s_first = 32'h16e6fec3; s_second = 32'h4770a087; key_up = 32'h0eba0ea8; key_down = 32'hccb1c51d; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'hb34e8ece, 32'h53b97377, 32'h9212824c, 32'h7e9ee51d}));
    in1 = 32'hb02e3d8d; in2 = 32'h2eefa279; in3 = 32'h669c2c38; in4 = 32'hf487c161; s_first = 32'h1289bafa; s_second = 32'h44d82a53; key_up = 32'hf037afc6; key_down = 32'h044f1574; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'h6ce193c2, 32'he5316960, 32'hb02e3d8d, 32'h2eefa279}));
    in1 = 32'ha26aa0ae; in2 = 32'h16ac4191; in3 = 32'h9cb7a7c6; in4 = 32'h95688d5f; s_first = 32'h1570266b; s_second = 32'h9bb183e1; key_up = 32'hdb31ccd2; key_down = 32'h38efbaeb; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'hcd37880e, 32'h42b38755, 32'ha26aa0ae, 32'h16ac4191}));
    in1 = 32'h110e2cb6; in2 = 32'h43b30f66; in3 = 32'h983cf85d; in4 = 32'h77a9851f; s_first = 32'h742a8063; s_second = 32'h02f4b342; key_up = 32'h56d2a68c; key_down = 32'hfe8ad4a1; #1;
    check("out", 128'({out1, out2, out3, out4}), 128'({32'hdcded204, 32'h1f2642aa, 32'h110e2cb6, 32'h43b30f66}));
    finish();
  end
endmodule
