// lcd_des: shows a 64-bit value as 16 hexadecimal characters on the first
// line of a 2x16 character LCD (HD44780-type controller, 4-bit bus), such as
// the one on a Spartan-3E starter board. In crypto_top it displays the DES
// result.
//
// Interface:
//   clk, rst      clock; synchronous, active-high reset
//   value         64-bit value to display; most significant nibble on the left
//   lcd_e         LCD enable strobe; the LCD takes lcd_rs/lcd_d on its fall
//   lcd_rs        0 = command nibble, 1 = character nibble
//   lcd_rw        always 0 (write only)
//   lcd_d         4-bit data bus (upper nibble of each byte first)
//   sf_ce0        held at 1 to keep the board's parallel flash, which shares
//                 the data bus, disabled
//
// Operation: a free-running CNT_W-bit counter paces everything. Its top six
// bits are the step number (64 steps); the next two bits split each step into
// four quarters. A 64x6 ROM gives, for each step, {write, rs, nibble}. In a
// step with the write bit set, the nibble and rs are driven for the whole
// step and lcd_e is high during the second quarter only, so the data is set
// up a quarter step before E rises and held a half step after it falls.
//   step 0        power-on wait, no write
//   steps 1-4     nibbles 3, 3, 3, 2: wake-up and switch to the 4-bit bus
//   steps 5-12    commands 28 (2 lines, 5x8 font), 06 (entry mode: increment),
//                 0C (display on, no cursor) and 01 (clear)
//   steps 13-14   command 80: address of line 1, column 0
//   steps 15-46   16 characters, two nibbles each; '0'-'9' and 'A'-'F' are
//                 made from the nibbles of value
//   steps 47-63   no write
// After step 63 the counter jumps back to step 13, so the line is rewritten
// once per pass and follows changes of value. value is sampled during step 13,
// so the 16 characters of one pass always come from one value.
// Timing: a step is 2^(CNT_W-6) clock cycles. With the default CNT_W = 26 and
// a 50 MHz clock, a step is about 21 ms. That is longer than every wait the
// controller needs, including 4.1 ms after the first wake-up nibble and
// 1.64 ms after clear. A pass (steps 13-63) takes about 1.07 s. The outputs are
// registered and follow the counter by one cycle.
// From the source: the 2x16 LCD showing the 64-bit cipher-text, the 64x6-bit
// ROM, the 26-bit counter and the count of eight output pins. This design's own
// choices: the ROM contents, the step timing, the value input (instead of a
// fixed message), the refresh loop and the reset.
module lcd_des #(
  parameter int CNT_W = 26   // counter width; must be at least 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] value,
  output logic        lcd_e,
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic [3:0]  lcd_d,
  output logic        sf_ce0
);
  localparam logic [5:0] LOOP_STEP  = 6'd13;
  localparam logic [5:0] FIRST_CHAR = 6'd15;
  localparam logic [5:0] LAST_CHAR  = 6'd46;

  logic [CNT_W-1:0] cnt;
  logic [5:0]       step;
  logic [1:0]       quarter;
  logic [5:0]       code;       // {write, rs, nibble} from the ROM
  logic [63:0]      shown;      // value sampled for the current pass
  logic [4:0]       char_pos;   // nibble index within the 16 characters
  logic [3:0]       digit;
  logic [7:0]       ascii;
  logic [3:0]       nibble;

  assign step    = cnt[CNT_W-1 -: 6];
  assign quarter = cnt[CNT_W-7 -: 2];

  // Command ROM, 64 entries of {write, rs, nibble}.
  always_comb begin
    unique case (step)
      6'd1, 6'd2, 6'd3: code = 6'b10_0011;
      6'd4:             code = 6'b10_0010;
      6'd5:             code = 6'b10_0010;   // 28
      6'd6:             code = 6'b10_1000;
      6'd7:             code = 6'b10_0000;   // 06
      6'd8:             code = 6'b10_0110;
      6'd9:             code = 6'b10_0000;   // 0C
      6'd10:            code = 6'b10_1100;
      6'd11:            code = 6'b10_0000;   // 01
      6'd12:            code = 6'b10_0001;
      6'd13:            code = 6'b10_1000;   // 80
      6'd14:            code = 6'b10_0000;
      default:          code = (step >= FIRST_CHAR && step <= LAST_CHAR)
                               ? 6'b11_0000 : 6'b00_0000;
    endcase
  end

  // Character steps: the character is the hex digit of one nibble of the
  // sampled value, sent upper nibble first.
  assign char_pos = 5'(step - FIRST_CHAR);
  assign digit    = shown[63 - 4*char_pos[4:1] -: 4];
  assign ascii    = (digit < 4'd10) ? 8'h30 + {4'd0, digit}
                                    : 8'h37 + {4'd0, digit};
  assign nibble   = code[4] ? (char_pos[0] ? ascii[3:0] : ascii[7:4])
                            : code[3:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      shown  <= '0;
      lcd_e  <= 1'b0;
      lcd_rs <= 1'b0;
      lcd_d  <= 4'd0;
    end else begin
      if (&cnt) cnt <= {LOOP_STEP, {(CNT_W-6){1'b0}}};
      else      cnt <= cnt + 1'b1;
      if (step == LOOP_STEP) shown <= value;
      lcd_e  <= code[5] && (quarter == 2'b01);
      lcd_rs <= code[4];
      lcd_d  <= nibble;
    end
  end

  assign lcd_rw = 1'b0;
  assign sf_ce0 = 1'b1;
endmodule
