// crypto_top: the three block-cipher cores side by side.
//
//   des_*   des_cipher_top  iterative DES, one round per clock, lddata/busy/ready
//   core_*  des_core        single/double/triple DES core with clock enable
//   tf_*    twofish_cipher  iterative 128-bit-key Twofish, one round per clock
//   lcd_*   lcd_des         2x16 character LCD showing des_data_out in hex
//
// LCD_CNT_W sets the LCD pacing counter (26 bits: about 21 ms per LCD step at
// 50 MHz); see lcd_des.
//
// The cores share the clock `clk` and the synchronous, active-high reset
// `rst` and are otherwise independent; each has its own data, key and
// handshake ports, with the protocol described in its own module header.
module crypto_top #(
  parameter int LCD_CNT_W = 26
) (
  input  logic         clk,
  input  logic         rst,
  // DES (des_cipher_top)
  input  logic         des_function_select,
  input  logic         des_lddata,
  input  logic [63:0]  des_data_in,
  input  logic [63:0]  des_key_in,
  output logic [63:0]  des_data_out,
  output logic         des_core_busy,
  output logic         des_out_rdy,
  // DES core with modes (des_core)
  input  logic         core_cen,
  input  logic         core_start,
  input  logic         core_ed,
  input  logic [1:0]   core_mode,
  input  logic [63:0]  core_k1,
  input  logic [63:0]  core_k2,
  input  logic [63:0]  core_k3,
  input  logic [63:0]  core_d,
  output logic [63:0]  core_q,
  output logic         core_ready,
  // Twofish (twofish_cipher)
  input  logic         tf_start,
  input  logic         tf_encrypt,
  input  logic [127:0] tf_key_in,
  input  logic [127:0] tf_data_in,
  output logic [127:0] tf_data_out,
  output logic         tf_busy,
  output logic         tf_done,
  // character LCD (lcd_des)
  output logic         lcd_e,
  output logic         lcd_rs,
  output logic         lcd_rw,
  output logic [3:0]   lcd_d,
  output logic         sf_ce0
);
  des_cipher_top u_des (
    .clock(clk), .reset(rst), .function_select(des_function_select),
    .lddata(des_lddata), .data_in(des_data_in), .key_in(des_key_in),
    .data_out(des_data_out), .core_busy(des_core_busy), .des_out_rdy(des_out_rdy)
  );

  des_core u_core (
    .CLK(clk), .RESET(rst), .CEN(core_cen), .START(core_start), .ED(core_ed),
    .MODE(core_mode), .K1(core_k1), .K2(core_k2), .K3(core_k3), .D(core_d),
    .Q(core_q), .READY(core_ready)
  );

  twofish_cipher u_tf (
    .clk(clk), .rst(rst), .start(tf_start), .encrypt(tf_encrypt),
    .key_in(tf_key_in), .data_in(tf_data_in), .data_out(tf_data_out),
    .busy(tf_busy), .done(tf_done)
  );

  lcd_des #(.CNT_W(LCD_CNT_W)) u_lcd (
    .clk(clk), .rst(rst), .value(des_data_out), .lcd_e(lcd_e), .lcd_rs(lcd_rs),
    .lcd_rw(lcd_rw), .lcd_d(lcd_d), .sf_ce0(sf_ce0)
  );
endmodule
