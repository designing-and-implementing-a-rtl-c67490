// calc_top: keyboard-and-LCD calculator built around a radix-2 Booth
// multiplier.
//
// A user types a hexadecimal number (up to four digits, two's complement) on
// a PS/2 keyboard and presses '*' to store it in X, types a second number and
// presses '#' to store it in Y, then presses '=' to multiply. ps2_rx receives
// the keyboard frames, key_control decodes them and holds X and Y, the
// sequential booth_multiplier forms the 32-bit signed product in the ANS
// register, and lcd_controller shows X (line 1), Y and then the product
// (line 2) in decimal on a 16x2 LCD. The partitioning and the X / Y / '='
// sequence follow the published top-level diagram; the LCD start (issued once,
// the cycle after reset is released) and the status outputs (x, y, ans, mult_busy,
// x_loaded, y_loaded, frame_err, lcd_ready, meant for LEDs or a logic
// analyser) are this design's own.
//
// Interface: clk is the system clock of CLK_HZ hertz, rst a synchronous
// active-high reset. ps2_clk and ps2_data come straight from the keyboard
// (open-collector lines, read only). lcd_data, lcd_rs, lcd_rw and lcd_en go to
// the LCD. Timing: the multiplication takes 51 clk cycles after '='; each LCD
// byte takes EN_US + GAP_US microseconds.
module calc_top #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned EN_US  = 10,
  parameter int unsigned GAP_US = 1000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ps2_clk,
  input  logic        ps2_data,
  output logic [7:0]  lcd_data,
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic        lcd_en,
  output logic [15:0] x,
  output logic [15:0] y,
  output logic [31:0] ans,
  output logic        mult_busy,
  output logic        x_loaded,
  output logic        y_loaded,
  output logic        frame_err,
  output logic        lcd_ready
);
  logic [7:0]  code;
  logic        code_valid;
  logic [15:0] entry;
  logic        start, disp_x, disp_y, disp_z;
  logic        mult_done, lcd_start;

  ps2_rx u_ps2 (
    .clk, .rst, .ps2_clk, .ps2_data, .code, .code_valid, .frame_err
  );

  key_control u_keys (
    .clk, .rst, .code, .code_valid, .mult_done,
    .x, .y, .entry, .x_loaded, .y_loaded, .start, .disp_x, .disp_y, .disp_z
  );

  booth_multiplier #(.N(16)) u_mult (
    .clk, .rst, .start, .init_x(x), .init_y(y),
    .busy(mult_busy), .done(mult_done), .result(ans)
  );

  // Start the LCD initialisation once, right after reset.
  always_ff @(posedge clk) begin
    if (rst) lcd_start <= 1'b1;
    else     lcd_start <= 1'b0;
  end

  lcd_controller #(.CLK_HZ(CLK_HZ), .EN_US(EN_US), .GAP_US(GAP_US)) u_lcd (
    .clk, .rst, .lcd_start, .req_x(disp_x), .req_y(disp_y), .req_z(disp_z),
    .x, .y, .z(ans), .lcd_data, .lcd_rs, .lcd_rw, .lcd_en, .ready(lcd_ready)
  );
endmodule
