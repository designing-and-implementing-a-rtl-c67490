// calc_top_full_tb: one complete calculation at the design's real timing.
//
// calc_top with all parameters at their defaults: 50 MHz clock (20 ns
// period), 10 us enable pulse and 1000 us gap per LCD byte. The keyboard
// model runs its clock at 12.5 kHz (half period 2000 clk cycles). After the
// LCD initialisation the keyboard types "1 1 *" "3 3 #" "=" and the test
// checks X = 17, Y = 51, ans = 867, the LCD showing "17" on line 1 and "867"
// on line 2, the multiplier busy for 51 cycles, E high for 500 cycles per
// write and the 1000 us gap.
module calc_top_full_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic ps2_clk, ps2_data;
  logic [7:0] lcd_data;
  logic lcd_rs, lcd_rw, lcd_en;
  logic [15:0] x, y;
  logic [31:0] ans;
  logic mult_busy, x_loaded, y_loaded, frame_err, lcd_ready;
  int checks = 0, failures = 0;

  calc_top dut (.*);
  ps2_keyboard_model #(.HALF(2000)) kbd (.clk, .ps2_clk, .ps2_data);
  lcd_model #(.MIN_EN(500), .MIN_GAP(50_000)) lcd (.clk, .rst, .lcd_data, .lcd_rs, .lcd_rw, .lcd_en);

  always #10 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int busy_run = 0, n_mult = 0, en_run = 0, bad_en = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (mult_busy) busy_run <= busy_run + 1;
      else if (busy_run != 0) begin
        n_mult <= n_mult + 1;
        check(busy_run == 51, $sformatf("multiplier busy %0d cycles", busy_run));
        busy_run <= 0;
      end
      if (lcd_en) en_run <= en_run + 1;
      else if (en_run != 0) begin
        if (en_run != 500) bad_en <= bad_en + 1;
        en_run <= 0;
      end
    end
  end

  task automatic settle();
    int t = 0;
    repeat (100) @(negedge clk);
    while (!lcd_ready && t < 5_000_000) begin
      @(negedge clk);
      t++;
    end
    check(lcd_ready, "LCD idle again");
  endtask

  logic [7:0] init_seq [7] = '{8'h01, 8'h02, 8'h06, 8'h0E, 8'h38, 8'h80, 8'hC0};
  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    settle();
    for (int i = 0; i < 7; i++)
      check(lcd.cmd_log[i] == init_seq[i], $sformatf("init command %0d = %h", i, lcd.cmd_log[i]));
    kbd.tap(8'h16); kbd.tap(8'h16); kbd.tap(8'h7C);
    kbd.tap(8'h26); kbd.tap(8'h26);
    kbd.press(8'h12); kbd.tap(8'h26); kbd.release_key(8'h12);
    kbd.tap(8'h55);
    settle();
    check(x == 16'd17 && y == 16'd51, $sformatf("X = %0d, Y = %0d", x, y));
    check(ans == 32'd867, $sformatf("ans = %0d", ans));
    check(n_mult == 1, "one multiplication");
    check(lcd.text(1) == "17", $sformatf("line 1 '%s'", lcd.text(1)));
    check(lcd.text(2) == "867", $sformatf("line 2 '%s'", lcd.text(2)));
    check(bad_en == 0, "E pulses of 500 cycles");
    check(lcd.errors == 0, "LCD bus timing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
