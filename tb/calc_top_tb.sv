// calc_top_tb: end-to-end test of the keyboard calculator.
//
// A behavioural PS/2 keyboard types on the calculator and a behavioural 16x2
// LCD shows what the controller writes. Timing is scaled down (1 MHz clock,
// 3 us enable pulse, 8 us gap, fast keyboard clock) so the run is short.
// Sequence:
//  1. the LCD initialisation (01 02 06 0E 38 80 C0);
//  2. '=' and 'W' before any operand, and a frame with a parity error, which
//     must all be ignored (frame_err must pulse for the bad frame);
//  3. "1 1" keypad-'*'  -> X = 17, line 1 "17";
//     "3 3" Shift+3 ('#') -> Y = 51, line 2 "51";
//     '=' -> product 867 on ans and line 2 (the published worked example);
//  4. "F F F E" Shift+8 ('*') -> X = -2, "7 #" -> Y = 7, '=' -> -14;
//  5. "C *" -> line 1 "12", "3 #", '=' -> 36;
//  6. 20 random operand pairs typed as four hex digits, product checked on
//     ans and on the LCD.
// It counts each mechanism (init, X store, Y store, start, multiplication of
// 51 busy cycles, X/Y/Z display, shifted key, break code, ignored key, frame
// error, negative display) and fails if one never happened.
module calc_top_tb;
  localparam int CLK_HZ = 1_000_000, EN_US = 3, GAP_US = 8;
  logic clk = 1'b0, rst = 1'b1;
  logic ps2_clk, ps2_data;
  logic [7:0] lcd_data;
  logic lcd_rs, lcd_rw, lcd_en;
  logic [15:0] x, y;
  logic [31:0] ans;
  logic mult_busy, x_loaded, y_loaded, frame_err, lcd_ready;
  int checks = 0, failures = 0;

  calc_top #(.CLK_HZ(CLK_HZ), .EN_US(EN_US), .GAP_US(GAP_US)) dut (.*);
  ps2_keyboard_model #(.HALF(12)) kbd (.clk, .ps2_clk, .ps2_data);
  lcd_model #(.MIN_EN(EN_US), .MIN_GAP(GAP_US)) lcd (.clk, .rst, .lcd_data, .lcd_rs, .lcd_rw, .lcd_en);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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

  // Mechanism counters.
  int n_frame_err = 0, n_mult = 0, busy_run = 0, n_x = 0, n_y = 0;
  int n_shift_key = 0, n_break = 0, n_ignored = 0, n_neg = 0;
  logic xl_d = 0, yl_d = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (frame_err) n_frame_err <= n_frame_err + 1;
      xl_d <= x_loaded;
      yl_d <= y_loaded;
      if (x_loaded && !xl_d) n_x <= n_x + 1;
      if (y_loaded && !yl_d) n_y <= n_y + 1;
      if (mult_busy) busy_run <= busy_run + 1;
      else if (busy_run != 0) begin
        n_mult <= n_mult + 1;
        check(busy_run == 51, $sformatf("multiplier busy %0d cycles, expected 51", busy_run));
        busy_run <= 0;
      end
    end
  end

  task automatic key(input logic [7:0] c);
    kbd.tap(c);
    n_break++;
  endtask

  task automatic shifted(input logic [7:0] c);
    kbd.press(8'h12);
    kbd.tap(c);
    kbd.release_key(8'h12);
    n_shift_key++;
  endtask

  logic [7:0] hex_code [16] = '{8'h45, 8'h16, 8'h1E, 8'h26, 8'h25, 8'h2E, 8'h36, 8'h3D,
                                8'h3E, 8'h46, 8'h1C, 8'h32, 8'h21, 8'h23, 8'h24, 8'h2B};
  task automatic type_hex(input logic [15:0] v);
    for (int d = 3; d >= 0; d--) key(hex_code[v[4*d +: 4]]);
  endtask

  task automatic settle();
    int t = 0;
    repeat (100) @(negedge clk);
    while (!lcd_ready && t < 100000) begin
      @(negedge clk);
      t++;
    end
    check(lcd_ready, "LCD idle again");
  endtask

  task automatic expect_lines(input string l1, input string l2);
    check(lcd.text(1) == l1, $sformatf("line 1 '%s' expected '%s'", lcd.text(1), l1));
    check(lcd.text(2) == l2, $sformatf("line 2 '%s' expected '%s'", lcd.text(2), l2));
    if (l1.len() > 0 && l1[0] == "-") n_neg++;
    if (l2.len() > 0 && l2[0] == "-") n_neg++;
  endtask

  logic [7:0] init_seq [7] = '{8'h01, 8'h02, 8'h06, 8'h0E, 8'h38, 8'h80, 8'hC0};
  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    settle();
    for (int i = 0; i < 7; i++)
      check(lcd.cmd_log[i] == init_seq[i], $sformatf("init command %0d = %h", i, lcd.cmd_log[i]));
    check(lcd.n_cmd == 7, "initialisation only");

    // Ignored input.
    key(8'h55);            // '=' with no operands
    key(8'h1D);            // 'W'
    n_ignored += 2;
    kbd.send_byte(8'h16, 1'b1);   // '1' with a parity error
    settle();
    check(n_frame_err == 1, "parity error reported");
    check(!x_loaded && n_mult == 0 && lcd.n_cmd == 7, "nothing happened");

    // 17 * 51 = 867.
    key(8'h16); key(8'h16); key(8'h7C);
    settle();
    check(x == 16'd17 && x_loaded, $sformatf("X = %0d", x));
    expect_lines("17", "");
    key(8'h26); key(8'h26); shifted(8'h26);
    settle();
    check(y == 16'd51 && y_loaded, $sformatf("Y = %0d", y));
    expect_lines("17", "51");
    key(8'h55);
    settle();
    check(ans == 32'd867, $sformatf("ans = %0d", $signed(ans)));
    expect_lines("17", "867");

    // -2 * 7 = -14.
    key(8'h2B); key(8'h2B); key(8'h2B); key(8'h24); shifted(8'h3E);
    settle();
    check(x == 16'hFFFE, $sformatf("X = %h", x));
    expect_lines("-2", "867");
    key(8'h3D); shifted(8'h26);
    settle();
    expect_lines("-2", "7");
    key(8'h55);
    settle();
    check($signed(ans) == -14, $sformatf("ans = %0d", $signed(ans)));
    expect_lines("-2", "-14");

    // C (twelve) * 3 = 36.
    key(8'h21); key(8'h7C);
    settle();
    expect_lines("12", "-14");
    key(8'h26); shifted(8'h26); key(8'h55);
    settle();
    check(ans == 32'd36, $sformatf("ans = %0d", $signed(ans)));
    expect_lines("12", "36");

    // Random operand pairs typed as four hex digits each.
    for (int i = 0; i < 20; i++) begin
      logic signed [15:0] a, b;
      a = 16'($urandom);
      do b = 16'($urandom); while (b == -16'sd32768);
      type_hex(a); key(8'h7C);
      type_hex(b); shifted(8'h26);
      key(8'h55);
      settle();
      check($signed(ans) == 32'(a) * 32'(b),
            $sformatf("%0d*%0d: ans = %0d", a, b, $signed(ans)));
      expect_lines($sformatf("%0d", a), $sformatf("%0d", 32'(a) * 32'(b)));
    end

    check(lcd.errors == 0, $sformatf("%0d LCD bus timing errors", lcd.errors));

    // Every mechanism must have happened.
    check(n_x == 23, $sformatf("X stores: %0d", n_x));
    check(n_y == 23, $sformatf("Y stores: %0d", n_y));
    check(n_mult == 23, $sformatf("multiplications: %0d", n_mult));
    check(n_frame_err > 0, "frame error exercised");
    check(n_shift_key > 0, "shifted keys exercised");
    check(n_break > 0, "break codes exercised");
    check(n_ignored > 0, "ignored keys exercised");
    check(n_neg > 0, "negative display exercised");
    $display("mechanisms: init=1 x_store=%0d y_store=%0d mult=%0d frame_err=%0d shifted=%0d break=%0d ignored=%0d neg_display=%0d",
             n_x, n_y, n_mult, n_frame_err, n_shift_key, n_break, n_ignored, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
