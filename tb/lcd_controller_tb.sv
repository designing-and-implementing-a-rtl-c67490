// lcd_controller_tb: self-checking test of the LCD controller.
//
// Runs the controller at reduced timing (1 MHz clock, E high 3 us, 8 us gap)
// against a behavioural 16x2 LCD and checks:
//  - nothing is written before lcd_start;
//  - the initialisation commands 01 02 06 0E 38 80 C0 in that order, RS=0;
//  - X on line 1, Y and Z on line 2, in decimal with a '-' for negatives and
//    16 characters per line (so a shorter value clears a longer one);
//  - requests made during initialisation or all in one cycle are all served,
//    X, then Y, then Z;
//  - E is high exactly EN_US cycles and low at least GAP_US cycles between
//    writes, RW stays 0.
module lcd_controller_tb;
  localparam int CLK_HZ = 1_000_000, EN_US = 3, GAP_US = 8;
  logic clk = 1'b0, rst = 1'b1, lcd_start = 1'b0;
  logic req_x = 0, req_y = 0, req_z = 0;
  logic [15:0] x = '0, y = '0;
  logic [31:0] z = '0;
  logic [7:0] lcd_data;
  logic lcd_rs, lcd_rw, lcd_en, ready;
  int checks = 0, failures = 0;

  lcd_controller #(.CLK_HZ(CLK_HZ), .EN_US(EN_US), .GAP_US(GAP_US)) dut (.*);
  lcd_model #(.MIN_EN(EN_US), .MIN_GAP(GAP_US)) lcd (.clk, .rst, .lcd_data, .lcd_rs, .lcd_rw, .lcd_en);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Exact length of every E pulse.
  int en_run = 0, bad_en = 0, n_pulses = 0;
  always @(posedge clk) begin
    if (lcd_en) en_run <= en_run + 1;
    else if (en_run != 0) begin
      n_pulses <= n_pulses + 1;
      if (en_run != EN_US) bad_en <= bad_en + 1;
      en_run <= 0;
    end
  end

  task automatic wait_ready();
    int t = 0;
    @(negedge clk);
    while (!ready && t < 100000) begin
      @(negedge clk);
      t++;
    end
    check(ready, "controller returns to WAIT");
  endtask

  task automatic request(input int which);
    @(negedge clk);
    req_x = (which == 0);
    req_y = (which == 1);
    req_z = (which == 2);
    @(negedge clk);
    {req_x, req_y, req_z} = '0;
    repeat (2) @(negedge clk);
    wait_ready();
  endtask

  int c0;
  logic [7:0] init_seq [7] = '{8'h01, 8'h02, 8'h06, 8'h0E, 8'h38, 8'h80, 8'hC0};
  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (200) @(negedge clk);
    check(n_pulses == 0 && !ready, "idle until lcd_start");

    // Start, and ask for X while the initialisation is running.
    x = 16'd12;
    lcd_start = 1'b1;
    @(negedge clk);
    lcd_start = 1'b0;
    repeat (20) @(negedge clk);
    req_x = 1'b1;
    @(negedge clk);
    req_x = 1'b0;
    wait_ready();
    for (int i = 0; i < 7; i++)
      check(lcd.cmd_log[i] == init_seq[i],
            $sformatf("init command %0d = %h expected %h", i, lcd.cmd_log[i], init_seq[i]));
    check(lcd.cmd_log[7] == 8'h80, "X goes to line 1");
    check(lcd.text(1) == "12", $sformatf("line 1 '%s' expected '12'", lcd.text(1)));
    check(lcd.n_char == 16, $sformatf("%0d characters, expected 16", lcd.n_char));

    y = -16'sd7;
    request(1);
    check(lcd.cmd_log[8] == 8'hC0, "Y goes to line 2");
    check(lcd.text(2) == "-7", $sformatf("line 2 '%s' expected '-7'", lcd.text(2)));

    z = 32'd3456;
    request(2);
    check(lcd.text(2) == "3456", $sformatf("line 2 '%s' expected '3456'", lcd.text(2)));
    z = 32'd867;
    request(2);
    check(lcd.text(2) == "867", $sformatf("shorter value: line 2 '%s'", lcd.text(2)));

    // All three in one cycle.
    x = -16'sd32768;
    y = 16'd32767;
    z = 32'h8000_0000;
    c0 = lcd.n_cmd;
    @(negedge clk);
    {req_x, req_y, req_z} = 3'b111;
    @(negedge clk);
    {req_x, req_y, req_z} = '0;
    repeat (2) @(negedge clk);
    wait_ready();
    wait_ready();
    wait_ready();
    check(lcd.n_cmd == c0 + 3, $sformatf("three line commands, got %0d", lcd.n_cmd - c0));
    check(lcd.cmd_log[c0] == 8'h80 && lcd.cmd_log[c0+1] == 8'hC0 && lcd.cmd_log[c0+2] == 8'hC0,
          "served X, Y, Z in order");
    check(lcd.text(1) == "-32768", $sformatf("line 1 '%s'", lcd.text(1)));
    check(lcd.text(2) == "-2147483648", $sformatf("line 2 '%s'", lcd.text(2)));

    check(bad_en == 0, $sformatf("%0d E pulses of wrong length", bad_en));
    check(lcd.errors == 0, $sformatf("%0d bus timing errors", lcd.errors));
    check(n_pulses == 7 + 7 * 17, $sformatf("%0d writes", n_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
