// key_control_tb: self-checking test of the key controller.
//
// Feeds scan-code bytes as ps2_rx delivers them (make codes, F0 break
// sequences, E0 extended codes, Shift) and checks the X, Y and entry
// registers, the x_loaded / y_loaded flags and the start, disp_x, disp_y and
// disp_z pulses:
//  - "1 1 *" stores 0x11 in X and requests its display; break codes add nothing;
//  - '#' and '=' out of order, invalid keys and extended keys are ignored;
//  - Shift+3 acts as '#', Shift+8 and keypad '*' as '*';
//  - '=' pulses start once and clears both flags; mult_done gives disp_z;
//  - a fifth digit pushes out the oldest.
module key_control_tb;
  import calc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] code = '0;
  logic code_valid = 1'b0, mult_done = 1'b0;
  logic [15:0] x, y, entry;
  logic x_loaded, y_loaded, start, disp_x, disp_y, disp_z;
  int checks = 0, failures = 0;
  int n_start = 0, n_dx = 0, n_dy = 0, n_dz = 0;

  key_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      n_start <= n_start + int'(start);
      n_dx    <= n_dx + int'(disp_x);
      n_dy    <= n_dy + int'(disp_y);
      n_dz    <= n_dz + int'(disp_z);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input logic [7:0] c);
    @(negedge clk);
    code = c;
    code_valid = 1'b1;
    @(negedge clk);
    code_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic tap(input logic [7:0] c);
    send(c);
    send(8'hF0);
    send(c);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);

    tap(8'h26);                        // '#' without shift is digit 3
    check(entry == 16'h0003, "3 typed");
    send(8'h12); tap(8'h26); send(8'hF0); send(8'h12);   // Shift+3 = '#', X not loaded
    check(!y_loaded && n_dy == 0, "'#' before X ignored");
    tap(8'h55);
    check(n_start == 0, "'=' before operands ignored");
    tap(8'h1D);                        // 'W' is not a calculator key
    send(8'hE0); send(8'h16); send(8'hE0); send(8'hF0); send(8'h16);
    check(entry == 16'h0003, "invalid and extended keys ignored");

    tap(8'h16); tap(8'h16);            // 1 1
    check(entry == 16'h0311, $sformatf("entry %h", entry));
    tap(8'h7C);                        // keypad '*'
    check(x == 16'h0311 && x_loaded && n_dx == 1, "X stored by keypad '*'");
    check(entry == 16'h0000, "entry cleared after '*'");

    tap(8'h16); tap(8'h16);            // 1 1
    send(8'h12); tap(8'h3E); send(8'hF0); send(8'h12);   // Shift+8 = '*' again
    check(x == 16'h0011 && n_dx == 2, "second '*' replaces X");

    tap(8'h26); tap(8'h26);            // 3 3
    send(8'h59); tap(8'h26); send(8'hF0); send(8'h59);   // right Shift+3 = '#'
    check(y == 16'h0033 && y_loaded && n_dy == 1, "Y stored by Shift+3");

    tap(8'h55);                        // '='
    check(n_start == 1, "start pulsed once");
    check(!x_loaded && !y_loaded, "flags cleared after '='");
    check(x == 16'h0011 && y == 16'h0033, "X and Y held for the multiplier");
    tap(8'h55);
    check(n_start == 1, "second '=' ignored");

    @(negedge clk); mult_done = 1'b1; @(negedge clk); mult_done = 1'b0;
    @(negedge clk);
    check(n_dz == 1, "disp_z follows mult_done");

    tap(8'h1C); tap(8'h32); tap(8'h21); tap(8'h23); tap(8'h24);  // A B C D E
    check(entry == 16'hBCDE, $sformatf("five digits keep last four: %h", entry));
    send(8'h12); tap(8'h1C); send(8'hF0); send(8'h12);           // Shift+A
    check(entry == 16'hCDEA, "shifted letter is a digit");
    send(8'h12); tap(8'h16); send(8'hF0); send(8'h12);           // Shift+1 = '!'
    check(entry == 16'hCDEA, "shifted digit 1 ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
