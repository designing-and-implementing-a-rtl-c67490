// scan_lut_tb: exhaustive test of the scan-code look-up table.
//
// Every one of the 256 codes is applied with and without Shift and the key
// class and value are compared with a reference list of scan-code set 2:
// digits 0-9 (45 16 1E 26 25 2E 36 3D 3E 46), letters A-F (1C 32 21 23 24 2B),
// keypad '*' (7C), '=' (55), Shift+3 as '#', Shift+8 as '*'.
module scan_lut_tb;
  import calc_pkg::*;
  logic [7:0] code;
  logic shift;
  key_t key;
  int checks = 0, failures = 0;

  scan_lut dut (.*);

  logic [7:0] digit_code [16] = '{8'h45, 8'h16, 8'h1E, 8'h26, 8'h25, 8'h2E, 8'h36, 8'h3D,
                                  8'h3E, 8'h46, 8'h1C, 8'h32, 8'h21, 8'h23, 8'h24, 8'h2B};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_kind_e ek;
    logic [3:0] ev;
    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < 256; c++) begin
        ek = KEY_NONE;
        ev = 4'd0;
        for (int d = 0; d < 16; d++) begin
          if (digit_code[d] == 8'(c)) begin
            ev = 4'(d);
            if (s == 0 || d >= 10) ek = KEY_DIGIT;
            else if (d == 3)       ek = KEY_HASH;
            else if (d == 8)       ek = KEY_STAR;
          end
        end
        if (c == 8'h7C) ek = KEY_STAR;
        if (c == 8'h55 && s == 0) ek = KEY_EQUAL;
        code  = 8'(c);
        shift = s[0];
        #1;
        checks++;
        if (key.kind != ek || (ek == KEY_DIGIT && key.value != ev)) begin
          failures++;
          $display("FAIL: code %h shift %0d gave %0d/%h expected %0d/%h",
                   c, s, key.kind, key.value, ek, ev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
