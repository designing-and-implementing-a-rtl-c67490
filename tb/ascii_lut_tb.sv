// ascii_lut_tb: exhaustive test of the digit-to-ASCII table.
//
// All 16 inputs: 0-9 must give '0'-'9', 10-15 must give 'A'-'F'.
module ascii_lut_tb;
  logic [3:0] digit;
  logic [7:0] ascii;
  int checks = 0, failures = 0;
  string ref_chars = "0123456789ABCDEF";

  ascii_lut dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      checks++;
      if (ascii != ref_chars[d]) begin
        failures++;
        $display("FAIL: digit %0d gave %h", d, ascii);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
