// lcd_delay_counter_tb: self-checking test of the LCD write-cycle counter.
//
// With EN_CYCLES = 7 and GAP_CYCLES = 23 the testbench clears the counter,
// lets it count, and checks cycle by cycle that en_window is high exactly in
// counts 1..7 and elapsed from count 30 on; that the counter holds when inc
// is low; and that clr restarts it.
module lcd_delay_counter_tb;
  localparam int EN = 7, GAP = 23;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, inc = 1'b0;
  logic en_window, elapsed;
  int checks = 0, failures = 0;

  lcd_delay_counter #(.EN_CYCLES(EN), .GAP_CYCLES(GAP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int rep = 0; rep < 3; rep++) begin
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      inc = 1'b1;
      for (int t = 0; t < EN + GAP + 10; t++) begin
        check(en_window == (t >= 1 && t <= EN), $sformatf("en_window at count %0d", t));
        check(elapsed == (t >= EN + GAP), $sformatf("elapsed at count %0d", t));
        if (rep == 1 && t == 3) begin
          inc = 1'b0;
          repeat (5) begin
            @(negedge clk);
            check(en_window && !elapsed, "holds while inc low");
          end
          inc = 1'b1;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
