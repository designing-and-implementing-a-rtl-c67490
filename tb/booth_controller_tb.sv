// booth_controller_tb: self-checking test of the Booth control FSM.
//
// A counter in the testbench stands in for the datapath's iteration counter
// (cleared by clr_c, advanced by inc_c, count_last at N-1). The testbench
// checks the exact control word of every cycle from start to done: one
// Reg_rst+clrC cycle, one LdX+LdY cycle, N times {Load, Right_shift,
// LdX-from-Q+incC}, one LdRes cycle with done; that done comes in the 51st
// cycle after start; that busy covers the operation; and that start while
// busy is ignored.
module booth_controller_tb;
  localparam int N = 16;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, count_last;
  logic reg_rst, ld_x, x_sel, ld_y, ld_res, shift_en, load, right_shift;
  logic clr_c, inc_c, busy, done;
  int checks = 0, failures = 0;
  int cnt = 0;

  booth_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (clr_c)      cnt <= 0;
    else if (inc_c) cnt <= cnt + 1;
  end
  assign count_last = (cnt == N - 1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [10:0] ctl();
    return {reg_rst, ld_x, x_sel, ld_y, ld_res, shift_en, load, right_shift, clr_c, inc_c, done};
  endfunction

  localparam logic [10:0] C_IDLE  = 11'b00000000000;
  localparam logic [10:0] C_CLEAR = 11'b10000000100;
  localparam logic [10:0] C_INIT  = 11'b01010000000;
  localparam logic [10:0] C_LOAD  = 11'b00000110000;
  localparam logic [10:0] C_SHIFT = 11'b00000101000;
  localparam logic [10:0] C_NEXT  = 11'b01100000010;
  localparam logic [10:0] C_FIN   = 11'b00001000001;

  task automatic expect_word(input logic [10:0] w, input string what);
    check(ctl() == w, $sformatf("%s: control %b expected %b", what, ctl(), w));
  endtask

  task automatic run_one(input bit poke_start);
    @(negedge clk);
    expect_word(C_IDLE, "idle");
    check(!busy, "not busy when idle");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    expect_word(C_CLEAR, "clear");
    check(busy, "busy");
    @(negedge clk);
    expect_word(C_INIT, "init");
    for (int i = 0; i < N; i++) begin
      if (poke_start) start = 1'b1;
      @(negedge clk);
      expect_word(C_LOAD, $sformatf("load %0d", i));
      @(negedge clk);
      expect_word(C_SHIFT, $sformatf("shift %0d", i));
      @(negedge clk);
      expect_word(C_NEXT, $sformatf("next %0d", i));
    end
    start = 1'b0;
    @(negedge clk);
    expect_word(C_FIN, "finish");
    check(cnt == N, "N iterations counted");
    @(negedge clk);
    expect_word(C_IDLE, "back to idle");
  endtask

  int lat;
  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run_one(1'b0);
    run_one(1'b1);
    // Latency: done in the 51st cycle after the cycle holding start.
    @(negedge clk);
    start = 1'b1;
    lat = 0;
    do begin
      @(negedge clk);
      start = 1'b0;
      lat++;
    end while (!done && lat < 200);
    check(lat == 3 * N + 3, $sformatf("latency %0d expected %0d", lat, 3 * N + 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
