// booth_multiplier_tb: self-checking test of the 16x16 Booth multiplier.
//
// 1. Multiplies 17 by 51 (the published worked example) and checks 867.
// 2. Checks the latency: done pulses 51 cycles after start.
// 3. Checks corner cases and 2000 random signed pairs against the product
//    computed by the testbench (multiplicand -32768 excluded, see
//    booth_datapath).
// 4. Checks that start is ignored while busy.
module booth_multiplier_tb;
  localparam int N = 16;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [N-1:0] init_x = '0, init_y = '0;
  logic busy, done;
  logic [2*N-1:0] result;
  int checks = 0, failures = 0;

  booth_multiplier #(.N(N)) dut (.*);

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

  // Start at a falling edge, count falling edges until done is seen: done
  // is high in the (3N+3)-th cycle after the one in which start is high.
  task automatic multiply(input logic signed [N-1:0] a, input logic signed [N-1:0] b,
                          output int cycles);
    @(negedge clk);
    init_x = a;
    init_y = b;
    start  = 1'b1;
    cycles = 0;
    do begin
      @(negedge clk);
      start = 1'b0;
      cycles++;
    end while (!done && cycles < 1000);
    @(negedge clk);
  endtask

  int cyc;
  logic signed [N-1:0] a, b;
  logic signed [2*N-1:0] expect_p;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    multiply(16'sd17, 16'sd51, cyc);
    check(result == 32'd867, $sformatf("17*51 result=%0d", result));
    check(cyc == 3 * N + 3, $sformatf("latency %0d cycles, expected %0d", cyc, 3 * N + 3));

    // Corner cases.
    begin
      logic signed [N-1:0] cx [8] = '{0, 1, -1, 32767, -32768, 12, -7, 255};
      logic signed [N-1:0] cy [8] = '{0, -1, -1, 32767, 32767, 3, -7, -256};
      for (int i = 0; i < 8; i++) begin
        multiply(cx[i], cy[i], cyc);
        expect_p = 32'(cx[i]) * 32'(cy[i]);
        check(result == expect_p,
              $sformatf("%0d*%0d=%0d expected %0d", cx[i], cy[i], $signed(result), expect_p));
      end
    end

    for (int i = 0; i < 2000; i++) begin
      a = N'($urandom);
      do b = N'($urandom); while (b == -32768);
      multiply(a, b, cyc);
      expect_p = 32'(a) * 32'(b);
      check(result == expect_p,
            $sformatf("%0d*%0d=%0d expected %0d", a, b, $signed(result), expect_p));
    end

    // A start during a multiplication must not restart it.
    @(negedge clk);
    init_x = 16'sd100;
    init_y = 16'sd3;
    start  = 1'b1;
    cyc    = 0;
    do begin
      @(negedge clk);
      cyc++;
      start = (cyc == 10);
    end while (!done && cyc < 1000);
    check(cyc == 3 * N + 3, $sformatf("start while busy changed latency to %0d", cyc));
    @(negedge clk);
    check(result == 32'd300, "100*3 after ignored start");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
