// booth_datapath_tb: self-checking test of the Booth datapath on its own.
//
// The testbench plays the controller: it clears the registers (reg_rst), loads
// the initial X and Y, and runs N iterations of Load, Right_shift and LdX-from-Q
// with incC. It checks
//  - the X register at every iteration of 17 x 51 against the published
//    33-bit step-by-step trace, and the product 867;
//  - Q after each Load (X+Y, X-Y or X, chosen by X1X0) and after each shift
//    against a model of the algorithm, for random operand pairs;
//  - count_last, the result register and reg_rst.
module booth_datapath_tb;
  localparam int N = 16;
  localparam int W = 2 * N + 1;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] init_x = '0, init_y = '0;
  logic reg_rst = 0, ld_x = 0, x_sel = 0, ld_y = 0, ld_res = 0;
  logic shift_en = 0, load = 0, right_shift = 0, clr_c = 0, inc_c = 0;
  logic [1:0] x_lsb2;
  logic count_last;
  logic [$clog2(N+1)-1:0] count;
  logic [W-1:0] x_q, q_q;
  logic [2*N-1:0] result;
  int checks = 0, failures = 0;

  booth_datapath #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [32:0] trace [17] = '{
    33'h000000022, 33'h1FFCD0011, 33'h000198008, 33'h0000CC004,
    33'h000066002, 33'h1FFD03001, 33'h0001B1800, 33'h0000D8C00,
    33'h00006C600, 33'h000036300, 33'h00001B180, 33'h00000D8C0,
    33'h000006C60, 33'h000003630, 33'h000001B18, 33'h000000D8C,
    33'h0000006C6 };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One clock with the given controls, applied at a falling edge.
  task automatic step(input logic [9:0] c);
    {reg_rst, ld_x, x_sel, ld_y, ld_res, shift_en, load, right_shift, clr_c, inc_c} = c;
    @(negedge clk);
    {reg_rst, ld_x, x_sel, ld_y, ld_res, shift_en, load, right_shift, clr_c, inc_c} = '0;
  endtask

  localparam logic [9:0] C_CLEAR = 10'b1000000010;
  localparam logic [9:0] C_INIT  = 10'b0101000000;
  localparam logic [9:0] C_LOAD  = 10'b0000011000;
  localparam logic [9:0] C_SHIFT = 10'b0000010100;
  localparam logic [9:0] C_NEXT  = 10'b0110000001;
  localparam logic [9:0] C_RES   = 10'b0000100000;

  task automatic run(input logic [N-1:0] a, input logic [N-1:0] b, input bit use_trace);
    logic [W-1:0] mx, my, mq;
    init_x = a;
    init_y = b;
    step(C_CLEAR);
    check(x_q == '0 && q_q == '0 && result == '0 && count == '0, "reg_rst clears");
    step(C_INIT);
    mx = {{N{1'b0}}, a, 1'b0};
    my = {b, {N{1'b0}}, 1'b0};
    check(x_q == mx, "initial X layout");
    for (int i = 0; i < N; i++) begin
      if (use_trace) check(x_q == trace[i], $sformatf("trace step %0d X=%h expected %h", i + 1, x_q, trace[i]));
      check(x_lsb2 == mx[1:0], "X1X0");
      check(count_last == (i == N - 1), $sformatf("count_last at %0d", i));
      step(C_LOAD);
      unique case (mx[1:0])
        2'b01:   mq = mx + my;
        2'b10:   mq = mx - my;
        default: mq = mx;
      endcase
      check(q_q == mq, $sformatf("Q after load, step %0d: %h expected %h", i + 1, q_q, mq));
      step(C_SHIFT);
      mq = {mq[W-1], mq[W-1:1]};
      check(q_q == mq, $sformatf("Q after shift, step %0d", i + 1));
      step(C_NEXT);
      mx = mq;
      check(x_q == mx, "X loaded from Q");
    end
    if (use_trace) check(x_q == trace[16], "trace final X");
    check(count == N, "count reaches N");
    step(C_RES);
    check(result == mx[W-1:1], "result is X[2N:1]");
    if (b != {1'b1, {(N-1){1'b0}}})
      check($signed(result) == $signed(a) * $signed(b),
            $sformatf("%0d*%0d gave %0d", $signed(a), $signed(b), $signed(result)));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(16'd17, 16'd51, 1'b1);
    for (int i = 0; i < 50; i++) run(N'($urandom), N'($urandom), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
