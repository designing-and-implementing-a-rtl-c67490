// ps2_rx_tb: self-checking test of the PS/2 frame receiver.
//
// A behavioural keyboard sends 300 random bytes, then frames with a parity
// error and with a stop-bit error. The testbench checks that every good byte
// comes out once, in order, with code_valid, that bad frames raise frame_err
// and no code_valid, that reception recovers afterwards, and that code_valid
// follows the eleventh falling keyboard-clock edge within four clk cycles.
module ps2_rx_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic ps2_clk, ps2_data;
  logic [7:0] code;
  logic code_valid, frame_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] got [$];

  ps2_rx dut (.*);
  ps2_keyboard_model #(.HALF(12)) kbd (.clk, .ps2_clk, .ps2_data);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // Collect outputs; measure distance from the last keyboard-clock fall.
  int since_fall = 0;
  logic ps2_clk_d = 1'b1;
  always @(posedge clk) begin
    ps2_clk_d <= ps2_clk;
    if (ps2_clk_d && !ps2_clk) since_fall <= 0;
    else                       since_fall <= since_fall + 1;
    if (code_valid && !rst) begin
      got.push_back(code);
      n_valid++;
      check(since_fall <= 4, $sformatf("code_valid %0d cycles after last fall", since_fall));
    end
    if (frame_err && !rst) n_err++;
  end

  logic [7:0] sent [$];
  logic [7:0] b;
  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      b = 8'($urandom);
      sent.push_back(b);
      kbd.send_byte(b);
    end
    repeat (10) @(posedge clk);
    check(got.size() == 300, $sformatf("received %0d of 300", got.size()));
    for (int i = 0; i < 300 && i < got.size(); i++)
      check(got[i] == sent[i], $sformatf("byte %0d: %h expected %h", i, got[i], sent[i]));
    check(n_err == 0, "no frame errors on good frames");

    kbd.send_byte(8'h5A, 1'b1, 1'b0);
    kbd.send_byte(8'h1C, 1'b0, 1'b1);
    repeat (10) @(posedge clk);
    check(n_err == 2, $sformatf("frame errors %0d expected 2", n_err));
    check(n_valid == 300, "bad frames give no code");

    kbd.send_byte(8'hA5);
    repeat (10) @(posedge clk);
    check(n_valid == 301 && got[300] == 8'hA5, "recovers after bad frames");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
