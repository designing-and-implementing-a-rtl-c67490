// bin2bcd_tb: self-checking test of the binary-to-BCD converter.
//
// Converts corner values (0, 1, -1, 867, 2^31-1, -2^31, 3456) and 500 random
// 32-bit values. The testbench works out sign, digits and the number of
// significant digits by repeated division and compares; it also checks that
// done comes W+1 cycles after start and that busy is high in between.
module bin2bcd_tb;
  localparam int W = 32, D = 10;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [W-1:0] value = '0;
  logic busy, done, neg;
  logic [4*D-1:0] bcd;
  logic [$clog2(D+1)-1:0] ndigits;
  int checks = 0, failures = 0;

  bin2bcd #(.W(W), .DIGITS(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic convert(input logic [W-1:0] v);
    longint m;
    logic [4*D-1:0] eb;
    int en, lat;
    m = $signed(v);
    if (m < 0) m = -m;
    eb = '0;
    en = 1;
    for (int d = 0; d < D; d++) begin
      eb[4*d +: 4] = 4'(m % 10);
      if (m % 10 != 0) en = d + 1;
      m = m / 10;
    end
    @(negedge clk);
    value = v;
    start = 1'b1;
    lat = 0;
    do begin
      @(negedge clk);
      start = 1'b0;
      lat++;
      if (!done) check(busy, "busy during conversion");
    end while (!done && lat < 100);
    check(lat == W + 1, $sformatf("latency %0d", lat));
    check(neg == v[W-1], $sformatf("sign of %0d", $signed(v)));
    check(bcd == eb, $sformatf("digits of %0d: %h expected %h", $signed(v), bcd, eb));
    check(ndigits == en, $sformatf("ndigits of %0d: %0d expected %0d", $signed(v), ndigits, en));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    convert(0);
    convert(1);
    convert('1);
    convert(867);
    convert(32'h7FFF_FFFF);
    convert(32'h8000_0000);
    convert(3456);
    for (int i = 0; i < 500; i++) convert($urandom >> ($urandom % 32));
    for (int i = 0; i < 100; i++) convert($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
