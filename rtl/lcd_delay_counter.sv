// lcd_delay_counter: times one write cycle on the LCD bus.
//
// Every byte sent to the LCD, command or character, is framed by this
// counter: the published timing holds the enable line E high for 10 us and
// then low for 1000 us before the next byte. The controller clears the
// counter (clr) when it puts a byte on the bus and lets it count (inc) until
// elapsed. en_window is high for counts 1 to EN_CYCLES (EN_CYCLES cycles),
// so E, registered from it by the controller, rises two cycles after the data
// and RS are set; elapsed is high from count EN_CYCLES + GAP_CYCLES on, and
// the counter saturates there. The window counts are this design's choice.
module lcd_delay_counter #(
  parameter int unsigned EN_CYCLES  = 500,
  parameter int unsigned GAP_CYCLES = 50_000
) (
  input  logic clk,
  input  logic rst,
  input  logic clr,
  input  logic inc,
  output logic en_window,
  output logic elapsed
);
  localparam int unsigned LAST = EN_CYCLES + GAP_CYCLES;
  localparam int unsigned CW   = $clog2(LAST + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || clr)
      cnt <= '0;
    else if (inc && !elapsed)
      cnt <= cnt + 1'b1;
  end

  assign en_window = (cnt >= CW'(1)) && (cnt <= CW'(EN_CYCLES));
  assign elapsed   = (cnt >= CW'(LAST));
endmodule
