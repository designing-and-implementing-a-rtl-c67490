// bin2bcd: signed binary to sign and BCD digits, for the LCD.
//
// The calculator keeps X, Y and the product in binary and shows them in
// decimal. This converter takes a W-bit two's-complement value, splits off
// the sign, and turns the magnitude into DIGITS BCD digits with the
// shift-and-add-3 (double dabble) method, one magnitude bit per clock: before
// each left shift every BCD digit of 5 or more gets 3 added. It also reports
// how many digits are significant (at least one, so zero shows as "0").
// The published design asks for BCD display but gives no converter; this one
// is the design's own.
//
// Interface: pulse start with value valid; done pulses W+1 cycles later with
// neg, bcd (most significant digit in the top nibble) and ndigits valid, and
// they hold until the next start. busy is high in between.
module bin2bcd #(
  parameter int unsigned W      = 32,
  parameter int unsigned DIGITS = 10
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic [W-1:0]              value,
  output logic                      busy,
  output logic                      done,
  output logic                      neg,
  output logic [4*DIGITS-1:0]       bcd,
  output logic [$clog2(DIGITS+1)-1:0] ndigits
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]        mag;
  logic [CW-1:0]       bits_left;
  logic [4*DIGITS-1:0] adj;

  // Add 3 to every digit that is 5 or more.
  always_comb begin
    for (int d = 0; d < DIGITS; d++) begin
      adj[4*d +: 4] = (bcd[4*d +: 4] >= 4'd5) ? bcd[4*d +: 4] + 4'd3
                                              : bcd[4*d +: 4];
    end
  end

  // Significant digits of the finished number.
  always_comb begin
    ndigits = 1;
    for (int d = 1; d < DIGITS; d++) begin
      if (bcd[4*d +: 4] != 4'd0) ndigits = ($clog2(DIGITS+1))'(d + 1);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mag       <= '0;
      bits_left <= '0;
      bcd       <= '0;
      neg       <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        neg       <= value[W-1];
        mag       <= value[W-1] ? (~value + 1'b1) : value;
        bcd       <= '0;
        bits_left <= CW'(W);
        busy      <= 1'b1;
      end else if (busy) begin
        bcd       <= {adj[4*DIGITS-2:0], mag[W-1]};
        mag       <= {mag[W-2:0], 1'b0};
        bits_left <= bits_left - 1'b1;
        if (bits_left == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
