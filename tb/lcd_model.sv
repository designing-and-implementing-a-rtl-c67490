// lcd_model: behavioural 16x2 character LCD (HD44780 bus, 8-bit, write only).
//
// Latches the bus when E falls: RS=0 is an instruction, RS=1 a character
// written at the cursor, which then moves right. Understood instructions:
// 01h clear, 02h home, 80h|addr set the cursor (line 1 at 00h, line 2 at
// 40h); others are only logged. It also checks the bus timing against the
// controller's contract: E must stay high at least MIN_EN cycles, and the
// next E must not rise until MIN_GAP cycles after the previous fall; RW must
// be 0 at every write. Violations are counted in errors. All instructions are
// kept in cmd_log, in order.
module lcd_model #(
  parameter int unsigned MIN_EN  = 1,
  parameter int unsigned MIN_GAP = 1
) (
  input  logic       clk,
  input  logic       rst,       // bus ignored while high (controller in reset)
  input  logic [7:0] lcd_data,
  input  logic       lcd_rs,
  input  logic       lcd_rw,
  input  logic       lcd_en
);
  logic [7:0] line1 [16];
  logic [7:0] line2 [16];
  logic [6:0] addr;
  int unsigned errors, n_cmd, n_char;
  logic [7:0] cmd_log [64];
  logic en_d;
  int unsigned en_len, gap_len;
  bit seen_fall;

  initial begin
    for (int i = 0; i < 16; i++) begin
      line1[i] = 8'h20;
      line2[i] = 8'h20;
    end
    addr = '0; errors = 0; n_cmd = 0; n_char = 0;
    en_d = 1'b0; en_len = 0; gap_len = 0; seen_fall = 0;
  end

  always @(posedge clk) if (rst) begin
    en_d <= 1'b0;
  end else begin
    en_d <= lcd_en;
    if (lcd_en) en_len <= en_len + 1;
    else        gap_len <= gap_len + 1;
    if (lcd_en && !en_d) begin
      if (seen_fall && gap_len < MIN_GAP) errors <= errors + 1;
      en_len <= 1;
    end
    if (!lcd_en && en_d) begin
      if (en_len < MIN_EN) errors <= errors + 1;
      if (lcd_rw) errors <= errors + 1;
      gap_len   <= 1;
      seen_fall <= 1'b1;
      if (!lcd_rs) begin
        if (n_cmd < 64) cmd_log[n_cmd] <= lcd_data;
        n_cmd <= n_cmd + 1;
        if (lcd_data == 8'h01) begin
          for (int i = 0; i < 16; i++) begin
            line1[i] <= 8'h20;
            line2[i] <= 8'h20;
          end
          addr <= '0;
        end else if (lcd_data == 8'h02) begin
          addr <= '0;
        end else if (lcd_data[7]) begin
          addr <= lcd_data[6:0];
        end
      end else begin
        n_char <= n_char + 1;
        if (addr < 7'h10)                      line1[addr[3:0]] <= lcd_data;
        else if (addr >= 7'h40 && addr < 7'h50) line2[addr[3:0]] <= lcd_data;
        addr <= addr + 1'b1;
      end
    end
  end

  // Text of a line with trailing spaces removed.
  function automatic string text(input int unsigned ln);
    string s;
    int last;
    s = "";
    last = -1;
    for (int i = 0; i < 16; i++)
      if ((ln == 1 ? line1[i] : line2[i]) != 8'h20) last = i;
    for (int i = 0; i <= last; i++)
      s = $sformatf("%s%c", s, (ln == 1) ? line1[i] : line2[i]);
    return s;
  endfunction
endmodule
