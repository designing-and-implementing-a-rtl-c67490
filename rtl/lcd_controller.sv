// lcd_controller: drives a 16x2 character LCD (HD44780 bus, 8-bit mode).
//
// The controller follows the published six-state machine: IDLE waits for
// lcd_start; LCDCMD_INIT sends the initialisation commands clear (01h),
// return home (02h), entry mode increment (06h), display on with blinking
// cursor (0Eh), 8-bit two-line mode (38h), line 1 (80h) and line 2 (C0h);
// WAIT idles until a value has to be shown; SEL_IN sets the multiplexer to X,
// Y or Z; LCDCMD_LINE sends the cursor address of the line; LCD_DISPLAY
// sends the characters. Commands go out with RS=0, characters with RS=1, RW
// is always 0. Each byte is held on the bus while E is high for EN_US
// microseconds and for GAP_US microseconds after E falls (10 us and 1000 us
// in the published timing), timed by lcd_delay_counter.
//
// The value picked by the multiplexer is converted to sign and decimal digits
// by bin2bcd (an extra CONVERT state between SEL_IN and LCDCMD_LINE); the
// digits are loaded into a digit shift register and each 4-bit digit is
// turned into its ASCII code by ascii_lut. Own choices: digits are sent most
// significant first with leading zeros dropped, so 3456 appears as "3456";
// a negative value gets a leading '-'; the rest of the 16-character line is
// filled with spaces so that an older, longer value is overwritten. X is shown
// on line 1, Y and the product Z on line 2. Requests (req_x, req_y, req_z
// pulses) are remembered until served, X first, then Y, then Z.
//
// Timing: each byte is set on lcd_data/lcd_rs, E rises two cycles later and
// stays high EN_US microseconds, and the next byte follows about GAP_US
// microseconds after E falls.
//
// Interface: x, y and z must hold their values from the request until the
// line is written. ready is high while the controller waits in WAIT with no
// request outstanding. Writing one line takes 17 bus writes (line address and
// 16 characters), each EN_US + GAP_US microseconds plus two clock cycles.
module lcd_controller
  import calc_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned EN_US  = 10,
  parameter int unsigned GAP_US = 1000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        lcd_start,
  input  logic        req_x,
  input  logic        req_y,
  input  logic        req_z,
  input  logic [15:0] x,
  input  logic [15:0] y,
  input  logic [31:0] z,
  output logic [7:0]  lcd_data,
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic        lcd_en,
  output logic        ready
);
  localparam int unsigned EN_CYCLES  = (CLK_HZ / 1_000_000) * EN_US;
  localparam int unsigned GAP_CYCLES = (CLK_HZ / 1_000_000) * GAP_US;
  localparam int unsigned DIGITS     = 10;
  localparam int unsigned NINIT      = 7;

  typedef enum logic [2:0] {
    IDLE, LCDCMD_INIT, WAIT, SEL_IN, CONVERT, LCDCMD_LINE, LCD_DISPLAY
  } state_e;

  state_e      state;
  logic        writing;
  logic [2:0]  init_idx;
  logic [2:0]  pend;            // {z, y, x}
  disp_sel_e   sel;
  logic [31:0] mux_val;
  logic        conv_start, conv_busy, conv_done, conv_neg;
  logic [4*DIGITS-1:0] conv_bcd;
  logic [$clog2(DIGITS+1)-1:0] conv_nd;
  logic [4*DIGITS-1:0] dig_sr;  // digit shift register, next digit on top
  logic [$clog2(DIGITS+1)-1:0] dig_left;
  logic        sign_pend;
  logic [4:0]  col;
  logic [7:0]  digit_ascii, next_byte;
  logic        next_rs;
  logic        cnt_clr, en_window, elapsed;

  // Initialisation command sequence.
  function automatic logic [7:0] init_cmd(input logic [2:0] i);
    unique case (i)
      3'd0:    return LCD_CLEAR;
      3'd1:    return LCD_HOME;
      3'd2:    return LCD_ENTRY_INC;
      3'd3:    return LCD_DISP_BLINK;
      3'd4:    return LCD_FUNC_8B2L;
      3'd5:    return LCD_LINE1;
      default: return LCD_LINE2;
    endcase
  endfunction

  // Multiplexer over X, Y and Z, sign-extended to 32 bits.
  always_comb begin
    unique case (sel)
      SEL_X:   mux_val = {{16{x[15]}}, x};
      SEL_Y:   mux_val = {{16{y[15]}}, y};
      default: mux_val = z;
    endcase
  end

  bin2bcd #(.W(32), .DIGITS(DIGITS)) u_bcd (
    .clk, .rst, .start(conv_start), .value(mux_val),
    .busy(conv_busy), .done(conv_done), .neg(conv_neg),
    .bcd(conv_bcd), .ndigits(conv_nd)
  );

  ascii_lut u_ascii (.digit(dig_sr[4*DIGITS-1 -: 4]), .ascii(digit_ascii));

  lcd_delay_counter #(.EN_CYCLES(EN_CYCLES), .GAP_CYCLES(GAP_CYCLES)) u_cnt (
    .clk, .rst, .clr(cnt_clr), .inc(writing), .en_window, .elapsed
  );

  // Byte the current state puts on the bus.
  always_comb begin
    next_rs   = 1'b0;
    next_byte = 8'h00;
    unique case (state)
      LCDCMD_INIT: next_byte = init_cmd(init_idx);
      LCDCMD_LINE: next_byte = (sel == SEL_X) ? LCD_LINE1 : LCD_LINE2;
      LCD_DISPLAY: begin
        next_rs = 1'b1;
        if (sign_pend)          next_byte = 8'h2D;   // '-'
        else if (dig_left != 0) next_byte = digit_ascii;
        else                    next_byte = 8'h20;   // ' '
      end
      default: ;
    endcase
  end

  wire emitting = (state == LCDCMD_INIT) || (state == LCDCMD_LINE) ||
                  (state == LCD_DISPLAY);
  assign cnt_clr = emitting && !writing;
  wire byte_done = writing && elapsed;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      writing    <= 1'b0;
      init_idx   <= '0;
      pend       <= '0;
      sel        <= SEL_X;
      conv_start <= 1'b0;
      dig_sr     <= '0;
      dig_left   <= '0;
      sign_pend  <= 1'b0;
      col        <= '0;
      lcd_data   <= '0;
      lcd_rs     <= 1'b0;
      lcd_en     <= 1'b0;
    end else begin
      conv_start <= 1'b0;
      lcd_en     <= writing && en_window;
      pend       <= pend | {req_z, req_y, req_x};

      // Put a new byte on the bus at the start of each write cycle.
      if (cnt_clr) begin
        lcd_data <= next_byte;
        lcd_rs   <= next_rs;
        writing  <= 1'b1;
      end else if (byte_done) begin
        writing  <= 1'b0;
      end

      unique case (state)
        IDLE: if (lcd_start) begin
          state    <= LCDCMD_INIT;
          init_idx <= '0;
        end
        LCDCMD_INIT: if (byte_done) begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == 3'(NINIT - 1)) state <= WAIT;
        end
        WAIT: if (pend != '0) state <= SEL_IN;
        SEL_IN: begin
          // X before Y before Z; the served request is dropped.
          if (pend[0]) begin
            sel <= SEL_X;
            pend[0] <= req_x;
          end else if (pend[1]) begin
            sel <= SEL_Y;
            pend[1] <= req_y;
          end else begin
            sel <= SEL_Z;
            pend[2] <= req_z;
          end
          conv_start <= 1'b1;
          state      <= CONVERT;
        end
        CONVERT: if (conv_done) begin
          dig_sr    <= conv_bcd << (4 * (DIGITS - 32'(conv_nd)));
          dig_left  <= conv_nd;
          sign_pend <= conv_neg;
          col       <= '0;
          state     <= LCDCMD_LINE;
        end
        LCDCMD_LINE: if (byte_done) state <= LCD_DISPLAY;
        LCD_DISPLAY: if (byte_done) begin
          if (sign_pend) begin
            sign_pend <= 1'b0;
          end else if (dig_left != 0) begin
            dig_sr   <= dig_sr << 4;
            dig_left <= dig_left - 1'b1;
          end
          col <= col + 1'b1;
          if (col == 5'(LCD_COLS - 1)) state <= WAIT;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign lcd_rw = 1'b0;
  assign ready  = (state == WAIT) && (pend == 3'b000);

  // E is only raised while a byte is being written.
  assert property (@(posedge clk) disable iff (rst) lcd_en |-> $past(writing));
endmodule
