// key_control: turns key presses into operands, a start and display requests.
//
// Takes the scan-code bytes from ps2_rx and decodes them with scan_lut. Digit
// keys are shifted into a 16-bit entry register one hexadecimal digit at a
// time, so up to four digits form a 16-bit two's-complement operand (typing
// C alone gives twelve). '*' copies the entry into the X register, '#' copies
// it into Y, '=' pulses start for the Booth multiplier. Three one-bit
// registers keep the order the published design asks for: x_loaded (X
// stored, '#' now accepted), y_loaded (Y stored, '=' now accepted) and the
// start pulse. After '=' both flags clear, ready for the next pair. disp_x and
// disp_y pulse when X or Y is stored and disp_z when the multiplier reports
// done, telling the LCD controller which value to show.
//
// Own choices: hexadecimal entry into one 16-bit register; a second '*' before
// '#' replaces X, a second '#' before '=' replaces Y; break codes (F0 xx) and
// extended codes (E0 xx) are ignored apart from tracking the Shift keys, so
// each key acts once, on its make code.
//
// Timing: one code per code_valid pulse; x, y change and start, disp_x,
// disp_y pulse on the cycle after the code_valid that completes a key.
module key_control
  import calc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  code,
  input  logic        code_valid,
  input  logic        mult_done,
  output logic [15:0] x,
  output logic [15:0] y,
  output logic [15:0] entry,
  output logic        x_loaded,
  output logic        y_loaded,
  output logic        start,
  output logic        disp_x,
  output logic        disp_y,
  output logic        disp_z
);
  logic brk, ext, shift_l, shift_r;
  key_t key;

  scan_lut u_lut (.code, .shift(shift_l | shift_r), .key);

  always_ff @(posedge clk) begin
    if (rst) begin
      brk      <= 1'b0;
      ext      <= 1'b0;
      shift_l  <= 1'b0;
      shift_r  <= 1'b0;
      x        <= '0;
      y        <= '0;
      entry    <= '0;
      x_loaded <= 1'b0;
      y_loaded <= 1'b0;
      start    <= 1'b0;
      disp_x   <= 1'b0;
      disp_y   <= 1'b0;
      disp_z   <= 1'b0;
    end else begin
      start  <= 1'b0;
      disp_x <= 1'b0;
      disp_y <= 1'b0;
      disp_z <= mult_done;
      if (code_valid) begin
        if (code == PS2_BREAK) begin
          brk <= 1'b1;
        end else if (code == PS2_EXTENDED) begin
          ext <= 1'b1;
        end else begin
          brk <= 1'b0;
          ext <= 1'b0;
          if (!ext && code == PS2_LSHIFT) begin
            shift_l <= !brk;
          end else if (!ext && code == PS2_RSHIFT) begin
            shift_r <= !brk;
          end else if (!brk && !ext) begin
            unique case (key.kind)
              KEY_DIGIT: entry <= {entry[11:0], key.value};
              KEY_STAR: if (!y_loaded) begin
                x        <= entry;
                entry    <= '0;
                x_loaded <= 1'b1;
                disp_x   <= 1'b1;
              end
              KEY_HASH: if (x_loaded) begin
                y        <= entry;
                entry    <= '0;
                y_loaded <= 1'b1;
                disp_y   <= 1'b1;
              end
              KEY_EQUAL: if (x_loaded && y_loaded) begin
                start    <= 1'b1;
                x_loaded <= 1'b0;
                y_loaded <= 1'b0;
              end
              default: ;
            endcase
          end
        end
      end
    end
  end

  // '=' is only acted on once both operands are in place.
  assert property (@(posedge clk) disable iff (rst) start |-> $past(x_loaded && y_loaded));
endmodule
