// ps2_rx: receiver for PS/2 keyboard frames.
//
// A PS/2 keyboard sends 11-bit frames: a start bit (0), eight data bits LSB
// first, an odd parity bit and a stop bit (1), each bit valid on a falling
// edge of the keyboard clock; both lines idle high. The receiver follows the
// published three-state ASM chart: START waits for a falling edge with the
// data line low, DATA shifts eight bits into a serial-in parallel-out shift
// register while a counter counts the clock edges, PARITY takes the parity
// and stop bits and then returns to START. The scan code byte is then on
// code with a one-cycle code_valid pulse.
//
// Own choices: the keyboard clock and data are brought into the system clock
// domain with two-flop synchronisers and the falling edge is detected there,
// rather than clocking the shift register with the keyboard clock itself; a
// frame whose parity is not odd or whose stop bit is 0 is dropped and
// reported with a frame_err pulse instead of code_valid.
//
// Timing: code_valid rises three clk cycles after the keyboard clock's
// eleventh falling edge. clk must be well above 2x the keyboard clock
// (10-16.7 kHz).
module ps2_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic [7:0] code,
  output logic       code_valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {S_START, S_DATA, S_PARITY} state_e;

  logic [2:0] clk_sync;
  logic [1:0] dat_sync;
  logic       fall, din;
  state_e     state;
  logic [2:0] cnt;
  logic [7:0] sr;
  logic       par;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync <= '1;
      dat_sync <= '1;
    end else begin
      clk_sync <= {clk_sync[1:0], ps2_clk};
      dat_sync <= {dat_sync[0], ps2_data};
    end
  end

  assign fall = clk_sync[2] & ~clk_sync[1];
  assign din  = dat_sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_START;
      cnt        <= '0;
      sr         <= '0;
      par        <= 1'b0;
      code       <= '0;
      code_valid <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      code_valid <= 1'b0;
      frame_err  <= 1'b0;
      if (fall) begin
        unique case (state)
          S_START: begin
            if (!din) begin
              state <= S_DATA;
              cnt   <= '0;
            end
          end
          S_DATA: begin
            sr  <= {din, sr[7:1]};
            cnt <= cnt + 1'b1;
            if (cnt == 3'd7) begin
              state <= S_PARITY;
              cnt   <= '0;
            end
          end
          S_PARITY: begin
            if (cnt == 3'd0) begin
              par <= din;
              cnt <= 3'd1;
            end else begin
              state <= S_START;
              cnt   <= '0;
              if (din && (^{sr, par})) begin
                code       <= sr;
                code_valid <= 1'b1;
              end else begin
                frame_err  <= 1'b1;
              end
            end
          end
          default: state <= S_START;
        endcase
      end
    end
  end
endmodule
