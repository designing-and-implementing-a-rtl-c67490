// booth_controller: finite-state machine that sequences the Booth datapath.
//
// On start it clears the datapath registers (Reg_rst) and the iteration
// counter (clrC), loads the initial X and Y (LdX, LdY), and then runs N
// iterations of three states each: LOAD puts the add/subtract/pass result
// into Q (Shift_enable, Load), SHIFT shifts Q right arithmetically
// (Shift_enable, Right_shift), NEXT copies Q back into X and counts (LdX from
// Q, incC). After the N-th iteration FINISH loads X[2N:1] into the result
// register (LdRes) and pulses done. The control signals are those the
// published data and control path names; the split into these states, the
// three-cycle iteration and the done/busy handshake are this design's own.
//
// The iteration count N is held by the datapath's counter, which reports
// its last value on count_last.
//
// Timing: start is sampled in IDLE; done is high in the (3N+3)-th cycle after
// the one in which start is high (the 51st for N = 16), and the result
// register is loaded at the end of that cycle. start is ignored while busy.
module booth_controller (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic count_last,
  output logic reg_rst,
  output logic ld_x,
  output logic x_sel,
  output logic ld_y,
  output logic ld_res,
  output logic shift_en,
  output logic load,
  output logic right_shift,
  output logic clr_c,
  output logic inc_c,
  output logic busy,
  output logic done
);
  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_INIT, S_LOAD, S_SHIFT, S_NEXT, S_FINISH
  } state_e;

  state_e state, state_nx;

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else     state <= state_nx;
  end

  always_comb begin
    state_nx    = state;
    reg_rst     = 1'b0;
    ld_x        = 1'b0;
    x_sel       = 1'b0;
    ld_y        = 1'b0;
    ld_res      = 1'b0;
    shift_en    = 1'b0;
    load        = 1'b0;
    right_shift = 1'b0;
    clr_c       = 1'b0;
    inc_c       = 1'b0;
    done        = 1'b0;
    unique case (state)
      S_IDLE:   if (start) state_nx = S_CLEAR;
      S_CLEAR: begin
        reg_rst  = 1'b1;
        clr_c    = 1'b1;
        state_nx = S_INIT;
      end
      S_INIT: begin
        ld_x     = 1'b1;
        ld_y     = 1'b1;
        state_nx = S_LOAD;
      end
      S_LOAD: begin
        shift_en = 1'b1;
        load     = 1'b1;
        state_nx = S_SHIFT;
      end
      S_SHIFT: begin
        shift_en    = 1'b1;
        right_shift = 1'b1;
        state_nx    = S_NEXT;
      end
      S_NEXT: begin
        ld_x     = 1'b1;
        x_sel    = 1'b1;
        inc_c    = 1'b1;
        state_nx = count_last ? S_FINISH : S_LOAD;
      end
      S_FINISH: begin
        ld_res   = 1'b1;
        done     = 1'b1;
        state_nx = S_IDLE;
      end
      default:  state_nx = S_IDLE;
    endcase
  end

  assign busy = (state != S_IDLE);

  // Load and shift of Q are never requested together.
  assert property (@(posedge clk) disable iff (rst) !(load && right_shift));
endmodule
