// booth_multiplier: sequential N x N signed radix-2 Booth multiplier.
//
// Wires booth_controller to booth_datapath. Present the two's-complement
// operands on init_x (multiplier) and init_y (multiplicand) and pulse start
// while busy is low; the operands are read two cycles later, so hold them
// until busy has been high for two cycles (the calculator holds them in its X
// and Y registers). done is high in the (3N+3)-th cycle after the one in which
// start is high (the 51st for N = 16); result holds the 2N-bit product from
// the next cycle until the next start. A multiplicand of -2^(N-1) is outside the range the
// published (2N+1)-bit register width handles (see booth_datapath).
module booth_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [N-1:0]   init_x,
  input  logic [N-1:0]   init_y,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] result
);
  logic reg_rst, ld_x, x_sel, ld_y, ld_res, shift_en, load, right_shift;
  logic clr_c, inc_c, count_last;
  logic [1:0] x_lsb2;
  logic [$clog2(N+1)-1:0] count;
  logic [2*N:0] x_q, q_q;

  booth_controller u_ctrl (
    .clk, .rst, .start, .count_last,
    .reg_rst, .ld_x, .x_sel, .ld_y, .ld_res, .shift_en, .load, .right_shift,
    .clr_c, .inc_c, .busy, .done
  );

  booth_datapath #(.N(N)) u_dp (
    .clk, .rst, .init_x, .init_y,
    .reg_rst, .ld_x, .x_sel, .ld_y, .ld_res, .shift_en, .load, .right_shift,
    .clr_c, .inc_c,
    .x_lsb2, .count_last, .count, .x_q, .q_q, .result
  );
endmodule
