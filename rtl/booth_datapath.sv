// booth_datapath: registers and arithmetic of the radix-2 Booth multiplier.
//
// The multiplier operand init_x is placed in a (2N+1)-bit register X as
// {N zeros, init_x, 0}; the multiplicand init_y is placed in a (2N+1)-bit
// register Y as {init_y, N zeros, 0}. Each iteration looks at the two low bits
// of X: 01 selects X+Y, 10 selects X-Y, 00 and 11 select X unchanged. A
// 4-input multiplexer picks among these and its output Q_IN is loaded into the
// shift register Q, which is then shifted one place right arithmetically.
// Q is copied back into X for the next iteration. After N iterations the
// product is X[2N:1], which is loaded into the result register. The layout of
// X and Y, the adder and subtractor, the 4-input multiplexer, the shift
// register Q and the control signal names (LdX, LdY, LdRes, Reg_rst,
// Shift_enable, Load, Right_shift, clrC, incC) follow the published
// architecture; x_sel (choosing the initial value or Q as the source of X)
// is this design's own.
//
// Interface: all control inputs act on the rising edge of clk. rst and
// reg_rst both clear X, Y, Q, the counter and the result (synchronous).
// Q loads when shift_en & load, shifts when shift_en & ~load & right_shift.
// count_last is high while the counter holds N-1.
//
// Known limit of the (2N+1)-bit width: the accumulator field X[2N:N+1] has no
// guard bit, so with a multiplicand init_y of -2^(N-1) the first subtraction
// overflows it and the product is wrong for every nonzero multiplier. Every
// other operand pair (init_x = -2^(N-1) included) gives the exact 2N-bit
// signed product.
module booth_datapath #(
  parameter int unsigned N = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N-1:0]     init_x,
  input  logic [N-1:0]     init_y,
  input  logic             reg_rst,
  input  logic             ld_x,
  input  logic             x_sel,      // 0: initial value, 1: Q
  input  logic             ld_y,
  input  logic             ld_res,
  input  logic             shift_en,
  input  logic             load,
  input  logic             right_shift,
  input  logic             clr_c,
  input  logic             inc_c,
  output logic [1:0]       x_lsb2,
  output logic             count_last,
  output logic [$clog2(N+1)-1:0] count,
  output logic [2*N:0]     x_q,
  output logic [2*N:0]     q_q,
  output logic [2*N-1:0]   result
);
  localparam int unsigned W = 2 * N + 1;

  logic [W-1:0] y_q;
  logic [W-1:0] sum, diff, q_in;

  // Adder, subtractor and the 4-input multiplexer selected by X1X0.
  assign sum  = x_q + y_q;
  assign diff = x_q - y_q;
  always_comb begin
    unique case (x_q[1:0])
      2'b01:   q_in = sum;
      2'b10:   q_in = diff;
      default: q_in = x_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || reg_rst) begin
      x_q    <= '0;
      y_q    <= '0;
      q_q    <= '0;
      result <= '0;
    end else begin
      if (ld_x)
        x_q <= x_sel ? q_q : {{N{1'b0}}, init_x, 1'b0};
      if (ld_y)
        y_q <= {init_y, {N{1'b0}}, 1'b0};
      if (shift_en) begin
        if (load)
          q_q <= q_in;
        else if (right_shift)
          q_q <= {q_q[W-1], q_q[W-1:1]};
      end
      if (ld_res)
        result <= x_q[W-1:1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clr_c)
      count <= '0;
    else if (inc_c)
      count <= count + 1'b1;
  end

  assign x_lsb2     = x_q[1:0];
  assign count_last = (count == ($clog2(N+1))'(N - 1));
endmodule
