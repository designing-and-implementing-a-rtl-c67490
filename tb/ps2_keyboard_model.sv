// ps2_keyboard_model: behavioural PS/2 keyboard for simulation.
//
// Drives the keyboard's clock and data lines the way a keyboard sends to its
// host: an 11-bit frame per byte (start 0, eight data bits LSB first, odd
// parity, stop 1), each bit set up while the clock is high and read by the
// host on the falling edge. Both lines idle high. HALF is the half period of
// the keyboard clock in cycles of clk. Tasks: send_byte sends one frame (with
// an optional parity or stop error), press sends a make code, release the
// break sequence F0 code, tap a press followed by a release.
module ps2_keyboard_model #(
  parameter int unsigned HALF = 20
) (
  input  logic clk,
  output logic ps2_clk,
  output logic ps2_data
);
  initial begin
    ps2_clk  = 1'b1;
    ps2_data = 1'b1;
  end

  task automatic send_byte(input logic [7:0] b, input bit bad_parity = 1'b0,
                           input bit bad_stop = 1'b0);
    logic [10:0] frame;
    frame = {~bad_stop, ~(^b) ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = frame[i];
      repeat (HALF) @(posedge clk);
      ps2_clk = 1'b0;
      repeat (HALF) @(posedge clk);
      ps2_clk = 1'b1;
    end
    ps2_data = 1'b1;
    repeat (4 * HALF) @(posedge clk);
  endtask

  task automatic press(input logic [7:0] code);
    send_byte(code);
  endtask

  task automatic release_key(input logic [7:0] code);
    send_byte(8'hF0);
    send_byte(code);
  endtask

  task automatic tap(input logic [7:0] code);
    press(code);
    release_key(code);
  endtask
endmodule
