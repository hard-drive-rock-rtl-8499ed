// output_gen: H-bridge control signals for one track's driver board.
//
// Each output board is a full H-bridge of N-channel MOSFETs behind two
// half-bridge gate drivers. Per side there is an enable and a "high" select:
// with the enable set, high turns on the high-side FET, low the low-side FET
// (the driver inserts the dead time). Both sides are enabled whenever the
// logic is out of reset. The PWM bit is steered to the left side for a
// negative wave sign and to the right side for a positive one, so the coil
// current reverses with the sign of the wave; with the PWM bit low both sides
// pull low and the coil is shorted through the low-side FETs.
//
// Timing: all four outputs are registered, one clock after their inputs;
// reset (synchronous, active high) drives all four low, so the bridge floats.
//
// The mapping follows the original design; calling the sign-1 half-wave "negative" is
// the naming used throughout this implementation.
module output_gen (
  input  logic clk,
  input  logic rst,
  input  logic pwm_out,
  input  logic sign,
  output logic left_high,
  output logic left_en,
  output logic right_high,
  output logic right_en
);

  always_ff @(posedge clk) begin
    if (rst) begin
      left_high  <= 1'b0;
      left_en    <= 1'b0;
      right_high <= 1'b0;
      right_en   <= 1'b0;
    end else begin
      left_en    <= 1'b1;
      right_en   <= 1'b1;
      left_high  <= sign & pwm_out;
      right_high <= ~sign & pwm_out;
    end
  end

  // The two high-side FETs of one bridge must never be on together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (rst) !(left_high && right_high))
    else $error("both high sides on");

endmodule
