// pwm_gen: PWM carrier and sample clock for one track.
//
// A free-running PWM_W-bit counter wraps every 2^PWM_W clocks (256 clocks,
// 156.25 kHz at 40 MHz). sample_en is high while the counter is 0, once per
// wrap: it asks wave_gen for the next amplitude, which the volume stage turns
// into the magnitude used for the following PWM cycle. pwm_out is high while
// the counter is below magnitude, so the duty cycle is magnitude / 2^PWM_W
// and a magnitude of 0 keeps the output low.
//
// Timing: pwm_out is registered (one clock after the compare). After reset
// the counter starts at 2^(PWM_W-1), so the first sample request comes
// 2^(PWM_W-1) clocks after reset is released. pwm_out is held low during
// reset.
//
// Counter width, overflow request and reset value follow the original design. The
// original description says the output is high when the counter is "less than or
// equal to" the amplitude, its logic uses "less than"; this block uses
// "less than" so that silence really is silent.
module pwm_gen
  import hdr_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [PWM_W-1:0] magnitude,
  output logic             sample_en,
  output logic             pwm_out
);

  logic [PWM_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) count <= PWM_W'(1) << (PWM_W - 1);
    else     count <= count + 1'b1;
  end

  assign sample_en = (count == '0);

  always_ff @(posedge clk) begin
    pwm_out <= !rst && (count < magnitude);
  end

endmodule
