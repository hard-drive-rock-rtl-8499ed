// note_core: tone generator for one track.
//
// Chains the four stages of one track: wave_gen produces a sign and an 8-bit
// sine amplitude once per sample; the amplitude is scaled by the track volume
// (8 x 8 bit product, upper byte kept, rounded to nearest and saturated at
// 255); pwm_gen turns the scaled magnitude into a 40 MHz PWM bit stream with
// one 256-clock period per sample; output_gen steers that stream to the left
// or right half of the H-bridge according to the sign.
//
// Interface: note carries the tune word and volume from the SPI receiver and
// may change at any time. The volume is copied into an internal register only
// at the sample request, so a volume change never alters a PWM period that
// is under way; the tune word is taken by wave_gen at the end of a wave.
//
// Timing: the sample requested at the clock edge where the PWM counter
// leaves 0 sets the bridge outputs for the 256 clocks that start two clocks
// later (PWM compare register, output register); within that window the
// active side is high for exactly magnitude clocks. Synchronous active-high
// reset.
//
// Structure, volume timing, rounding and saturation follow the original design
// (with 8-bit operands the product is at most 65025, so the saturation guard
// never acts; it is kept as a guard for wider operands). The
// one-clock delay of the sign, which keeps sign and PWM bit of the same
// sample together, is this implementation's addition.
module note_core
  import hdr_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  note_packet_t note,
  output logic         left_high,
  output logic         left_en,
  output logic         right_high,
  output logic         right_en
);

  logic                sample_en;
  logic                sign;
  logic [AMP_W-1:0]    amplitude;
  logic [VOL_W-1:0]    cur_vol;
  logic [PWM_W-1:0]    magnitude;
  logic                pwm_out;
  logic                sign_q;
  logic [AMP_W+VOL_W-1:0] product;
  logic [AMP_W-1:0]    prod_hi;

  wave_gen u_wave (
    .clk       (clk),
    .rst       (rst),
    .sample_en (sample_en),
    .tune_word (note.tune_word),
    .sign      (sign),
    .amplitude (amplitude)
  );

  always_ff @(posedge clk) begin
    if (rst)            cur_vol <= '0;
    else if (sample_en) cur_vol <= note.volume;
  end

  // magnitude = round(amplitude * volume / 256), saturated at all ones
  assign product   = amplitude * cur_vol;
  assign prod_hi   = product[AMP_W+VOL_W-1 -: AMP_W];
  assign magnitude = (product[VOL_W-1] && !(&prod_hi)) ? prod_hi + 1'b1 : prod_hi;

  pwm_gen u_pwm (
    .clk       (clk),
    .rst       (rst),
    .magnitude (magnitude),
    .sample_en (sample_en),
    .pwm_out   (pwm_out)
  );

  // pwm_out is one clock behind the compare; delay the sign to match so the
  // last PWM clock of a sample is not steered by the next sample's sign.
  always_ff @(posedge clk) begin
    if (rst) sign_q <= 1'b0;
    else     sign_q <= sign;
  end

  output_gen u_out (
    .clk        (clk),
    .rst        (rst),
    .pwm_out    (pwm_out),
    .sign       (sign_q),
    .left_high  (left_high),
    .left_en    (left_en),
    .right_high (right_high),
    .right_en   (right_en)
  );

endmodule
