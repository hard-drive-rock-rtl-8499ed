// wave_gen: direct digital synthesis of one track's sine tone.
//
// A TUNE_W-bit phase accumulator is advanced by the current tune word once per
// sample (sample_en, one pulse every 2^8 clocks from pwm_gen), so the tone
// frequency is tune_word * f_sample / 2^TUNE_W. The accumulator's top bit is
// the sign of the wave, the next bit selects a rising or falling quadrant, and
// the following LUT_ADDR_W bits address the quarter-wave table: falling
// quadrants read it with the complemented address (backwards), negative
// half-waves set the sign bit. Output is sign plus an unsigned amplitude.
//
// A new tune word is accepted only at the end of a wave period (the
// accumulator has just wrapped after a negative half-wave) or at once when
// the track is silent, so a note never ends in the middle of a cycle. On a
// switch the sample at phase 0 (amplitude 0, positive) is emitted and the
// accumulator restarts from the new tune word. A tune word of 0 is a rest.
//
// Timing: sign and amplitude are registered and change only on the clock
// edge where sample_en is high; they show the phase the accumulator held
// before that edge. Synchronous active-high reset clears everything.
//
// The accumulator width, quarter-wave folding, the end-of-wave rule and the
// output format follow the original design. The exact switch point (the wrap at the
// end of the period rather than the mid-wave crossing) and restarting from
// the new tune word instead of from zero are this implementation's choices.
module wave_gen
  import hdr_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              sample_en,
  input  logic [TUNE_W-1:0] tune_word,
  output logic              sign,
  output logic [AMP_W-1:0]  amplitude
);

  logic [TUNE_W-1:0]     phase_acc;
  logic [TUNE_W-1:0]     cur_tune;
  logic [LUT_ADDR_W-1:0] quarter_idx;
  logic [LUT_ADDR_W-1:0] lut_addr;
  logic [AMP_W-1:0]      lut_amp;
  logic                  period_end;
  logic                  take_new;

  assign quarter_idx = phase_acc[TUNE_W-3 -: LUT_ADDR_W];
  assign lut_addr    = phase_acc[TUNE_W-2] ? ~quarter_idx : quarter_idx;

  sine_lut #(.ADDR_W(LUT_ADDR_W), .AMP_W(AMP_W)) u_lut (
    .addr      (lut_addr),
    .amplitude (lut_amp)
  );

  // Last sample was in the negative half and the accumulator has wrapped.
  assign period_end = sign && !phase_acc[TUNE_W-1];
  assign take_new   = (tune_word != cur_tune) && (period_end || cur_tune == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_acc <= '0;
      cur_tune  <= '0;
      amplitude <= '0;
      sign      <= 1'b0;
    end else if (sample_en) begin
      if (take_new) begin
        cur_tune  <= tune_word;
        phase_acc <= tune_word;
        amplitude <= '0;
        sign      <= 1'b0;
      end else begin
        phase_acc <= phase_acc + cur_tune;
        amplitude <= lut_amp;
        sign      <= phase_acc[TUNE_W-1];
      end
    end
  end

endmodule
