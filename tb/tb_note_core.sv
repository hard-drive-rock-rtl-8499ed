// tb_note_core: runs one track end to end against a reference model that
// works per sample: phase accumulator with the end-of-wave switch rule, sine
// amplitude from real arithmetic, volume latched at the sample request, and
// magnitude = round(amplitude * volume / 256) saturated at 255. For every
// 256-clock output window the testbench counts the clocks each bridge side
// is high and compares with the model: the side chosen by the sign must be
// high for exactly magnitude clocks, the other side never. Also checked:
// enables high, both high sides never on together, sample period 256 clocks.
// Covered: note changes, rests, volume changes in mid-period, full volume
// (magnitude 250 or more), zero volume.
module tb_note_core;
  import hdr_pkg::*;

  logic         clk = 1'b0;
  logic         rst;
  note_packet_t note;
  logic         left_high, left_en, right_high, right_en;

  int checks = 0, failures = 0;
  int full_scale = 0,  // samples at or near full scale
      windows_left = 0, windows_right = 0;

  note_core dut (.*);

  always #5 clk = ~clk;

  // ---------------- per-sample reference model ----------------
  logic [15:0] m_phase, m_tune;
  logic        m_sign;
  int          m_amp, m_vol, m_mag;

  function automatic int sine_amp(input logic [15:0] ph);
    int idx;
    real x;
    idx = int'(ph[13:4]);
    if (ph[14]) idx = 1023 - idx;
    x = 3.14159265358979 / 2.0 * (real'(idx) + 0.5) / 1024.0;
    return int'($floor(255.0 * $sin(x) + 0.5));
  endfunction

  task automatic model_sample(input logic [15:0] tw, input int vol);
    if (tw != m_tune && ((m_sign && !m_phase[15]) || m_tune == 0)) begin
      m_tune = tw; m_phase = tw; m_amp = 0; m_sign = 1'b0;
    end else begin
      m_amp   = sine_amp(m_phase);
      m_sign  = m_phase[15];
      m_phase = m_phase + m_tune;
    end
    m_vol = vol;
    m_mag = (m_amp * m_vol + 128) / 256;
    if (m_mag > 255) m_mag = 255;
    if (m_mag >= 250) full_scale++;
  endtask

  // ---------------- window bookkeeping ----------------
  // The first sample request is the 129th clock edge after reset is released,
  // then one every 256 edges. Sample k controls the outputs seen after edges
  // S_k+2 .. S_k+257.
  int edge_cnt;       // edges since reset release
  int since;          // edges since the last sample request
  int cnt_l, cnt_r;
  logic [15:0] exp_sign_q;
  int exp_mag, exp_sign;
  bit have_window;

  always @(posedge clk) begin
    if (rst) begin
      edge_cnt <= 0;
    end else begin
      edge_cnt <= edge_cnt + 1;
    end
  end

  initial begin
    have_window = 0; since = 1000; cnt_l = 0; cnt_r = 0;
    forever begin
      @(posedge clk);
      if (!rst && edge_cnt >= 128 && (edge_cnt - 128) % 256 == 0) begin
        model_sample(note.tune_word, int'(note.volume));
        since = 0;
      end else begin
        since++;
      end
      @(negedge clk);
      if (rst) continue;
      if (since == 2) begin
        if (have_window) begin
          checks++;
          if ((exp_sign == 1 && (cnt_l != exp_mag || cnt_r != 0)) ||
              (exp_sign == 0 && (cnt_r != exp_mag || cnt_l != 0))) begin
            failures++;
            if (failures < 10)
              $display("FAIL t=%0t window sign=%0d mag=%0d got L=%0d R=%0d",
                       $time, exp_sign, exp_mag, cnt_l, cnt_r);
          end
          if (exp_mag > 0) begin
            if (exp_sign == 1) windows_left++; else windows_right++;
          end
        end
        have_window = 1;
        exp_mag = m_mag; exp_sign = int'(m_sign);
        cnt_l = 0; cnt_r = 0;
      end
      if (left_high) cnt_l++;
      if (right_high) cnt_r++;
      if (edge_cnt > 2) begin
        checks++;
        if (!left_en || !right_en || (left_high && right_high)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0t enables/overlap", $time);
        end
      end
    end
  end

  task automatic play(input int tw, input int vol, input int samples);
    note.tune_word = 16'(tw);
    note.volume    = 8'(vol);
    repeat (samples * 256) @(negedge clk);
  endtask

  initial begin
    m_phase = '0; m_tune = '0; m_sign = 1'b0; m_amp = 0; m_vol = 0; m_mag = 0;
    rst = 1'b1; note = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    play(0, 0, 4);
    play(2000, 255, 200);     // full volume, peaks near full scale
    play(3000, 128, 150);     // note change waits for end of wave
    // volume change in the middle of a PWM period
    repeat (100) @(negedge clk);
    play(3000, 40, 100);
    play(0, 200, 30);         // rest
    play(500, 0, 40);         // zero volume
    for (int k = 0; k < 10; k++) play($urandom_range(100, 6000), $urandom_range(0, 255), 60);
    checks++;
    if (full_scale == 0 || windows_left < 10 || windows_right < 10) begin
      failures++;
      $display("FAIL coverage: full-scale=%0d left=%0d right=%0d", full_scale, windows_left, windows_right);
    end
    $display("full-scale samples=%0d left windows=%0d right windows=%0d", full_scale, windows_left, windows_right);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
