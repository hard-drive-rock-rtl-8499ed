// track_monitor: reference model and checker for one track's bridge outputs,
// for the system testbenches. It follows the track's note command (tune word
// and volume), models the tone generator per sample (phase accumulator with
// the end-of-wave switch rule, sine from real arithmetic, volume latched per
// sample, rounded product) and counts, for every 256-clock output window,
// how many clocks the left and right high sides are on. The side chosen by
// the sample's sign must be on for exactly the expected magnitude, the other
// side never; both enables must be high. Sample requests are the 129th clock
// edge after reset is released and every 256 edges after that.
// It also counts events for coverage: windows driven on each side, note
// switches deferred to the end of a wave, switches from silence.
module track_monitor
  import hdr_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  note_packet_t note,
  input  logic         left_high,
  input  logic         left_en,
  input  logic         right_high,
  input  logic         right_en,
  output int           checks,
  output int           failures,
  output int           windows_left,
  output int           windows_right,
  output int           deferred_switches,
  output int           immediate_switches,
  output int           periods
);

  logic [15:0] m_phase, m_tune;
  logic        m_sign;
  int          m_amp, m_mag;
  int          edge_cnt, since, cnt_l, cnt_r, exp_mag, exp_sign;
  bit          have_window;

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
      if (m_tune == 0) immediate_switches++;
      else             deferred_switches++;
      m_tune = tw; m_phase = tw; m_amp = 0; m_sign = 1'b0;
    end else begin
      if (m_sign && !m_phase[15]) periods++;
      m_amp   = sine_amp(m_phase);
      m_sign  = m_phase[15];
      m_phase = m_phase + m_tune;
    end
    m_mag = (m_amp * vol + 128) / 256;
    if (m_mag > 255) m_mag = 255;
  endtask

  initial begin
    checks = 0; failures = 0; windows_left = 0; windows_right = 0;
    deferred_switches = 0; immediate_switches = 0; periods = 0;
    m_phase = '0; m_tune = '0; m_sign = 1'b0; m_amp = 0; m_mag = 0;
    have_window = 0; since = 1000; cnt_l = 0; cnt_r = 0; edge_cnt = 0;
    exp_mag = 0; exp_sign = 0;
    forever begin
      @(posedge clk);
      if (rst) begin
        edge_cnt = 0; have_window = 0; since = 1000;
        m_phase = '0; m_tune = '0; m_sign = 1'b0;
        continue;
      end
      edge_cnt++;
      if (edge_cnt >= 129 && (edge_cnt - 129) % 256 == 0) begin
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
            if (failures < 6)
              $display("FAIL %m t=%0t window sign=%0d mag=%0d got L=%0d R=%0d",
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
      if (since == 5) begin
        checks++;
        if (!left_en || !right_en || (left_high && right_high)) begin
          failures++;
          if (failures < 6) $display("FAIL %m t=%0t enables/overlap", $time);
        end
      end
    end
  end

endmodule
