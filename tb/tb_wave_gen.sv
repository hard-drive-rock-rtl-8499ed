// tb_wave_gen: runs the tone generator against a reference model written
// with real arithmetic. Sample requests come every 4 clocks to keep the run
// short. Checked: sign and amplitude after every sample, that a new tune
// word waits for the end of the running wave period, that a silent track
// takes a new tune word at once, rests, and the number of periods produced
// in a fixed number of samples (the pitch).
module tb_wave_gen;
  import hdr_pkg::*;

  logic              clk = 1'b0;
  logic              rst;
  logic              sample_en;
  logic [TUNE_W-1:0] tune_word;
  logic              sign;
  logic [AMP_W-1:0]  amplitude;

  int checks = 0, failures = 0;
  int deferred_switches = 0, immediate_switches = 0, periods = 0;

  wave_gen dut (.*);

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [15:0] m_phase, m_tune;
  logic        m_sign;
  int          m_amp;

  function automatic int sine_amp(input logic [15:0] ph);
    int idx;
    real x;
    idx = int'(ph[13:4]);
    if (ph[14]) idx = 1023 - idx;
    x = 3.14159265358979 / 2.0 * (real'(idx) + 0.5) / 1024.0;
    return int'($floor(255.0 * $sin(x) + 0.5));
  endfunction

  task automatic model_sample();
    bit at_end;
    at_end = m_sign && !m_phase[15];
    if (tune_word != m_tune && (at_end || m_tune == 0)) begin
      if (m_tune == 0) immediate_switches++;
      else             deferred_switches++;
      m_tune  = tune_word;
      m_phase = tune_word;
      m_amp   = 0;
      m_sign  = 1'b0;
    end else begin
      if (m_sign && !m_phase[15]) periods++;
      m_amp   = sine_amp(m_phase);
      m_sign  = m_phase[15];
      m_phase = m_phase + m_tune;
    end
  endtask

  task automatic do_sample();
    @(negedge clk) sample_en = 1'b1;
    model_sample();
    @(negedge clk) sample_en = 1'b0;
    checks++;
    if (sign !== m_sign || int'(amplitude) != m_amp) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t sign %0b/%0b amp %0d/%0d", $time, sign, m_sign, amplitude, m_amp);
    end
    repeat (2) @(negedge clk);
  endtask

  int p0;
  initial begin
    rst = 1'b1; sample_en = 1'b0; tune_word = '0;
    m_phase = '0; m_tune = '0; m_sign = 1'b0; m_amp = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // silent output after reset
    do_sample();
    checks++; if (amplitude != 0 || sign != 0) failures++;

    // A note from silence: taken at once
    tune_word = 16'd185;     // about 441 Hz
    repeat (2000) do_sample();

    // pitch check: periods in 65536/185*k samples
    p0 = periods;
    repeat (3542) do_sample();   // 3542 * 185 / 65536 = 9.998 periods
    checks++;
    if (periods - p0 < 9 || periods - p0 > 10) begin
      failures++; $display("FAIL pitch: %0d periods", periods - p0);
    end

    // change note mid-wave: the model waits for the period to end, and the
    // per-sample comparison shows whether the generator did too
    while (m_phase[15] != 1'b1) do_sample();   // now in negative half
    tune_word = 16'd1000;
    do_sample();
    checks++;
    if (m_tune != 16'd185) begin failures++; $display("FAIL switched mid-wave"); end
    repeat (1000) do_sample();
    checks++;
    if (m_tune != 16'd1000) begin failures++; $display("FAIL never switched"); end

    // a rest, then a high note, then a low note
    tune_word = 16'd0;
    repeat (300) do_sample();
    checks++; if (amplitude != 0) begin failures++; $display("FAIL rest not silent"); end
    tune_word = 16'd20000;
    repeat (500) do_sample();
    tune_word = 16'd37;
    repeat (4000) do_sample();
    for (int k = 0; k < 20; k++) begin
      tune_word = 16'($urandom_range(1, 4000));
      repeat ($urandom_range(50, 400)) do_sample();
    end

    checks++;
    if (deferred_switches < 2 || immediate_switches < 2) begin
      failures++;
      $display("FAIL switch coverage deferred=%0d immediate=%0d", deferred_switches, immediate_switches);
    end
    $display("deferred switches=%0d immediate switches=%0d periods=%0d",
             deferred_switches, immediate_switches, periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
