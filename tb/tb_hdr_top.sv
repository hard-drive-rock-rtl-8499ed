// tb_hdr_top: end-to-end test of the four-track player. A model of the
// microcontroller sends SPI frames; one track_monitor per track checks every
// 256-clock PWM window of that track's bridge outputs against a reference
// model of the tone generator. The watchdog is shortened to 2^18 clocks and
// sck runs at about 8 MHz to keep the run short; everything else is at its
// default. The scenario: silence after reset, a four-note chord, note changes
// in mid-wave (deferred to the end of the wave), a rest, a volume change, a
// frame of the wrong length (ignored), pause (all-zero frame), the watchdog
// silencing a stalled link and a new frame reviving it. Each of these
// mechanisms is counted and must have happened at least once.
module tb_hdr_top;
  import hdr_pkg::*;

  localparam int N    = NUM_TRACKS;
  localparam int WD_W = 18;
  localparam int FB   = N * PACKET_W;

  logic clk = 1'b0;
  logic reset;
  logic cs, sck, sdi;
  logic [N-1:0] left_high, left_en, right_high, right_en;

  int checks = 0, failures = 0;
  int n_frames = 0, n_rejected = 0, n_wd_trips = 0, n_wd_recover = 0;
  int n_pause = 0, n_rest = 0, n_volume = 0;

  always #12.5 clk = ~clk;   // 40 MHz

  hdr_top #(.WD_W(WD_W)) dut (
    .clk, .reset, .cs, .sck, .sdi, .left_high, .left_en, .right_high, .right_en
  );

  sam_spi_model #(.SCK_HALF_NS(61), .GAP_NS(200)) sam (.cs, .sck, .sdi);

  int m_checks [N], m_failures [N], m_wl [N], m_wr [N], m_def [N], m_imm [N], m_per [N];

  for (genvar t = 0; t < N; t++) begin : g_mon
    track_monitor mon (
      .clk, .rst(reset), .note(dut.notes[t]),
      .left_high(left_high[t]), .left_en(left_en[t]),
      .right_high(right_high[t]), .right_en(right_en[t]),
      .checks(m_checks[t]), .failures(m_failures[t]),
      .windows_left(m_wl[t]), .windows_right(m_wr[t]),
      .deferred_switches(m_def[t]), .immediate_switches(m_imm[t]), .periods(m_per[t])
    );
  end

  // tune word for a pitch in Hz, as the controller computes it
  function automatic logic [15:0] tw_of(input real hz);
    return 16'(int'(hz / 2.38418579));
  endfunction

  note_packet_t cur [N];

  function automatic logic [FB:0] frame_bits(input note_packet_t p [N]);
    logic [FB:0] f;
    f = '0;
    for (int t = 0; t < N; t++) f[FB-1-t*PACKET_W -: PACKET_W] = p[t];
    return f;
  endfunction

  task automatic expect_notes(input note_packet_t p [N], input string what);
    checks++;
    for (int t = 0; t < N; t++)
      if (dut.notes[t] != p[t]) begin
        failures++;
        $display("FAIL %s: track %0d holds %h, expected %h", what, t, dut.notes[t], p[t]);
        break;
      end
  endtask

  task automatic send(input note_packet_t p [N]);
    sam.send_frame(frame_bits(p), FB);
    n_frames++;
    expect_notes(p, "frame");
  endtask

  task automatic run_clocks(input int n);
    repeat (n) @(posedge clk);
  endtask

  note_packet_t silent [N];

  initial begin
    reset = 1'b0;
    #1 reset = 1'b1;
    for (int t = 0; t < N; t++) silent[t] = '0;
    repeat (5) @(negedge clk);
    reset = 1'b0;
    run_clocks(3000);

    // chord: A4, C#5, E5, A3 at different volumes
    cur[0] = '{tw_of(440.0), 8'd255};
    cur[1] = '{tw_of(554.37), 8'd200};
    cur[2] = '{tw_of(659.26), 8'd128};
    cur[3] = '{tw_of(220.0), 8'd64};
    send(cur);
    run_clocks(200000);

    // new notes arrive in mid-wave; track 2 rests
    cur[0].tune_word = tw_of(493.88);
    cur[1].tune_word = tw_of(587.33);
    cur[2]           = '{16'd0, 8'd0};
    cur[3].tune_word = tw_of(246.94);
    send(cur);
    n_rest++;
    run_clocks(200000);

    // volume change on all playing tracks
    cur[0].volume = 8'd30; cur[1].volume = 8'd30; cur[3].volume = 8'd255;
    cur[2] = '{tw_of(1318.5), 8'd30};
    send(cur);
    n_volume++;
    run_clocks(20000);

    // a frame one bit short is ignored
    begin
      note_packet_t bad [N];
      bad = cur;
      bad[0].tune_word = 16'h1234;
      sam.send_frame(frame_bits(bad) >> 1, FB - 1);
      n_rejected++;
      expect_notes(cur, "short frame ignored");
    end
    run_clocks(5000);

    // pause: the controller sends all zeros
    send(silent);
    n_pause++;
    run_clocks(30000);
    // silence must really be silent
    checks++;
    if (left_high != 0 || right_high != 0) begin failures++; $display("FAIL not silent in pause"); end

    // resume, then the link stalls: the watchdog silences the tracks
    send(cur);
    run_clocks((1 << WD_W) + 200);
    n_wd_trips++;
    expect_notes(silent, "watchdog silenced");
    run_clocks(30000);
    checks++;
    if (left_high != 0 || right_high != 0) begin failures++; $display("FAIL not silent after watchdog"); end

    // a new frame brings the music back
    cur[0].tune_word = tw_of(392.0);
    send(cur);
    n_wd_recover++;
    run_clocks(10000);

    checks++;
    if (n_frames < 5 || n_rejected == 0 || n_wd_trips == 0 || n_wd_recover == 0 ||
        n_pause == 0 || n_rest == 0 || n_volume == 0) begin
      failures++; $display("FAIL scenario coverage");
    end
    for (int t = 0; t < N; t++) begin
      checks += m_checks[t];
      failures += m_failures[t];
      $display("track %0d: windows left=%0d right=%0d deferred=%0d from-silence=%0d periods=%0d",
               t, m_wl[t], m_wr[t], m_def[t], m_imm[t], m_per[t]);
      checks++;
      if (m_wl[t] == 0 || m_wr[t] == 0 || m_imm[t] == 0 || m_per[t] == 0) begin
        failures++; $display("FAIL track %0d coverage", t);
      end
    end
    checks++;
    if (m_def[0] + m_def[1] + m_def[3] == 0) begin failures++; $display("FAIL no deferred note switch"); end
    $display("frames=%0d rejected=%0d pauses=%0d rests=%0d volume changes=%0d watchdog trips=%0d recoveries=%0d",
             n_frames, n_rejected, n_pause, n_rest, n_volume, n_wd_trips, n_wd_recover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
