// tb_hdr_top_full: the player at its default sizes (four tracks, 26-bit
// watchdog, 40 MHz clock) with SPI at the controller's 244 kHz. One complete
// operation: a four-note chord plays for 20 ms, every track changes note,
// the player is paused with an all-zero frame, resumes, and then the link
// stalls until the watchdog (2^26 clocks, 1.68 s) silences every track.
// track_monitor checks every PWM window of every track against the
// reference model throughout, and the watchdog must not act before its time.
module tb_hdr_top_full;
  import hdr_pkg::*;

  localparam int N  = NUM_TRACKS;
  localparam int FB = N * PACKET_W;

  logic clk = 1'b0;
  logic reset;
  logic cs, sck, sdi;
  logic [N-1:0] left_high, left_en, right_high, right_en;

  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;   // 40 MHz

  hdr_top dut (
    .clk, .reset, .cs, .sck, .sdi, .left_high, .left_en, .right_high, .right_en
  );

  sam_spi_model sam (.cs, .sck, .sdi);

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

  function automatic logic [15:0] tw_of(input real hz);
    return 16'(int'(hz / 2.38418579));
  endfunction

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
    expect_notes(p, "frame");
  endtask

  task automatic run_ms(input real ms);
    repeat (int'(ms * 40000.0)) @(posedge clk);
  endtask

  note_packet_t cur [N], silent [N];
  time t_last;

  initial begin
    reset = 1'b0;
    #1 reset = 1'b1;
    for (int t = 0; t < N; t++) silent[t] = '0;
    repeat (5) @(negedge clk);
    reset = 1'b0;
    run_ms(0.1);

    cur[0] = '{tw_of(261.63), 8'd127};
    cur[1] = '{tw_of(329.63), 8'd127};
    cur[2] = '{tw_of(392.0),  8'd127};
    cur[3] = '{tw_of(130.81), 8'd127};
    send(cur);
    run_ms(20.0);

    cur[0].tune_word = tw_of(293.66);
    cur[1].tune_word = tw_of(349.23);
    cur[2].tune_word = tw_of(440.0);
    cur[3].tune_word = tw_of(146.83);
    send(cur);
    run_ms(20.0);

    send(silent);
    run_ms(2.0);
    checks++;
    if (left_high != 0 || right_high != 0) begin failures++; $display("FAIL not silent in pause"); end

    send(cur);
    t_last = $time;
    // just before the watchdog time the notes must still be playing
    repeat ((1 << 26) - 1000) @(posedge clk);
    expect_notes(cur, "still playing before watchdog time");
    repeat (2000) @(posedge clk);
    expect_notes(silent, "watchdog silenced");
    run_ms(1.0);
    checks++;
    if (left_high != 0 || right_high != 0) begin failures++; $display("FAIL not silent after watchdog"); end

    for (int t = 0; t < N; t++) begin
      checks += m_checks[t];
      failures += m_failures[t];
      $display("track %0d: windows left=%0d right=%0d periods=%0d deferred=%0d",
               t, m_wl[t], m_wr[t], m_per[t], m_def[t]);
      checks++;
      if (m_wl[t] == 0 || m_wr[t] == 0 || m_per[t] == 0 || m_def[t] == 0) begin
        failures++; $display("FAIL track %0d coverage", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (72_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
