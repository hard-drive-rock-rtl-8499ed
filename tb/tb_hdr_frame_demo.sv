// tb_hdr_frame_demo: plays the two-tone demonstration frame 0x0114ff,
// 0x0217ff, 0x0114ff, 0x0217ff (tune words 276 and 535 at full volume) on the
// full-size player and measures the pitch straight from the bridge outputs:
// it counts how often each track's drive moves from the left to the right
// side (once per wave period) in 20 ms and compares with
// 20 ms * tune_word * 40 MHz / 2^24, that is 13.2 and 25.5 periods. The
// per-window check of track_monitor runs as well.
module tb_hdr_frame_demo;
  import hdr_pkg::*;

  localparam int N  = NUM_TRACKS;
  localparam int FB = N * PACKET_W;

  logic clk = 1'b0;
  logic reset;
  logic cs, sck, sdi;
  logic [N-1:0] left_high, left_en, right_high, right_en;

  int checks = 0, failures = 0;
  int flips [N];
  logic [N-1:0] last_side;   // 1 = left
  bit counting = 0;

  always #12.5 clk = ~clk;

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

  always @(posedge clk) begin
    for (int t = 0; t < N; t++) begin
      if (left_high[t]) last_side[t] <= 1'b1;
      if (right_high[t]) begin
        last_side[t] <= 1'b0;
        if (last_side[t] && counting) flips[t]++;
      end
    end
  end

  initial begin
    reset = 1'b0;
    #1 reset = 1'b1;
    last_side = '0;
    for (int t = 0; t < N; t++) flips[t] = 0;
    repeat (5) @(negedge clk);
    reset = 1'b0;
    sam.send_frame({1'b0, 96'h0114ff_0217ff_0114ff_0217ff}, FB);
    repeat (4000) @(posedge clk);     // first periods under way
    counting = 1;
    repeat (800_000) @(posedge clk);  // 20 ms
    counting = 0;
    for (int t = 0; t < N; t++) begin
      real expect_p;
      expect_p = 0.02 * real'((t % 2 == 0) ? 276 : 535) * 40.0e6 / 16777216.0;
      checks++;
      if (real'(flips[t]) < expect_p - 1.0 || real'(flips[t]) > expect_p + 1.0) begin
        failures++;
        $display("FAIL track %0d: %0d periods in 20 ms, expected %f", t, flips[t], expect_p);
      end else
        $display("track %0d: %0d periods in 20 ms (expected %f)", t, flips[t], expect_p);
      checks += m_checks[t];
      failures += m_failures[t];
    end
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
