// tb_spi_rx: drives the SPI receiver as the microcontroller does (cs high,
// 24 bits per track MSB first, cs low), with an sck unrelated to the 40 MHz
// clk. Checked: all notes zero after reset; a valid frame reaches the right
// tracks within 5 clocks of cs falling; notes do not change while a frame is
// being shifted in; frames one bit short or long are ignored; the watchdog
// (shortened to 2^12 clocks here) silences all tracks when no new frame
// arrives, a repeat of the same frame does not revive them, a different one
// does. Each of these events is counted and must occur.
module tb_spi_rx;
  import hdr_pkg::*;

  localparam int N    = 4;
  localparam int WD_W = 12;
  localparam int FB   = N * PACKET_W;

  logic clk = 1'b0;
  logic rst, cs, sck, sdi;
  note_packet_t notes [N];

  int checks = 0, failures = 0;
  int n_valid = 0, n_rejected = 0, n_wd_trips = 0, n_wd_held = 0, n_wd_recovered = 0;

  spi_rx #(.N_TRACKS(N), .WD_W(WD_W)) dut (.*);

  always #12.5 clk = ~clk;   // 40 MHz

  task automatic send_bits(input logic [FB:0] data, input int nbits, input bit check_stable);
    note_packet_t prev_notes [N];
    prev_notes = notes;
    cs = 1'b1;
    #200;
    for (int b = nbits - 1; b >= 0; b--) begin
      sdi = data[b];
      #61;
      sck = 1'b1;
      #61;
      sck = 1'b0;
      if (check_stable && b % 17 == 0) begin
        checks++;
        if (notes != prev_notes) begin failures++; $display("FAIL notes changed during a frame"); end
      end
    end
    #200;
    cs = 1'b0;
    #200;
  endtask

  function automatic logic [FB-1:0] pack(input note_packet_t p [N]);
    logic [FB-1:0] f;
    for (int t = 0; t < N; t++) f[FB-1-t*PACKET_W -: PACKET_W] = p[t];
    return f;
  endfunction

  task automatic expect_notes(input note_packet_t p [N], input string what);
    checks++;
    if (notes != p) begin
      failures++;
      $display("FAIL %s: got %h %h %h %h", what, notes[0], notes[1], notes[2], notes[3]);
    end
  endtask

  task automatic send_valid(input note_packet_t p [N]);
    int wait_clk;
    cs = 1'b1;
    send_bits({1'b0, pack(p)}, FB, 1'b1);
    n_valid++;
  endtask

  note_packet_t zero [N];
  note_packet_t a [N], b [N], c [N];
  logic [FB-1:0] fa;

  initial begin
    for (int t = 0; t < N; t++) begin
      zero[t] = '0;
      a[t] = '{tune_word: 16'h0114 + 16'(t), volume: 8'hff - 8'(t)};
      b[t] = '{tune_word: 16'(16'h2000 * (t + 1)), volume: 8'(8'h20 + t)};
      c[t] = '{tune_word: 16'($urandom), volume: 8'($urandom)};
    end
    // Start with reset and the cs-low clear inactive and raise them after
    // time 0: a two-state simulator sees no edge on a signal that starts
    // high, so the asynchronous clears of the sck domain would never act.
    rst = 1'b0; cs = 1'b1; sck = 1'b0; sdi = 1'b0;
    #1;
    rst = 1'b1; cs = 1'b0;
    #300;
    @(negedge clk) rst = 1'b0;
    #100;
    expect_notes(zero, "after reset");

    // valid frame, and the update latency after cs falls
    fa = pack(a);
    cs = 1'b1; #200;
    for (int bit_i = FB - 1; bit_i >= 0; bit_i--) begin
      sdi = fa[bit_i]; #61; sck = 1'b1; #61; sck = 1'b0;
    end
    #200;
    cs = 1'b0;
    n_valid++;
    begin
      int lat;
      lat = 0;
      while (notes != a && lat < 20) begin @(posedge clk); lat++; end
      checks++;
      if (lat > 5) begin failures++; $display("FAIL update latency %0d clocks", lat); end
    end
    expect_notes(a, "frame a");

    // short and long frames are dropped
    send_bits({1'b0, pack(b)}, FB - 1, 1'b1);
    n_rejected++;
    expect_notes(a, "short frame ignored");
    send_bits({pack(b), 1'b1}, FB + 1, 1'b1);
    n_rejected++;
    expect_notes(a, "long frame ignored");

    send_valid(b);
    expect_notes(b, "frame b");

    // watchdog: no new frame for 2^WD_W clocks silences everything
    repeat ((1 << WD_W) + 10) @(posedge clk);
    #1;
    n_wd_trips++;
    expect_notes(zero, "watchdog silenced");
    // the same frame again is not new data: stays silent
    send_valid(b);
    n_wd_held++;
    expect_notes(zero, "repeat frame after watchdog");
    // a different frame revives the tracks
    send_valid(c);
    n_wd_recovered++;
    expect_notes(c, "new frame after watchdog");
    // and the watchdog was restarted: still playing half a period later
    repeat ((1 << WD_W) / 2) @(posedge clk);
    #1;
    expect_notes(c, "watchdog restarted");

    // back-to-back random frames
    for (int k = 0; k < 20; k++) begin
      for (int t = 0; t < N; t++) c[t] = '{tune_word: 16'($urandom), volume: 8'($urandom)};
      send_valid(c);
      expect_notes(c, "random frame");
    end

    checks++;
    if (n_valid == 0 || n_rejected == 0 || n_wd_trips == 0 || n_wd_held == 0 || n_wd_recovered == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("valid=%0d rejected=%0d wd_trips=%0d", n_valid, n_rejected, n_wd_trips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
