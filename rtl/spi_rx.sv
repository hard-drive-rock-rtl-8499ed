// spi_rx: SPI slave that receives the note commands for all tracks.
//
// Protocol (SPI mode 0: sck idles low, sdi sampled on the rising edge, most
// significant bit first). The controller raises cs (active HIGH), sends for
// each track in turn the tune word's high byte, its low byte and the volume
// byte, then lowers cs. Track 0 is sent first. A frame counts only if exactly
// PACKET_W * NUM_TRACKS bits (96 for four tracks) were clocked in while cs
// was high; any other length leaves the notes as they were.
//
// Clock domains. The shift register, the bit counter and the frame-ok flag
// run on sck and change only while cs is high; the bit counter is cleared
// asynchronously while cs is low (or in reset). The 40 MHz clk domain
// synchronises cs with two flip-flops and copies shift register and flag only
// while the synchronised cs is low, when nothing in the sck domain can
// change. This is safe provided the controller leaves at least three clk
// periods between an edge of cs and the next sck edge.
//
// Watchdog. A WD_W-bit counter counts clk cycles since the last frame whose
// content differs from the one before. When it saturates, all tracks are
// silenced (tune word and volume 0) until a new, different frame arrives. At
// 40 MHz and WD_W = 26 this is 2^26 / 40 MHz = 1.68 s. The original design
// declares a counter of this width but quotes about 3.4 s (WD_W = 27); the
// counter width is followed here.
//
// Reset: rst is used synchronously in the clk domain and as an asynchronous
// clear of the sck domain, which has no clock while cs is low; the lint
// warning about a reset used both ways is expected here. In a two-state
// simulator the asynchronous clears act only on an edge, so a testbench
// should raise reset (and lower cs) after time 0.
//
// Timing: notes change 3 to 4 clk cycles after cs falls at the end of a valid
// frame (two synchroniser stages, the copy register, the note register).
// Synchronous active-high reset for the clk domain; reset also clears the sck
// domain asynchronously. notes are all zero after reset.
//
// Protocol, frame-length check, the copy-while-cs-low crossing and the
// watchdog follow the original design. The cs synchroniser, the asynchronous reset of
// the sck domain and silencing on a tripped watchdog even when the last frame
// was invalid are this implementation's choices.
module spi_rx
  import hdr_pkg::*;
#(
  parameter int unsigned N_TRACKS = NUM_TRACKS,
  parameter int unsigned WD_W     = 26
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cs,
  input  logic         sck,
  input  logic         sdi,
  output note_packet_t notes [N_TRACKS]
);

  localparam int unsigned FRAME_BITS = PACKET_W * N_TRACKS;
  localparam int unsigned CNT_W      = $clog2(FRAME_BITS + 2);
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  // ---------------- sck domain ----------------
  logic [FRAME_BITS-1:0] shift_q;
  logic [CNT_W-1:0]      bit_cnt;
  logic                  frame_ok;
  logic                  cnt_clr;

  assign cnt_clr = rst | ~cs;

  always_ff @(posedge sck or posedge cnt_clr) begin
    if (cnt_clr)                bit_cnt <= '0;
    else if (bit_cnt != CNT_MAX) bit_cnt <= bit_cnt + 1'b1;
  end

  always_ff @(posedge sck or posedge rst) begin
    if (rst) frame_ok <= 1'b0;
    else     frame_ok <= (32'(bit_cnt) + 1 == FRAME_BITS);
  end

  always_ff @(posedge sck) begin
    shift_q <= {shift_q[FRAME_BITS-2:0], sdi};
  end

  // ---------------- clk domain ----------------
  logic [1:0]            cs_sync;
  logic [FRAME_BITS-1:0] rx_copy;
  logic                  valid_copy;
  logic [FRAME_BITS-1:0] last_frame;
  logic [WD_W-1:0]       wd_count;
  logic                  new_frame;
  logic                  wd_tripped;

  always_ff @(posedge clk) begin
    if (rst) cs_sync <= '0;
    else     cs_sync <= {cs_sync[0], cs};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_copy    <= '0;
      valid_copy <= 1'b0;
    end else if (!cs_sync[1]) begin
      rx_copy    <= shift_q;
      valid_copy <= frame_ok;
    end
  end

  assign new_frame = valid_copy && (rx_copy != last_frame);

  always_ff @(posedge clk) begin
    if (rst) begin
      last_frame <= '0;
      wd_count   <= '0;
      wd_tripped <= 1'b0;
    end else begin
      if (new_frame) begin
        last_frame <= rx_copy;
        wd_count   <= '0;
        wd_tripped <= 1'b0;
      end else if (&wd_count) begin
        wd_tripped <= 1'b1;
      end else begin
        wd_count <= wd_count + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int t = 0; t < N_TRACKS; t++) begin
      if (rst || (wd_tripped && !new_frame))
        notes[t] <= '0;
      else if (valid_copy)
        notes[t] <= rx_copy[FRAME_BITS-1-t*PACKET_W -: PACKET_W];
    end
  end

endmodule
