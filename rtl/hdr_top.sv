// hdr_top: FPGA logic of a four-track music player that plays tones on hard
// drive head actuators.
//
// A microcontroller sequences the song and sends, whenever a note or the
// volume changes, one SPI frame holding a tune word and a volume for every
// track (see spi_rx). The frame is received here and handed to one note_core
// per track. Each note_core synthesises a sine tone at the requested pitch,
// scales it by the volume and drives one H-bridge output board as a 40 MHz
// PWM stream, steering the current direction with the sign of the wave.
//
// Interface: clk is the 40 MHz system clock, reset is synchronous and active
// high. cs (active high), sck and sdi come from the microcontroller. For track
// t, left_high[t], left_en[t], right_high[t] and right_en[t] drive the two
// half-bridge gate drivers of that track's output board.
//
// Timing: a frame takes effect a few clocks after cs falls; each track then
// changes pitch at the end of its current wave period. All outputs are
// registered. Structure and track count follow the original design.
module hdr_top
  import hdr_pkg::*;
#(
  parameter int unsigned N_TRACKS = NUM_TRACKS,
  parameter int unsigned WD_W     = 26
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                cs,
  input  logic                sck,
  input  logic                sdi,
  output logic [N_TRACKS-1:0] left_high,
  output logic [N_TRACKS-1:0] left_en,
  output logic [N_TRACKS-1:0] right_high,
  output logic [N_TRACKS-1:0] right_en
);

  note_packet_t notes [N_TRACKS];

  spi_rx #(.N_TRACKS(N_TRACKS), .WD_W(WD_W)) u_spi (
    .clk        (clk),
    .rst        (reset),
    .cs         (cs),
    .sck        (sck),
    .sdi        (sdi),
    .notes      (notes)
  );

  for (genvar t = 0; t < N_TRACKS; t++) begin : g_track
    note_core u_core (
      .clk        (clk),
      .rst        (reset),
      .note       (notes[t]),
      .left_high  (left_high[t]),
      .left_en    (left_en[t]),
      .right_high (right_high[t]),
      .right_en   (right_en[t])
    );
  end

endmodule
