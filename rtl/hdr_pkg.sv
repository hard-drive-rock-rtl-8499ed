// hdr_pkg: constants and types shared by the hard-drive music player.
//
// The player has four independent tone tracks. The controller sends one
// 24-bit word per track over SPI: a 16-bit tune word (phase increment of the
// tone's phase accumulator) followed by an 8-bit volume. The system clock is
// 40 MHz and one waveform sample is produced every 2^8 clocks, so a tune word
// of 1 is 40e6 / 2^8 / 2^16 = 2.384 Hz.
//
// The track count, word layout and clock figures follow the original design; the
// struct type and the helper function are this implementation's packaging.
package hdr_pkg;

  localparam int unsigned NUM_TRACKS  = 4;   // tracks and tone generators
  localparam int unsigned TUNE_W      = 16;  // tune word / phase accumulator width
  localparam int unsigned VOL_W       = 8;   // volume width
  localparam int unsigned AMP_W       = 8;   // unsigned amplitude width (plus sign)
  localparam int unsigned PWM_W       = 8;   // PWM counter width, 2^8 clocks per sample
  localparam int unsigned LUT_ADDR_W  = 10;  // quarter-wave table depth 2^10
  localparam int unsigned PACKET_W    = TUNE_W + VOL_W;  // 24 bits per track
  localparam int unsigned CLK_HZ      = 40_000_000;

  // One track's command as received over SPI, most significant field first.
  typedef struct packed {
    logic [TUNE_W-1:0] tune_word;
    logic [VOL_W-1:0]  volume;
  } note_packet_t;


endpackage
