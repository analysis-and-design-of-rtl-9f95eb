// mt_pkg: constants and types shared by the mixed voice/data mobile terminal.
//
// The whole terminal runs from one 9.6 MHz master clock. The carrier loop
// works on a hard-limited 455 kHz IF, the bit synchronizer recovers the
// 16 kb/s data clock, and the speech detector takes 10-bit samples at 8 kHz.
// These numbers follow the text; the type definitions are this design's own.
package mt_pkg;
  localparam int unsigned CLK_HZ   = 9_600_000; // master reference (bit synchronizer f0)
  localparam int unsigned IF_HZ    = 455_000;   // receiver IF, carrier loop centre
  localparam int unsigned BIT_HZ   = 16_000;    // TFM data rate
  localparam int unsigned SPEECH_FS = 8_000;    // speech detector sample rate
  localparam int unsigned SAMPLE_W = 10;        // A/D word of the speech detector

  // States of the transmitter keying controller.
  typedef enum logic [1:0] {
    TX_IDLE  = 2'd0,  // carrier suppressed
    TX_VOICE = 2'd1,  // talk spurt on the air
    TX_DATA  = 2'd2   // data packet on the air, sent in a channel gap
  } tx_state_e;
endpackage
