// serial_debugger_pkg: widths and defaults shared by the serial bus debugger.
//
// The debugger watches one serial line and cuts the bit stream into a fixed
// sequence of frames ("states"), whose lengths come from a wait table. The
// widths below are those of the reference waveforms: a 5-bit state number,
// 129-bit result registers and 8-bit wait-table entries. The default wait
// table is the 7-frame, 8-bits-per-frame example protocol.
package serial_debugger_pkg;

  // Width of one wait-table entry (a frame length in bits).
  localparam int unsigned COUNT_W_DEF = 8;
  // Width of the displayed state number.
  localparam int unsigned STATE_W_DEF = 5;
  // Width of the big- and little-endian result registers.
  localparam int unsigned RESULT_W_DEF = 129;
  // Number of frames in the default (example) protocol.
  localparam int unsigned NO_OF_STATE_DEF = 7;
  // Length of every frame in the default protocol.
  localparam int unsigned FRAME_BITS_DEF = 8;

endpackage
