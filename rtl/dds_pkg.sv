// dds_pkg: constants and types shared by the direct digital synthesizer.
//
// The system clock, accumulator width, sample width and frequency range are
// the figures the design is specified with (48 MHz clock, 32-bit phase,
// 8-bit samples, 0..160 kHz output). The key codes are this design's own
// encoding of a decoded keyboard: the keyboard hardware itself is outside the
// FPGA and its codes are not specified.
package dds_pkg;

  localparam int unsigned FCLK_HZ   = 48_000_000;  // system clock clk_f
  localparam int unsigned PHASE_W   = 32;          // phase accumulator width N
  localparam int unsigned SLICE_W   = 8;           // width of one pipeline slice
  localparam int unsigned ROM_AW    = 8;           // ROM address = top phase bits
  localparam int unsigned SAMPLE_W  = 8;           // amplitude width
  localparam int unsigned F_MAX_HZ  = 160_000;     // highest output frequency
  localparam int unsigned FREQ_W    = 18;          // binary frequency in Hz, 0..F_MAX_HZ
  localparam int unsigned DISP_DIGITS = 6;         // decimal digits on the LED display

  // Decoded keyboard keys (4-bit code).
  typedef enum logic [3:0] {
    KEY_0     = 4'd0,  KEY_1 = 4'd1, KEY_2 = 4'd2, KEY_3 = 4'd3, KEY_4 = 4'd4,
    KEY_5     = 4'd5,  KEY_6 = 4'd6, KEY_7 = 4'd7, KEY_8 = 4'd8, KEY_9 = 4'd9,
    KEY_ENTER = 4'd10,  // apply the entered frequency
    KEY_CLEAR = 4'd11   // zero the entry
  } key_code_t;

  typedef logic [3:0] bcd_t;

endpackage
