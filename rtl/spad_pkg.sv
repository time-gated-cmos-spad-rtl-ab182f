// spad_pkg: widths, configuration encodings and data formats shared by the
// time-gated SPAD imager. The sizes (5-bit photon counters, 7-bit coarse
// counter, 5-bit interpolator, 6-bit gate counter, 18-bit conversion
// register, 23-bit row bus, 16x16 macropixels of 2x2 SPADs) follow the
// published architecture. The encodings of the operating and readout modes
// and the layout of the readout words are this design's own choice.
package spad_pkg;

  localparam int unsigned FINE_W    = 5;   // interpolator bits (32 sub-intervals)
  localparam int unsigned NPHASE    = 16;  // clock phases sampled on both edges
  localparam int unsigned COARSE_W  = 7;   // coarse counter bits
  localparam int unsigned GATE_W    = 6;   // gate counter bits
  localparam int unsigned CNT_W     = 5;   // photon counter bits
  localparam int unsigned NSPAD     = 4;   // SPADs per macropixel (2x2)
  localparam int unsigned STOR_W    = GATE_W + COARSE_W + FINE_W; // 18
  localparam int unsigned WORD_W    = CNT_W + STOR_W;              // 23
  localparam int unsigned MAX_GATES = 62;  // gates per frame that can convert

  // Operating mode of the macropixel arbiter.
  typedef enum logic {
    OP_SINGLE = 1'b0,   // first photon of a gate wins the TDC
    OP_COINC  = 1'b1    // two photons within the coincidence window trigger
  } op_mode_e;

  // Readout mode: decides how many row-bus words each macropixel sends.
  typedef enum logic [1:0] {
    RO_FULL     = 2'd0, // 4 words: {count, conversion} per register
    RO_FAST     = 2'd1, // 1 conversion per macropixel, 1 word
    RO_FAST_CNT = 2'd2, // 1 conversion plus counts: 2 words (1 in coincidence)
    RO_COUNT    = 2'd3  // counting only, 1 word
  } ro_mode_e;

  // One stored TDC conversion. gate == 0 marks an empty register.
  typedef struct packed {
    logic [GATE_W-1:0]   gate;
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } conv_t;

  // Everything a macropixel hands to its output registers at frame end.
  typedef struct packed {
    conv_t [NSPAD-1:0]            conv;
    logic  [NSPAD-1:0][CNT_W-1:0] cnt;
    logic  [1:0]                  first_idx; // SPAD of the conversion in fast mode
  } frame_data_t;

endpackage
