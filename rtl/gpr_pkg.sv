// gpr_pkg -- types and constants shared by the GPR clutter-removal stream datapath.
//
// The datapath processes one radar B-scan at a time: an image of IMG_ROWS x IMG_COLS
// single-precision samples (256 x 183 = 46848), stored column by column, which is the
// size every radar image is resampled to before processing.  Samples travel on
// AXI-Stream channels that carry a 32-bit IEEE-754 word and a TLAST flag; the beat
// payload is the packed struct axis_beat_t.
//
// SHRINK_THRESHOLD is the soft-threshold constant 0.00015 of the RNMF target update.
// The core subtracts it in double precision (as the C reference does, since the
// literal is a double), so it is kept here as the IEEE-754 binary64 bit pattern of
// 0.00015.
package gpr_pkg;

  localparam int unsigned IMG_ROWS    = 256;
  localparam int unsigned IMG_COLS    = 183;
  localparam int unsigned IMG_SAMPLES = IMG_ROWS * IMG_COLS;  // 46848

  // IEEE-754 binary32 field widths
  localparam int unsigned SP_EW = 8;
  localparam int unsigned SP_MW = 23;
  // IEEE-754 binary64 field widths
  localparam int unsigned DP_EW = 11;
  localparam int unsigned DP_MW = 52;

  // 0.00015 as a binary64 bit pattern
  localparam logic [63:0] SHRINK_THRESHOLD = 64'h3F23_A92A_3055_3261;

  typedef logic [31:0] float32_t;
  typedef logic [63:0] float64_t;

  // One AXI-Stream beat: data word plus end-of-frame marker
  typedef struct packed {
    float32_t data;
    logic     last;
  } axis_beat_t;

endpackage
