// rcg_pkg -- shared sizes and types of the random channel generator.
//
// The channel generator picks, at random, which power-line channel transfer
// functions (TFs) the emulated channel is built from. Three channel models
// feed it: the transmission-line model with 22 TFs, the Zimmermann multipath
// model with 10 TFs, and the linear periodically time-varying (LPTV) model
// with 2 types of 5 steps each. Those counts, the 32-bit LFSR and the 3-bit
// random number follow the source design. The 16-bit signed sample width is
// this design's own choice; the source does not give one.
package rcg_pkg;

  // Random number generator
  localparam int unsigned LFSR_W = 32;   // shift register length
  localparam int unsigned RN_W   = 3;    // random number register width

  // Channel models
  localparam int unsigned N_TL        = 22;  // transmission-line model TFs
  localparam int unsigned N_ZM        = 10;  // Zimmermann multipath model TFs
  localparam int unsigned LPTV_TYPES  = 2;   // LPTV model types
  localparam int unsigned LPTV_STEPS  = 5;   // steps per LPTV type
  localparam int unsigned N_LPTV      = LPTV_TYPES * LPTV_STEPS;
  localparam int unsigned N_MODELS    = 3;

  // Sample path
  localparam int unsigned SAMPLE_W = 16;
  // The sum of three samples needs two guard bits.
  localparam int unsigned SUM_W    = SAMPLE_W + 2;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [SUM_W-1:0]    sum_t;

  // Which random number bit enables which model multiplexer.
  typedef enum logic [1:0] {
    MODEL_TL   = 2'd0,
    MODEL_ZM   = 2'd1,
    MODEL_LPTV = 2'd2
  } model_e;

endpackage
