// rcg_top -- random channel generator of a power-line (PLC) channel emulator.
//
// The emulator passes a modem's signal through a power-line channel model.
// Real power lines change as loads switch on and off, so this block changes
// the channel at random: on every `advance` strobe (a press of the user
// interface) the random number generator steps once, and the new random
// state decides which transfer functions (TFs) make up the channel.
//
// Structure (as in the source design): a 32-bit LFSR random number
// generator, one multiplexer per channel model and a summing node. The
// models themselves -- 22 transmission-line TFs, 10 Zimmermann multipath TFs
// and 2 x 5 LPTV TFs -- are outside this block; each TF's current output
// sample arrives on the tl_tf, zm_tf and lptv_tf inputs.
//
// Selection (this design's own choice, the source only says that the 3-bit
// random number drives the multiplexers that choose the channel models):
//   * random number bit 0 / 1 / 2 enables the TL / Zimmermann / LPTV
//     multiplexer; a disabled multiplexer passes its grounded input (zero);
//   * which TF of a model is picked comes from a field of the LFSR state:
//       TL   : state[23:16] mod N_TL
//       ZM   : state[31:24] mod N_ZM
//       LPTV : state[15:9]  mod (LPTV_TYPES*LPTV_STEPS), type-major.
// The channel output is the sum of the three multiplexer outputs.
//
// Timing: the selection changes on the clock edge that follows an `advance`
// and then holds; chan_out/chan_valid follow tf_valid and the TF samples by
// one clock. Reset is synchronous and active low.
module rcg_top
  import rcg_pkg::*;
#(
  parameter int unsigned        NUM_TL      = N_TL,
  parameter int unsigned        NUM_ZM      = N_ZM,
  parameter int unsigned        NUM_TYPES   = LPTV_TYPES,
  parameter int unsigned        NUM_STEPS   = LPTV_STEPS,
  parameter int unsigned        DW          = SAMPLE_W,
  parameter logic [LFSR_W-1:0]  SEED        = 32'hACE1_2D5B,
  localparam int unsigned       NUM_LPTV    = NUM_TYPES * NUM_STEPS,
  localparam int unsigned       TL_SEL_W    = (NUM_TL   > 1) ? $clog2(NUM_TL)   : 1,
  localparam int unsigned       ZM_SEL_W    = (NUM_ZM   > 1) ? $clog2(NUM_ZM)   : 1,
  localparam int unsigned       LPTV_SEL_W  = (NUM_LPTV > 1) ? $clog2(NUM_LPTV) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // random number generator control
  input  logic                                  seed_load,
  input  logic [LFSR_W-1:0]                     seed,
  input  logic                                  advance,
  // current output sample of every transfer function
  input  logic                                  tf_valid,
  input  logic [NUM_TL-1:0][DW-1:0]             tl_tf,
  input  logic [NUM_ZM-1:0][DW-1:0]             zm_tf,
  input  logic [NUM_TYPES-1:0][NUM_STEPS-1:0][DW-1:0] lptv_tf,
  // emulated channel output
  output logic                                  chan_valid,
  output logic signed [DW+1:0]                  chan_out,
  // current random selection, for monitoring
  output logic [RN_W-1:0]                       rn,
  output logic [N_MODELS-1:0]                   model_en,
  output logic [TL_SEL_W-1:0]                   tl_sel,
  output logic [ZM_SEL_W-1:0]                   zm_sel,
  output logic [LPTV_SEL_W-1:0]                 lptv_sel,
  output logic [LFSR_W-1:0]                     rng_state
);


  logic [DW-1:0]     tl_y, zm_y, lptv_y;

  lfsr_rng #(
    .WIDTH (LFSR_W),
    .RN_W  (RN_W),
    .SEED  (SEED)
  ) u_rng (
    .clk       (clk),
    .rst_n     (rst_n),
    .seed_load (seed_load),
    .seed      (seed),
    .advance   (advance),
    .state     (rng_state),
    .rn        (rn)
  );

  // Channel selection from the random number and the LFSR state.
  always_comb begin
    model_en[MODEL_TL]   = rn[0];
    model_en[MODEL_ZM]   = rn[1];
    model_en[MODEL_LPTV] = rn[2];
    tl_sel   = TL_SEL_W'(32'(rng_state[23:16]) % NUM_TL);
    zm_sel   = ZM_SEL_W'(32'(rng_state[31:24]) % NUM_ZM);
    lptv_sel = LPTV_SEL_W'(32'(rng_state[15:9]) % NUM_LPTV);
  end

  model_mux #(.N_TF(NUM_TL), .DW(DW)) u_mux_tl (
    .tf_in (tl_tf),
    .enable(model_en[MODEL_TL]),
    .sel   (tl_sel),
    .out   (tl_y)
  );

  model_mux #(.N_TF(NUM_ZM), .DW(DW)) u_mux_zm (
    .tf_in (zm_tf),
    .enable(model_en[MODEL_ZM]),
    .sel   (zm_sel),
    .out   (zm_y)
  );

  // The LPTV inputs, type-major, are the same bits as a flat list of TFs.
  model_mux #(.N_TF(NUM_LPTV), .DW(DW)) u_mux_lptv (
    .tf_in (lptv_tf),
    .enable(model_en[MODEL_LPTV]),
    .sel   (lptv_sel),
    .out   (lptv_y)
  );

  channel_adder #(.DW(DW)) u_sum (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (tf_valid),
    .a        (tl_y),
    .b        (zm_y),
    .c        (lptv_y),
    .out_valid(chan_valid),
    .sum      (chan_out)
  );

endmodule
