// lfsr_rng -- seeded LFSR random number generator with a 3-bit output register.
//
// A WIDTH-bit Fibonacci linear feedback shift register. On every step the
// register shifts one place towards bit 0 and the XOR of the tapped bits
// enters at the most significant bit. The default tap set (bits 0, 1, 2 and
// 22, i.e. x^32 + x^22 + x^2 + x + 1) is primitive, so from any non-zero seed
// the register runs through all 2^32 - 1 non-zero states before repeating.
// Three XOR trees fold groups of low-order bits (bits 0 and 2 to 8) and bit 29
// into a 3-bit random number, which is captured in a register on the same
// step. The 32-bit length, the seed loaded at start, feedback into the MSB,
// the XOR taps and the 3-bit random number register follow the source design;
// the exact tap set, the grouping of the folded bits and the handshake are
// this design's own choices.
//
// Interface
//   seed_load  load `seed` into the shift register (an all-zero seed, which
//              would lock the register, is replaced by the SEED parameter)
//   advance    one step: shift the register and capture a new random number
//   state      current shift register contents
//   rn         random number register, 0 to 2^RN_W - 1
//
// Timing: one step per cycle in which `advance` is high; `rn` holds the fold
// of the state before that step. seed_load has priority over advance.
// Reset (active low, synchronous) loads SEED and clears `rn`.
module lfsr_rng #(
  parameter int unsigned      WIDTH    = 32,
  parameter int unsigned      RN_W     = 3,
  parameter logic [WIDTH-1:0] TAPS     = WIDTH'(32'h0040_0007),
  parameter logic [WIDTH-1:0] SEED     = WIDTH'(32'hACE1_2D5B),
  // RN_MASKS[i] selects the state bits XOR-ed into random number bit i.
  parameter logic [RN_W-1:0][WIDTH-1:0] RN_MASKS = {
    WIDTH'(32'h2000_0090),   // bit 2: state bits 4, 7, 29
    WIDTH'(32'h0000_0124),   // bit 1: state bits 2, 5, 8
    WIDTH'(32'h0000_0049)    // bit 0: state bits 0, 3, 6
  }
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             seed_load,
  input  logic [WIDTH-1:0] seed,
  input  logic             advance,
  output logic [WIDTH-1:0] state,
  output logic [RN_W-1:0]  rn
);

  logic             feedback;
  logic [WIDTH-1:0] state_next;
  logic [RN_W-1:0]  rn_fold;

  always_comb begin
    feedback   = ^(state & TAPS);
    state_next = {feedback, state[WIDTH-1:1]};
    for (int i = 0; i < int'(RN_W); i++) begin
      rn_fold[i] = ^(state & RN_MASKS[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= SEED;
      rn    <= '0;
    end else if (seed_load) begin
      state <= (seed == '0) ? SEED : seed;
    end else if (advance) begin
      state <= state_next;
      rn    <= rn_fold;
    end
  end

  // An LFSR that reaches the all-zero state never leaves it.
  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
