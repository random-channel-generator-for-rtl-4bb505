// tb_lfsr_rng -- self-checking testbench of the LFSR random number generator.
//
// Checks, against a reference written out bit by bit here:
//   * reset loads the seed and clears the random number;
//   * every step of the 32-bit register (feedback = bits 0^1^2^22 into the
//     MSB, shift towards bit 0) and every random number bit (XOR of state bits
//     {0,3,6}, {2,5,8} and {4,7,29} before the step);
//   * the register holds while `advance` is low, seed loading, and that an
//     all-zero seed is replaced by the default;
//   * the spread of 1000 random numbers over the eight values 0..7 (each
//     bin within 125 +/- 50);
//   * a second, 8-bit instance with primitive taps (x^8+x^6+x^5+x^4+1) has
//     the maximal period 2^8 - 1 = 255 and visits every non-zero state.
// It also prints 24 successive random numbers, as logged by button presses.
module tb_lfsr_rng;
  localparam logic [31:0] SEED = 32'hACE1_2D5B;

  logic clk = 1'b0;
  logic rst_n;
  logic seed_load, advance;
  logic [31:0] seed;
  logic [31:0] state;
  logic [2:0]  rn;

  logic        seed_load8, advance8;
  logic [7:0]  seed8, state8;
  logic [1:0]  rn8;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  lfsr_rng dut (
    .clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(seed),
    .advance(advance), .state(state), .rn(rn)
  );

  lfsr_rng #(
    .WIDTH(8), .RN_W(2), .TAPS(8'h71), .SEED(8'h01),
    .RN_MASKS({8'h0A, 8'h05})
  ) dut8 (
    .clk(clk), .rst_n(rst_n), .seed_load(seed_load8), .seed(seed8),
    .advance(advance8), .state(state8), .rn(rn8)
  );

  function automatic logic [31:0] ref_next(input logic [31:0] s);
    logic fb;
    fb = s[0] ^ s[1] ^ s[2] ^ s[22];
    return {fb, s[31:1]};
  endfunction

  function automatic logic [2:0] ref_rn(input logic [31:0] s);
    return {s[4] ^ s[7] ^ s[29], s[2] ^ s[5] ^ s[8], s[0] ^ s[3] ^ s[6]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic step();
    advance = 1'b1;
    @(posedge clk);
    #1;
    advance = 1'b0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [31:0] exp_state;
    logic [2:0]  exp_rn;
    int hist [8];
    logic [7:0] first8;
    int period;
    bit seen [256];
    int distinct;

    rst_n = 1'b0; seed_load = 1'b0; advance = 1'b0; seed = '0;
    seed_load8 = 1'b0; advance8 = 1'b0; seed8 = '0;
    repeat (2) @(posedge clk);
    #1;
    check(state == SEED, "reset loads the seed");
    check(rn == 3'd0, "reset clears the random number");
    rst_n = 1'b1;

    // Stepping against the reference model.
    exp_state = SEED;
    for (int i = 0; i < 2000; i++) begin
      exp_rn    = ref_rn(exp_state);
      exp_state = ref_next(exp_state);
      step();
      check(state == exp_state, $sformatf("state after step %0d", i));
      check(rn == exp_rn, $sformatf("random number after step %0d", i));
    end

    // Holds without advance.
    repeat (5) @(posedge clk);
    #1;
    check(state == exp_state, "state holds while advance is low");

    // Seed loading, including the all-zero seed.
    seed = 32'h1234_5678; seed_load = 1'b1; advance = 1'b1;
    @(posedge clk); #1;
    seed_load = 1'b0; advance = 1'b0;
    check(state == 32'h1234_5678, "seed load (priority over advance)");
    seed = 32'h0; seed_load = 1'b1;
    @(posedge clk); #1;
    seed_load = 1'b0;
    check(state == SEED, "all-zero seed replaced by default seed");

    // Two logged trials of 24 presses each, from two seeds.
    for (int t = 0; t < 2; t++) begin
      string line;
      seed = (t == 0) ? 32'h0BAD_F00D : 32'hDEAD_BEEF; seed_load = 1'b1;
      @(posedge clk); #1;
      seed_load = 1'b0;
      line = "";
      for (int i = 0; i < 24; i++) begin
        step();
        line = {line, $sformatf(" %0d", rn)};
      end
      $display("trial %0d random numbers:%s", t + 1, line);
    end

    // Histogram of 1000 random numbers.
    seed = SEED; seed_load = 1'b1;
    @(posedge clk); #1;
    seed_load = 1'b0;
    foreach (hist[i]) hist[i] = 0;
    for (int i = 0; i < 1000; i++) begin
      step();
      hist[rn]++;
    end
    for (int b = 0; b < 8; b++) begin
      $display("histogram bin %0d: %0d", b, hist[b]);
      check(hist[b] >= 75 && hist[b] <= 175, $sformatf("histogram bin %0d = %0d", b, hist[b]));
    end

    // Maximal period of the 8-bit instance.
    first8 = state8;
    foreach (seen[i]) seen[i] = 1'b0;
    period = 0;
    distinct = 0;
    do begin
      if (!seen[state8]) distinct++;
      seen[state8] = 1'b1;
      advance8 = 1'b1;
      @(posedge clk); #1;
      advance8 = 1'b0;
      period++;
    end while (state8 != first8 && period < 300);
    check(period == 255, $sformatf("8-bit period %0d, expected 255", period));
    check(distinct == 255, $sformatf("8-bit distinct states %0d, expected 255", distinct));
    check(!seen[0], "8-bit register never all-zero");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
