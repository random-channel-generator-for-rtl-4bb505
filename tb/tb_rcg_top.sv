// tb_rcg_top -- end-to-end testbench of the random channel generator.
//
// Runs the generator at its default sizes (22 transmission-line, 10
// Zimmermann and 2 x 5 LPTV transfer functions, 32-bit LFSR, 16-bit samples).
// Every transfer function input carries a fresh random sample on every
// clock. The testbench keeps its own model of the LFSR and of the selection
// rule and checks, one clock after each sample:
//   * the channel output equals the sum of the transfer functions that the
//     model says are selected (a disabled model contributes zero);
//   * chan_valid follows tf_valid;
//   * the random number and the three selections shown on the outputs.
// The button is pressed (`advance`) every few clocks, 3000 times, and the
// seed is reloaded once. It counts how often each mechanism occurred and
// fails if one never did: each of the eight random numbers, each model
// enabled and grounded, every transfer function of every model picked,
// the all-grounded channel, a seed reload, and holding between presses.
module tb_rcg_top;
  import rcg_pkg::*;

  localparam logic [31:0] SEED = 32'hACE1_2D5B;
  localparam int PRESSES = 3000;

  logic clk = 1'b0;
  logic rst_n;
  logic seed_load, advance, tf_valid;
  logic [31:0] seed;
  logic [N_TL-1:0][SAMPLE_W-1:0] tl_tf;
  logic [N_ZM-1:0][SAMPLE_W-1:0] zm_tf;
  logic [LPTV_TYPES-1:0][LPTV_STEPS-1:0][SAMPLE_W-1:0] lptv_tf;
  logic chan_valid;
  logic signed [SAMPLE_W+1:0] chan_out;
  logic [2:0] rn;
  logic [2:0] model_en;
  logic [4:0] tl_sel;
  logic [3:0] zm_sel;
  logic [3:0] lptv_sel;
  logic [31:0] rng_state;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  rcg_top dut (
    .clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(seed),
    .advance(advance), .tf_valid(tf_valid), .tl_tf(tl_tf), .zm_tf(zm_tf),
    .lptv_tf(lptv_tf), .chan_valid(chan_valid), .chan_out(chan_out),
    .rn(rn), .model_en(model_en), .tl_sel(tl_sel), .zm_sel(zm_sel),
    .lptv_sel(lptv_sel), .rng_state(rng_state)
  );

  // Reference model state
  logic [31:0] m_state;
  logic [2:0]  m_rn;

  int rn_seen [8];
  int tl_seen [N_TL];
  int zm_seen [N_ZM];
  int lptv_seen [N_LPTV];
  int en_on [3];
  int en_off [3];
  int grounded_all = 0;
  int reloads = 0;
  int holds = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] m_next(input logic [31:0] s);
    return {s[0] ^ s[1] ^ s[2] ^ s[22], s[31:1]};
  endfunction

  function automatic logic [2:0] m_fold(input logic [31:0] s);
    return {s[4] ^ s[7] ^ s[29], s[2] ^ s[5] ^ s[8], s[0] ^ s[3] ^ s[6]};
  endfunction

  initial begin : watchdog
    repeat (PRESSES * 10 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fresh random samples on every transfer function input.
  task automatic new_samples();
    for (int i = 0; i < N_TL; i++) tl_tf[i] = SAMPLE_W'($urandom);
    for (int i = 0; i < N_ZM; i++) zm_tf[i] = SAMPLE_W'($urandom);
    for (int t = 0; t < LPTV_TYPES; t++)
      for (int s = 0; s < LPTV_STEPS; s++) lptv_tf[t][s] = SAMPLE_W'($urandom);
  endtask

  // One clock: drive inputs, predict, check after the edge.
  task automatic cycle(input bit press, input bit load, input logic [31:0] load_val);
    int tl_i, zm_i, lp_i, expected;
    bit v;
    logic [31:0] prev_state;
    new_samples();
    v = ($urandom_range(0, 7) != 0);
    tf_valid = v;
    advance = press;
    seed_load = load;
    seed = load_val;
    #1;
    // Selection shown prev_state the edge
    tl_i = int'(m_state[23:16]) % N_TL;
    zm_i = int'(m_state[31:24]) % N_ZM;
    lp_i = int'(m_state[15:9]) % N_LPTV;
    check(rn == m_rn, "random number output");
    check(model_en == m_rn, "model enables follow the random number bits");
    check(int'(tl_sel) == tl_i && int'(zm_sel) == zm_i && int'(lptv_sel) == lp_i,
          $sformatf("selection tl=%0d/%0d zm=%0d/%0d lptv=%0d/%0d",
                    tl_sel, tl_i, zm_sel, zm_i, lptv_sel, lp_i));
    expected = 0;
    if (m_rn[0]) expected += int'($signed(tl_tf[tl_i]));
    if (m_rn[1]) expected += int'($signed(zm_tf[zm_i]));
    if (m_rn[2]) expected += int'($signed(lptv_tf[lp_i / LPTV_STEPS][lp_i % LPTV_STEPS]));
    prev_state = rng_state;
    @(posedge clk);
    #1;
    advance = 1'b0;
    seed_load = 1'b0;
    tf_valid = 1'b0;
    check(chan_valid == v, "chan_valid follows tf_valid by one clock");
    if (v) check(int'(chan_out) == expected,
                 $sformatf("channel output %0d expected %0d", chan_out, expected));
    // Reference update
    if (load) begin
      m_state = (load_val == 0) ? SEED : load_val;
      reloads++;
    end else if (press) begin
      m_rn = m_fold(m_state);
      m_state = m_next(m_state);
    end else begin
      check(rng_state == prev_state, "selection holds between presses");
      holds++;
    end
    check(rng_state == m_state, "LFSR state");
  endtask

  initial begin : main
    rst_n = 1'b0; seed_load = 1'b0; advance = 1'b0; tf_valid = 1'b0; seed = '0;
    new_samples();
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    m_state = SEED;
    m_rn = 3'd0;
    check(rng_state == SEED && rn == 3'd0, "reset state");

    for (int p = 0; p < PRESSES; p++) begin
      int gap;
      gap = $urandom_range(1, 4);
      for (int g = 0; g < gap; g++) cycle(1'b0, 1'b0, '0);
      if (p == PRESSES / 2) cycle(1'b0, 1'b1, 32'h5EED_0001);
      cycle(1'b1, 1'b0, '0);
      // Count what the new selection exercises
      rn_seen[m_rn]++;
      for (int k = 0; k < 3; k++) if (m_rn[k]) en_on[k]++; else en_off[k]++;
      if (m_rn == 3'd0) grounded_all++;
      if (m_rn[0]) tl_seen[int'(m_state[23:16]) % N_TL]++;
      if (m_rn[1]) zm_seen[int'(m_state[31:24]) % N_ZM]++;
      if (m_rn[2]) lptv_seen[int'(m_state[15:9]) % N_LPTV]++;
    end
    repeat (2) cycle(1'b0, 1'b0, '0);

    // Every mechanism must have happened.
    for (int i = 0; i < 8; i++) check(rn_seen[i] > 0, $sformatf("random number %0d never drawn", i));
    for (int k = 0; k < 3; k++) begin
      check(en_on[k] > 0, $sformatf("model %0d never enabled", k));
      check(en_off[k] > 0, $sformatf("model %0d never grounded", k));
    end
    for (int i = 0; i < N_TL; i++) check(tl_seen[i] > 0, $sformatf("TL TF %0d never picked", i));
    for (int i = 0; i < N_ZM; i++) check(zm_seen[i] > 0, $sformatf("Zimmermann TF %0d never picked", i));
    for (int i = 0; i < N_LPTV; i++) check(lptv_seen[i] > 0, $sformatf("LPTV TF %0d never picked", i));
    check(grounded_all > 0, "all-grounded channel never drawn");
    check(reloads > 0, "seed never reloaded");
    check(holds > 0, "no hold between presses");
    $display("presses=%0d reloads=%0d holds=%0d all_grounded=%0d", PRESSES, reloads, holds, grounded_all);
    $display("random number counts: %0p", rn_seen);
    $display("model enabled: %0p grounded: %p", en_on, en_off);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
