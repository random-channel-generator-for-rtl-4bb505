// channel_adder -- summing node that combines the three model multiplexers.
//
// Adds the signed samples from the transmission-line, Zimmermann and LPTV
// multiplexers into one channel output sample. The sum is two bits wider
// than a sample, so it never overflows. The summing node itself follows the
// source design; the registered output and the `valid` pipeline flag are
// this design's own choices.
//
// Timing: one register stage; `sum` and `out_valid` appear one clock after
// `in_valid` and the three samples. Reset (active low, synchronous) clears
// both outputs.
module channel_adder #(
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  input  logic signed [DW-1:0] c,
  output logic                 out_valid,
  output logic signed [DW+1:0] sum
);

  logic signed [DW+1:0] sum_next;

  always_comb begin
    sum_next = (DW+2)'(a) + (DW+2)'(b) + (DW+2)'(c);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sum <= sum_next;
      end
    end
  end

endmodule
