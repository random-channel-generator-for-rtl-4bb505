// model_mux -- selects one channel transfer function output of a channel model.
//
// One of these sits between each channel model and the summing node. It has
// N_TF data inputs, one per transfer function (TF) of the model, and a
// grounded input: when `enable` is low the output is zero, so the model adds
// nothing to the channel. When `enable` is high the output is the input
// picked by `sel`. A `sel` of N_TF or more is out of range and also gives
// zero. One multiplexer per model with a grounded input follows the source
// design; the enable / index form of the select is this design's own choice.
//
// Timing: purely combinational.
module model_mux #(
  parameter int unsigned N_TF  = 22,
  parameter int unsigned DW    = 16,
  parameter int unsigned SEL_W = (N_TF > 1) ? $clog2(N_TF) : 1
) (
  input  logic [N_TF-1:0][DW-1:0] tf_in,
  input  logic                    enable,
  input  logic [SEL_W-1:0]        sel,
  output logic [DW-1:0]           out
);

  always_comb begin
    out = '0;
    if (enable && (32'(sel) < N_TF)) begin
      out = tf_in[sel];
    end
  end

endmodule
