// tb_model_mux -- self-checking testbench of the channel model multiplexer.
//
// Drives a 22-input multiplexer (the transmission-line model's size) with
// random samples and checks, for every select value and both enable states,
// that the output is the selected input or zero. Select values past the last
// input must also give zero.
module tb_model_mux;
  localparam int N  = 22;
  localparam int DW = 16;

  logic [N-1:0][DW-1:0] tf_in;
  logic                 enable;
  logic [4:0]           sel;
  logic [DW-1:0]        out;

  int checks = 0;
  int failures = 0;

  model_mux #(.N_TF(N), .DW(DW)) dut (
    .tf_in(tf_in), .enable(enable), .sel(sel), .out(out)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [DW-1:0] expected;
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < N; i++) tf_in[i] = DW'($urandom);
      for (int s = 0; s < 32; s++) begin
        for (int e = 0; e < 2; e++) begin
          sel = 5'(s);
          enable = e[0];
          #1;
          expected = (e == 1 && s < N) ? tf_in[s] : '0;
          checks++;
          if (out !== expected) begin
            failures++;
            $display("FAIL: sel=%0d enable=%0d out=%h expected %h", s, e, out, expected);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
