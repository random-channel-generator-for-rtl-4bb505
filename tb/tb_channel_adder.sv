// tb_channel_adder -- self-checking testbench of the summing node.
//
// Feeds random signed samples, including the extreme values, and checks
// that the sum appears one clock later, exact and without wrap-around, that
// out_valid follows in_valid by one clock and that the sum holds while
// in_valid is low.
module tb_channel_adder;
  localparam int DW = 16;

  logic clk = 1'b0;
  logic rst_n, in_valid, out_valid;
  logic signed [DW-1:0] a, b, c;
  logic signed [DW+1:0] sum;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  channel_adder #(.DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .c(c),
    .out_valid(out_valid), .sum(sum)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int ia, ib, ic, expected, last;
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0; c = '0;
    repeat (2) @(posedge clk);
    #1;
    check(sum == 0 && out_valid == 1'b0, "reset clears the outputs");
    rst_n = 1'b1;
    last = 0;
    for (int i = 0; i < 1000; i++) begin
      case (i)
        0: begin ia = 32767;  ib = 32767;  ic = 32767;  end
        1: begin ia = -32768; ib = -32768; ic = -32768; end
        2: begin ia = 32767;  ib = -32768; ic = 1;      end
        default: begin
          ia = $signed(16'($urandom));
          ib = $signed(16'($urandom));
          ic = $signed(16'($urandom));
        end
      endcase
      a = DW'(ia); b = DW'(ib); c = DW'(ic);
      in_valid = ($urandom_range(0, 3) != 0);
      expected = in_valid ? ia + ib + ic : last;
      @(posedge clk);
      #1;
      check(out_valid == in_valid, $sformatf("out_valid at sample %0d", i));
      check(int'(sum) == expected, $sformatf("sum at sample %0d: %0d expected %0d", i, sum, expected));
      last = expected;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
