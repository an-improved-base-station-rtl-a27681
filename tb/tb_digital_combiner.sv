// tb_digital_combiner: random and all-maximum inputs against a plain sum,
// with the one-cycle latency of the registered output.
module tb_digital_combiner;
  localparam int N = 64, W = 8, SW = W + $clog2(N);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] in [N];
  logic [SW-1:0] sum;

  digital_combiner #(.N(N), .W(W)) dut (.clk, .rst_n, .in, .sum);

  always #5 clk = !clk;

  initial begin
    int expect_sum;
    foreach (in[i]) in[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      expect_sum = 0;
      foreach (in[i]) begin
        in[i] = (it == 0) ? '1 : W'($urandom);
        expect_sum += in[i];
      end
      @(posedge clk); #1;
      checks++;
      if (int'(sum) != expect_sum) begin
        failures++;
        $display("it %0d: got %0d expected %0d", it, sum, expect_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
