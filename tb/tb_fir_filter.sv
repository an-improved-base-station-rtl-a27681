// tb_fir_filter: drives random multilevel samples (with gaps in in_valid)
// and compares the four output phases with a direct convolution of the
// filter taps; also checks the impulse response and the one-cycle latency.
module tb_fir_filter;
  import bsm_pkg::*;
  import bsm_ref_pkg::*;
  localparam int IN_W = 14;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [IN_W-1:0] in;
  logic out_valid;
  logic signed [FIR_OUT_W-1:0] out [4];
  longint hist [12];

  fir_filter #(.IN_W(IN_W)) dut (.clk, .rst_n, .in_valid, .in, .out_valid, .out);

  always #5 clk = !clk;

  initial begin
    foreach (hist[k]) hist[k] = 0;
    in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = (n < 40) ? 1'b1 : 1'($urandom_range(3) != 0);
      // impulse at n = 0, then random levels (mostly small, some full scale)
      if (n < 40) in = (n == 0) ? IN_W'(1) : '0;
      else        in = ($urandom_range(9) == 0) ? IN_W'(16320) : IN_W'($urandom_range(2000));
      if (in_valid) begin
        for (int k = 11; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(in);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid != in_valid) begin
        failures++;
        $display("n=%0d: out_valid %0d", n, out_valid);
      end
      if (in_valid)
        for (int p = 0; p < 4; p++) begin
          checks++;
          if (longint'(out[p]) != fir_phase(p, hist)) begin
            failures++;
            $display("n=%0d phase %0d: got %0d expected %0d", n, p, out[p], fir_phase(p, hist));
          end
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
