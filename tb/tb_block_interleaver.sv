// tb_block_interleaver: writes three random frames of 384 symbols and
// checks that each frame leaves, one frame later, in the row/column order
// (output m = r*16 + c carries input c*24 + r).
module tb_block_interleaver;
  import bsm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sym = 0;
  logic [8:0] in_idx = 0, out_idx;
  logic out_valid, out_sym;
  bit frames [4][384];

  block_interleaver dut (.clk, .rst_n, .in_valid, .in_sym, .in_idx, .out_valid, .out_sym, .out_idx);

  always #5 clk = !clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 4; f++)
      for (int k = 0; k < 384; k++) begin
        frames[f][k] = 1'($urandom);
        @(negedge clk);
        in_valid = 1; in_sym = frames[f][k]; in_idx = 9'(k);
        @(negedge clk);
        in_valid = 0; in_sym = 1'($urandom);
        if (f > 0) begin
          checks++;
          if (!out_valid || out_idx != 9'(k) || out_sym != frames[f-1][il_src(k)]) begin
            failures++;
            $display("frame %0d pos %0d: got %0d want %0d", f, k, out_sym, frames[f-1][il_src(k)]);
          end
        end
        // a position written in this frame never appears before the next
        if (f > 0 && k == 383) begin
          int hits;
          hits = 0;
          for (int m = 0; m < 384; m++) hits += (il_src(m) < 384);
          checks++;
          if (hits != 384) failures++;
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
