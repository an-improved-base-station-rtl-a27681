// tb_conv_encoder: encodes random frames (192 bits, ending in 8 zero tail
// bits) and compares both symbols of every bit with the generator
// polynomial model, including clear on the first bit of each frame and
// idle cycles between bits.
module tb_conv_encoder;
  import bsm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0;
  logic sym0, sym1;
  bit info [$];

  conv_encoder dut (.clk, .rst_n, .clear, .in_valid, .in_bit, .sym0, .sym1);

  always #5 clk = !clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      info.delete();
      // frames 0..3 end in tail bits, frames 4..5 do not: clear must still
      // start them from an empty register
      for (int b = 0; b < 192; b++) info.push_back((f < 4 && b >= 184) ? 1'b0 : 1'($urandom));
      for (int b = 0; b < 192; b++) begin
        @(negedge clk);
        in_valid = 1; in_bit = info[b]; clear = (b == 0);
        #1;
        checks++;
        if (sym0 != conv_sym(9'o753, info, b) || sym1 != conv_sym(9'o561, info, b)) begin
          failures++;
          $display("frame %0d bit %0d: got %b%b", f, b, sym0, sym1);
        end
        @(negedge clk);
        in_valid = 0; clear = 0; in_bit = 1'($urandom);
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
