// tb_walsh_cover: checks Walsh covering and gain gating against a Walsh
// matrix built by Sylvester doubling, and checks that the 64 covers are
// mutually orthogonal over a symbol.
module tb_walsh_cover;
  import bsm_pkg::*;
  import bsm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic sym, en, chip;
  logic [5:0] walsh_idx, chip_idx;
  logic [GAIN_W-1:0] gain, weighted;
  bit wm [64][64];

  walsh_cover dut (.sym, .walsh_idx, .chip_idx, .en, .gain, .chip, .weighted);

  initial begin
    walsh_matrix(wm);
    // Exhaustive over code, chip and symbol value.
    for (int n = 0; n < 64; n++)
      for (int j = 0; j < 64; j++)
        for (int s = 0; s < 2; s++) begin
          sym = 1'(s); walsh_idx = 6'(n); chip_idx = 6'(j);
          en = 1'($urandom); gain = GAIN_W'($urandom);
          #1;
          checks++;
          if (chip != (sym ^ wm[n][j]) || weighted != ((en && (sym ^ wm[n][j])) ? gain : '0)) begin
            failures++;
            $display("n=%0d j=%0d sym=%0d: chip %0d weighted %0d", n, j, s, chip, weighted);
          end
        end
    // Orthogonality: covers of different codes agree on exactly 32 chips.
    for (int a = 0; a < 64; a++)
      for (int b = a + 1; b < 64; b++) begin
        int agree;
        agree = 0;
        for (int j = 0; j < 64; j++) begin
          logic ca;
          sym = 1'b0; chip_idx = 6'(j); walsh_idx = 6'(a); en = 1'b1; gain = 1;
          #1 ca = chip;
          walsh_idx = 6'(b);
          #1 agree += (ca == chip);
        end
        checks++;
        if (agree != 32) begin
          failures++;
          $display("codes %0d and %0d not orthogonal (%0d)", a, b, agree);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
