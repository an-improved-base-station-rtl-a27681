// tb_long_code_scrambler: compares the long code chip of every cycle with
// the reference recurrence and mask, and checks that each symbol is XORed
// with the chip taken at its sym_start (decimation by the symbol period),
// for two masks and after a sync.
module tb_long_code_scrambler;
  import bsm_ref_pkg::*;
  localparam int P = 8;   // symbol period in cycles for this test
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sync = 0, sym_start = 0, in_valid = 0, in_sym = 0;
  logic [41:0] mask;
  logic [8:0] in_idx = 0, out_idx;
  logic lc_chip, dec_bit, out_valid, out_sym, out_dec;

  long_code_scrambler dut (.clk, .rst_n, .sync, .sym_start, .mask, .in_valid, .in_sym, .in_idx,
                           .lc_chip, .dec_bit, .out_valid, .out_sym, .out_dec, .out_idx);

  always #5 clk = !clk;

  initial begin
    logic [41:0] s;
    logic dec, x;
    int bad_chip;
    mask = {10'h3ff & 10'($urandom), 32'($urandom)};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk) sync = 1;
      @(negedge clk) sync = 0;
      s = 42'h1;
      bad_chip = 0;
      for (int n = 0; n < 600 * P; n++) begin
        // now in the cycle that sees state s
        sym_start = (n % P == 0);
        in_valid  = (n % P == 2);
        if (in_valid) begin x = 1'($urandom); in_sym = x; in_idx = 9'(n / P); end
        #1;
        if (lc_chip != lc_out(s, mask)) bad_chip++;
        if (sym_start) dec = lc_out(s, mask);
        @(negedge clk);
        if (n % P == 2) begin
          checks++;
          if (!out_valid || out_sym != (x ^ dec) || out_dec != dec || out_idx != 9'(n / P)) begin
            failures++;
            $display("pass %0d sym %0d: got %0d want %0d", pass, n / P, out_sym, x ^ dec);
          end
        end
        s = lc_step(s);
      end
      checks++;
      if (bad_chip != 0) begin failures++; $display("pass %0d: %0d long code chips differ", pass, bad_chip); end
      mask = 42'h2aa_5555_aaaa ^ mask;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
