// tb_symbol_repeater: for each of the four rates runs one frame of 384
// symbol strobes with a stand-in encoder whose outputs change every
// symbol, and checks the pop pattern (one bit per 2*2**rate symbols), the
// repeated symbol values and the number of bits taken per frame.
module tb_symbol_repeater;
  import bsm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sym_en = 0, enc_sym0 = 0, enc_sym1 = 0;
  logic [8:0] sym_idx = 0, out_idx;
  rate_e rate = RATE_9600;
  logic pop, out_valid, out_sym;

  symbol_repeater dut (.clk, .rst_n, .sym_en, .sym_idx, .rate, .enc_sym0, .enc_sym1,
                       .pop, .out_valid, .out_sym, .out_idx);

  always #5 clk = !clk;

  initial begin
    logic c0, c1, want;
    int r, pops;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int rt = 0; rt < 4; rt++) begin
      rate = rate_e'(rt);
      r = 1 << rt;
      pops = 0;
      for (int k = 0; k < 384; k++) begin
        @(negedge clk);
        sym_en = 1; sym_idx = 9'(k);
        enc_sym0 = 1'($urandom); enc_sym1 = 1'($urandom);
        #1;
        checks++;
        if (pop != (k % (2*r) == 0)) begin failures++; $display("rate %0d sym %0d: pop %0d", rt, k, pop); end
        if (k % (2*r) == 0) begin c0 = enc_sym0; c1 = enc_sym1; end
        pops += pop;
        want = (k % (2*r) < r) ? c0 : c1;
        @(negedge clk);
        sym_en = 0;
        checks++;
        if (!out_valid || out_sym != want || out_idx != 9'(k)) begin
          failures++;
          $display("rate %0d sym %0d: valid %0d sym %0d want %0d", rt, k, out_valid, out_sym, want);
        end
        repeat (2) begin
          enc_sym0 = 1'($urandom); enc_sym1 = 1'($urandom);
          @(negedge clk);
          checks++;
          if (out_valid || pop) begin failures++; $display("spurious strobe"); end
        end
      end
      checks++;
      if (pops != 192 >> rt) begin failures++; $display("rate %0d: %0d bits per frame", rt, pops); end
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
