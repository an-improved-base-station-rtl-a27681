// tb_puncture_control: feeds random symbols and decimated long code bits
// for many 24-symbol power-control groups and checks that exactly two
// consecutive symbols per group carry the power-control bit, starting at
// the position given by the previous group's last four long code bits,
// and that every other symbol passes unchanged.
module tb_puncture_control;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sync = 0, pcb = 0, in_valid = 0, in_sym = 0, in_dec = 0;
  logic [8:0] in_idx = 0;
  logic out_valid, out_sym, out_punct;

  puncture_control dut (.clk, .rst_n, .sync, .pcb, .in_valid, .in_sym, .in_dec, .in_idx,
                        .out_valid, .out_sym, .out_punct);

  always #5 clk = !clk;

  initial begin
    bit decs [24];
    int pos, npos, per_group;
    logic x;
    bit seen [16];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    pos = 0;
    for (int g = 0; g < 400; g++) begin
      per_group = 0;
      pcb = 1'($urandom);
      for (int t = 0; t < 24; t++) begin
        int k;
        k = (g * 24 + t) % 384;
        decs[t] = 1'($urandom);
        x = 1'($urandom);
        @(negedge clk);
        in_valid = 1; in_sym = x; in_dec = decs[t]; in_idx = 9'(k);
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (t == pos || t == pos + 1) begin
          per_group++;
          if (!out_valid || !out_punct || out_sym != pcb) begin
            failures++; $display("group %0d pos %0d: not punctured", g, t);
          end
        end else if (!out_valid || out_punct || out_sym != x) begin
          failures++; $display("group %0d pos %0d: wrongly punctured", g, t);
        end
      end
      checks++;
      if (per_group != 2) failures++;
      seen[pos] = 1'b1;
      npos = 8 * decs[23] + 4 * decs[22] + 2 * decs[21] + decs[20];
      pos = npos;
    end
    // sync returns the start position to 0
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    for (int t = 0; t < 24; t++) begin
      x = 1'($urandom);
      @(negedge clk);
      in_valid = 1; in_sym = x; in_dec = 1'b1; in_idx = 9'(t); pcb = !x;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_punct != (t < 2) || out_sym != ((t < 2) ? !x : x)) begin
        failures++; $display("after sync pos %0d: punct %0d", t, out_punct);
      end
    end
    // the start position must have taken every value 0..15
    foreach (seen[i]) begin checks++; if (!seen[i]) begin failures++; $display("position %0d never used", i); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
