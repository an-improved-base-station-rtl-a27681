// tb_timing_gen: checks the chip and symbol counters over two frames: one
// sym_start per 64 chips, one frame_start per 384 symbols, and sync.
module tb_timing_gen;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sync = 0;
  logic [5:0] chip_idx;
  logic [8:0] sym_idx;
  logic sym_start, sym_last, frame_start;

  timing_gen dut (.clk, .rst_n, .sync, .chip_idx, .sym_idx, .sym_start, .sym_last, .frame_start);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    int n_sym, n_frame, last_frame;
    n_sym = 0; n_frame = 0; last_frame = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2 * 384 * 64; t++) begin
      #1;
      check(chip_idx == 6'(t % 64) && sym_idx == 9'((t / 64) % 384), "counter");
      check(sym_start == (t % 64 == 0) && sym_last == (t % 64 == 63), "symbol strobes");
      if (frame_start) begin
        if (last_frame >= 0) check(t - last_frame == 384 * 64, "frame period");
        last_frame = t;
        n_frame++;
      end
      n_sym += sym_start;
      @(posedge clk);
    end
    check(n_sym == 768 && n_frame == 2, "strobe counts");
    // sync in the middle of a symbol restarts at chip 0, symbol 0.
    repeat (37) @(posedge clk);
    @(negedge clk) sync = 1;
    @(posedge clk) #1 sync = 0;
    check(chip_idx == 0 && sym_idx == 0 && frame_start, "sync restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
