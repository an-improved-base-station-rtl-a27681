// tb_pilot_pn_gen: checks the I and Q pilot PN generators against the
// reference m-sequences with the inserted zero over a full 32768-chip
// period and more, checks the balance of the period (16384 ones) and that
// a generator with offset d produces the same sequence d chips later.
// A second sync in mid-sequence must restart every generator. Each chip
// compared counts as one check.
module tb_pilot_pn_gen;
  import bsm_ref_pkg::*;
  localparam logic [14:0] TAPS_I = 15'b010_0011_1010_0001;
  localparam logic [14:0] TAPS_Q = 15'b001_1100_0111_1001;
  localparam int D = 512;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sync = 0;
  logic pn_i, pn_q, pn_i_d;
  bit seq_i [32768], seq_q [32768];

  pilot_pn_gen #(.TAPS(TAPS_I)) u_i  (.clk, .rst_n, .sync, .offset(15'd0), .pn(pn_i));
  pilot_pn_gen #(.TAPS(TAPS_Q)) u_q  (.clk, .rst_n, .sync, .offset(15'd0), .pn(pn_q));
  pilot_pn_gen #(.TAPS(TAPS_I)) u_id (.clk, .rst_n, .sync, .offset(15'(D)), .pn(pn_i_d));

  always #5 clk = !clk;

  initial begin
    int ones, bad_i, bad_q, bad_d;
    pn_sequence(1'b0, seq_i);
    pn_sequence(1'b1, seq_q);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    // first chip after sync is now on the outputs
    ones = 0; bad_i = 0; bad_q = 0; bad_d = 0;
    for (int c = 0; c < 32768 + 1000; c++) begin
      #1;
      if (pn_i != seq_i[c % 32768]) bad_i++;
      if (pn_q != seq_q[c % 32768]) bad_q++;
      if (c >= D && pn_i_d != seq_i[(c - D) % 32768]) bad_d++;
      if (c < 32768) ones += pn_i;
      @(negedge clk);
    end
    checks += 32768 + 1000; failures += bad_i;
    checks += 32768 + 1000; failures += bad_q;
    checks += 32768 + 1000 - D; failures += bad_d;
    if (bad_i != 0) $display("I sequence: %0d mismatches", bad_i);
    if (bad_q != 0) $display("Q sequence: %0d mismatches", bad_q);
    if (bad_d != 0) $display("offset sequence: %0d mismatches", bad_d);
    checks++; if (ones != 16384) begin failures++; $display("I period has %0d ones", ones); end
    // a second sync in mid-sequence restarts all generators
    sync = 1;
    @(negedge clk) sync = 0;
    bad_i = 0; bad_d = 0;
    for (int c = 0; c < 2 * D; c++) begin
      #1;
      if (pn_i != seq_i[c]) bad_i++;
      if (c >= D && pn_i_d != seq_i[c - D]) bad_d++;
      checks += (c >= D) ? 2 : 1;
      @(negedge clk);
    end
    failures += bad_i + bad_d;
    if (bad_i + bad_d != 0) $display("after re-sync: %0d mismatches", bad_i + bad_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000 + 4 * D) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
