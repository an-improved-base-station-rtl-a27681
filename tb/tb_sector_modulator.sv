// tb_sector_modulator: checks one sector against the conventional
// structure it replaces. The reference spreads every slot separately,
// x_i = V_i ^ W_i ^ P, filters each x_i with its own 48-tap filter and
// adds G_i times the filter outputs; the sector instead adds first and
// spreads and filters once. Random symbols change every 64 chips, the
// slot table has disabled slots and random gains, and the pilot PN offset
// is nonzero, so both multiplexer paths of the multilevel XOR are used.
module tb_sector_modulator;
  import bsm_pkg::*;
  import bsm_ref_pkg::*;
  localparam int OFFSET = 100;
  localparam int NCHIP = 64 * 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sync = 0;
  logic [5:0] chip_idx = 0;
  logic slot_sym [64];
  slot_cfg_t slot_cfg [64];
  logic [13:0] level, radix_m1;
  logic pn_i, pn_q, out_valid;
  logic signed [31:0] i_out [4], q_out [4];
  bit seq_i [32768], seq_q [32768];
  bit wm [64][64];
  bit xi [64][NCHIP], xq [64][NCHIP];
  int n_p1 = 0, n_p0 = 0;

  sector_modulator dut (.clk, .rst_n, .sync, .chip_idx, .slot_sym, .slot_cfg,
                        .pn_offset(15'(OFFSET)), .level, .radix_m1, .pn_i, .pn_q,
                        .i_out, .q_out, .out_valid);

  always #5 clk = !clk;

  function automatic longint conventional(input bit q, input int p, input int c);
    longint acc;
    acc = 0;
    for (int i = 0; i < 64; i++)
      if (slot_cfg[i].en) begin
        longint hist [12];
        for (int k = 0; k < 12; k++) hist[k] = (q ? xq[i][c-k] : xi[i][c-k]);
        acc += longint'(slot_cfg[i].gain) * fir_phase(p, hist);
      end
    return acc;
  endfunction

  initial begin
    pn_sequence(1'b0, seq_i);
    pn_sequence(1'b1, seq_q);
    walsh_matrix(wm);
    foreach (slot_cfg[i]) begin
      slot_cfg[i].en = ($urandom_range(3) != 0);
      slot_cfg[i].card = '0;
      slot_cfg[i].gain = 8'($urandom);
      slot_sym[i] = 1'b0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    for (int c = 0; c < NCHIP + 2; c++) begin
      int pc;
      if (c < NCHIP) begin
        chip_idx = 6'(c % 64);
        if (c % 64 == 0) foreach (slot_sym[i]) slot_sym[i] = 1'($urandom);
        pc = (c < OFFSET) ? 0 : c - OFFSET;
        foreach (slot_sym[i]) begin
          xi[i][c] = slot_sym[i] ^ wm[i][c % 64] ^ seq_i[pc];
          xq[i][c] = slot_sym[i] ^ wm[i][c % 64] ^ seq_q[pc];
        end
      end
      @(posedge clk); #1;
      // outputs of chip c-1 are now on i_out/q_out
      if (c - 1 >= 12 && c - 1 < NCHIP) begin
        if (seq_i[(c - 1 < OFFSET) ? 0 : c - 1 - OFFSET]) n_p1++; else n_p0++;
        for (int p = 0; p < 4; p++) begin
          checks += 2;
          if (longint'(i_out[p]) != conventional(1'b0, p, c - 1)) begin
            failures++;
            if (failures < 10) $display("chip %0d I phase %0d: got %0d want %0d", c - 1, p, i_out[p], conventional(1'b0, p, c - 1));
          end
          if (longint'(q_out[p]) != conventional(1'b1, p, c - 1)) begin
            failures++;
            if (failures < 10) $display("chip %0d Q phase %0d: got %0d want %0d", c - 1, p, q_out[p], conventional(1'b1, p, c - 1));
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_p1 == 0 || n_p0 == 0) begin failures++; $display("a multiplexer path was never used"); end
    $display("chips with P_I=1: %0d, P_I=0: %0d", n_p1, n_p0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCHIP + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
