// tb_bsm_top: end-to-end test of the three-sector modulator at its full
// size (192 cards, 64 Walsh slots per sector, 48-tap filters).
//
// The microprocessor bus sets up 24 active cards over the three sectors with
// all four rates, random gains and long code masks, pilot PN offsets of 0,
// 768 and 1536 chips, and two softer handoffs (card 0 also in sector 1,
// card 5 also in sector 2). After sync the modulator runs for three 20 ms
// frames. Checked:
//  - every I and Q output sample of every sector against the conventional
//    modulator: each slot spread and filtered on its own, then weighted by
//    its gain and summed (using the card outputs and a reference pilot PN);
//  - the symbol streams of cards 0 and 3 (full and quarter rate) against a
//    bit-level model of encoding, repetition, interleaving, long code
//    scrambling and power-control puncturing;
//  - the number of vocoder bits each active card pulls per frame.
// Counted, each must occur: handoff chips, MLO complement (P=1) and direct
// (P=0) chips, punctured symbols, interleaver frame swaps and each rate.
module tb_bsm_top;
  import bsm_pkg::*;
  import bsm_ref_pkg::*;
  localparam int NF = 3;
  localparam int NCHIP = NF * 384 * 64 + 128;
  localparam int NACT = 24;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sync = 0, cpu_we = 0;
  logic [11:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0;
  logic [191:0] info_bit, info_req;
  logic signed [31:0] i_out [3][4], q_out [3][4];
  logic out_valid;

  bsm_top dut (.clk, .rst_n, .sync, .cpu_we, .cpu_addr, .cpu_wdata,
               .info_bit, .info_req, .i_out, .q_out, .out_valid);

  always #5 clk = !clk;

  // vocoder bit sources
  bit ib [192][700];
  int ptr [192];
  int pulled [192][NF + 1];
  int frame_now = 0;
  always_comb for (int c = 0; c < 192; c++) info_bit[c] = ib[c][ptr[c]];
  always @(posedge clk)
    for (int c = 0; c < 192; c++)
      if (rst_n && info_req[c]) begin
        ptr[c] <= ptr[c] + 1;
        pulled[c][frame_now] <= pulled[c][frame_now] + 1;
      end

  // configuration shadow
  int rate_of [192];
  logic [41:0] mask_of [192];
  bit pcb_of [192];
  int sec_card [3][64];    // -1: slot disabled
  int sec_gain [3][64];
  int offs [3] = '{0, 768, 1536};

  bit seq_i [32768], seq_q [32768];
  bit wm [64][64];
  longint hi [3][64][12], hq [3][64][12];

  // reference for the checked cards
  int chk_cards [2] = '{0, 3};
  bit rep [2][NF][384];
  bit dec [2][NF * 384 + 2];
  bit pun [2][NF * 384 + 2];

  // mechanism counters
  int n_handoff = 0, n_p1 = 0, n_p0 = 0, n_punct = 0, n_swaps = 0;
  int n_rate [4] = '{0, 0, 0, 0};

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk);
    cpu_we = 0;
  endtask

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    pn_sequence(1'b0, seq_i);
    pn_sequence(1'b1, seq_q);
    walsh_matrix(wm);
    foreach (ib[c, b]) ib[c][b] = 1'($urandom);
    foreach (ptr[c]) ptr[c] = 0;
    foreach (pulled[c, f]) pulled[c][f] = 0;
    foreach (sec_card[s, n]) begin sec_card[s][n] = -1; sec_gain[s][n] = 0; end
    foreach (rate_of[c]) begin rate_of[c] = 0; mask_of[c] = '0; pcb_of[c] = 0; end

    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 24 active cards: card c in sector c%3, Walsh slot 1 + c/3
    for (int c = 0; c < NACT; c++) begin
      rate_of[c] = c % 4;
      mask_of[c] = {10'($urandom), 32'($urandom)};
      pcb_of[c] = 1'($urandom);
      wr({2'd1, 2'd0, 8'(c)}, {29'd0, pcb_of[c], 2'(rate_of[c])});
      wr({2'd1, 2'd1, 8'(c)}, mask_of[c][31:0]);
      wr({2'd1, 2'd2, 8'(c)}, {22'd0, mask_of[c][41:32]});
      sec_card[c % 3][1 + c / 3] = c;
      sec_gain[c % 3][1 + c / 3] = 1 + $urandom_range(254);
    end
    // softer handoffs
    sec_card[1][40] = 0; sec_gain[1][40] = 200;
    sec_card[2][50] = 5; sec_gain[2][50] = 90;
    for (int s = 0; s < 3; s++) begin
      for (int n = 0; n < 64; n++)
        if (sec_card[s][n] >= 0)
          wr({2'd0, 2'd0, 8'(s * 64 + n)}, {15'd0, 1'b1, 8'(sec_card[s][n]), 8'(sec_gain[s][n])});
      wr({2'd2, 8'd0, 2'(s)}, 32'(offs[s]));
    end

    // bit-level model of the checked cards
    foreach (chk_cards[k]) begin
      int c, nb, pos;
      logic [41:0] st;
      bit info [$];
      c = chk_cards[k];
      nb = 192 >> rate_of[c];
      for (int f = 0; f < NF; f++) begin
        info.delete();
        for (int b = 0; b < nb; b++) info.push_back(ib[c][f * nb + b]);
        frame_symbols(info, rate_of[c], rep[k][f]);
      end
      st = 42'h1;
      pos = 0;
      for (int n = 0; n < NF * 384 + 2; n++) begin
        int t;
        t = n % 24;
        dec[k][n] = lc_out(st, mask_of[c]);
        for (int j = 0; j < 64; j++) st = lc_step(st);
        pun[k][n] = (t == pos || t == pos + 1);
        if (t == 23) pos = 8 * dec[k][n] + 4 * dec[k][n-1] + 2 * dec[k][n-2] + dec[k][n-3];
      end
    end

    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    foreach (ptr[c]) ptr[c] = 0;
    foreach (pulled[c, f]) pulled[c][f] = 0;

    for (int c = 0; c < NCHIP; c++) begin
      frame_now = c / (384 * 64);
      // spread each slot separately, as the conventional modulator does
      for (int s = 0; s < 3; s++) begin
        int pc;
        pc = (c < offs[s]) ? 0 : c - offs[s];
        for (int n = 0; n < 64; n++)
          if (sec_card[s][n] >= 0) begin
            logic v;
            v = dut.card_sym[sec_card[s][n]];
            for (int k = 11; k > 0; k--) begin hi[s][n][k] = hi[s][n][k-1]; hq[s][n][k] = hq[s][n][k-1]; end
            hi[s][n][0] = longint'(v ^ wm[n][c % 64] ^ seq_i[pc]);
            hq[s][n][0] = longint'(v ^ wm[n][c % 64] ^ seq_q[pc]);
          end
        if (c >= 12) begin
          if (seq_i[pc]) n_p1++; else n_p0++;
        end
      end
      if (c % 64 == 32) begin
        // handoff: card 0 and card 5 feed two sectors
        if (dut.g_sector[0].sec_sym[1] == dut.card_sym[0] && dut.g_sector[1].sec_sym[40] == dut.card_sym[0] &&
            dut.g_sector[2].sec_sym[2] == dut.card_sym[5] && dut.g_sector[2].sec_sym[50] == dut.card_sym[5])
          n_handoff++;
        else begin failures++; $display("handoff routing wrong at chip %0d", c); end
        checks++;
        n_punct += dut.card_punct[0] + dut.card_punct[3];
        // card symbol streams
        if (c >= 64) foreach (chk_cards[k]) begin
          int kk, f, m;
          logic want;
          kk = c / 64 - 1; f = kk / 384; m = kk % 384;
          if (pun[k][kk]) want = pcb_of[chk_cards[k]];
          else if (f >= 1) want = rep[k][f-1][il_src(m)] ^ dec[k][kk];
          else want = dut.card_sym[chk_cards[k]];
          expect_eq(dut.card_sym[chk_cards[k]], want, $sformatf("card %0d symbol %0d", chk_cards[k], kk));
          if (f >= 1 && m == 383 && k == 0) n_swaps++;
        end
      end
      @(posedge clk); #1;
      // outputs of chip c-1
      if (c - 1 >= 12) begin
        checks++;
        if (!out_valid) failures++;
        for (int s = 0; s < 3; s++)
          for (int p = 0; p < 4; p++) begin
            longint wi, wq;
            wi = 0; wq = 0;
            for (int n = 0; n < 64; n++)
              if (sec_card[s][n] >= 0) begin
                wi += longint'(sec_gain[s][n]) * fir_phase(p, hi_prev[s][n]);
                wq += longint'(sec_gain[s][n]) * fir_phase(p, hq_prev[s][n]);
              end
            expect_eq(i_out[s][p], wi, $sformatf("sector %0d I chip %0d phase %0d", s, c - 1, p));
            expect_eq(q_out[s][p], wq, $sformatf("sector %0d Q chip %0d phase %0d", s, c - 1, p));
          end
      end
      hi_prev = hi; hq_prev = hq;
      @(negedge clk);
    end

    // bits per frame for every active card, whole frames 0..NF-1
    for (int c = 0; c < NACT; c++)
      for (int f = 0; f < NF; f++) begin
        expect_eq(pulled[c][f], 192 >> rate_of[c], $sformatf("card %0d frame %0d bits", c, f));
        if (pulled[c][f] == (192 >> rate_of[c])) n_rate[rate_of[c]]++;
      end

    $display("handoff chips %0d, P=1 chips %0d, P=0 chips %0d, punctured symbols %0d, interleaver swaps %0d",
             n_handoff, n_p1, n_p0, n_punct, n_swaps);
    $display("frames at 9.6/4.8/2.4/1.2 kbps: %0d %0d %0d %0d", n_rate[0], n_rate[1], n_rate[2], n_rate[3]);
    if (n_handoff == 0) begin failures++; $display("no softer handoff"); end
    if (n_p1 == 0 || n_p0 == 0) begin failures++; $display("an MLO path never used"); end
    if (n_punct == 0) begin failures++; $display("no power-control puncturing"); end
    if (n_swaps == 0) begin failures++; $display("no interleaver frame checked"); end
    foreach (n_rate[r]) if (n_rate[r] == 0) begin failures++; $display("rate %0d never ran", r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hi_prev [3][64][12], hq_prev [3][64][12];

  initial begin
    repeat (NCHIP + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
