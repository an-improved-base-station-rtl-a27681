// tb_traffic_channel: runs one channel card for five 20 ms frames at a
// shortened symbol period (8 clocks instead of 64) with the rate changing
// every frame (9.6, 4.8, 2.4, 1.2, 9.6 kbps) and the power-control bit
// changing every frame. A bit-level model encodes, repeats, interleaves,
// scrambles with the decimated long code and punctures each frame; every
// output symbol from the second frame on is compared with it, and the
// number of bits the card pulls per frame is checked against the rate.
module tb_traffic_channel;
  import bsm_pkg::*;
  import bsm_ref_pkg::*;
  localparam int P = 8;                 // clocks per symbol in this test
  localparam int F = 5;                 // frames
  localparam int NSYM = F * 384;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sync = 0, sym_start = 0, sym_last = 0;
  logic [8:0] sym_idx = 0;
  card_cfg_t cfg;
  logic info_bit, info_req, sym_out, out_punct;

  int rates [F] = '{0, 1, 2, 3, 0};
  bit allbits [F*192];
  int bit_ptr = 0;
  bit rep [F][384];
  bit dec [NSYM];
  bit punct [NSYM];
  bit pcbs [F];
  int pulled [F];

  traffic_channel dut (.clk, .rst_n, .sync, .sym_start, .sym_last, .sym_idx, .cfg,
                       .info_bit, .info_req, .sym_out, .out_punct);

  always #5 clk = !clk;
  assign info_bit = allbits[bit_ptr];
  always @(posedge clk) if (rst_n && info_req) begin
    bit_ptr <= bit_ptr + 1;
    pulled[cur_frame] <= pulled[cur_frame] + 1;
  end
  int cur_frame = 0;

  initial begin
    int base, pos;
    logic [41:0] s;
    bit info [$];
    cfg.mask = {10'($urandom), 32'($urandom)};
    // information bits and reference symbols of each frame
    base = 0;
    for (int f = 0; f < F; f++) begin
      int nb;
      nb = 192 >> rates[f];
      info.delete();
      for (int b = 0; b < nb; b++) begin
        allbits[base + b] = (b >= nb - 8) ? 1'b0 : 1'($urandom);
        info.push_back(allbits[base + b]);
      end
      base += nb;
      frame_symbols(info, rates[f], rep[f]);
      pcbs[f] = 1'(f % 2);
      pulled[f] = 0;
    end
    // decimated long code and puncture positions
    s = 42'h1;
    pos = 0;
    for (int n = 0; n < NSYM; n++) begin
      int t;
      t = n % 24;
      dec[n] = lc_out(s, cfg.mask);
      for (int k = 0; k < P; k++) s = lc_step(s);
      punct[n] = (t == pos || t == pos + 1);
      if (t == 23) pos = 8 * dec[n] + 4 * dec[n-1] + 2 * dec[n-2] + dec[n-3];
    end

    cfg.rate = rate_e'(rates[0]);
    cfg.pcb = pcbs[0];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    for (int n = 0; n <= NSYM; n++) begin
      cur_frame = (n / 384) % F;
      if (n % 384 == 0 && n < NSYM) begin
        cfg.rate = rate_e'(rates[n / 384]);
        cfg.pcb = pcbs[n / 384];
      end
      for (int c = 0; c < P; c++) begin
        sym_start = (c == 0) && (n < NSYM);
        sym_last  = (c == P - 1);
        sym_idx   = 9'(n % 384);
        // mid-period: the card shows the symbol formed in period n-1
        if (c == P / 2 && n >= 1) begin
          int k, f, m;
          logic want;
          k = n - 1; f = k / 384; m = k % 384;
          if (punct[k]) want = pcbs[f];
          else if (f >= 1) want = rep[f-1][il_src(m)] ^ dec[k];
          else want = sym_out;   // first frame: interleaver not yet filled
          checks++;
          if (sym_out != want || out_punct != punct[k]) begin
            failures++;
            if (failures < 10) $display("symbol period %0d: got %0d want %0d (punct %0d)", k, sym_out, want, punct[k]);
          end
        end
        @(negedge clk);
      end
    end
    for (int f = 0; f < F; f++) begin
      checks++;
      if (pulled[f] != (192 >> rates[f])) begin
        failures++;
        $display("frame %0d: %0d bits pulled, want %0d", f, pulled[f], 192 >> rates[f]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((F + 1) * 384 * P + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
