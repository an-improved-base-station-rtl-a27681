// bsm_top: improved three-sector CDMA base station modulator (digital part).
//
// N_CARDS traffic channel cards each turn one user's vocoder bits into a
// 19.2 ksps symbol stream. The sector select hands every card's stream to
// one Walsh slot of a sector, or to slots of two sectors during a softer
// handoff. Each sector then covers its N_WALSH slots with their Walsh codes,
// weights them by their gains, adds them into one multilevel value, spreads
// that value with its I and Q pilot PN chips through binary-multilevel XOR
// operators and filters it with one FIR filter per channel. So the whole
// modulator has 2*N_SECTORS spreaders and filters, where a conventional
// one spreads and filters every channel of every transmit section.
// Interface: clk is the 1.2288 MHz chip clock. sync restarts the frame
// timing, the long code and the pilot PN generators (with the sector
// offsets). The microprocessor writes the configuration through cpu_*
// (see cpu_regs). Card c pulls vocoder bits: info_req[c] is high for one
// cycle when info_bit[c] is consumed. i_out/q_out carry, per sector, OSR
// filtered samples per chip for the D/A converters; out_valid marks them.
// Timing: bits of frame f leave in frame f+1 (interleaver) and one symbol
// later; the filter samples of chip c leave two cycles after chip c.
// Some internal signals have no load here: frame_start, the cards'
// puncture flags and each sector's level, radix and PN chips. They are
// kept as named nets for observation in simulation (lint reports them as
// unused).
module bsm_top
  import bsm_pkg::*;
#(
  parameter int unsigned N_CARDS   = 192,
  parameter int unsigned N_SECTORS = 3,
  parameter int unsigned N_WALSH   = 64,
  parameter int unsigned OSR       = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        sync,
  input  logic                        cpu_we,
  input  logic [11:0]                 cpu_addr,
  input  logic [31:0]                 cpu_wdata,
  input  logic [N_CARDS-1:0]          info_bit,
  output logic [N_CARDS-1:0]          info_req,
  output logic signed [FIR_OUT_W-1:0] i_out [N_SECTORS][OSR],
  output logic signed [FIR_OUT_W-1:0] q_out [N_SECTORS][OSR],
  output logic                        out_valid
);
  localparam int unsigned N_SLOTS = N_SECTORS * N_WALSH;
  localparam int unsigned SW      = GAIN_W + $clog2(N_WALSH);

  logic [5:0]        chip_idx;
  logic [8:0]        sym_idx;
  logic              sym_start, sym_last, frame_start;
  slot_cfg_t         slot_cfg  [N_SLOTS];
  card_cfg_t         card_cfg  [N_CARDS];
  logic [PN_LEN-1:0] pn_offset [N_SECTORS];
  logic              card_sym  [N_CARDS];
  logic              card_punct[N_CARDS];
  logic              slot_sym  [N_SLOTS];
  logic [N_SECTORS-1:0] sec_valid;

  timing_gen u_timing (
    .clk, .rst_n, .sync,
    .chip_idx, .sym_idx, .sym_start, .sym_last, .frame_start
  );

  cpu_regs #(.N_CARDS(N_CARDS), .N_SECTORS(N_SECTORS), .N_WALSH(N_WALSH)) u_regs (
    .clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata,
    .slot_cfg, .card_cfg, .pn_offset
  );

  for (genvar c = 0; c < N_CARDS; c++) begin : g_card
    traffic_channel u_card (
      .clk, .rst_n, .sync,
      .sym_start, .sym_last, .sym_idx,
      .cfg      (card_cfg[c]),
      .info_bit (info_bit[c]),
      .info_req (info_req[c]),
      .sym_out  (card_sym[c]),
      .out_punct(card_punct[c])
    );
  end

  sector_select #(.N_CARDS(N_CARDS), .N_SLOTS(N_SLOTS)) u_select (
    .card_sym, .slot_cfg, .slot_sym
  );

  for (genvar s = 0; s < N_SECTORS; s++) begin : g_sector
    logic      sec_sym [N_WALSH];
    slot_cfg_t sec_cfg [N_WALSH];
    logic [SW-1:0] level, radix_m1;
    logic      pn_i, pn_q;
    for (genvar n = 0; n < N_WALSH; n++) begin : g_map
      assign sec_sym[n] = slot_sym[s*N_WALSH + n];
      assign sec_cfg[n] = slot_cfg[s*N_WALSH + n];
    end
    sector_modulator #(.N_WALSH(N_WALSH), .OSR(OSR)) u_sector (
      .clk, .rst_n, .sync,
      .chip_idx,
      .slot_sym (sec_sym),
      .slot_cfg (sec_cfg),
      .pn_offset(pn_offset[s]),
      .level, .radix_m1, .pn_i, .pn_q,
      .i_out    (i_out[s]),
      .q_out    (q_out[s]),
      .out_valid(sec_valid[s])
    );
  end

  assign out_valid = &sec_valid;
endmodule
