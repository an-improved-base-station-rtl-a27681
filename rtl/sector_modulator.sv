// sector_modulator: the digital part of one sector of the improved modulator.
//
// Implements, for the I and the Q channel of one sector,
//   I = FIR{ EXOR(P_I, sum_i G_i (V_i ^ W_i)) },
//   Q = FIR{ EXOR(P_Q, sum_i G_i (V_i ^ W_i)) },
// which equals the conventional sum_i G_i FIR{(V_i ^ W_i) ^ P}: each of the
// N_WALSH slots is Walsh covered and gated by its gain (walsh_cover), the
// digital combiner adds the weighted binary chips into one multilevel value
// shared by I and Q, and for each channel one binary-multilevel XOR
// (mlo_xor) spreads it with the pilot PN chip and one FIR filter shapes it.
// The radix minus one of the multilevel value is the sum of the gains of
// the enabled slots, the largest value the combiner can reach, so that
// P = 1 turns each weighted term G_i*y into G_i*(1-y). Slot n always uses
// Walsh code n, as drawn for the improved modulator. Using the same gain
// for I and Q follows the source design's equations.
// Timing: slot_sym must be constant over a symbol and chip_idx is the chip
// being sent. The combiner sum and the PN chips are registered (one
// cycle), the XOR is combinational and the filter registers its output:
// the samples of chip c leave two cycles after chip c was presented.
// The covers' unweighted chip output is not needed here and is left open.
module sector_modulator
  import bsm_pkg::*;
#(
  parameter int unsigned N_WALSH = 64,
  parameter int unsigned OSR     = 4,
  localparam int unsigned SW     = GAIN_W + $clog2(N_WALSH)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        sync,
  input  logic [5:0]                  chip_idx,
  input  logic                        slot_sym  [N_WALSH],
  input  slot_cfg_t                   slot_cfg  [N_WALSH],
  input  logic [PN_LEN-1:0]           pn_offset,
  output logic [SW-1:0]               level,
  output logic [SW-1:0]               radix_m1,
  output logic                        pn_i,
  output logic                        pn_q,
  output logic signed [FIR_OUT_W-1:0] i_out [OSR],
  output logic signed [FIR_OUT_W-1:0] q_out [OSR],
  output logic                        out_valid
);
  localparam logic [PN_LEN-1:0] TAPS_I = 15'b010_0011_1010_0001;
  localparam logic [PN_LEN-1:0] TAPS_Q = 15'b001_1100_0111_1001;

  logic [GAIN_W-1:0] weighted [N_WALSH];
  logic [GAIN_W-1:0] en_gain  [N_WALSH];
  logic              pn_i_now, pn_q_now;
  logic [SW-1:0]     mlo_i, mlo_q;
  logic              i_valid, q_valid;

  for (genvar n = 0; n < N_WALSH; n++) begin : g_slot
    walsh_cover u_cover (
      .sym      (slot_sym[n]),
      .walsh_idx(6'(n)),
      .chip_idx (chip_idx),
      .en       (slot_cfg[n].en),
      .gain     (slot_cfg[n].gain),
      .chip     (),
      .weighted (weighted[n])
    );
    assign en_gain[n] = slot_cfg[n].en ? slot_cfg[n].gain : '0;
  end

  digital_combiner #(.N(N_WALSH), .W(GAIN_W)) u_comb (
    .clk, .rst_n, .in(weighted), .sum(level)
  );

  // The largest level: the same adder over the enabled gains.
  digital_combiner #(.N(N_WALSH), .W(GAIN_W)) u_radix (
    .clk, .rst_n, .in(en_gain), .sum(radix_m1)
  );

  pilot_pn_gen #(.TAPS(TAPS_I)) u_pn_i (
    .clk, .rst_n, .sync, .offset(pn_offset), .pn(pn_i_now)
  );
  pilot_pn_gen #(.TAPS(TAPS_Q)) u_pn_q (
    .clk, .rst_n, .sync, .offset(pn_offset), .pn(pn_q_now)
  );

  // Delay the PN chips to line up with the registered combiner sum.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pn_i <= 1'b0;
      pn_q <= 1'b0;
    end else begin
      pn_i <= pn_i_now;
      pn_q <= pn_q_now;
    end
  end

  mlo_xor #(.W(SW)) u_xor_i (.p(pn_i), .r(level), .radix_m1(radix_m1), .y(mlo_i));
  mlo_xor #(.W(SW)) u_xor_q (.p(pn_q), .r(level), .radix_m1(radix_m1), .y(mlo_q));

  fir_filter #(.IN_W(SW), .OSR(OSR)) u_fir_i (
    .clk, .rst_n, .in_valid(1'b1), .in(mlo_i), .out_valid(i_valid), .out(i_out)
  );
  fir_filter #(.IN_W(SW), .OSR(OSR)) u_fir_q (
    .clk, .rst_n, .in_valid(1'b1), .in(mlo_q), .out_valid(q_valid), .out(q_out)
  );

  assign out_valid = i_valid && q_valid;
endmodule
