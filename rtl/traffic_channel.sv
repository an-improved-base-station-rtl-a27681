// traffic_channel: one forward traffic channel card ("Section 1").
//
// Turns a user's vocoder bits into the 19.2 ksps symbol stream that is
// Walsh covered in the sectors: rate 1/2 convolutional encoding, symbol
// repetition to the fixed rate, block interleaving over a 20 ms frame,
// scrambling with the decimated long code and insertion of the
// power-control bit, in the order the source design gives. The improved modulator
// has one such card per user (192 in all) and shares its output among the
// sectors through the sector select, instead of duplicating the Walsh
// covering, spreading and filtering behind each card.
// Interface: the card pulls vocoder bits: info_req is high for one cycle
// when info_bit is consumed (first-word-fall-through). cfg holds the rate,
// the power-control bit and the long code mask.
// Timing: all stages work in the first chips of a symbol period (sym_start
// starts them); the result is loaded into sym_out on sym_last, so sym_out
// is constant over each whole symbol period, one period after the symbol
// was formed. Because of the interleaver, the bits of frame f leave in
// frame f+1. out_punct marks a symbol that carries the power-control bit.
// The scrambler's undecimated and decimated long code chips and the
// puncture stage's valid strobe have no load here (the sym_last load makes
// the strobe unnecessary); they stay as named nets for observation.
module traffic_channel
  import bsm_pkg::*;
#(
  parameter int unsigned       SYMS = SYMS_PER_FRAME,
  parameter logic [LC_LEN-1:0] SEED = 42'h1,
  localparam int unsigned      AW   = $clog2(SYMS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sync,
  input  logic          sym_start,
  input  logic          sym_last,
  input  logic [AW-1:0] sym_idx,
  input  card_cfg_t     cfg,
  input  logic          info_bit,
  output logic          info_req,
  output logic          sym_out,
  output logic          out_punct
);
  logic          enc0, enc1, pop;
  logic          rep_v, rep_s;
  logic [AW-1:0] rep_i;
  logic          il_v, il_s;
  logic [AW-1:0] il_i;
  logic          sc_v, sc_s, sc_d;
  logic [AW-1:0] sc_i;
  logic          pc_v, pc_s, pc_p;
  logic          lc_chip, dec_bit;

  conv_encoder u_enc (
    .clk, .rst_n,
    .clear   (pop && sym_idx == '0),
    .in_valid(pop),
    .in_bit  (info_bit),
    .sym0    (enc0),
    .sym1    (enc1)
  );

  symbol_repeater #(.SYMS(SYMS)) u_rep (
    .clk, .rst_n,
    .sym_en   (sym_start),
    .sym_idx  (sym_idx),
    .rate     (cfg.rate),
    .enc_sym0 (enc0),
    .enc_sym1 (enc1),
    .pop      (pop),
    .out_valid(rep_v),
    .out_sym  (rep_s),
    .out_idx  (rep_i)
  );

  block_interleaver #(.ROWS(SYMS / 16), .COLS(16)) u_il (
    .clk, .rst_n,
    .in_valid (rep_v),
    .in_sym   (rep_s),
    .in_idx   (rep_i),
    .out_valid(il_v),
    .out_sym  (il_s),
    .out_idx  (il_i)
  );

  long_code_scrambler #(.SEED(SEED), .AW(AW)) u_lc (
    .clk, .rst_n, .sync,
    .sym_start,
    .mask     (cfg.mask),
    .in_valid (il_v),
    .in_sym   (il_s),
    .in_idx   (il_i),
    .lc_chip  (lc_chip),
    .dec_bit  (dec_bit),
    .out_valid(sc_v),
    .out_sym  (sc_s),
    .out_dec  (sc_d),
    .out_idx  (sc_i)
  );

  puncture_control #(.AW(AW)) u_pc (
    .clk, .rst_n, .sync,
    .pcb      (cfg.pcb),
    .in_valid (sc_v),
    .in_sym   (sc_s),
    .in_dec   (sc_d),
    .in_idx   (sc_i),
    .out_valid(pc_v),
    .out_sym  (pc_s),
    .out_punct(pc_p)
  );

  assign info_req = pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_out   <= 1'b0;
      out_punct <= 1'b0;
    end else if (sym_last) begin
      sym_out   <= pc_s;
      out_punct <= pc_p;
    end
  end
endmodule
