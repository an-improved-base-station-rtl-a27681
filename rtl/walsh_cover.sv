// walsh_cover: Walsh covering and gain of one channel slot.
//
// Covers the channel's current symbol with chip chip_idx of the 64-ary
// Walsh function walsh_idx (chip = symbol XOR parity(walsh_idx AND
// chip_idx), Hadamard ordering) and weights the binary chip by the slot's
// gain: weighted is gain when the covered chip is 1 and the slot is
// enabled, else 0. Multiplying a binary chip by G is thus only a gate; the
// weighted values of all slots are summed by the digital combiner. The
// Hadamard ordering and the gating by en are this design's choices; the
// source design gives the 64-ary cover and the gain factor G.
// Purely combinational; sym must be constant over the 64 chips of a
// symbol.
module walsh_cover
  import bsm_pkg::*;
(
  input  logic              sym,
  input  logic [5:0]        walsh_idx,
  input  logic [5:0]        chip_idx,
  input  logic              en,
  input  logic [GAIN_W-1:0] gain,
  output logic              chip,
  output logic [GAIN_W-1:0] weighted
);
  always_comb begin
    chip     = sym ^ walsh_chip(walsh_idx, chip_idx);
    weighted = (en && chip) ? gain : '0;
  end
endmodule
