// sector_select: routes channel card outputs to the sectors' Walsh slots.
//
// Every sector has N_WALSH Walsh slots; slot n of sector s is entry
// s*N_WALSH + n of the slot table and carries the symbol of the card the
// table names. Because any number of slots may name the same card, one card
// can feed two sectors at once for a softer handoff without a second
// transmit section; a card in no handoff feeds one slot only. The source design
// only names this "select sector" block; the table-driven crossbar is this
// design's choice. A card index beyond the last card gives symbol 0.
// Purely combinational.
module sector_select
  import bsm_pkg::*;
#(
  parameter int unsigned N_CARDS = 192,
  parameter int unsigned N_SLOTS = 192
) (
  input  logic      card_sym [N_CARDS],
  input  slot_cfg_t slot_cfg [N_SLOTS],
  output logic      slot_sym [N_SLOTS]
);
  always_comb begin
    for (int s = 0; s < N_SLOTS; s++) begin
      if (32'(slot_cfg[s].card) < N_CARDS) slot_sym[s] = card_sym[slot_cfg[s].card];
      else                                 slot_sym[s] = 1'b0;
    end
  end
endmodule
