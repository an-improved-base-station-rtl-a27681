// tb_sector_select: random card outputs and slot tables, including one card
// routed to slots of two sectors (softer handoff) and card indices beyond
// the last card, checked against a direct lookup.
module tb_sector_select;
  import bsm_pkg::*;
  int checks = 0, failures = 0;
  logic card_sym [192];
  slot_cfg_t slot_cfg [192];
  logic slot_sym [192];

  sector_select dut (.card_sym, .slot_cfg, .slot_sym);

  initial begin
    for (int it = 0; it < 300; it++) begin
      foreach (card_sym[c]) card_sym[c] = 1'($urandom);
      foreach (slot_cfg[s]) begin
        slot_cfg[s].en = 1'($urandom);
        slot_cfg[s].gain = 8'($urandom);
        slot_cfg[s].card = ($urandom_range(15) == 0) ? 8'(192 + $urandom_range(63)) : 8'($urandom_range(191));
      end
      // handoff: card 7 in sector 0 slot 3 and sector 1 slot 10
      slot_cfg[3].card = 8'd7;
      slot_cfg[64 + 10].card = 8'd7;
      #1;
      foreach (slot_sym[s]) begin
        logic want;
        want = (slot_cfg[s].card < 192) ? card_sym[slot_cfg[s].card] : 1'b0;
        checks++;
        if (slot_sym[s] != want) begin failures++; $display("it %0d slot %0d", it, s); end
      end
      checks++;
      if (slot_sym[3] != card_sym[7] || slot_sym[74] != card_sym[7]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
