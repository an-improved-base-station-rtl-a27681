// timing_gen: system timing of the modulator.
//
// Counts chips of the 1.2288 MHz chip clock. chip_idx is the chip within
// the current code symbol (0..63), sym_idx the symbol within the current
// 20 ms frame (0..383). sym_start is high on chip 0 of every symbol,
// frame_start on chip 0 of symbol 0, and sym_last on chip 63 of every
// symbol. The counters are registers and the strobes decode them. sync
// restarts the count at chip 0 of symbol 0 on the next cycle, as rst_n
// does.
// The 64 chips per symbol follow from the source design's 19.2 ksps symbol rate and
// 1.2288 Mcps chip rate; the 384-symbol frame is the IS-95 20 ms frame.
module timing_gen
  import bsm_pkg::*;
#(
  parameter int unsigned CHIPS = CHIPS_PER_SYM,
  parameter int unsigned SYMS  = SYMS_PER_FRAME
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      sync,
  output logic [$clog2(CHIPS)-1:0]  chip_idx,
  output logic [$clog2(SYMS)-1:0]   sym_idx,
  output logic                      sym_start,
  output logic                      sym_last,
  output logic                      frame_start
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chip_idx <= '0;
      sym_idx  <= '0;
    end else if (sync) begin
      chip_idx <= '0;
      sym_idx  <= '0;
    end else if (32'(chip_idx) == CHIPS - 1) begin
      chip_idx <= '0;
      sym_idx  <= (32'(sym_idx) == SYMS - 1) ? '0 : sym_idx + 1'b1;
    end else begin
      chip_idx <= chip_idx + 1'b1;
    end
  end

  always_comb begin
    sym_start   = (chip_idx == '0);
    sym_last    = (32'(chip_idx) == CHIPS - 1);
    frame_start = sym_start && (sym_idx == '0);
  end
endmodule
