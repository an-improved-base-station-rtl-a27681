// block_interleaver: frame block interleaver of a traffic channel.
//
// Spreads the 384 repeated symbols of a 20 ms frame over the frame so that
// a burst of channel errors hits symbols far apart after deinterleaving.
// The symbols are written column by column into a ROWS x COLS array
// (24 x 16) and read out row by row: output position m = r*COLS + c
// carries input symbol c*ROWS + r of the previous frame. The source design only
// names a block interleaver; this plain row/column array (without the
// IS-95 bit-reversed row order) is this design's choice.
// Two banks alternate: while frame f is written into one, frame f-1 is
// read from the other, so the delay is one frame. Timing: on in_valid,
// in_sym is written at frame position in_idx and the symbol of output
// position in_idx is read; out_sym/out_idx are registered with out_valid
// one cycle after in_valid. The banks swap after position SYMS-1. The
// output of the first frame after reset is whatever the banks held.
module block_interleaver
  import bsm_pkg::*;
#(
  parameter int unsigned ROWS = 24,
  parameter int unsigned COLS = 16,
  localparam int unsigned SYMS = ROWS * COLS,
  localparam int unsigned AW   = $clog2(SYMS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sym,
  input  logic [AW-1:0] in_idx,
  output logic          out_valid,
  output logic          out_sym,
  output logic [AW-1:0] out_idx
);
  logic [SYMS-1:0] mem [2];
  logic            wbank;
  logic [AW-1:0]   waddr;

  always_comb begin
    waddr = AW'((32'(in_idx) % ROWS) * COLS + (32'(in_idx) / ROWS));
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[wbank][waddr] <= in_sym;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      out_valid <= 1'b0;
      out_sym   <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= mem[!wbank][in_idx];
        out_idx <= in_idx;
        if (32'(in_idx) == SYMS - 1) wbank <= !wbank;
      end
    end
  end
endmodule
