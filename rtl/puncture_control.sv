// puncture_control: power-control bit insertion of a traffic channel.
//
// The scrambled symbol stream is split into power-control groups of 24
// symbols (1.25 ms, so one group per 800 Hz cycle as the source design gives). In
// each group two consecutive symbols, starting at position p (0..15), are
// replaced by the power-control bit pcb from the microprocessor. p is
// pseudorandom: it is formed from the decimated long code bits of
// positions 20..23 of the previous group (position 23 the most significant
// bit). sync returns p to 0 and restarts the collection of its bits. The
// two-symbol length of the power-control bit, the 24-symbol group
// and the choice of the four bits follow IS-95; the source design only says that
// the symbols are punctured at 800 Hz by the decimated long code. The first
// group after reset uses p = 0.
// Timing: on in_valid the symbol at frame position in_idx (with its
// decimated long code bit in_dec) is taken; out_sym is registered, with
// out_valid one cycle later and out_punct high when it carries pcb.
module puncture_control
  import bsm_pkg::*;
#(
  parameter int unsigned GROUP = SYMS_PER_PCG,
  parameter int unsigned AW    = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sync,
  input  logic          pcb,
  input  logic          in_valid,
  input  logic          in_sym,
  input  logic          in_dec,
  input  logic [AW-1:0] in_idx,
  output logic          out_valid,
  output logic          out_sym,
  output logic          out_punct
);
  logic [4:0] t;         // position within the power-control group
  logic [3:0] pos;       // start of the power-control bit in this group
  logic [2:0] nxt;       // bits of positions GROUP-4..GROUP-2 for the next start
  logic       hit;

  always_comb begin
    t   = 5'(32'(in_idx) % GROUP);
    hit = (t == {1'b0, pos}) || (t == {1'b0, pos} + 5'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      nxt       <= '0;
      out_valid <= 1'b0;
      out_sym   <= 1'b0;
      out_punct <= 1'b0;
    end else if (sync) begin
      pos       <= '0;
      nxt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym   <= hit ? pcb : in_sym;
        out_punct <= hit;
        if (t >= 5'(GROUP - 4) && t < 5'(GROUP - 1)) nxt[2'(t - 5'(GROUP - 4))] <= in_dec;
        if (t == 5'(GROUP - 1)) pos <= {in_dec, nxt[2:0]};
      end
    end
  end
endmodule
