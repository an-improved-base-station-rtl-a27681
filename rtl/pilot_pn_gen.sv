// pilot_pn_gen: pilot (short) PN sequence generator of one sector and phase.
//
// A 15-bit linear feedback shift register that steps once per chip, with
// one extra zero state inserted after the run of 14 zeros so that the
// period is 2**15 = 32768 chips. With state[k] = a(n+k), the feedback is
// a(n+15) = XOR of c_i*a(n+i) (the polynomial TAPS gives c_i), inverted
// when state[14:1] is all zero, and the output is state[0]. The defaults
// are the IS-95 in-phase polynomial x^15+x^13+x^9+x^8+x^7+x^5+1; the
// quadrature generator uses x^15+x^12+x^11+x^10+x^6+x^5+x^4+x^3+1. The source design
// says only that shifted versions of two common sequences tell the sectors
// apart: here the shift is offset chips, made by holding the register at
// SEED for offset chips after sync (or reset).
// Timing: pn is the chip of the current cycle; after sync the first chip is
// the SEED output and sequence chip c appears offset + c cycles later.
module pilot_pn_gen
  import bsm_pkg::*;
#(
  parameter logic [PN_LEN-1:0] TAPS = 15'b010_0011_1010_0001,
  parameter logic [PN_LEN-1:0] SEED = 15'h0001
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sync,
  input  logic [PN_LEN-1:0] offset,
  output logic              pn
);
  logic [PN_LEN-1:0] state;
  logic [PN_LEN-1:0] hold;
  logic              fb;

  always_comb begin
    fb = ^(state & TAPS) ^ (state[PN_LEN-1:1] == '0);
    pn = state[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEED;
      hold  <= '0;
    end else if (sync) begin
      state <= SEED;
      hold  <= offset;
    end else if (hold != '0) begin
      hold  <= hold - 1'b1;
    end else begin
      state <= {fb, state[PN_LEN-1:1]};
    end
  end
endmodule
