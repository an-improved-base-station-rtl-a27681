// long_code_scrambler: long code PN generator and data scrambler of a
// traffic channel.
//
// A 42-bit linear feedback shift register, as the source design gives, steps once
// per chip. Its long code chip is the modulo-2 inner product of the
// register with the user's 42-bit long code mask. The chip stream is
// decimated by 64 to one bit per symbol (the bit of chip 0 of each symbol
// period, taken on sym_start) and each interleaved symbol is XORed with
// that bit. The decimated bit is also passed on for the puncture control.
// The feedback follows the IS-95 long code polynomial
//   x^42+x^35+x^33+x^31+x^27+x^26+x^25+x^22+x^21+x^19+x^18+x^17+x^16
//   +x^10+x^7+x^6+x^5+x^3+x^2+x+1
// in Fibonacci form: with state[k] = a(n+k), a(n+42) = XOR of a(n+i) over
// the exponents i below 42. The polynomial, mask use and decimation phase
// come from IS-95, not from the source design. rst_n and sync load SEED.
// Timing: out_sym/out_dec/out_idx are registered, out_valid one cycle after
// in_valid; dec_bit is valid from the cycle after sym_start.
module long_code_scrambler
  import bsm_pkg::*;
#(
  parameter logic [LC_LEN-1:0] SEED = 42'h1,
  parameter int unsigned       AW   = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sync,
  input  logic              sym_start,
  input  logic [LC_LEN-1:0] mask,
  input  logic              in_valid,
  input  logic              in_sym,
  input  logic [AW-1:0]     in_idx,
  output logic              lc_chip,
  output logic              dec_bit,
  output logic              out_valid,
  output logic              out_sym,
  output logic              out_dec,
  output logic [AW-1:0]     out_idx
);
  // c_i of the polynomial for i = 0..41
  localparam logic [LC_LEN-1:0] TAPS =
    (42'd1 << 0)  | (42'd1 << 1)  | (42'd1 << 2)  | (42'd1 << 3)  |
    (42'd1 << 5)  | (42'd1 << 6)  | (42'd1 << 7)  | (42'd1 << 10) |
    (42'd1 << 16) | (42'd1 << 17) | (42'd1 << 18) | (42'd1 << 19) |
    (42'd1 << 21) | (42'd1 << 22) | (42'd1 << 25) | (42'd1 << 26) |
    (42'd1 << 27) | (42'd1 << 31) | (42'd1 << 33) | (42'd1 << 35);

  logic [LC_LEN-1:0] state;

  always_comb lc_chip = ^(state & mask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= SEED;
      dec_bit   <= 1'b0;
      out_valid <= 1'b0;
      out_sym   <= 1'b0;
      out_dec   <= 1'b0;
      out_idx   <= '0;
    end else begin
      if (sync) state <= SEED;
      else      state <= {^(state & TAPS), state[LC_LEN-1:1]};
      if (sym_start) dec_bit <= lc_chip;
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= in_sym ^ dec_bit;
        out_dec <= dec_bit;
        out_idx <= in_idx;
      end
    end
  end
endmodule
