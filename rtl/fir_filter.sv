// fir_filter: 48-tap baseband low-pass FIR filter with 4x interpolation.
//
// Limits the bandwidth of one spread I or Q chip stream. In the improved
// modulator the input is a multilevel unsigned integer (the output of the
// binary-multilevel XOR) rather than a binary chip, so the filter needs
// integer arithmetic on its input; it is built here as a polyphase
// interpolator. The 48 taps, as the source design gives, are spaced a quarter chip
// apart (OSR = 4, as in IS-95), so each input chip yields OSR output
// samples in parallel: out[p] = sum over k of COEF[p + OSR*k] * x(n - k),
// k = 0..N_TAPS/OSR-1, where x(n) is the newest input. The coefficients
// are this design's choice, a symmetric low-pass response close to the
// IS-95 reference filter scaled so that the centre taps are 256; the source design
// gives none. The input is taken as an unsigned level; its mean (half the
// radix) is a constant offset that the D/A stage can remove.
// Because the input is an integer, each coefficient product is built from
// shifted copies of the input, one per set coefficient bit, and added, as
// the source design suggests for this filter, instead of a multiplier.
// Timing: on in_valid one input sample is taken; out and out_valid are
// registered one cycle later.
module fir_filter
  import bsm_pkg::*;
#(
  parameter int unsigned IN_W   = 14,
  parameter int unsigned N_TAPS = 48,
  parameter int unsigned OSR    = 4,
  parameter int unsigned OUT_W  = FIR_OUT_W,
  parameter logic signed [COEF_W-1:0] COEF [48] = '{
     -6,  -9,  -9,  -4,   6,  17,  23,  21,   9,  -6, -16, -13,
      2,  22,  32,  24,  -3, -37, -54, -36,  24, 113, 201, 256,
    256, 201, 113,  24, -36, -54, -37,  -3,  24,  32,  22,   2,
    -13, -16,  -6,   9,  21,  23,  17,   6,  -4,  -9,  -9,  -6},
  localparam int unsigned PH = N_TAPS / OSR
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out [OSR]
);
  logic [IN_W-1:0]         x   [PH];   // x[0] newest input
  logic signed [OUT_W-1:0] acc [OSR];

  // Each product is formed from shifts and adds over the set bits of the
  // constant coefficient (two's complement: the top bit has weight
  // -2^(COEF_W-1)), so no multiplier is needed.
  always_comb begin
    logic signed [OUT_W-1:0] xs;
    logic        [COEF_W-1:0] c;
    for (int p = 0; p < OSR; p++) begin
      acc[p] = '0;
      for (int k = 0; k < PH; k++) begin
        xs = OUT_W'((k == 0) ? in : x[k-1]);
        c  = COEF[p + OSR*k];
        for (int b = 0; b < COEF_W - 1; b++) begin
          if (c[b]) acc[p] = acc[p] + (xs <<< b);
        end
        if (c[COEF_W-1]) acc[p] = acc[p] - (xs <<< (COEF_W - 1));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < PH; k++) x[k] <= '0;
      for (int p = 0; p < OSR; p++) out[p] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x[0] <= in;
        for (int k = 1; k < PH; k++) x[k] <= x[k-1];
        for (int p = 0; p < OSR; p++) out[p] <= acc[p];
      end
    end
  end
endmodule
