// bsm_ref_pkg: reference models used by the modulator testbenches.
//
// Bit-level models written from the definitions, independently of the RTL:
// the long code and pilot PN recurrences, the K=9 rate 1/2 code from its
// generator polynomials, the interleaver permutation, Walsh codes by the
// Sylvester (Hadamard) doubling and the FIR response as a direct sum.
package bsm_ref_pkg;

  // Long code: exponents i < 42 of the characteristic polynomial.
  localparam int LC_EXP [20] = '{0,1,2,3,5,6,7,10,16,17,18,19,21,22,25,26,27,31,33,35};

  // One step of the sequence a(n+42) = XOR over LC_EXP of a(n+i),
  // with s[k] = a(n+k).
  function automatic logic [41:0] lc_step(input logic [41:0] s);
    logic nb = 1'b0;
    foreach (LC_EXP[e]) nb ^= s[LC_EXP[e]];
    return {nb, s[41:1]};
  endfunction

  function automatic logic lc_out(input logic [41:0] s, input logic [41:0] mask);
    logic o = 1'b0;
    for (int i = 0; i < 42; i++) if (mask[i]) o ^= s[i];
    return o;
  endfunction

  // Pilot PN: exponents i < 15 of the polynomials.
  localparam int PNI_EXP [6] = '{0,5,7,8,9,13};
  localparam int PNQ_EXP [8] = '{0,3,4,5,6,10,11,12};

  // The 2**15-chip pilot sequence starting from state 1, generated as the
  // plain m-sequence with one 0 inserted after the run of 14 zeros.
  function automatic void pn_sequence(input bit q, output bit seq [32768]);
    logic [14:0] s = 15'h1;
    int n = 0;
    int zeros = 0;
    while (n < 32768) begin
      logic nb = 1'b0;
      seq[n] = s[0];
      n++;
      zeros = s[0] ? 0 : zeros + 1;
      if (zeros == 14 && n < 32768) begin
        seq[n] = 1'b0;   // the inserted zero
        n++;
        zeros = 0;
      end
      if (q) foreach (PNQ_EXP[e]) nb ^= s[PNQ_EXP[e]];
      else   foreach (PNI_EXP[e]) nb ^= s[PNI_EXP[e]];
      s = {nb, s[14:1]};
    end
  endfunction

  // Rate 1/2, K = 9 code: generator g (octal 753 / 561), MSB on u(n).
  function automatic logic conv_sym(input logic [8:0] g, input bit hist [$], input int n);
    logic o = 1'b0;
    for (int j = 0; j <= 8; j++)
      if (g[8-j] && n - j >= 0) o ^= hist[n-j];
    return o;
  endfunction

  // Encode and repeat one frame of info bits into 384 symbols.
  function automatic void frame_symbols(input bit info [$], input int rate, output bit rep [384]);
    int r = 1 << rate;
    int nbits = 192 >> rate;
    for (int b = 0; b < nbits; b++) begin
      logic c0 = conv_sym(9'o753, info, b);
      logic c1 = conv_sym(9'o561, info, b);
      for (int k = 0; k < r; k++) begin
        rep[2*b*r + k]     = c0;
        rep[2*b*r + r + k] = c1;
      end
    end
  endfunction

  // Interleaver: output position m takes input symbol il_src(m).
  function automatic int il_src(input int m, input int rows = 24, input int cols = 16);
    return (m % cols) * rows + (m / cols);
  endfunction

  // 64 x 64 Walsh matrix by Sylvester doubling (0/1 entries).
  function automatic void walsh_matrix(output bit w [64][64]);
    w[0][0] = 1'b0;
    for (int sz = 1; sz < 64; sz *= 2)
      for (int r = 0; r < sz; r++)
        for (int c = 0; c < sz; c++) begin
          w[r][c+sz]    = w[r][c];
          w[r+sz][c]    = w[r][c];
          w[r+sz][c+sz] = !w[r][c];
        end
  endfunction

  // FIR coefficients of the modulator's pulse-shaping filter.
  localparam int FIR_H [48] = '{
     -6,  -9,  -9,  -4,   6,  17,  23,  21,   9,  -6, -16, -13,
      2,  22,  32,  24,  -3, -37, -54, -36,  24, 113, 201, 256,
    256, 201, 113,  24, -36, -54, -37,  -3,  24,  32,  22,   2,
    -13, -16,  -6,   9,  21,  23,  17,   6,  -4,  -9,  -9,  -6};

  // Output phase p of the 4x interpolating filter for input history x
  // (x[0] newest).
  function automatic longint fir_phase(input int p, input longint x [12]);
    longint acc = 0;
    for (int k = 0; k < 12; k++) acc += longint'(FIR_H[p + 4*k]) * x[k];
    return acc;
  endfunction

endpackage
