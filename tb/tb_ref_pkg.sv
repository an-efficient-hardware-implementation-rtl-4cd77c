// tb_ref_pkg: reference model for the SC-PWL activation testbenches.
//
// A behavioural re-statement, written apart from the RTL, of what the
// hardware should compute: the 8-bit LFSR x^8+x^6+x^5+x^4+1, the weighted
// binary stochastic number generator, the AND-gate product counted over a
// window, the Table I coefficients and the symmetric extension to negative
// operands. It also gives the exact tanh and sigmoid for error measurement.
package tb_ref_pkg;

  localparam int TANH = 0;
  localparam int SIGM = 1;

  // Slopes and offsets, units of 2^-8: [function][segment].
  localparam int A_TAB [2][8] = '{'{255, 247, 232, 213, 189, 165, 141, 117},
                                  '{ 64,  64,  63,  63,  57,  57,  52,  50}};
  localparam int B_TAB [2][8] = '{'{  0,   2,   5,  12,  24,  39,  57,  78},
                                  '{128, 128, 128, 128, 131, 131, 135, 137}};

  function automatic int lfsr_next(int s);
    int fb;
    fb = ((s >> 7) ^ (s >> 5) ^ (s >> 4) ^ (s >> 3)) & 1;
    return ((s << 1) | fb) & 255;
  endfunction

  // Stream bit of value v for LFSR state s: v's bit at the highest set bit of s.
  function automatic int sng_bit(int s, int v);
    for (int k = 7; k >= 0; k--) if (((s >> k) & 1) != 0) return (v >> k) & 1;
    return 0;
  endfunction

  // Number of 1s of the AND of the two streams over len cycles.
  function automatic int ref_count(int seed_a, int a, int seed_x, int xm, int len);
    int sa, sx, n;
    sa = seed_a; sx = seed_x; n = 0;
    for (int i = 0; i < len; i++) begin
      n += sng_bit(sa, a) & sng_bit(sx, xm);
      sa = lfsr_next(sa);
      sx = lfsr_next(sx);
    end
    return n;
  endfunction

  // Output stage: prod + b, saturate, extend to negative x. Returns {sign, mag}.
  function automatic logic [8:0] ref_out(int f, int prod, int b, bit neg);
    int p;
    p = prod + b;
    if (p > 255) p = 255;
    if (f == TANH) return {neg && (p != 0), 8'(p)};
    if (!neg) return {1'b0, 8'(p)};
    p = 256 - p;
    if (p > 255) p = 255;
    return {1'b0, 8'(p)};
  endfunction

  // Whole unit for sign neg and magnitude xm.
  function automatic logic [8:0] ref_unit(int f, bit neg, int xm, int seed_x, int seed_a, int len);
    int seg, cnt;
    seg = xm >> 5;
    cnt = ref_count(seed_a, A_TAB[f][seg], seed_x, xm, len) * (256 / len);
    return ref_out(f, cnt, B_TAB[f][seg], neg);
  endfunction

  function automatic real sm_to_real(logic [8:0] v);
    real r;
    r = real'(v[7:0]) / 256.0;
    return v[8] ? -r : r;
  endfunction

  function automatic real exact(int f, real x);
    if (f == TANH) return $tanh(x);
    return 1.0 / (1.0 + $exp(-x));
  endfunction

endpackage
