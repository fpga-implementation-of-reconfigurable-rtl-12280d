// Shared width rules of the distributed-arithmetic (DA) FIR filter.
//
// The filter computes y(n) = sum_{k=0}^{N-1} h(k) x(n-k) with unsigned L-bit
// samples x and signed H_W-bit coefficients h. The N taps are split into P
// groups of M taps; each group owns a 2^M-word look-up table holding every
// sum of a subset of its M coefficients. The functions below give the word
// widths that make every intermediate sum exact (no overflow, no rounding):
//   LUT word   : sum of up to M coefficients        -> H_W + clog2(M) bits
//   PAT output : sum of P LUT words                  -> LUT + clog2(P) bits
//   section    : R bit-weighted PAT outputs          -> PAT + R bits
//   filter out : N products of H_W x L bits          -> H_W + clog2(N) + L bits
// All values are two's complement. Nothing here is clocked.
package da_fir_pkg;

  function automatic int lut_width(input int h_w, input int m);
    return h_w + $clog2(m);
  endfunction

  function automatic int pat_width(input int h_w, input int m, input int p);
    return lut_width(h_w, m) + $clog2(p);
  endfunction

  function automatic int section_width(input int h_w, input int m, input int p, input int r);
    return pat_width(h_w, m, p) + r;
  endfunction

  function automatic int output_width(input int h_w, input int n, input int l);
    return h_w + $clog2(n) + l;
  endfunction

endpackage
