// cic_pkg -- shared constants and elaboration-time helpers for the CIC
// compressor (decimator) and expander (interpolator) family.
//
// A CIC filter with N stages, rate change R and differential delay M has the
// transfer function H(z) = [(1 - z^-RM) / (1 - z^-1)]^N, i.e. N cascaded
// moving sums of length R*M.  Its DC gain is (R*M)^N, so a decimator output
// needs Bmax = Bin + N*log2(R*M) bits.  The same width is used here for the
// interpolator (its true gain (R*M)^N / R is smaller, so it never overflows).
// When log2(R*M) is not an integer it is rounded up, which is this design's
// choice.  Two's-complement wrap-around inside the recursive structures is
// harmless as long as the final width is large enough.
//
// The coefficient functions evaluate the impulse response of H(z) so the
// polyphase structures can be built for any N, R and M at elaboration time.
package cic_pkg;

  // Defaults of the evaluated configurations.
  parameter int unsigned DEF_IN_W    = 16; // input sample width
  parameter int unsigned DEF_STAGES  = 3;  // N, largest stage count evaluated
  parameter int unsigned DEF_DEC_R   = 8;  // compressor rate change factor
  parameter int unsigned DEF_INT_R   = 3;  // expander rate change factor
  parameter int unsigned DEF_DIFF_M  = 1;  // differential delay

  // Largest number of impulse-response taps the coefficient function supports.
  parameter int unsigned MAX_TAPS = 1024;

  // Ceiling of log2(v) for v >= 1.
  function automatic int unsigned ceil_log2(input int unsigned v);
    int unsigned r = 0;
    while ((64'd1 << r) < 64'(v)) r++;
    return r;
  endfunction

  // Output width of a CIC filter: Bin + N * ceil(log2(R*M)).
  function automatic int unsigned cic_out_width(input int unsigned in_w,
                                                input int unsigned n_stages,
                                                input int unsigned rate,
                                                input int unsigned diff_m);
    return in_w + n_stages * ceil_log2(rate * diff_m);
  endfunction

  // Number of taps of the CIC impulse response: N*(R*M - 1) + 1.
  function automatic int unsigned cic_num_taps(input int unsigned n_stages,
                                               input int unsigned rate,
                                               input int unsigned diff_m);
    return n_stages * (rate * diff_m - 1) + 1;
  endfunction

  // Tap k of (1 + z^-1 + ... + z^-(R*M-1))^N, by repeated convolution with a
  // box of length R*M.  Returns 0 outside the response.
  function automatic longint unsigned cic_coef(input int unsigned n_stages,
                                               input int unsigned rate,
                                               input int unsigned diff_m,
                                               input int unsigned k);
    longint unsigned h   [MAX_TAPS];
    longint unsigned nxt [MAX_TAPS];
    int unsigned len = 1;
    int unsigned box = rate * diff_m;
    for (int unsigned i = 0; i < MAX_TAPS; i++) h[i] = 0;
    h[0] = 1;
    for (int unsigned s = 0; s < n_stages; s++) begin
      for (int unsigned i = 0; i < MAX_TAPS; i++) nxt[i] = 0;
      for (int unsigned i = 0; i < len; i++)
        for (int unsigned j = 0; j < box; j++)
          if (i + j < MAX_TAPS) nxt[i + j] += h[i];
      len = len + box - 1;
      for (int unsigned i = 0; i < MAX_TAPS; i++) h[i] = nxt[i];
    end
    return (k < len && k < MAX_TAPS) ? h[k] : 64'd0;
  endfunction

  // Binomial coefficient C(n, k): the taps of (1 + z^-1)^n.
  function automatic longint unsigned binom(input int unsigned n,
                                            input int unsigned k);
    longint unsigned r  = 1;
    longint unsigned nn = 64'(n);
    longint unsigned kk = 64'(k);
    if (kk > nn) return 0;
    for (longint unsigned i = 1; i <= kk; i++) r = r * (nn - kk + i) / i;
    return r;
  endfunction

endpackage
