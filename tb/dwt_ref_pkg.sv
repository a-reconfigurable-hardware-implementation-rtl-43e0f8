// dwt_ref_pkg: reference model of the fixed-point DWT used by the testbenches.
//
// Computes the same results as the RTL with ordinary multiply-accumulate
// arithmetic on 64-bit integers (no look-up tables, no polyphase split):
// the direct-form filter, decimation by keeping even outputs, interpolation
// by inserting zeros, and the same rounding (add half, shift right by CF,
// keep DW bits) after every filter.
package dwt_ref_pkg;
  import dwt_pkg::*;

  typedef longint seq_t [$];

  function automatic longint wrap(longint v);
    longint m;
    m = v & ((64'sd1 <<< DW) - 1);
    if (m >= (64'sd1 <<< (DW - 1))) m -= (64'sd1 <<< DW);
    return m;
  endfunction

  function automatic longint rnd(longint acc);
    return wrap((acc + (64'sd1 <<< (CF - 1))) >>> CF);
  endfunction

  // Direct FIR, then keep every other output: y[n] = sum_k c[k] x[2n-k].
  function automatic seq_t analysis(seq_t x, coef_t c);
    seq_t y;
    for (int n = 0; n < (x.size() + 1) / 2; n++) begin
      longint acc = 0;
      for (int k = 0; k < TAPS; k++) if (2*n - k >= 0) acc += longint'(c[k]) * x[2*n - k];
      y.push_back(rnd(acc));
    end
    return y;
  endfunction

  // Insert zeros, filter both sequences, add: 2*len outputs.
  function automatic seq_t synthesis(seq_t lo, seq_t hi, coef_t g0, coef_t g1);
    seq_t ul, uh, y;
    for (int m = 0; m < lo.size(); m++) begin
      ul.push_back(lo[m]); ul.push_back(0);
      uh.push_back((m < hi.size()) ? hi[m] : 0); uh.push_back(0);
    end
    for (int n = 0; n < ul.size(); n++) begin
      longint acc = 0;
      for (int k = 0; k < TAPS; k++)
        if (n - k >= 0) acc += longint'(g0[k]) * ul[n - k] + longint'(g1[k]) * uh[n - k];
      y.push_back(rnd(acc));
    end
    return y;
  endfunction

  // Integer input samples to the sample format.
  function automatic seq_t to_samples(seq_t x);
    seq_t y;
    foreach (x[i]) y.push_back(x[i] * (64'sd1 <<< FRAC));
    return y;
  endfunction

  // Input cycle of every sample: back to back for the first `full` samples,
  // then random gaps of 0..max_gap clocks. Starts at cycle `start`.
  function automatic seq_t schedule(int n, int full, int max_gap, int start);
    seq_t c;
    longint t = longint'(start);
    for (int i = 0; i < n; i++) begin
      if (i >= full) t += longint'($urandom_range(0, max_gap));
      c.push_back(t);
      t++;
    end
    return c;
  endfunction

  function automatic seq_t delayed(seq_t s, int d);
    seq_t y;
    for (int i = 0; i < d; i++) y.push_back(0);
    foreach (s[i]) y.push_back(s[i]);
    return y;
  endfunction

endpackage
