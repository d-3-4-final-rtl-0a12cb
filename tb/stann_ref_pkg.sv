// stann_ref_pkg: reference model of a fixed-point fully connected layer for the STANN
// classifier testbenches: y[o] = sat(act((sum_i x[i]*w[o][i] + (b[o] << FRAC)) >>> FRAC)),
// with w stored row-major (o*n_in + i) and saturation to the signed DW-bit range.
// The published classifier computes in floating point; this fixed-point model matches
// this design's own number format.
package stann_ref_pkg;
  typedef int iarr_t[];

  function automatic iarr_t fc(int n_in, int n_out, int frac, int dw, bit relu,
                               iarr_t x, iarr_t w, iarr_t b);
    iarr_t y;
    longint hi, lo;
    hi = (longint'(1) << (dw - 1)) - 1;
    lo = -hi - 1;
    y = new[n_out];
    for (int o = 0; o < n_out; o++) begin
      longint acc;
      acc = longint'(b[o]) <<< frac;
      for (int i = 0; i < n_in; i++) acc += longint'(x[i]) * w[o*n_in + i];
      acc = acc >>> frac;
      if (relu && acc < 0) acc = 0;
      if (acc > hi) acc = hi;
      if (acc < lo) acc = lo;
      y[o] = int'(acc);
    end
    return y;
  endfunction

  function automatic iarr_t rand_arr(int n, int lo, int hi);
    iarr_t a;
    a = new[n];
    foreach (a[i]) a[i] = lo + int'($urandom_range(hi - lo));
    return a;
  endfunction
endpackage
