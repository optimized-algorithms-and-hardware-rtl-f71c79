// median_ref_pkg: reference models for the testbenches, written as plain
// sequential software, independent of the pipelined RTL.
//   true_median : sorts the nine values and returns the middle one
//   max9        : linear scan for the largest value
//   alg2_model  : the approximate-median step sequence, executed in order
//   next_perm   : lexicographic next permutation, for exhaustive runs
package median_ref_pkg;
  typedef logic [7:0] pix_t;
  typedef pix_t win_t [9];

  function automatic pix_t true_median(input win_t w);
    pix_t v [9];
    pix_t t;
    v = w;
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
    return v[4];
  endfunction

  function automatic pix_t max9(input win_t w);
    pix_t m = w[0];
    for (int i = 1; i < 9; i++) if (w[i] > m) m = w[i];
    return m;
  endfunction

  // order a[i] <= a[j]; returns 1 if they were exchanged
  function automatic bit cx(ref pix_t a [9], input int i, input int j);
    pix_t t;
    if (a[i] > a[j]) begin t = a[i]; a[i] = a[j]; a[j] = t; return 1'b1; end
    return 1'b0;
  endfunction

  function automatic void xchg(ref pix_t a [9], input int i, input int j);
    pix_t t = a[i];
    a[i] = a[j];
    a[j] = t;
  endfunction

  function automatic pix_t alg2_model(input win_t w);
    pix_t a [9];
    a = w;
    for (int i = 0; i < 4; i++) void'(cx(a, i, i + 5));
    if (cx(a, 5, 7)) xchg(a, 0, 2);
    if (cx(a, 6, 8)) xchg(a, 1, 3);
    if (cx(a, 5, 6)) xchg(a, 0, 1);
    void'(cx(a, 2, 4));
    void'(cx(a, 4, 6));
    void'(cx(a, 3, 5));
    if (a[1] > a[3]) xchg(a, 1, 3); else xchg(a, 2, 3);
    void'(cx(a, 2, 4));
    void'(cx(a, 3, 5));
    void'(cx(a, 3, 4));
    void'(cx(a, 4, 5));
    return a[4];
  endfunction

  // lexicographic next permutation of a[0..8]; returns 0 after the last one
  function automatic bit next_perm(ref pix_t a [9]);
    int i, j;
    i = 7;
    while (i >= 0 && a[i] >= a[i+1]) i--;
    if (i < 0) return 1'b0;
    j = 8;
    while (a[j] <= a[i]) j--;
    xchg(a, i, j);
    for (int l = i + 1, r = 8; l < r; l++, r--) xchg(a, l, r);
    return 1'b1;
  endfunction
endpackage
