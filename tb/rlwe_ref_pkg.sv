// rlwe_ref_pkg: software reference for the testbenches. Polynomials are
// dynamic arrays of int, coefficient i at index i; binary polynomials are
// arrays of bit. Everything is reduced modulo 2^w and modulo x^n + 1 by
// plain schoolbook arithmetic, independently of the hardware's Horner order.
package rlwe_ref_pkg;

  typedef int  poly_t[];
  typedef bit  bpoly_t[];

  function automatic int modw(input longint x, input int w);
    longint m = longint'(1) << w;
    longint r = x % m;
    if (r < 0) r += m;
    return int'(r);
  endfunction

  // r = (sub ? c - a*b : a*b + c)  in Z_{2^w}[x]/(x^n+1)
  function automatic poly_t mac(input int n, input int w, input poly_t a,
                                input bpoly_t b, input poly_t c, input bit sub);
    poly_t  r = new[n];
    longint acc[] = new[n];
    for (int k = 0; k < n; k++) acc[k] = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (b[j]) begin
          if (i + j < n) acc[i+j]     += a[i];
          else           acc[i+j-n]   -= a[i];
        end
    for (int k = 0; k < n; k++)
      r[k] = modw(sub ? (longint'(c[k]) - acc[k]) : (acc[k] + longint'(c[k])), w);
    return r;
  endfunction

  // Encode message bit + error bit: e_i + m_i * (-q/2) mod q.
  function automatic poly_t enc_add(input int n, input int w, input bpoly_t m, input bpoly_t e);
    poly_t r = new[n];
    for (int i = 0; i < n; i++)
      r[i] = modw(longint'(e[i]) - (m[i] ? (longint'(1) << (w - 1)) : 0), w);
    return r;
  endfunction

  // Decode: distance from the noise centre i - round((n-3)/2) larger than q/4.
  function automatic bpoly_t decode(input int n, input int w, input poly_t mt);
    bpoly_t m = new[n];
    int q = 1 << w;
    for (int i = 0; i < n; i++) begin
      int d = modw(longint'(mt[i]) - i + (n - 2) / 2, w);
      if (d >= q / 2) d -= q;
      m[i] = (d > q / 4) || (d < -(q / 4));
    end
    return m;
  endfunction

  function automatic poly_t rand_poly(input int n, input int w);
    poly_t r = new[n];
    for (int i = 0; i < n; i++) r[i] = int'($urandom % (1 << w));
    return r;
  endfunction

  function automatic bpoly_t rand_bpoly(input int n);
    bpoly_t r = new[n];
    for (int i = 0; i < n; i++) r[i] = bit'($urandom % 2);
    return r;
  endfunction

  function automatic poly_t bin_to_poly(input int n, input bpoly_t b);
    poly_t r = new[n];
    for (int i = 0; i < n; i++) r[i] = int'(b[i]);
    return r;
  endfunction

endpackage
