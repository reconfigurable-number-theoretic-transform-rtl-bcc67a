// ntt_ref_pkg: reference arithmetic for the testbenches, written with plain
// integer % operations so it is independent of the RTL's bit-level tricks.
//   urand_mod -- random residue 0..q-1
//   mod_q    -- canonical residue of a signed value
//   pow2_mod -- 2^e mod q by repeated doubling
//   dft      -- the transform by its definition, X_i = sum_j x_j w^(ij)
//   idft     -- the inverse, x_i = d^-1 sum_j X_j w^(-ij), given w^-1, d^-1
//   fft      -- the textbook iterative radix-2 FFT (bit-reversed load,
//               spans 1, 2, 4, ...), used where w is not a true d-th root
//   cconv    -- cyclic convolution of two sequences mod q
package ntt_ref_pkg;
  typedef longint vec_t [64];

  // uniform random value in 0..q-1 (q below 2^32)
  function automatic longint urand_mod(longint q);
    longint r;
    r = longint'({32'd0, $urandom});
    return r % q;
  endfunction

  function automatic longint mod_q(longint v, longint q);
    longint r;
    r = v % q;
    if (r < 0) r += q;
    return r;
  endfunction

  function automatic longint mulm(longint a, longint b, longint q);
    return mod_q(mod_q(a, q) * mod_q(b, q), q);
  endfunction

  function automatic longint pow_mod(longint b, longint e, longint q);
    longint r;
    r = 1;
    for (longint i = 0; i < e; i++) r = mulm(r, b, q);
    return r;
  endfunction

  function automatic longint pow2_mod(longint e, longint q);
    return pow_mod(2, e, q);
  endfunction

  function automatic vec_t dft(vec_t x, int d, longint q, longint w);
    vec_t y;
    for (int i = 0; i < 64; i++) y[i] = 0;
    for (int i = 0; i < d; i++)
      for (int j = 0; j < d; j++)
        y[i] = mod_q(y[i] + mulm(x[j], pow_mod(w, longint'(i * j), q), q), q);
    return y;
  endfunction

  function automatic vec_t idft(vec_t x, int d, longint q, longint winv, longint dinv);
    vec_t y;
    y = dft(x, d, q, winv);
    for (int i = 0; i < d; i++) y[i] = mulm(y[i], dinv, q);
    return y;
  endfunction

  function automatic int brev(int i, int m);
    int r;
    r = 0;
    for (int b = 0; b < m; b++) r = (r << 1) | ((i >> b) & 1);
    return r;
  endfunction

  function automatic vec_t fft(vec_t x, int d, longint q, longint w);
    vec_t v;
    int m;
    longint wl, t, u, tw;
    m = 0;
    while ((1 << m) < d) m++;
    for (int i = 0; i < 64; i++) v[i] = 0;
    for (int i = 0; i < d; i++) v[i] = mod_q(x[brev(i, m)], q);
    for (int len = 2; len <= d; len *= 2) begin
      wl = pow_mod(w, longint'(d) / longint'(len), q);
      for (int b = 0; b < d; b += len) begin
        tw = 1;
        for (int j = 0; j < len / 2; j++) begin
          u = v[b+j];
          t = mulm(v[b+j+len/2], tw, q);
          v[b+j]       = mod_q(u + t, q);
          v[b+j+len/2] = mod_q(u - t, q);
          tw = mulm(tw, wl, q);
        end
      end
    end
    return v;
  endfunction

  function automatic vec_t cconv(vec_t a, vec_t b, int d, longint q);
    vec_t c;
    for (int i = 0; i < 64; i++) c[i] = 0;
    for (int i = 0; i < d; i++)
      for (int j = 0; j < d; j++)
        c[(i + j) % d] = mod_q(c[(i + j) % d] + mulm(a[i], b[j], q), q);
    return c;
  endfunction
endpackage
