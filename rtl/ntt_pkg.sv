// ntt_pkg: constants and elaboration-time helpers shared by the number
// theoretic transform (NTT) RTL.
//
// The transforms work in the rings Z_q with q = 2^n - 1 (Mersenne, MNT) or
// q = 2^n + 1 (Fermat, FNT), with a root of unity omega = 2^OMEGA_EXP, so every
// twiddle multiplication is a multiplication by a power of two. The helpers
// below compute, at elaboration time, which power of two each node of the
// networks needs. Residues are n bits wide for 2^n - 1 (all-ones is a second
// code for zero) and n+1 bits wide for 2^n + 1 (values 0..2^n).
//
// The DIT twiddle schedule is the textbook one; the constant-geometry
// schedule is this implementation's formulation of the published figure.
package ntt_pkg;

  // Residue width for a ring: n bits for 2^n-1, n+1 bits for 2^n+1.
  function automatic int res_width(int n, bit fermat);
    return fermat ? n + 1 : n;
  endfunction

  // Multiplicative order of 2 modulo q: 2^n = 1 mod 2^n-1, 2^2n = 1 mod 2^n+1.
  function automatic int two_order(int n, bit fermat);
    return fermat ? 2 * n : n;
  endfunction

  // Bit reversal of index i over m bits.
  function automatic int bitrev(int i, int m);
    int r;
    r = 0;
    for (int b = 0; b < m; b++) if (((i >> b) & 1) != 0) r |= 1 << (m - 1 - b);
    return r;
  endfunction

  // Exponent of 2 by which output i of decimation-in-time layer `layer`
  // (butterfly span 2^layer) is multiplied before it enters layer+1.
  // Layer L+1 has span h = 2^(L+1); the lower element of each pair (bit L+1
  // of the index set) takes omega^((i mod h) * d/(2h)). Result taken modulo
  // the order of 2 in the ring.
  function automatic int dit_next_exp(int layer, int i, int m, int omega_exp, int order);
    int h, j;
    if (layer + 1 >= m) return 0;
    h = 1 << (layer + 1);
    if (((i >> (layer + 1)) & 1) == 0) return 0;
    j = i % h;
    return (j * ((1 << m) / (2 * h)) * omega_exp) % order;
  endfunction

  // Twiddle exponent of butterfly k at stage s of the constant-geometry
  // (decimation-in-frequency) network: omega^((k >> s) << s).
  function automatic int cg_exp(int s, int k, int omega_exp, int order);
    return (((k >> s) << s) * omega_exp) % order;
  endfunction

endpackage
