// prbg_ref_pkg: bit-exact reference models used by the testbenches.
//
// Written independently of the RTL: arithmetic is done on 128-bit or 64-bit integers with
// explicit masking, multiplications are real multiplications (no shifts), and the rotation
// moves bits one at a time. Widths up to 64 bits are supported.
package prbg_ref_pkg;

  typedef logic [63:0] word_t;

  function automatic word_t mask(input int unsigned p);
    return (p >= 64) ? '1 : ((64'd1 << p) - 64'd1);
  endfunction

  // Logistic map with r = 4 on unsigned p-bit fractions: x' = 4x - 4*trunc(x*x), modulo 1.
  function automatic word_t log_step(input word_t x, input int unsigned p);
    logic [127:0] prod, sq, r;
    prod = 128'(x) * 128'(x);
    sq   = prod >> p;                       // x*x as a p-bit fraction, truncated
    r    = 128'(4) * 128'(x) - 128'(4) * sq;
    return word_t'(r) & mask(p);
  endfunction

  // Sign-extend a p-bit word to 64 bits.
  function automatic longint sx(input word_t v, input int unsigned p);
    longint t;
    t = longint'(v << (64 - p));
    return t >>> (64 - p);
  endfunction

  // One Euler step of the FDNR oscillator in p-bit signed fixed point with fbits fraction
  // bits and step h = 2^-hs. B = 4 when y >= 1, else 0. Returns {x', y', z'} as words.
  function automatic void osc_step(input word_t x, y, z, input int unsigned p, fbits, hs,
                                   output word_t xn, yn, zn, output bit b_high);
    longint sxv, syv, szv, one, bval, acc;
    sxv = sx(x, p); syv = sx(y, p); szv = sx(z, p);
    one = longint'(1) << fbits;
    b_high = (syv >= one);
    bval = b_high ? 4 : 0;
    acc  = sx(word_t'(szv + bval * syv) & mask(p), p);        // Z + B*Y   (p-bit wrap)
    acc  = sx(word_t'(acc + sxv) & mask(p), p);               // + X
    xn = word_t'(sxv + (syv >>> hs)) & mask(p);
    yn = word_t'(syv + (szv >>> hs)) & mask(p);
    zn = word_t'(szv - (acc >>> hs)) & mask(p);
  endfunction

  // Rotate a p-bit word left by r, one bit at a time.
  function automatic word_t rotl(input word_t v, input int unsigned r, input int unsigned p);
    word_t o;
    o = '0;
    for (int unsigned i = 0; i < p; i++) o[(i + r) % p] = v[i];
    return o;
  endfunction

  // Post-processing: Q' = X_i ^ rotl(X_{i-1}, p/4) ^ rotl(X_{i-2}, p/2) ^ rotl(Q, 3p/4).
  function automatic word_t pp_step(input word_t xi, xi1, xi2, q, input int unsigned p);
    return xi ^ rotl(xi1, p / 4, p) ^ rotl(xi2, 2 * (p / 4), p) ^ rotl(q, 3 * (p / 4), p);
  endfunction

  // Convert a real number to p-bit fixed point with fbits fraction bits.
  function automatic word_t to_fix(input real r, input int unsigned p, fbits);
    return word_t'(longint'(r * (2.0 ** fbits))) & mask(p);
  endfunction

  function automatic real to_real(input word_t v, input int unsigned p, fbits);
    return real'(sx(v, p)) / (2.0 ** fbits);
  endfunction

endpackage
