// nist_math_pkg: special functions for the statistical testbench, in plain real arithmetic.
//
// igamc(a, x) is the regularised upper incomplete gamma function Q(a, x), evaluated by its power
// series for x < a + 1 and by a Lentz continued fraction otherwise; ln Gamma uses the Lanczos
// approximation (g = 5, six coefficients), accurate to about 1e-10. erfc(x) = Q(1/2, x^2) for
// x >= 0 and 2 - erfc(-x) for x < 0; phi is the standard normal distribution function.
package nist_math_pkg;

  function automatic real gammln(input real xx);
    real cof [6] = '{76.18009172947146, -86.50532032941677, 24.01409824083091,
                     -1.231739572450155, 0.1208650973866179e-2, -0.5395239384953e-5};
    real x, y, tmp, ser;
    x = xx; y = xx;
    tmp = x + 5.5;
    tmp = tmp - (x + 0.5) * $ln(tmp);
    ser = 1.000000000190015;
    for (int j = 0; j < 6; j++) begin
      y = y + 1.0;
      ser = ser + cof[j] / y;
    end
    return -tmp + $ln(2.5066282746310005 * ser / x);
  endfunction

  function automatic real igamc(input real a, input real x);
    real gln, sum, del, ap, b, c, d, h, an;
    if (x <= 0.0) return 1.0;
    gln = gammln(a);
    if (x < a + 1.0) begin
      // series for the lower function P(a, x)
      ap = a; sum = 1.0 / a; del = sum;
      for (int n = 1; n < 100000; n++) begin
        ap = ap + 1.0;
        del = del * x / ap;
        sum = sum + del;
        if ((del < 0.0 ? -del : del) < (sum < 0.0 ? -sum : sum) * 1.0e-15) break;
      end
      return 1.0 - sum * $exp(-x + a * $ln(x) - gln);
    end
    // continued fraction for Q(a, x)
    b = x + 1.0 - a; c = 1.0e300; d = 1.0 / b; h = d;
    for (int i = 1; i < 100000; i++) begin
      an = -real'(i) * (real'(i) - a);
      b = b + 2.0;
      d = an * d + b;
      if ((d < 0.0 ? -d : d) < 1.0e-300) d = 1.0e-300;
      c = b + an / c;
      if ((c < 0.0 ? -c : c) < 1.0e-300) c = 1.0e-300;
      d = 1.0 / d;
      del = d * c;
      h = h * del;
      if ((del - 1.0 < 0.0 ? 1.0 - del : del - 1.0) < 1.0e-15) break;
    end
    return $exp(-x + a * $ln(x) - gln) * h;
  endfunction

  function automatic real erfc(input real x);
    if (x < 0.0) return 2.0 - igamc(0.5, x * x);
    return igamc(0.5, x * x);
  endfunction

  function automatic real phi(input real x);
    return 0.5 * erfc(-x / $sqrt(2.0));
  endfunction

endpackage
