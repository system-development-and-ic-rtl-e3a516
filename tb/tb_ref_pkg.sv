// tb_ref_pkg: reference arithmetic for the downscaler testbenches.
//
// Coefficients are computed here in floating point straight from the Lagrange
// formula, c_k(s) = 512 * prod_{j!=k} (s-j)/(k-j), rounded half away from zero
// with the centre tap taking the remainder, independently of the integer
// constant functions used by the RTL.
package tb_ref_pkg;

  function automatic int rnd(real x);
    if (x >= 0) return int'($floor(x + 0.5));
    else        return -int'($floor(-x + 0.5));
  endfunction

  function automatic real lag(int r, int k, real s);
    real w = 1.0;
    for (int j = -r; j <= r; j++) if (j != k) w = w * (s - j) / (k - j);
    return w;
  endfunction

  // coefficient of tap i (0 = newest) of phase p, for 2r+1 taps and `phases` phases
  function automatic int ref_coef(int r, int phases, int p, int i);
    real s = real'(p - phases / 2) / phases;
    int sum = 0;
    if (i != r) return rnd(512.0 * lag(r, r - i, s));
    for (int m = 0; m < 2 * r + 1; m++)
      if (m != r) sum += rnd(512.0 * lag(r, r - m, s));
    return 512 - sum;
  endfunction

  function automatic int floordiv(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

endpackage
