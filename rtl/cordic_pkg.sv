// cordic_pkg: constants shared by the fixed-point CORDIC sine/cosine pipeline.
//
// Every number in the datapath is a two's-complement fixed-point value with a
// stated count of fractional bits. Angles are in radians. The package works
// out, at elaboration time, the two constants the algorithm needs:
//   * the elementary angles alpha_i = atan(2^-i) of the CORDIC iterations, and
//   * the circular scale factor K_c = prod_i cos(alpha_i) = prod_i 1/sqrt(1+2^-2i),
//     which is pre-applied to the starting vector so that no multiplier is
//     needed after the last iteration.
// atan is evaluated by its Taylor series (|x| <= 1/2 for i >= 1, pi/4 for i = 0)
// and the square root by Newton's method, so only plain real arithmetic is used
// and any tool that evaluates constant functions can build the tables.
// Nothing here is a circuit: it only produces parameters.
package cordic_pkg;

  localparam real PI = 3.14159265358979323846;

  // Newton iteration for sqrt(v), v > 0.
  function automatic real sqrt_r(real v);
    real r;
    r = (v > 1.0) ? v : 1.0;
    for (int k = 0; k < 60; k++) r = 0.5 * (r + v / r);
    return r;
  endfunction

  // atan(2^-i) in radians.
  function automatic real atan_pow2(int i);
    real x, x2, term, sum;
    if (i == 0) return PI / 4.0;
    x    = 1.0;
    for (int k = 0; k < i; k++) x = x / 2.0;
    x2   = x * x;
    term = x;
    sum  = 0.0;
    for (int k = 0; k < 64; k++) begin
      if ((k % 2) == 0) sum = sum + term / real'(2 * k + 1);
      else              sum = sum - term / real'(2 * k + 1);
      term = term * x2;
    end
    return sum;
  endfunction

  // K_c for n iterations: prod_{i<n} 1/sqrt(1 + 2^-2i).
  function automatic real scale_kc(int n);
    real k, p;
    k = 1.0;
    p = 1.0;                      // 2^-2i
    for (int i = 0; i < n; i++) begin
      k = k / sqrt_r(1.0 + p);
      p = p / 4.0;
    end
    return k;
  endfunction

  // Round a real to the nearest integer on a grid of 2^-frac.
  function automatic longint to_fixed(real v, int frac);
    real s;
    s = v;
    for (int k = 0; k < frac; k++) s = s * 2.0;
    return longint'(s);           // real-to-integer casts round to nearest
  endfunction

endpackage
