// mod_pkg: constants shared by the modulo 2^n - 2^k - 1 arithmetic blocks.
//
// The modulus is m = 2^n - 2^k - 1. Its correction constant is
// T = 2^n - m = 2^k + 1: A+B >= m exactly when A+B+T >= 2^n.
// The defaults n = 8, k = 4 (m = 239, T = 17) are the example adder the
// design is built around. The helper functions below are behavioural
// reference models. The testbenches and the self-test checker use them.
package mod_pkg;

  // m = 2^n - 2^k - 1
  function automatic int unsigned modulus(int unsigned n, int unsigned k);
    return (32'd1 << n) - (32'd1 << k) - 32'd1;
  endfunction

  // Reference modular addition, equation (4): subtract m once if needed.
  function automatic int unsigned ref_mod_add(int unsigned a, int unsigned b,
                                              int unsigned m);
    int unsigned t;
    t = a + b;
    return (t >= m) ? t - m : t;
  endfunction

  // Number of folds v -> (v >> n) * T + (v mod 2^n) that bring any
  // product of two residues below 2m, so that one subtraction of m
  // finishes the reduction (worst case taken at every step).
  function automatic int unsigned mult_folds(int unsigned n, int unsigned k);
    int unsigned v, f, m;
    m = modulus(n, k);
    v = (m - 1) * (m - 1);
    f = 0;
    for (int i = 0; i < 32; i++) begin
      if (v >= 2 * m) begin
        v = (v >> n) * ((32'd1 << k) + 1) + ((32'd1 << n) - 1);
        f++;
      end
    end
    return f;
  endfunction

endpackage
