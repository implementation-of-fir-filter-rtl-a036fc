// mod_adder: modulo 2^n - 2^k - 1 adder (default n = 8, k = 4, m = 239).
//
// s = (a + b) mod m for residues a, b < m. It is one binary addition of
// A+B+T (T = 2^k + 1 = 2^n - m) instead of two adders. The carry out of
// A+B+T tells whether A+B >= m; when it is 0, the carries of A+B are
// corrected out of those of A+B+T. Four units in a row:
//   mod_preproc    -> generate/propagate pairs, word split into A1 | A2
//   mod_carry_gen  -> Sklansky prefix carries of A+B+T and the carry out
//   mod_carry_corr -> real carries (A+B+T or A+B, chosen by the carry out)
//   mod_sum        -> result bits, equation (6)
// Any prefix tree could replace the Sklansky one. Purely combinational:
// one adder delay plus the correction and XOR levels. cout is brought out
// as well: it is 1 when the reduction by m was applied.
// Inputs of m or more are outside the contract and give no defined result.
module mod_adder #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N-1:0] g, p, c_t, c_real, p_hi_grp;
  logic [K:0]   p_lo_grp;
  logic         g_msb;

  mod_preproc #(.N(N), .K(K)) u_preproc (
    .a    (a),
    .b    (b),
    .g    (g),
    .p    (p),
    .g_msb(g_msb)
  );

  mod_carry_gen #(.N(N), .K(K)) u_carry_gen (
    .g       (g),
    .p       (p),
    .g_msb   (g_msb),
    .c_t     (c_t),
    .cout    (cout),
    .p_lo_grp(p_lo_grp),
    .p_hi_grp(p_hi_grp)
  );

  mod_carry_corr #(.N(N), .K(K)) u_carry_corr (
    .g       (g),
    .p       (p),
    .c_t     (c_t),
    .cout    (cout),
    .p_lo_grp(p_lo_grp),
    .p_hi_grp(p_hi_grp),
    .c_real  (c_real)
  );

  mod_sum #(.N(N), .K(K)) u_sum (
    .p     (p),
    .c_real(c_real),
    .cout  (cout),
    .s     (s)
  );

endmodule
