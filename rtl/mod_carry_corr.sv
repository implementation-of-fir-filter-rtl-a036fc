// mod_carry_corr: carry correction unit of the modulo 2^n - 2^k - 1 adder.
//
// The sum stage needs the carries of A+B+T when the carry out is 1
// (A+B >= m) and the carries of A+B otherwise. Only the A+B+T carries
// are computed, so the A+B ones are made from them, in two corrections:
//
//  Low bits i = 1..k (A1). A+B+T carries in 1 at bit 0. The carries only
//  differ where the carry-in propagates all the way:
//      c_i^real = c_i^T & (cout | ~P_{i-1:0})        (the x(y+~z) cell)
//  Bit k gives c_k of A+B = c_k^T & ~P_{k-1:0}.
//
//  High bits j = k+1..n-1 (A2). Write Y for the A2 carry-save sum without
//  carry-in. A2 of A+B+T is Y + c_k^T. A2 of A+B is Y - 1 + c_k, because
//  the square cell at bit k added the 1 of T. The carries are taken with
//  respect to the row-2 propagates p'_j:
//    first correction, remove the carry-in:
//      G'_{j-1:k} = c_j^T & ~(P'_{j-1:k} & c_k^T)
//    second correction, subtract 1 when c_k = 0. Y - 1 flips bit j
//    exactly when Y[j-1:k] is all zero, written z_j:
//      c_j^real = G'_{j-1:k} ^ (~c_k & z_j)
//    z_j is found without carries: Y[j-1:k] is zero iff p'_k = 0 and
//    p'_i == (p'_{i-1} | g'_{i-1}) for i = k+1..j-1.
//  When cout = 1 the A+B+T carries are used unchanged.
//
// Purely combinational. Correcting the A+B+T carries (instead of computing
// the A+B carries again) follows the published design, and so does the
// low-bit cell. The high-bit equations are this design's derivation: they
// reproduce every published waveform value of the unit.
module mod_carry_corr #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  input  logic [N-1:0] c_t,
  input  logic         cout,
  input  logic [K:0]   p_lo_grp,
  input  logic [N-1:0] p_hi_grp,
  output logic [N-1:0] c_real
);

  logic c_ab_k;     // carry into bit k of A+B
  logic [N:0] z;    // z[j]: A2 carry-save sum is zero on bits k..j-1

  always_comb begin
    z = '0;
    z[K+1] = ~p[K];
    for (int j = K + 1; j < N; j++)
      z[j+1] = z[j] & ~(p[j] ^ (p[j-1] | g[j-1]));
  end

  always_comb begin
    c_real = '0;
    for (int i = 1; i <= K; i++)
      c_real[i] = c_t[i] & (cout | ~p_lo_grp[i]);
    c_ab_k = c_t[K] & ~p_lo_grp[K];
    for (int j = K + 1; j < N; j++) begin
      logic g_grp;
      g_grp = c_t[j] & ~(p_hi_grp[j] & c_t[K]);
      c_real[j] = cout ? c_t[j] : (g_grp ^ (~c_ab_k & z[j]));
    end
  end

endmodule
