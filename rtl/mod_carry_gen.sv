// mod_carry_gen: carry generation unit of the modulo 2^n - 2^k - 1 adder.
//
// Two Sklansky prefix trees compute the carries of A+B+T from the
// pre-processed pairs:
//   * A1 (bits 0..k-1): the constant 1 at bit 0 is already folded into
//     g_0, so c_i^T = G_{i-1:0} for i = 1..k. c_k^T is A2's carry in.
//   * A2 (bits k..n-1): c_j^T = G'_{j-1:k} | P'_{j-1:k} & c_k^T
//     ("gray" cells after the tree). The carry out is the row-1 carry
//     g_msb ORed with the A2 carry out of bit n-1.
// It also passes on the group propagates that carry correction needs:
// p_lo_grp[i] = P_{i-1:0} over the plain XOR propagates of A+B (p_0 comes
// in as an XNOR, so it is inverted), and p_hi_grp[j] = P'_{j-1:k}.
// The unused low entries are 1 (p_lo_grp[0], p_hi_grp[K]) or 0.
//
// Purely combinational. The split into A1 and A2, the Sklansky trees and
// the carry-in of A2 follow the published structure. Handing the group
// propagates to the next unit is this design's choice.
module mod_carry_gen #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  input  logic         g_msb,
  output logic [N-1:0] c_t,
  output logic         cout,
  output logic [K:0]   p_lo_grp,
  output logic [N-1:0] p_hi_grp
);

  localparam int unsigned WH = N - K;

  logic [K-1:0]  gg_lo, pp_lo;
  logic [WH-1:0] gg_hi, pp_hi;

  sklansky_prefix #(.W(K)) u_prefix_a1 (
    .g (g[K-1:0]),
    .p (p[K-1:0]),
    .gg(gg_lo),
    .pp(pp_lo)
  );

  sklansky_prefix #(.W(WH)) u_prefix_a2 (
    .g (g[N-1:K]),
    .p (p[N-1:K]),
    .gg(gg_hi),
    .pp(pp_hi)
  );

  always_comb begin
    c_t = '0;
    for (int i = 1; i <= K; i++) c_t[i] = gg_lo[i-1];
    for (int j = K + 1; j < N; j++)
      c_t[j] = gg_hi[j-1-K] | (pp_hi[j-1-K] & c_t[K]);
    cout = g_msb | gg_hi[WH-1] | (pp_hi[WH-1] & c_t[K]);
  end

  // Group propagates for carry correction. pp_lo includes the XNOR of
  // bit 0, so the A+B version is P_{i-1:1} & ~p_0.
  always_comb begin
    p_lo_grp    = '0;
    p_lo_grp[0] = 1'b1;
    p_lo_grp[1] = ~p[0];
    for (int i = 2; i <= K; i++) p_lo_grp[i] = p_lo_grp[i-1] & p[i-1];
    p_hi_grp    = '0;
    p_hi_grp[K] = 1'b1;
    for (int j = K + 1; j < N; j++) p_hi_grp[j] = pp_hi[j-1-K];
  end

endmodule
