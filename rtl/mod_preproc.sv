// mod_preproc: pre-processing unit of the modulo 2^n - 2^k - 1 adder.
//
// The adder computes A+B+T with T = 2^k + 1 and splits the word in two:
// A1 covers bits 0..k-1 and A2 covers bits k..n-1. The unit builds the
// generate/propagate pairs of that sum, with no carry chain:
//   * "white circle" cell (two inputs):         g = x & y, p = x ^ y
//   * "white square" cell (x, y and a const 1): g = x | y, p = ~(x ^ y)
//     That is the carry and sum of x + y + 1.
// Bit 0 and bit k carry the two 1s of T, so they use square cells.
// A1 needs one row of cells: the carry of its square enters the prefix
// tree as an ordinary generate. In A2 the square at bit k leaves a
// carry-save pair (row-1 sums p_j and row-1 carries g_j). A second row of
// circles merges it into one generate/propagate pair per bit:
//   g'_j = p_j & g_{j-1},  p'_j = p_j ^ g_{j-1}   for j = k+1..n-1
//   g'_k = 0,              p'_k = p_k
// The row-1 carry out of bit n-1 leaves as g_msb, which carry generation
// ORs into the final carry out.
//
// Interface: purely combinational. g/p[K-1:0] are A1's row-1 pairs.
// g/p[N-1:K] are A2's row-2 pairs. For a = 215, b = 177 (n=8, k=4) the
// unit gives g = 00100001, p = 01010111 and g_msb = 1.
//
// The cell types, the two rows of A2 and the operator symbols follow the
// published structure. The merge equations of the second row are derived
// here so that they give the published example values.
module mod_preproc #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] p,
  output logic         g_msb
);

  logic [N-1:0] g1, p1;  // row-1 cells

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (i == 0 || i == K) begin
        g1[i] = a[i] | b[i];
        p1[i] = ~(a[i] ^ b[i]);
      end else begin
        g1[i] = a[i] & b[i];
        p1[i] = a[i] ^ b[i];
      end
    end
  end

  always_comb begin
    // A1: row-1 pairs pass straight to the prefix tree
    g[K-1:0] = g1[K-1:0];
    p[K-1:0] = p1[K-1:0];
    // A2: row 2 merges the sum and the shifted carry vectors
    g[K] = 1'b0;
    p[K] = p1[K];
    for (int j = K + 1; j < N; j++) begin
      g[j] = p1[j] & g1[j-1];
      p[j] = p1[j] ^ g1[j-1];
    end
    g_msb = g1[N-1];
  end

endmodule
