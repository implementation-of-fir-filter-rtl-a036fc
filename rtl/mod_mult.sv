// mod_mult: modulo 2^n - 2^k - 1 multiplier for the FIR taps.
//
// y = (x * h) mod m for residues x, h < m. It forms the full 2n-bit
// product, then folds it with 2^n = 2^k + 1 (mod m): the bits above n are
// multiplied by T = 2^k + 1 (a shift and an add) and added back to the low
// n bits. FOLDS is the number of folds that brings the worst-case product
// below 2m. It is computed at elaboration and is 3 for n = 8, k = 4
// (56644 -> 4012 -> 510 -> 272 at worst). A final compare-and-subtract
// removes one m. Purely combinational.
//
// The filter drawing shows only a multiplier symbol in front of each
// modulo adder. Reducing the product so that the adder gets a valid
// residue, and the folding method, are this design's choices.
module mod_mult
  import mod_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] h,
  output logic [N-1:0] y
);

  localparam int unsigned M = modulus(N, K);
  localparam int unsigned T = (1 << K) + 1;
  localparam int unsigned W = 2 * N + 1;   // wide enough for every fold

  localparam int unsigned FOLDS = mult_folds(N, K);

  always_comb begin
    logic [W-1:0] v;
    v = W'(x) * W'(h);
    for (int f = 0; f < FOLDS; f++)
      v = (v >> N) * W'(T) + (v & W'((1 << N) - 1));
    if (v >= W'(M)) v = v - W'(M);
    y = v[N-1:0];
  end

endmodule
