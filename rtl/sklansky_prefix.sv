// sklansky_prefix: Sklansky (divide-and-conquer) parallel-prefix tree.
//
// Given per-bit generate/propagate pairs (g_i, p_i), it returns every
// group pair (G_{i:0}, P_{i:0}) in ceil(log2 W) levels. At level l, each bit
// whose index has bit l set combines with the last bit of the block below
// it:
//   (G, P) o (G', P') = (G | P & G', P & P')      ("black" cell)
// Bits needing only G ("gray" cells) are left to synthesis, which drops
// the unused P logic. Purely combinational, fan-out grows towards the top.
module sklansky_prefix #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  output logic [W-1:0] gg,   // gg[i] = G_{i:0}
  output logic [W-1:0] pp    // pp[i] = P_{i:0}
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 0;

  always_comb begin
    logic [W-1:0] gl, pl, gn, pn;
    gl = g;
    pl = p;
    for (int l = 0; l < LEVELS; l++) begin
      gn = gl;
      pn = pl;
      for (int i = 0; i < W; i++) begin
        if (((i >> l) & 1) == 1) begin
          int j;
          j = ((i >> l) << l) - 1;
          gn[i] = gl[i] | (pl[i] & gl[j]);
          pn[i] = pl[i] & pl[j];
        end
      end
      gl = gn;
      pl = pn;
    end
    gg = gl;
    pp = pl;
  end

endmodule
