// mod_rng: random number generator built from a word shift register and
// modulo 2^n - 2^k - 1 adders.
//
// STAGES cells of n bits, each holding a residue below m, shift one place
// towards the output on every enabled clock. The new value of the input
// stage (stage 0) is the modular sum of the tapped cells. A chain of modulo
// adders forms it, starting at the output stage and adding the other taps
// on the way back to stage 0. With the default taps the recurrence is
//   x[t] = x[t-1] + x[t-2] + x[t-5] + x[t-8] + x[t-10] + x[t-11]  (mod m)
// using five adders. The output is the last stage.
//
// Interface and timing: synchronous, active-high rst loads the default
// seed (stage i = i + 1). load (which wins over en) loads the seed input.
// en advances the register by one step. rnd always shows the last stage.
// Seeds must be residues below m. The all-zero state is a fixed point.
//
// From the design: 11 cells, five modulo adders in a chain fed by five
// cells plus the output stage, and the feedback into the first stage. Which
// cells are tapped is read off the block drawing (TAP_MASK: bit i set
// means stage i feeds the sum, stage 0 is the input end). The seed, reset
// and enable behaviour are this design's choices.
module mod_rng #(
  parameter int unsigned N        = 8,
  parameter int unsigned K        = 4,
  parameter int unsigned STAGES   = 11,
  parameter logic [31:0] TAP_MASK = 32'b110_1001_0011
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     load,
  input  logic [STAGES-1:0][N-1:0] seed,
  input  logic                     en,
  output logic [N-1:0]             rnd
);

  logic [STAGES-1:0][N-1:0] stage;
  logic [STAGES-1:0][N-1:0] acc;   // acc[i]: sum of the taps at cells i..STAGES-1

  assign acc[STAGES-1] = stage[STAGES-1];

  for (genvar i = STAGES - 2; i >= 0; i--) begin : g_fb
    if (TAP_MASK[i]) begin : g_add
      logic unused_cout;
      mod_adder #(.N(N), .K(K)) u_add (
        .a   (stage[i]),
        .b   (acc[i+1]),
        .s   (acc[i]),
        .cout(unused_cout)
      );
    end else begin : g_pass
      assign acc[i] = acc[i+1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < STAGES; i++) stage[i] <= N'(i + 1);
    end else if (load) begin
      stage <= seed;
    end else if (en) begin
      stage[0] <= acc[0];
      for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
    end
  end

  assign rnd = stage[STAGES-1];

endmodule
