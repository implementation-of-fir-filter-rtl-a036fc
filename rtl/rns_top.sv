// rns_top: the residue-arithmetic design around the modulo 2^n - 2^k - 1
// adder (default m = 239), with its three users side by side:
//   * fir_mod  - four-tap FIR filter whose additions are modulo adders
//   * mod_rng  - 11-cell word shift register with modulo-adder feedback,
//                a pseudo-random residue generator
//   * mod_bist - LFSR-driven self test of the modulo adder
// The three share clock and reset and nothing else. Every port of the
// subblocks is brought out unchanged. See each module for its timing.
module rns_top #(
  parameter int unsigned N      = 8,
  parameter int unsigned K      = 4,
  parameter int unsigned TAPS   = 4,
  parameter int unsigned STAGES = 11
) (
  input  logic                     clk,
  input  logic                     rst,
  // FIR filter
  input  logic [N-1:0]             fir_x,
  input  logic [TAPS-1:0][N-1:0]   fir_h,
  output logic [N-1:0]             fir_y,
  // random number generator
  input  logic                     rng_load,
  input  logic [STAGES-1:0][N-1:0] rng_seed,
  input  logic                     rng_en,
  output logic [N-1:0]             rng_out,
  // self test of the modulo adder
  input  logic                     bist_start,
  input  logic                     bist_inject_fault,
  output logic                     bist_busy,
  output logic                     bist_done,
  output logic                     bist_pass,
  output logic [31:0]              bist_err_count,
  output logic [31:0]              bist_pat_count
);

  fir_mod #(.N(N), .K(K), .TAPS(TAPS)) u_fir (
    .clk(clk), .rst(rst), .x(fir_x), .h(fir_h), .y(fir_y)
  );

  mod_rng #(.N(N), .K(K), .STAGES(STAGES)) u_rng (
    .clk(clk), .rst(rst), .load(rng_load), .seed(rng_seed), .en(rng_en),
    .rnd(rng_out)
  );

  mod_bist #(.N(N), .K(K)) u_bist (
    .clk(clk), .rst(rst), .start(bist_start), .inject_fault(bist_inject_fault),
    .busy(bist_busy), .done(bist_done), .pass(bist_pass),
    .err_count(bist_err_count), .pat_count(bist_pat_count)
  );

endmodule
