// tb_mod_rng: checks the 11-cell modulo-239 random number generator
// against a software model of its recurrence
//   x[t] = x[t-1] + x[t-2] + x[t-5] + x[t-8] + x[t-10] + x[t-11]  (mod 239).
// It checks the reset seed, that a low en holds the state, a seed load,
// and 3000 steps from each seed. Every output must be a residue (< 239).
module tb_mod_rng;
  import mod_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned K = 4;
  localparam int unsigned S = 11;
  localparam int unsigned M = modulus(N, K);
  localparam int TAPPED [6] = '{0, 1, 4, 7, 9, 10};   // cells in the feedback sum

  logic clk = 1'b0, rst, load, en;
  logic [S-1:0][N-1:0] seed;
  logic [N-1:0] rnd;
  int unsigned model [S];
  int checks = 0, failures = 0, cycles = 0;

  mod_rng #(.N(N), .K(K), .STAGES(S)) dut (
    .clk(clk), .rst(rst), .load(load), .seed(seed), .en(en), .rnd(rnd)
  );

  always #5ns clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: rnd=%0d model=%0d", what, rnd, model[S-1]);
    end
  endtask

  task automatic model_step();
    int unsigned fb = 0;
    foreach (TAPPED[i]) fb = (fb + model[TAPPED[i]]) % M;
    for (int i = S - 1; i > 0; i--) model[i] = model[i-1];
    model[0] = fb;
  endtask

  task automatic run(input int steps);
    for (int t = 0; t < steps; t++) begin
      @(posedge clk);
      #1ns;
      model_step();
      check(rnd == N'(model[S-1]), "sequence");
      check(rnd < N'(M), "residue range");
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; en = 1'b0; seed = '0;
    @(posedge clk);
    #1ns rst = 1'b0;
    for (int i = 0; i < S; i++) model[i] = i + 1;
    check(rnd == N'(S), "reset seed");
    en = 1'b1;
    run(3000);
    // hold
    en = 1'b0;
    repeat (5) @(posedge clk);
    #1ns check(rnd == N'(model[S-1]), "hold with en low");
    // load a random seed
    for (int i = 0; i < S; i++) begin
      seed[i]  = N'($urandom_range(M - 1));
      model[i] = seed[i];
    end
    load = 1'b1; en = 1'b1;
    @(posedge clk);
    #1ns load = 1'b0;
    check(rnd == N'(model[S-1]), "seed load");
    run(3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
