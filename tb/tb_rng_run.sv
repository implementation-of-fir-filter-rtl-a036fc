// tb_rng_run: long run of the random number generator at its default
// size (11 cells of 8 bits, m = 239). It steps 200 000 times from the
// reset seed and checks every output against the recurrence model. It also
// checks that the state never returns to the seed (no period of 200 000 or
// less) and that every residue 0..238 appears in the output.
module tb_rng_run;
  import mod_pkg::*;

  localparam int unsigned M = modulus(8, 4);
  localparam int unsigned S = 11;
  localparam int STEPS = 200000;
  localparam int TAPPED [6] = '{0, 1, 4, 7, 9, 10};

  logic clk = 1'b0, rst, en;
  logic [S-1:0][7:0] seed;
  logic [7:0] rnd;
  int unsigned model [S];
  int hist [M];
  int checks = 0, failures = 0, cycles = 0, repeats = 0;

  mod_rng dut (.clk(clk), .rst(rst), .load(1'b0), .seed(seed), .en(en), .rnd(rnd));

  always #5ns clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == STEPS + 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int missing;
    rst = 1'b1; en = 1'b0; seed = '0;
    for (int v = 0; v < M; v++) hist[v] = 0;
    @(posedge clk);
    #1ns rst = 1'b0;
    en = 1'b1;
    for (int i = 0; i < S; i++) model[i] = i + 1;
    for (int t = 0; t < STEPS; t++) begin
      int unsigned fb;
      bit same;
      @(posedge clk);
      #1ns;
      fb = 0;
      foreach (TAPPED[i]) fb = (fb + model[TAPPED[i]]) % M;
      for (int i = S - 1; i > 0; i--) model[i] = model[i-1];
      model[0] = fb;
      checks++;
      if (rnd != 8'(model[S-1]) || rnd >= 8'(M)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: rnd=%0d model=%0d", t, rnd, model[S-1]);
      end
      if (rnd < 8'(M)) hist[rnd]++;
      same = 1;
      for (int i = 0; i < S; i++) if (dut.stage[i] != 8'(i + 1)) same = 0;
      if (same) repeats++;
    end
    checks++;
    if (repeats != 0) begin
      failures++;
      $display("FAIL state returned to the seed %0d times", repeats);
    end
    missing = 0;
    for (int v = 0; v < M; v++) if (hist[v] == 0) missing++;
    checks++;
    if (missing != 0) begin
      failures++;
      $display("FAIL %0d residues never produced", missing);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
