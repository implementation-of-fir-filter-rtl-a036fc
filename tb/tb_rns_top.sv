// tb_rns_top: end-to-end test of rns_top at its default parameters
// (m = 239, four FIR taps, 11 generator cells). All three parts run at the
// same time:
//  * FIR filter: 4000 random samples with random coefficients, checked
//    every cycle against sum h[i] x[t-i] mod 239
//  * random number generator: seeded through the load port, stepped with
//    en, paused, checked every cycle against its recurrence
//  * self test: one full run on the good adder (must pass), then one with
//    the fault injected (must fail on every pattern)
// Each mechanism is counted: adder wrap and no-wrap in the filter, generator
// load, advance and hold, self-test pass and self-test fault detection. A
// mechanism that never happened counts as a failure.
module tb_rns_top;
  import mod_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned K = 4;
  localparam int unsigned TAPS = 4;
  localparam int unsigned S = 11;
  localparam int unsigned M = modulus(N, K);
  localparam int unsigned P = (1 << (2 * N)) - 1;
  localparam int TAPPED [6] = '{0, 1, 4, 7, 9, 10};

  logic clk = 1'b0, rst;
  logic [N-1:0] fir_x, fir_y, rng_out;
  logic [TAPS-1:0][N-1:0] fir_h;
  logic rng_load, rng_en;
  logic [S-1:0][N-1:0] rng_seed;
  logic bist_start, bist_inject, bist_busy, bist_done, bist_pass;
  logic [31:0] bist_err, bist_pat;

  int checks = 0, failures = 0, cycles = 0;
  int n_wrap = 0, n_nowrap = 0, n_load = 0, n_adv = 0, n_hold = 0;
  int n_bist_pass = 0, n_bist_detect = 0;
  int unsigned xh [TAPS];
  int unsigned rm [S];
  bit fir_done = 0, rng_done = 0, released = 0;

  rns_top dut (
    .clk(clk), .rst(rst),
    .fir_x(fir_x), .fir_h(fir_h), .fir_y(fir_y),
    .rng_load(rng_load), .rng_seed(rng_seed), .rng_en(rng_en), .rng_out(rng_out),
    .bist_start(bist_start), .bist_inject_fault(bist_inject), .bist_busy(bist_busy),
    .bist_done(bist_done), .bist_pass(bist_pass), .bist_err_count(bist_err),
    .bist_pat_count(bist_pat)
  );

  always #5ns clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  // ---------------- FIR filter ----------------
  initial begin
    wait (released);
    for (int i = 0; i < TAPS; i++) begin
      fir_h[i] = N'($urandom_range(M - 1));
      xh[i] = 0;
    end
    for (int t = 0; t < 4000; t++) begin
      int unsigned acc;
      acc = 0;
      fir_x = N'($urandom_range(M - 1));
      xh[0] = fir_x;
      #1ns;
      for (int i = 0; i < TAPS; i++) acc = (acc + xh[i] * int'(fir_h[i])) % M;
      check(fir_y == N'(acc), "FIR output");
      for (int i = 1; i < TAPS; i++) if (dut.u_fir.wrap[i]) n_wrap++; else n_nowrap++;
      @(posedge clk);
      #1ns;
      for (int i = TAPS - 1; i > 0; i--) xh[i] = xh[i-1];
    end
    fir_done = 1;
  end

  // ---------------- random number generator ----------------
  task automatic rng_model_step();
    int unsigned fb = 0;
    foreach (TAPPED[i]) fb = (fb + rm[TAPPED[i]]) % M;
    for (int i = S - 1; i > 0; i--) rm[i] = rm[i-1];
    rm[0] = fb;
  endtask

  initial begin
    wait (released);
    for (int i = 0; i < S; i++) begin
      rng_seed[i] = N'($urandom_range(1, M - 1));
      rm[i] = rng_seed[i];
    end
    rng_load = 1'b1;
    @(posedge clk);
    #1ns rng_load = 1'b0;
    n_load++;
    check(rng_out == N'(rm[S-1]), "RNG seed load");
    for (int t = 0; t < 4000; t++) begin
      rng_en = ($urandom_range(7) != 0);
      @(posedge clk);
      #1ns;
      if (rng_en) begin
        rng_model_step();
        n_adv++;
      end else begin
        n_hold++;
      end
      check(rng_out == N'(rm[S-1]) && rng_out < N'(M), "RNG output");
    end
    rng_en = 1'b0;
    rng_done = 1;
  end

  // ---------------- self test ----------------
  initial begin
    rst = 1'b1; fir_x = '0; fir_h = '0; rng_load = 1'b0; rng_en = 1'b0;
    rng_seed = '0; bist_start = 1'b0; bist_inject = 1'b0;
    repeat (2) @(posedge clk);
    #1ns rst = 1'b0;
    released = 1;
    for (int run = 0; run < 2; run++) begin
      int t0;
      bist_inject = (run == 1);
      bist_start = 1'b1;
      @(posedge clk);
      #1ns bist_start = 1'b0;
      t0 = cycles;
      wait (bist_done);
      #1ns;
      check(cycles - t0 == P, "self-test length");
      if (run == 0) begin
        check(bist_pass && bist_err == 0 && bist_pat == P, "self test passes");
        if (bist_pass) n_bist_pass++;
      end else begin
        check(!bist_pass && bist_err == P, "self test detects injected fault");
        if (!bist_pass && bist_err != 0) n_bist_detect++;
      end
    end
    wait (fir_done && rng_done);
    check(n_wrap > 0,        "mechanism: modulo adder wrap (A+B >= m)");
    check(n_nowrap > 0,      "mechanism: modulo adder no wrap (A+B < m)");
    check(n_load > 0,        "mechanism: generator seed load");
    check(n_adv > 0,         "mechanism: generator advance");
    check(n_hold > 0,        "mechanism: generator hold");
    check(n_bist_pass > 0,   "mechanism: self test pass");
    check(n_bist_detect > 0, "mechanism: self test fault detection");
    $display("wrap=%0d nowrap=%0d load=%0d advance=%0d hold=%0d bist_pass=%0d bist_detect=%0d",
             n_wrap, n_nowrap, n_load, n_adv, n_hold, n_bist_pass, n_bist_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
