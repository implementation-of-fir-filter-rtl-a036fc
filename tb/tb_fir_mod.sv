// tb_fir_mod: checks the four-tap modulo-239 FIR filter against a model
// of y[t] = sum h[i] x[t-i] mod 239, built from a history of the applied
// samples. Covers an impulse (the output must show the coefficients one
// per cycle, i.e. one cycle per delay stage), a reset in mid stream, and
// 5000 random samples with random coefficients. It also counts how often
// the adder chain reduced by m (wrap) and how often it did not.
module tb_fir_mod;
  import mod_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned K = 4;
  localparam int unsigned TAPS = 4;
  localparam int unsigned M = modulus(N, K);

  logic clk = 1'b0, rst;
  logic [N-1:0] x, y;
  logic [TAPS-1:0][N-1:0] h;
  int unsigned hist [TAPS];
  int checks = 0, failures = 0, n_wrap = 0, n_nowrap = 0, cycles = 0;

  fir_mod #(.N(N), .K(K), .TAPS(TAPS)) dut (.clk(clk), .rst(rst), .x(x), .h(h), .y(y));

  always #5ns clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned model();
    int unsigned acc = 0;
    for (int i = 0; i < TAPS; i++) acc = (acc + hist[i] * int'(h[i])) % M;
    return acc;
  endfunction

  task automatic check(input int unsigned exp, input string what);
    checks++;
    if (y != N'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: y=%0d expected %0d", what, y, exp);
    end
  endtask

  // apply x, check y in the same cycle, then clock the sample in
  task automatic step(input logic [N-1:0] xv, input string what);
    x = xv;
    hist[0] = xv;
    #1ns;
    check(model(), what);
    for (int i = 1; i < TAPS; i++) begin
      if (dut.wrap[i]) n_wrap++; else n_nowrap++;
    end
    @(posedge clk);
    #1ns;
    for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
  endtask

  initial begin
    rst = 1'b1; x = '0;
    for (int i = 0; i < TAPS; i++) h[i] = N'(10 * i + 3);
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    #1ns rst = 1'b0;
    // impulse: y shows h[0], h[1], h[2], h[3], then 0
    step(8'd1, "impulse");
    for (int t = 1; t <= TAPS; t++) begin
      x = '0;
      #1ns;
      checks++;
      if (y != ((t < TAPS) ? h[t] : 8'd0)) begin
        failures++;
        $display("FAIL impulse response at delay %0d: y=%0d", t, y);
      end
      step(8'd0, "impulse tail");
    end
    // random stream with random coefficients
    for (int i = 0; i < TAPS; i++) h[i] = N'($urandom_range(M - 1));
    for (int t = 0; t < 5000; t++) begin
      if (t == 2500) begin
        // reset in mid stream clears the delay line
        rst = 1'b1;
        @(posedge clk);
        #1ns rst = 1'b0;
        for (int i = 0; i < TAPS; i++) hist[i] = 0;
      end
      step(N'($urandom_range(M - 1)), "random");
    end
    checks++;
    if (n_wrap == 0 || n_nowrap == 0) begin
      failures++;
      $display("FAIL adder chain wrap=%0d nowrap=%0d", n_wrap, n_nowrap);
    end
    $display("adder wraps=%0d no-wraps=%0d", n_wrap, n_nowrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
