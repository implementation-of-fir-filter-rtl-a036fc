// tb_mod_preproc: checks the pre-processing unit for every pair of
// residues a, b < 239 (n = 8, k = 4), against the arithmetic it encodes.
//  * Low bits i < k: each cell holds a_i + b_i + t_i = p_i + 2 g_i, with
//    t = T = 2^k + 1, so t_0 = 1.
//  * High bits: the merged pairs plus the top carry hold
//    A_hi + B_hi + 1: sum_j (p_j + 2 g_j) 2^(j-k) + g_msb 2^(n-k).
//    Also g_j & p_j = 0 (the two merge outputs never both 1) and g_k = 0.
//  * The G/P values of the reference waveform for the example operands.
module tb_mod_preproc;
  import mod_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned K = 4;
  localparam int unsigned M = modulus(N, K);

  logic [N-1:0] a, b, g, p;
  logic         g_msb;
  int checks = 0, failures = 0;

  mod_preproc #(.N(N), .K(K)) dut (.a(a), .b(b), .g(g), .p(p), .g_msb(g_msb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%0d b=%0d g=%b p=%b", what, a, b, g, p);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'd215; b = 8'd177; #1ns;
    check(g == 8'b00100001 && p == 8'b01010111 && g_msb, "example 215+177");
    a = 8'd42;  b = 8'd14;  #1ns;
    check(g == 8'b00001010 && p == 8'b00110101, "example 42+14");
    a = 8'd128; b = 8'd128; #1ns;
    check(g == 8'b00000000 && p == 8'b00010001, "example 128+128");
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < M; j++) begin
        int unsigned hi;
        a = N'(i); b = N'(j);
        #1ns;
        for (int unsigned q = 0; q < K; q++)
          check(32'(a[q]) + 32'(b[q]) + ((q == 0) ? 1 : 0) == 32'(p[q]) + 2 * 32'(g[q]),
                "low cell");
        hi = 32'(g_msb) << (N - K);
        for (int unsigned q = K; q < N; q++)
          hi += (32'(p[q]) + 2 * 32'(g[q])) << (q - K);
        check(hi == (i >> K) + (j >> K) + 1, "high carry-save value");
        check((g[N-1:K] & p[N-1:K]) == '0 && g[K] == 1'b0, "high merge exclusive");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
