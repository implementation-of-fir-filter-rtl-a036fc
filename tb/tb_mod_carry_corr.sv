// tb_mod_carry_corr: checks the carry correction unit for every pair of
// residues a, b < 239 (n = 8, k = 4), with pre-processing and carry
// generation in front of it. Reference real carries, from integers:
//  * bits i <= k: the carry into bit i of a+b+T when a+b >= m, otherwise
//    of a+b (low i bits of each operand added)
//  * bits j > k: when a+b >= m the A+B+T carries pass unchanged; otherwise
//    bit j of a+b XOR the merged propagate p'_j (what the sum stage needs)
module tb_mod_carry_corr;
  import mod_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned K = 4;
  localparam int unsigned M = modulus(N, K);
  localparam int unsigned T = (1 << K) + 1;

  logic [N-1:0] a, b, g, p, c_t, p_hi_grp, c_real;
  logic [K:0]   p_lo_grp;
  logic         g_msb, cout;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_nowrap = 0;

  mod_preproc #(.N(N), .K(K)) u_pre (.a(a), .b(b), .g(g), .p(p), .g_msb(g_msb));
  mod_carry_gen #(.N(N), .K(K)) u_gen (
    .g(g), .p(p), .g_msb(g_msb), .c_t(c_t), .cout(cout),
    .p_lo_grp(p_lo_grp), .p_hi_grp(p_hi_grp)
  );
  mod_carry_corr #(.N(N), .K(K)) dut (
    .g(g), .p(p), .c_t(c_t), .cout(cout), .p_lo_grp(p_lo_grp),
    .p_hi_grp(p_hi_grp), .c_real(c_real)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%0d b=%0d c_t=%b c_real=%b", what, a, b, c_t, c_real);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'd215; b = 8'd177; #1ns; check(c_real == 8'b11001110, "example 215+177");
    a = 8'd42;  b = 8'd14;  #1ns; check(c_real == 8'b00011100, "example 42+14");
    a = 8'd170; b = 8'd10;  #1ns; check(c_real == 8'b00010100, "example 170+10");
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < M; j++) begin
        bit wrap;
        int unsigned sab;
        a = N'(i); b = N'(j);
        #1ns;
        wrap = (i + j >= M);
        sab  = i + j;
        if (wrap) n_wrap++; else n_nowrap++;
        for (int unsigned q = 1; q <= K; q++) begin
          int unsigned msk;
          msk = (1 << q) - 1;
          check(c_real[q] == 1'(((i & msk) + (j & msk) + (wrap ? 1 : 0)) >> q), "low real carry");
        end
        for (int unsigned q = K + 1; q < N; q++)
          check(c_real[q] == (wrap ? c_t[q] : (1'(sab >> q) ^ p[q])), "high real carry");
      end
    end
    check(n_wrap > 0 && n_nowrap > 0, "both correction cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
