// tb_mod_carry_gen: checks the carry generation unit for every pair of
// residues a, b < 239 (n = 8, k = 4). The pre-processing unit feeds it.
// The references come from integer arithmetic on a and b:
//  * c_i^T for i <= k is the carry into bit i of (a mod 2^i) + (b mod 2^i) + 1
//  * for j > k, c_j^T is the carry the sum stage needs: bit j of a+b+T
//    XOR the merged propagate p'_j
//  * cout = bit n of a + b + T
//  * p_lo_grp[i] = AND of (a ^ b)[i-1:0], p_hi_grp[j] = AND of p'[j-1:k]
// It also replays the published carry vectors of the example operands.
module tb_mod_carry_gen;
  import mod_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned K = 4;
  localparam int unsigned M = modulus(N, K);
  localparam int unsigned T = (1 << K) + 1;

  logic [N-1:0] a, b, g, p, c_t, p_hi_grp;
  logic [K:0]   p_lo_grp;
  logic         g_msb, cout;
  int checks = 0, failures = 0;

  mod_preproc #(.N(N), .K(K)) u_pre (.a(a), .b(b), .g(g), .p(p), .g_msb(g_msb));
  mod_carry_gen #(.N(N), .K(K)) dut (
    .g(g), .p(p), .g_msb(g_msb), .c_t(c_t), .cout(cout),
    .p_lo_grp(p_lo_grp), .p_hi_grp(p_hi_grp)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%0d b=%0d c_t=%b cout=%b", what, a, b, c_t, cout);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'd215; b = 8'd177; #1ns; check(c_t == 8'b11001110 && cout, "example 215+177");
    a = 8'd42;  b = 8'd14;  #1ns; check(c_t == 8'b01111100 && !cout, "example 42+14");
    a = 8'd170; b = 8'd10;  #1ns; check(c_t == 8'b01110100 && !cout, "example 170+10");
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < M; j++) begin
        int unsigned st;
        logic [N-1:0] x;
        a = N'(i); b = N'(j);
        #1ns;
        st = i + j + T;
        x  = a ^ b;
        for (int unsigned q = 1; q <= K; q++) begin
          int unsigned msk;
          msk = (1 << q) - 1;
          check(c_t[q] == 1'(((i & msk) + (j & msk) + 1) >> q), "low carry");
          check(p_lo_grp[q] == &(x | ~N'(msk)), "low group propagate");
        end
        for (int unsigned q = K + 1; q < N; q++) begin
          check(c_t[q] == (1'(st >> q) ^ p[q]), "high carry");
          check(p_hi_grp[q] == &(p | ~(N'((1 << q) - 1) & ~N'((1 << K) - 1))),
                "high group propagate");
        end
        check(cout == 1'(st >> N), "carry out");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
