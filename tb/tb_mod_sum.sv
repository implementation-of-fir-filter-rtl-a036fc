// tb_mod_sum: checks the sum computation unit on its own for every pair
// of residues a, b < 239 (n = 8, k = 4). The pre-processing unit gives the
// partial sums. The real carries and the carry out are built here from
// integer arithmetic, not by the carry units. The result must equal
// (a + b) mod 239.
module tb_mod_sum;
  import mod_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned K = 4;
  localparam int unsigned M = modulus(N, K);
  localparam int unsigned T = (1 << K) + 1;

  logic [N-1:0] a, b, g, p, c_real, s;
  logic         g_msb, cout;
  int checks = 0, failures = 0;

  mod_preproc #(.N(N), .K(K)) u_pre (.a(a), .b(b), .g(g), .p(p), .g_msb(g_msb));
  mod_sum #(.N(N), .K(K)) dut (.p(p), .c_real(c_real), .cout(cout), .s(s));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < M; j++) begin
        int unsigned sum;
        a = N'(i); b = N'(j);
        #1ns;
        cout = (i + j >= M);
        sum  = cout ? i + j + T : i + j;   // the binary sum the stage forms
        c_real = '0;
        for (int unsigned q = 1; q <= K; q++) begin
          int unsigned msk;
          msk = (1 << q) - 1;
          c_real[q] = 1'(((i & msk) + (j & msk) + 32'(cout)) >> q);
        end
        for (int unsigned q = K + 1; q < N; q++) c_real[q] = 1'(sum >> q) ^ p[q];
        #1ns;
        checks++;
        if (s != N'(ref_mod_add(i, j, M))) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d s=%0d", i, j, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
