// mod_sum: sum computation unit of the modulo 2^n - 2^k - 1 adder.
//
// Forms the result bits from the real carries and the partial sums,
// following equation (6) of the design:
//   s_0 = ~cout ^ p_0
//   s_k = c_k^real ^ ~cout ^ p_k
//   s_i = c_i^real ^ p_i                      (all other bits)
// p_0 and p_k are XNORs, the partial sums of A+B+T at the bits where T has
// its ones. Inverting them when cout = 0 turns them into the partial sums
// of A+B ("inverse XOR" cells). The high propagates are the row-2 pairs
// of the pre-processing unit. Purely combinational.
module mod_sum #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] c_real,
  input  logic         cout,
  output logic [N-1:0] s
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (i == 0)      s[i] = ~cout ^ p[i];
      else if (i == K) s[i] = c_real[i] ^ ~cout ^ p[i];
      else             s[i] = c_real[i] ^ p[i];
    end
  end

endmodule
