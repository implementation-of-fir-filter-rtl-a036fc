// tb_mod_mult: exhaustive check of the modulo-239 multiplier. Every
// pair x, h < 239 must give (x * h) mod 239, computed with the integer %
// operator.
module tb_mod_mult;
  import mod_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned K = 4;
  localparam int unsigned M = modulus(N, K);

  logic [N-1:0] x, h, y;
  int checks = 0, failures = 0;

  mod_mult #(.N(N), .K(K)) dut (.x(x), .h(h), .y(y));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < M; j++) begin
        x = N'(i); h = N'(j);
        #1ns;
        checks++;
        if (y != N'((i * j) % M)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d gave %0d", i, j, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
