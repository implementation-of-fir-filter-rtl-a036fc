// tb_mod_adder: exhaustive self-checking test of the modulo 2^8-2^4-1 adder.
//
// Applies every pair of residues a, b < 239 and compares the sum with
// (a + b) mod 239, and cout with (a + b >= 239). It first replays the four
// operand pairs of the reference waveform (215+177, 42+14, 170+10,
// 128+128) and checks the internal carry vectors there.
module tb_mod_adder;
  import mod_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned K = 4;
  localparam int unsigned M = modulus(N, K);

  logic [N-1:0] a, b, s;
  logic         cout;
  int checks = 0, failures = 0;

  mod_adder #(.N(N), .K(K)) dut (.a(a), .b(b), .s(s), .cout(cout));

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp,
                       input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: a=%0d b=%0d got %0d expected %0d", what, a, b, got, exp);
    end
  endtask

  // Watchdog: the whole test takes about 60 us of simulated time.
  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example vectors: {a, b, s, G, P, cT, Creal}
    logic [N-1:0] ex [4][7];
    ex[0] = '{8'b11010111, 8'b10110001, 8'b10011001, 8'b00100001, 8'b01010111, 8'b11001110, 8'b11001110};
    ex[1] = '{8'b00101010, 8'b00001110, 8'b00111000, 8'b00001010, 8'b00110101, 8'b01111100, 8'b00011100};
    ex[2] = '{8'b10101010, 8'b00001010, 8'b10110100, 8'bxxxxxxxx, 8'b10110001, 8'b01110100, 8'b00010100};
    ex[3] = '{8'b10000000, 8'b10000000, 8'b00010001, 8'b00000000, 8'b00010001, 8'b00000000, 8'b00000000};
    for (int e = 0; e < 4; e++) begin
      a = ex[e][0]; b = ex[e][1];
      #1ns;
      check(s, ex[e][2], "example sum");
      if (e != 2) check(dut.g, ex[e][3], "example G");
      check(dut.p, ex[e][4], "example P");
      check(dut.c_t, ex[e][5], "example cT");
      check(dut.c_real, ex[e][6], "example Creal");
    end
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < M; j++) begin
        a = N'(i); b = N'(j);
        #1ns;
        check(s, N'(ref_mod_add(i, j, M)), "sum");
        check({7'd0, cout}, {7'd0, (i + j >= M)}, "cout");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
