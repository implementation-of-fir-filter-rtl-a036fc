// tb_mod_bist: runs the adder self test to completion twice. With a good
// adder it must report pass with no errors after exactly 2^16 - 1
// patterns, one per cycle. With inject_fault set, every pattern is wrong
// at the checker, so it must count 2^16 - 1 errors and not pass. It also
// checks that the LFSR operands covered every residue pair (through a
// coverage bitmap kept here).
module tb_mod_bist;
  import mod_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned K = 4;
  localparam int unsigned M = modulus(N, K);
  localparam int unsigned P = (1 << (2 * N)) - 1;

  logic clk = 1'b0, rst, start, inject, busy, done, pass;
  logic [31:0] err_count, pat_count;
  int checks = 0, failures = 0, cycles = 0;
  bit seen [M][M];

  mod_bist #(.N(N), .K(K)) dut (
    .clk(clk), .rst(rst), .start(start), .inject_fault(inject), .busy(busy),
    .done(done), .pass(pass), .err_count(err_count), .pat_count(pat_count)
  );

  always #5ns clk = ~clk;
  always @(posedge clk) cycles++;
  always @(posedge clk) if (busy) seen[dut.a][dut.b] = 1'b1;

  initial begin
    wait (cycles == 300000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pass=%b errors=%0d patterns=%0d", what, pass, err_count, pat_count);
    end
  endtask

  task automatic run_once(input bit inj, output int len);
    int t0;
    inject = inj;
    start = 1'b1;
    @(posedge clk);
    #1ns start = 1'b0;
    t0 = cycles;
    wait (done);
    len = cycles - t0;
    #1ns;
  endtask

  initial begin
    int len;
    rst = 1'b1; start = 1'b0; inject = 1'b0;
    repeat (2) @(posedge clk);
    #1ns rst = 1'b0;
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) seen[i][j] = 1'b0;
    check(!busy && !done, "idle after reset");
    run_once(1'b0, len);
    check(pass && err_count == 0, "good adder passes");
    check(pat_count == P, "pattern count");
    check(len == P, "one pattern per cycle");
    begin
      int missing = 0;
      for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) if (!seen[i][j]) missing++;
      check(missing == 0, "every residue pair applied");
    end
    run_once(1'b1, len);
    check(!pass && err_count == P, "injected fault detected on every pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
