// tb_fir_step: the filter's step-response run. After reset, x = 1 and
// all four coefficients are 1, so the output climbs 1, 2, 3, 4 as the
// delay line fills, then stays at 4. Uses rns_top at its default
// parameters, the generator and self test idle.
module tb_fir_step;
  logic clk = 1'b0, rst;
  logic [7:0] fir_x, fir_y, rng_out;
  logic [3:0][7:0] fir_h;
  logic [10:0][7:0] rng_seed;
  logic bist_busy, bist_done, bist_pass;
  logic [31:0] bist_err, bist_pat;
  int checks = 0, failures = 0, cycles = 0;

  rns_top dut (
    .clk(clk), .rst(rst), .fir_x(fir_x), .fir_h(fir_h), .fir_y(fir_y),
    .rng_load(1'b0), .rng_seed(rng_seed), .rng_en(1'b0), .rng_out(rng_out),
    .bist_start(1'b0), .bist_inject_fault(1'b0), .bist_busy(bist_busy),
    .bist_done(bist_done), .bist_pass(bist_pass), .bist_err_count(bist_err),
    .bist_pat_count(bist_pat)
  );

  always #5ns clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; fir_x = 8'd0; fir_h = '0; rng_seed = '0;
    repeat (2) @(posedge clk);
    #1ns rst = 1'b0;
    fir_x = 8'd1;
    fir_h = {8'd1, 8'd1, 8'd1, 8'd1};
    for (int t = 0; t < 8; t++) begin
      #1ns;
      checks++;
      if (fir_y != 8'((t < 3) ? t + 1 : 4)) begin
        failures++;
        $display("FAIL step %0d: y=%0d", t, fir_y);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
