// fir_mod: direct-form FIR filter in modulo 2^n - 2^k - 1 arithmetic.
//
//   y[t] = sum_{i=0}^{TAPS-1} h[i] * x[t-i]   (mod m, m = 239 by default)
//
// A delay line of TAPS-1 sample registers (z^-1) feeds TAPS modulo
// multipliers. Their products are summed by a chain of TAPS-1 modulo
// 2^n - 2^k - 1 adders in place of ordinary adders: the first adder takes
// taps 0 and 1, and each later adder adds the next tap to the running sum.
// The default TAPS = 4 matches the four-tap filter of the design.
//
// Interface and timing: x and h are residues below m. The delay line
// shifts on every rising clk edge. y is combinational from the current x
// and the stored samples, so y for sample x[t] is valid in the cycle x[t]
// is applied, as in the drawn filter, which has no output register.
// rst (synchronous, active high) clears the delay line. The coefficients
// are ports, as in the published simulation. Clearing on reset and the
// timing of y are this design's choices.
module fir_mod #(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 4,
  parameter int unsigned TAPS = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0]        x,
  input  logic [TAPS-1:0][N-1:0] h,
  output logic [N-1:0]        y
);

  logic [TAPS-1:0][N-1:0] xd;     // xd[i] = x[t-i]
  logic [TAPS-1:0][N-1:0] prod;   // h[i] * x[t-i] mod m
  logic [TAPS-1:0][N-1:0] acc;    // acc[i] = sum of taps 0..i mod m
  logic [TAPS-1:0]        wrap;   // adder i reduced by m (acc[0] unused)

  assign xd[0] = x;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < TAPS; i++) xd[i] <= '0;
    end else begin
      for (int i = 1; i < TAPS; i++) xd[i] <= xd[i-1];
    end
  end

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    mod_mult #(.N(N), .K(K)) u_mult (.x(xd[i]), .h(h[i]), .y(prod[i]));
  end

  assign acc[0]  = prod[0];
  assign wrap[0] = 1'b0;

  for (genvar i = 1; i < TAPS; i++) begin : g_add
    mod_adder #(.N(N), .K(K)) u_add (
      .a   (acc[i-1]),
      .b   (prod[i]),
      .s   (acc[i]),
      .cout(wrap[i])
    );
  end

  assign y = acc[TAPS-1];

endmodule
