// mod_bist: built-in self test of the modulo 2^n - 2^k - 1 adder.
//
// A 2n-bit maximal-length LFSR supplies the two operands: the upper n bits
// go to a, the lower n bits to b. Values of m or more have m subtracted
// once, so the operands are residues. Over the LFSR's full period
// (2^(2n) - 1 steps) every pair of n-bit words except (0, 0) is applied,
// so every pair of residues is covered. A checker compares the adder under
// test with a plain reference of equation (4): add, then subtract m if
// the sum is m or more. Mismatches are counted.
//
// Interface and timing: pulse start (for one or more cycles) while idle
// to run. busy is high for PATTERNS cycles, one pattern per cycle. Then
// done rises and stays high, and pass = (err_count == 0), until the next
// start. inject_fault flips bit 0 of the adder result seen by the checker,
// so the checker itself can be tested. rst is synchronous and active high.
// The LFSR taps are x^16 + x^14 + x^13 + x^11 + 1 for n = 8. Other widths
// use the generic polynomial table in the code.
//
// The design states only that the adder is self tested with an LFSR. The
// pattern generator, the reference checker and the error counter are this
// design's own.
module mod_bist
  import mod_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned K        = 4,
  parameter int unsigned PATTERNS = (1 << (2 * N)) - 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        inject_fault,
  output logic        busy,
  output logic        done,
  output logic        pass,
  output logic [31:0] err_count,
  output logic [31:0] pat_count
);

  localparam int unsigned M = modulus(N, K);
  localparam int unsigned L = 2 * N;

  // Feedback taps of a maximal-length Fibonacci LFSR of L bits.
  function automatic logic [L-1:0] lfsr_taps();
    case (L)
      8:       return L'(8'hB8);
      10:      return L'(10'h240);
      12:      return L'(12'hE08);
      14:      return L'(14'h3802);
      16:      return L'(16'hB400);
      default: return L'(16'hB400);
    endcase
  endfunction

  localparam logic [L-1:0] TAPS = lfsr_taps();

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_t;
  state_t state;

  logic [L-1:0] lfsr;
  logic [N-1:0] a, b, s_dut, s_obs, s_ref;
  logic         cout_dut;

  function automatic logic [N-1:0] to_residue(logic [N-1:0] v);
    return (int'(v) >= M) ? N'(int'(v) - M) : v;
  endfunction

  assign a = to_residue(lfsr[L-1:N]);
  assign b = to_residue(lfsr[N-1:0]);

  mod_adder #(.N(N), .K(K)) u_dut (.a(a), .b(b), .s(s_dut), .cout(cout_dut));

  assign s_obs = s_dut ^ N'(inject_fault);
  assign s_ref = N'(ref_mod_add(a, b, M));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      lfsr      <= L'(1);
      err_count <= '0;
      pat_count <= '0;
    end else begin
      case (state)
        IDLE, DONE: if (start) begin
          state     <= RUN;
          lfsr      <= L'(1);
          err_count <= '0;
          pat_count <= '0;
        end
        RUN: begin
          // carry out must agree with the reduction decision too
          if (s_obs != s_ref || cout_dut != (int'(a) + int'(b) >= M))
            err_count <= err_count + 1;
          pat_count <= pat_count + 1;
          lfsr      <= {lfsr[L-2:0], ^(lfsr & TAPS)};
          if (pat_count == PATTERNS - 1) state <= DONE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state == RUN);
  assign done = (state == DONE);
  assign pass = done && (err_count == 0);

endmodule
