// sp_mult_cell: one cell of the serial-parallel (carry delay) multiplier.
//
// The cell holds one bit b of the parallel operand. Every cycle it forms the
// summand a_in AND b with a majority gate whose third input is 0 and adds it,
// with a majority-logic full adder, to the partial sum s_in arriving from
// the cell on its left and to its own carry of the previous cycle. The
// carry loop is one register long (carry latency 1), the sum leaves through
// two registers (sum latency 2), and the serial operand bit is passed to the
// next cell through one register, the cycle it spends crossing the b wire.
// These latencies are the published ones; the synchronous active-high reset
// that clears the carry and the pipeline is this design's choice.
module sp_mult_cell
  import qca_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic a_in,
  input  logic b,
  input  logic s_in,
  output logic a_out,
  output logic s_out
);

  logic summand, fa_sum, fa_carry;
  logic carry_q, s_mid;

  always_comb summand = and2(a_in, b);

  maj_full_adder u_fa (
    .x     (summand),
    .y     (s_in),
    .z     (carry_q),
    .sum   (fa_sum),
    .carry (fa_carry)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      carry_q <= 1'b0;
      s_mid   <= 1'b0;
      s_out   <= 1'b0;
      a_out   <= 1'b0;
    end else begin
      carry_q <= fa_carry;
      s_mid   <= fa_sum;
      s_out   <= s_mid;
      a_out   <= a_in;
    end
  end

endmodule
