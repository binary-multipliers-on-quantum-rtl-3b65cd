// arr_mult_cell: one cell of the pipelined (systolic) array multiplier.
//
// The cell forms the summand a_i AND b_j with a majority gate whose third
// input is 0, and adds it to the partial sum arriving from the row above
// (s_in) and to the carry arriving from the cell on its right (c_in) with a
// majority-logic full adder. All four inputs belong to the same cycle.
//
// Timing (QCA clock cycles, one register stage each), as in the QCA layout:
//   s_out : sum,                 2 cycles after the inputs
//   c_out : carry,               1 cycle  after the inputs
//   a_out : a_i to the next row, 3 cycles (it crosses b_j, the carry and
//           the sum wires on its way down)
//   b_out : b_j to the next column on the left, 1 cycle
// Those delays are what make the whole array a wave-pipelined lattice that
// accepts a new operand pair every cycle. The synchronous active-high reset
// (a choice of this design) clears all stages.
module arr_mult_cell
  import qca_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic a_in,
  input  logic b_in,
  input  logic s_in,
  input  logic c_in,
  output logic a_out,
  output logic b_out,
  output logic s_out,
  output logic c_out
);

  logic summand, fa_sum, fa_carry;
  logic s_mid;
  logic [2:0] a_pipe;

  always_comb summand = and2(a_in, b_in);

  maj_full_adder u_fa (
    .x     (summand),
    .y     (s_in),
    .z     (c_in),
    .sum   (fa_sum),
    .carry (fa_carry)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      s_mid  <= 1'b0;
      s_out  <= 1'b0;
      c_out  <= 1'b0;
      b_out  <= 1'b0;
      a_pipe <= '0;
    end else begin
      s_mid  <= fa_sum;
      s_out  <= s_mid;
      c_out  <= fa_carry;
      b_out  <= b_in;
      a_pipe <= {a_pipe[1:0], a_in};
    end
  end

  assign a_out = a_pipe[2];

endmodule
