// array_multiplier: complete N-bit pipelined array multiplier, M = A * B.
//
// The design maps the paper-and-pencil multiplication straight onto an
// N x N lattice of identical cells (arr_core); each cell is a majority gate
// AND plus a majority-logic full adder with registered outputs, so the
// lattice is fully pipelined and no signal crosses more than one cell per
// cycle. Input delay lines (arr_operand_skew) skew the operand bits into the
// order in which the cells need them, and output delay lines
// (arr_result_sync) bring the result bits back into one parallel word.
//
// Interface and timing: unsigned operands a, b and in_valid are sampled
// every cycle; the product of the operands of cycle t appears on m, with
// out_valid set, in cycle t + 4N - 1 (11 cycles for N = 3, 63 for N = 16).
// Throughput: one product per clock. The latency and throughput are the
// published ones; the valid bit and the synchronous active-high reset are
// this design's additions.
module array_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-1:0] m
);

  localparam int unsigned LATENCY = 4*N - 1;

  logic [N-1:0]   a_skew, b_skew;
  logic [2*N-1:0] m_raw;

  arr_operand_skew #(.N(N)) u_skew (
    .clk (clk), .rst (rst), .a (a), .b (b), .a_skew (a_skew), .b_skew (b_skew)
  );

  arr_core #(.N(N)) u_core (
    .clk (clk), .rst (rst), .a_skew (a_skew), .b_skew (b_skew), .m_raw (m_raw)
  );

  arr_result_sync #(.N(N)) u_sync (
    .clk (clk), .rst (rst), .m_raw (m_raw), .m (m)
  );

  delay_line #(.WIDTH(1), .DEPTH(LATENCY)) u_valid (
    .clk (clk), .rst (rst), .d (in_valid), .q (out_valid)
  );

endmodule
