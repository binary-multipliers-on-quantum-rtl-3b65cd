// arr_operand_skew: input delay lines of the pipelined array multiplier.
//
// Inside the array an operand bit a_i moves down three cycles per row and
// b_j moves left one cycle per column, so cell (i,j) works at cycle i + 3j
// after the operands enter. To meet there, a_i is delayed by i cycles and
// b_j by 3j cycles before entering the array; the pair (a_0, b_0) enters at
// once. Outputs: a_skew[i] = a[i] delayed i cycles, b_skew[j] = b[j]
// delayed 3j cycles. The delays are the published ones; the register reset
// is this design's choice.
module arr_operand_skew #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] a_skew,
  output logic [N-1:0] b_skew
);

  for (genvar k = 0; k < N; k++) begin : g_bit
    delay_line #(.WIDTH(1), .DEPTH(k)) u_a_dly (
      .clk (clk), .rst (rst), .d (a[k]), .q (a_skew[k])
    );
    delay_line #(.WIDTH(1), .DEPTH(3*k)) u_b_dly (
      .clk (clk), .rst (rst), .d (b[k]), .q (b_skew[k])
    );
  end

endmodule
