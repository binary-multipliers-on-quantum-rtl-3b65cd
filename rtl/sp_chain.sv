// sp_chain: the chain of N serial-parallel multiplier cells.
//
// Cell 0 is at the left, where the serial operand enters, and cell N-1 at
// the right, where the product leaves. The serial operand moves one cell per
// cycle and partial sums move one cell per two cycles, so a partial sum
// meets operand bits one position later at every cell; for the weights to
// match, cell k must hold b_{N-1-k}. b_dist[k] is the bit for cell k and
// must already carry that cell's distribution delay (sp_b_distribution).
// The leftmost sum input is zero. Each cycle the chain adds one row of the
// paper-and-pencil product to the accumulated ones.
//
// Timing: if a_i is on a_ser in cycle c0 + i, and b_dist[k] is steady from
// cycle c0 + k for 2N cycles, then product bit m_i is on m_ser in cycle
// c0 + i + N + 1, for i = 0 .. 2N-1, provided a_N .. a_{2N-1} are zero (they
// flush the carries out and leave every carry clear for the next product).
// The serial operand leaving the last cell (a_w[N]) goes nowhere; lint
// reports it as unused.
module sp_chain #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         a_ser,
  input  logic [N-1:0] b_dist,
  output logic         m_ser
);

  logic [N:0] a_w;
  logic [N:0] s_w;

  assign a_w[0] = a_ser;
  assign s_w[0] = 1'b0;

  for (genvar k = 0; k < N; k++) begin : g_cell
    sp_mult_cell u_cell (
      .clk   (clk),
      .rst   (rst),
      .a_in  (a_w[k]),
      .b     (b_dist[k]),
      .s_in  (s_w[k]),
      .a_out (a_w[k+1]),
      .s_out (s_w[k+1])
    );
  end

  assign m_ser = s_w[N];

endmodule
