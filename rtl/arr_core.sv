// arr_core: the N x N lattice of array multiplier cells.
//
// Cell (i,j) sits in column i (operand bit a_i) and row j (operand bit b_j)
// and computes a_i*b_j, of weight i+j. Each row adds its partial product
// A*b_j to the partial sums of the row above with a ripple carry that runs
// from right (i = 0) to left (i = N-1):
//   - a_i enters at the top of column i and moves down (3 cycles per row),
//   - b_j enters at the right end of row j and moves left (1 cycle per cell),
//   - the sum of cell (i+1, j-1) (same weight, row above) feeds cell (i,j),
//   - the carry of cell (i-1, j) feeds cell (i,j).
// Perimeter inputs (sums into row 0, carries into column 0) are zero, as in
// the published array. How a row's last carry reaches the next row is this
// design's choice: the carry of cell (N-1, j-1) feeds the sum input of cell
// (N-1, j) through two extra register stages, so that it arrives in the same
// cycle as that cell's other inputs.
//
// Timing: with a_skew/b_skew driven by arr_operand_skew, cell (i,j) works
// at cycle i + 3j, counted from the cycle in which (a_0, b_0) enters. The
// result bits leave the array skewed in time:
//   m_raw[k], k <  N-1   : sum of cell (0,k),        valid at cycle 3k + 2
//   m_raw[k], N-1..2N-2  : sum of cell (k-N+1, N-1), valid at cycle k + 2N
//   m_raw[2N-1]          : carry of cell (N-1, N-1), valid at cycle 4N - 3
// arr_result_sync lines them up. A new operand pair can enter every cycle.
module arr_core #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   a_skew,
  input  logic [N-1:0]   b_skew,
  output logic [2*N-1:0] m_raw
);

  // Per-row buses, indexed [row][column].
  logic [N-1:0] a_i [N];   // a input of each cell
  logic [N-1:0] b_i [N];
  logic [N-1:0] s_i [N];
  logic [N-1:0] c_i [N];
  logic [N-1:0] a_o [N];
  logic [N-1:0] b_o [N];
  logic [N-1:0] s_o [N];
  logic [N-1:0] c_o [N];

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      // Operand A: from the top for row 0, else from the cell above.
      if (j == 0) begin : g_a_top
        assign a_i[j][i] = a_skew[i];
      end else begin : g_a_down
        assign a_i[j][i] = a_o[j-1][i];
      end

      // Operand B: from the right end for column 0, else from the right.
      if (i == 0) begin : g_b_edge
        assign b_i[j][i] = b_skew[j];
      end else begin : g_b_left
        assign b_i[j][i] = b_o[j][i-1];
      end

      // Carry in: zero at the right perimeter.
      if (i == 0) begin : g_c_edge
        assign c_i[j][i] = 1'b0;
      end else begin : g_c_ripple
        assign c_i[j][i] = c_o[j][i-1];
      end

      // Sum in: zero for the top row, the row-end carry for the leftmost
      // cell, otherwise the same-weight sum of the row above.
      if (j == 0) begin : g_s_top
        assign s_i[j][i] = 1'b0;
      end else if (i == N-1) begin : g_s_rowend
        delay_line #(.WIDTH(1), .DEPTH(2)) u_rowend (
          .clk (clk), .rst (rst), .d (c_o[j-1][i]), .q (s_i[j][i])
        );
      end else begin : g_s_down
        assign s_i[j][i] = s_o[j-1][i+1];
      end

      arr_mult_cell u_cell (
        .clk   (clk),
        .rst   (rst),
        .a_in  (a_i[j][i]),
        .b_in  (b_i[j][i]),
        .s_in  (s_i[j][i]),
        .c_in  (c_i[j][i]),
        .a_out (a_o[j][i]),
        .b_out (b_o[j][i]),
        .s_out (s_o[j][i]),
        .c_out (c_o[j][i])
      );
    end
  end

  // Result bits: the right column of the upper rows, the whole bottom row,
  // and the bottom row's final carry.
  for (genvar k = 0; k < N-1; k++) begin : g_m_low
    assign m_raw[k] = s_o[k][0];
  end
  assign m_raw[2*N-2:N-1] = s_o[N-1];
  assign m_raw[2*N-1]     = c_o[N-1][N-1];

endmodule
