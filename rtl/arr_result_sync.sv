// arr_result_sync: output delay lines of the pipelined array multiplier.
//
// The array delivers its result bits at different cycles (see arr_core).
// Bit m_k, k = 0 .. 2N-2, comes from the sum output of the cell in row j
// and paper-and-pencil column (weight) i = k, and is delayed by
// 4(N-1) - 2j - i cycles; the MSB m_{2N-1}, the last carry, is delayed by
// one cycle. All bits are then aligned 4N-2 cycles after the operands
// entered the array. As this design's own choice, a final register holds
// the aligned word, so the product appears on m 4N-1 cycles after the
// operands, the latency published for the array multiplier.
module arr_result_sync #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [2*N-1:0] m_raw,
  output logic [2*N-1:0] m
);

  logic [2*N-1:0] m_aligned;

  // Row of the output cell for bit k: bits below N-1 come from row k, the
  // rest from the bottom row.
  function automatic int unsigned out_row(input int unsigned k);
    return (k < N-1) ? k : N-1;
  endfunction

  for (genvar k = 0; k < 2*N-1; k++) begin : g_sum_bit
    delay_line #(.WIDTH(1), .DEPTH(4*(N-1) - 2*out_row(k) - k)) u_dly (
      .clk (clk), .rst (rst), .d (m_raw[k]), .q (m_aligned[k])
    );
  end

  delay_line #(.WIDTH(1), .DEPTH(1)) u_msb_dly (
    .clk (clk), .rst (rst), .d (m_raw[2*N-1]), .q (m_aligned[2*N-1])
  );

  always_ff @(posedge clk) begin
    if (rst) m <= '0;
    else     m <= m_aligned;
  end

endmodule
