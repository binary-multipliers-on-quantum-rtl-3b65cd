// sp_b_distribution: distribution wiring of operand B in the
// serial-parallel multiplier.
//
// B comes from one compact bus, but chain cell k starts its share of a
// product k cycles after cell 0, so its bit b_{N-1-k} is delayed by k
// cycles. A holding register, loaded by load, keeps B steady between loads
// (this register is this design's choice); each bit then passes its own
// delay line. Result: b_dist[k] = b_{N-1-k} as loaded, from k+1 cycles after
// the load cycle until k+1 cycles after the next load. Synchronous
// active-high reset.
module sp_b_distribution #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [N-1:0] b,
  output logic [N-1:0] b_dist
);

  logic [N-1:0] b_hold;

  always_ff @(posedge clk) begin
    if (rst)       b_hold <= '0;
    else if (load) b_hold <= b;
  end

  for (genvar k = 0; k < N; k++) begin : g_cell_bit
    delay_line #(.WIDTH(1), .DEPTH(k)) u_dly (
      .clk (clk), .rst (rst), .d (b_hold[N-1-k]), .q (b_dist[k])
    );
  end

endmodule
