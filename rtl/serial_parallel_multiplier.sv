// serial_parallel_multiplier: complete N-bit serial-parallel (carry delay)
// multiplier with its format converters, M = A * B.
//
// A linear chain of N cells (sp_chain) holds the parallel operand B, one bit
// per cell, while A is fed through it bit-serially, LSB first, followed by N
// zeros; each cycle the chain adds one row of the paper-and-pencil product
// and the product leaves the right end bit-serially. Around the chain:
// sp_ps_converter turns A into the serial stream, sp_b_distribution holds B
// and delays each bit to the cycle its cell starts, and sp_sp_converter
// gathers the serial product into the parallel word M.
//
// Interface and timing: when ready is high, start samples a and b (start
// while not ready is ignored). ready returns 2N cycles after an accepted
// start (throughput one product per 2N cycles). m_0 enters the output
// converter N+3 cycles after the start cycle; the full product is on m, with
// out_valid pulsing, 3N+2 cycles after it (11 for N = 3, 50 for N = 16),
// and m holds it until the next product. Latencies and throughput are the
// published ones; the start/ready handshake and the synchronous active-high
// reset are this design's choices.
module serial_parallel_multiplier #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           ready,
  output logic           out_valid,
  output logic [2*N-1:0] m
);

  localparam int unsigned PERIOD   = 2*N;     // cycles per product
  localparam int unsigned CAPTURE  = 3*N + 1; // start -> MSB on the serial output
  localparam int unsigned CNT_W    = $clog2(PERIOD) + 1;

  logic [CNT_W-1:0] busy_cnt;
  logic             accept;
  logic             a_ser, m_ser, capture;
  logic [N-1:0]     b_dist;

  assign ready  = (busy_cnt == '0);
  assign accept = start && ready;

  always_ff @(posedge clk) begin
    if (rst)                busy_cnt <= '0;
    else if (accept)        busy_cnt <= CNT_W'(PERIOD - 1);
    else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1'b1;
  end

  sp_ps_converter #(.N(N)) u_a_conv (
    .clk (clk), .rst (rst), .load (accept), .a (a), .a_ser (a_ser)
  );

  sp_b_distribution #(.N(N)) u_b_dist (
    .clk (clk), .rst (rst), .load (accept), .b (b), .b_dist (b_dist)
  );

  sp_chain #(.N(N)) u_chain (
    .clk (clk), .rst (rst), .a_ser (a_ser), .b_dist (b_dist), .m_ser (m_ser)
  );

  delay_line #(.WIDTH(1), .DEPTH(CAPTURE)) u_capture (
    .clk (clk), .rst (rst), .d (accept), .q (capture)
  );

  sp_sp_converter #(.N(N)) u_m_conv (
    .clk (clk), .rst (rst), .m_ser (m_ser), .capture (capture),
    .m (m), .m_valid (out_valid)
  );

  // A start is only honoured when the previous product has cleared the
  // chain entrance.
  a_period : assert property (@(posedge clk) disable iff (rst)
    accept |=> !ready [*PERIOD-1]);

endmodule
