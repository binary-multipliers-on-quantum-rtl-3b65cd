// qca_multipliers_top: the two QCA binary multipliers side by side.
//
//   - array_multiplier: N x N pipelined array multiplier, one product per
//     clock, latency 4N-1 cycles.
//   - serial_parallel_multiplier: N-cell serial-parallel multiplier, one
//     product per 2N clocks, latency 3N+2 cycles.
// The two units share only the clock and reset; each has its own operand
// and result ports (arr_* and sp_*), with the timing described in its own
// module. Both default to 16-bit operands, the larger published layout size.
module qca_multipliers_top #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  // pipelined array multiplier
  input  logic           arr_in_valid,
  input  logic [N-1:0]   arr_a,
  input  logic [N-1:0]   arr_b,
  output logic           arr_out_valid,
  output logic [2*N-1:0] arr_m,
  // serial-parallel multiplier
  input  logic           sp_start,
  input  logic [N-1:0]   sp_a,
  input  logic [N-1:0]   sp_b,
  output logic           sp_ready,
  output logic           sp_out_valid,
  output logic [2*N-1:0] sp_m
);

  array_multiplier #(.N(N)) u_array (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (arr_in_valid),
    .a         (arr_a),
    .b         (arr_b),
    .out_valid (arr_out_valid),
    .m         (arr_m)
  );

  serial_parallel_multiplier #(.N(N)) u_serial (
    .clk       (clk),
    .rst       (rst),
    .start     (sp_start),
    .a         (sp_a),
    .b         (sp_b),
    .ready     (sp_ready),
    .out_valid (sp_out_valid),
    .m         (sp_m)
  );

endmodule
