// sp_ps_converter: parallel-to-serial converter for operand A of the
// serial-parallel multiplier.
//
// A loadable right-shift register: load captures the N-bit word, after
// which a_ser carries a_0, a_1, ... a_{N-1} in the N cycles following the
// load cycle and then zeros, since zeros are shifted in from the top. Those
// trailing zeros are the extra zero operand bits the multiplier needs to
// push its carries out. The shift-register form is this design's choice;
// only the converter's function is published. Synchronous active-high reset.
module sp_ps_converter #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [N-1:0] a,
  output logic         a_ser
);

  logic [N-1:0] shreg;

  always_ff @(posedge clk) begin
    if (rst)       shreg <= '0;
    else if (load) shreg <= a;
    else           shreg <= shreg >> 1;
  end

  assign a_ser = shreg[0];

endmodule
