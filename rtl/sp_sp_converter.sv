// sp_sp_converter: serial-to-parallel converter for the product of the
// serial-parallel multiplier.
//
// A (2N-1)-bit right-shift register takes one product bit per cycle, LSB first,
// from the right end of the cell chain. capture marks the cycle in which
// the MSB m_{2N-1} is on m_ser; at the end of that cycle the whole word,
// the MSB included, is copied to the output register m, which holds it
// until the next capture, and m_valid pulses for one cycle. Only the
// function of the converter is published; the shift register with a
// separate output register is this design's choice. Synchronous
// active-high reset.
module sp_sp_converter #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           m_ser,
  input  logic           capture,
  output logic [2*N-1:0] m,
  output logic           m_valid
);

  logic [2*N-2:0] shreg;       // the 2N-1 most recent bits
  logic [2*N-1:0] shreg_next;  // those bits plus the one on m_ser

  always_comb shreg_next = {m_ser, shreg};

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg   <= '0;
      m       <= '0;
      m_valid <= 1'b0;
    end else begin
      shreg   <= shreg_next[2*N-1:1];
      m_valid <= capture;
      if (capture) m <= shreg_next;
    end
  end

endmodule
