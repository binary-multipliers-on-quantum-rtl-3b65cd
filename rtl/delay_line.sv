// delay_line: WIDTH-bit shift register of DEPTH stages.
//
// Models a QCA wire segment that spans DEPTH clock cycles (DEPTH successive
// four-phase clock zone groups). DEPTH = 0 gives a plain wire. Every stage is
// cleared by the synchronous active-high reset. Output = input delayed by
// exactly DEPTH rising clock edges. With DEPTH = 0, clk and rst are unused
// and lint reports them; that is expected.
module delay_line #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [WIDTH-1:0] stage [DEPTH];

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int unsigned s = 0; s < DEPTH; s++) stage[s] <= '0;
      end else begin
        stage[0] <= d;
        for (int unsigned s = 1; s < DEPTH; s++) stage[s] <= stage[s-1];
      end
    end

    assign q = stage[DEPTH-1];
  end

endmodule
