// tb_sp_mult_cell: random stimulus for one serial-parallel multiplier cell.
// The testbench keeps its own carry: each cycle it adds (a AND b) + s_in +
// carry as integers, keeps bit 1 as the next carry and expects bit 0 on
// s_out two cycles later; a_out must repeat a_in one cycle later.
module tb_sp_mult_cell;
  localparam int NCYC = 400;
  logic clk = 0, rst = 1;
  logic a_in, b, s_in, a_out, s_out;
  logic ha [NCYC];
  logic hs [NCYC];          // expected sum of each cycle
  logic carry_ref;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sp_mult_cell dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] tot;
    {a_in, b, s_in} = '0;
    carry_ref = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      {a_in, b, s_in} = 3'($urandom);
      ha[t] = a_in;
      tot = 2'(int'(a_in & b) + int'(s_in) + int'(carry_ref));
      hs[t] = tot[0];
      carry_ref = tot[1];
      #1;
      if (t >= 2) begin
        checks++;
        if (s_out !== hs[t-2]) begin failures++; $display("FAIL cycle %0d s_out", t); end
      end
      if (t >= 1) begin
        checks++;
        if (a_out !== ha[t-1]) begin failures++; $display("FAIL cycle %0d a_out", t); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
