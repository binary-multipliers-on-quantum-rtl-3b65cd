// tb_sp_b_distribution: checks the distribution wiring of operand B at the
// default width. B is loaded at random moments; the testbench records the
// held word of every cycle (the last B loaded in an earlier cycle) and
// expects b_dist[k] in cycle t to be bit N-1-k of the word held in cycle
// t-k.
module tb_sp_b_distribution;
  localparam int N = 16;
  localparam int NCYC = 1000;
  logic clk = 0, rst = 1;
  logic load;
  logic [N-1:0] b, b_dist;
  logic [N-1:0] held [NCYC];
  logic [N-1:0] cur;
  int loads = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sp_b_distribution dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; b = '0; cur = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      held[t] = cur;
      load = ($urandom_range(20) == 0);
      b = N'($urandom);
      #1;
      for (int k = 0; k < N; k++) begin
        logic exp;
        exp = (t >= k) ? held[t-k][N-1-k] : 1'b0;
        checks++;
        if (b_dist[k] !== exp) begin
          failures++; $display("FAIL cycle %0d b_dist[%0d]", t, k);
        end
      end
      if (load) begin cur = b; loads++; end
      @(negedge clk);
    end
    checks++;
    if (loads < 10) begin failures++; $display("FAIL too few loads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
