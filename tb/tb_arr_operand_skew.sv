// tb_arr_operand_skew: checks the operand delay lines of the array
// multiplier at the default width. Random words are applied every cycle;
// in cycle t, a_skew[i] must equal bit i of the A applied in cycle t-i and
// b_skew[j] bit j of the B applied in cycle t-3j.
module tb_arr_operand_skew;
  localparam int N = 16;
  localparam int NCYC = 200;
  logic clk = 0, rst = 1;
  logic [N-1:0] a, b, a_skew, b_skew;
  logic [N-1:0] ha [NCYC];
  logic [N-1:0] hb [NCYC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arr_operand_skew dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      ha[t] = N'($urandom); hb[t] = N'($urandom);
      a = ha[t]; b = hb[t];
      #1;
      for (int k = 0; k < N; k++) begin
        if (t >= k) begin
          checks++;
          if (a_skew[k] !== ha[t-k][k]) begin
            failures++; $display("FAIL cycle %0d a_skew[%0d]", t, k);
          end
        end
        if (t >= 3*k) begin
          checks++;
          if (b_skew[k] !== hb[t-3*k][k]) begin
            failures++; $display("FAIL cycle %0d b_skew[%0d]", t, k);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
