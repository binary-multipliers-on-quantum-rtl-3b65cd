// tb_arr_core: checks the N x N cell lattice at the default width.
// The testbench itself skews a stream of random operand pairs (one pair per
// cycle, a_i delayed i cycles, b_j delayed 3j cycles) and checks every raw
// result bit at its own cycle: bit k of the product of the pair that
// entered in cycle p must be on m_raw[k] in cycle p + T(k), with
// T(k) = 3k+2 for k < N-1, k+2N for N-1 <= k <= 2N-2, and 4N-3 for the MSB.
module tb_arr_core;
  localparam int N = 16;
  localparam int NCYC = 300;
  logic clk = 0, rst = 1;
  logic [N-1:0] a_skew, b_skew;
  logic [2*N-1:0] m_raw;
  logic [N-1:0] ha [NCYC];
  logic [N-1:0] hb [NCYC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arr_core dut (.*);

  function automatic int raw_time(input int k);
    if (k < N-1)      return 3*k + 2;
    else if (k < 2*N-1) return k + 2*N;
    else              return 4*N - 3;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] prod;
    a_skew = '0; b_skew = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      ha[t] = N'($urandom); hb[t] = N'($urandom);
      for (int k = 0; k < N; k++) begin
        a_skew[k] = (t >= k)   ? ha[t-k][k]   : 1'b0;
        b_skew[k] = (t >= 3*k) ? hb[t-3*k][k] : 1'b0;
      end
      #1;
      for (int k = 0; k < 2*N; k++) begin
        int p;
        p = t - raw_time(k);
        if (p >= 0) begin
          prod = (2*N)'(ha[p]) * (2*N)'(hb[p]);
          checks++;
          if (m_raw[k] !== prod[k]) begin
            failures++;
            $display("FAIL cycle %0d m_raw[%0d]=%0b expected %0b", t, k, m_raw[k], prod[k]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
