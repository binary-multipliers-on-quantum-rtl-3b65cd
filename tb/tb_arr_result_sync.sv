// tb_arr_result_sync: checks the output delay lines of the array multiplier
// at the default width. Random raw words are applied every cycle; bit k of
// the output word in cycle t must be bit k of the raw word of cycle
// t - (4N-1 - T(k)), where T(k) is the cycle at which the array delivers
// bit k (3k+2, k+2N or 4N-3, see arr_core): every bit ends up 4N-1 cycles
// after its operands.
module tb_arr_result_sync;
  localparam int N = 16;
  localparam int NCYC = 300;
  logic clk = 0, rst = 1;
  logic [2*N-1:0] m_raw, m;
  logic [2*N-1:0] hr [NCYC];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arr_result_sync dut (.*);

  function automatic int raw_time(input int k);
    if (k < N-1)        return 3*k + 2;
    else if (k < 2*N-1) return k + 2*N;
    else                return 4*N - 3;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_raw = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      hr[t] = {$urandom, $urandom};
      m_raw = hr[t];
      #1;
      for (int k = 0; k < 2*N; k++) begin
        int s;
        s = t - (4*N - 1 - raw_time(k));
        if (s >= 0) begin
          checks++;
          if (m[k] !== hr[s][k]) begin
            failures++;
            $display("FAIL cycle %0d m[%0d]", t, k);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
