// tb_sp_chain: checks the chain of serial-parallel cells at the default
// width. The testbench plays the converters: products follow each other
// every 2N cycles; in phase i of a product it drives a_ser = a_i for i < N
// and 0 after, and it drives b_dist[k] = b_{N-1-k} of the product that
// started in cycle t-k. Product bit m_i of the product started in cycle c0
// must be on m_ser in cycle c0 + i + N + 1, for all 2N bits.
module tb_sp_chain;
  localparam int N = 16;
  localparam int P = 2*N;
  localparam int NOPS = 12;
  localparam int NCYC = NOPS * P;
  logic clk = 0, rst = 1;
  logic a_ser, m_ser;
  logic [N-1:0] b_dist;
  logic [N-1:0] opa [NOPS];
  logic [N-1:0] opb [NOPS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sp_chain dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NOPS; p++) begin
      opa[p] = N'($urandom); opb[p] = N'($urandom);
    end
    opa[0] = '1; opb[0] = '1;
    opa[NOPS-1] = '0;   // last slot only flushes the previous product
    a_ser = 0; b_dist = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      int u;
      a_ser = ((t % P) < N) ? opa[t / P][t % P] : 1'b0;
      for (int k = 0; k < N; k++)
        b_dist[k] = (t >= k) ? opb[(t - k) / P][N-1-k] : 1'b0;
      #1;
      u = t - N - 1;
      if (u >= 0 && u / P < NOPS - 1) begin
        logic [2*N-1:0] prod;
        prod = (2*N)'(opa[u / P]) * (2*N)'(opb[u / P]);
        checks++;
        if (m_ser !== prod[u % P]) begin
          failures++;
          $display("FAIL cycle %0d product %0d bit %0d", t, u / P, u % P);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
