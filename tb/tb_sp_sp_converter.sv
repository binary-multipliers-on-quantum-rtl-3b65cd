// tb_sp_sp_converter: checks the serial-to-parallel product converter at
// the default width. A random bit stream is shifted in and capture is
// pulsed at random. After a capture in cycle c, m must hold the 2N most
// recent stream bits of cycles c-2N+1 .. c (the bit of cycle c as MSB) from
// cycle c+1 until the next capture, and m_valid must be set exactly in the
// cycles that follow a capture.
module tb_sp_sp_converter;
  localparam int N = 16;
  localparam int NCYC = 1000;
  logic clk = 0, rst = 1;
  logic m_ser, capture, m_valid;
  logic [2*N-1:0] m;
  logic hs [NCYC];
  logic [2*N-1:0] exp_m;
  logic exp_valid;
  int caps = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sp_sp_converter dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_ser = 0; capture = 0;
    exp_m = '0; exp_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      m_ser = 1'($urandom);
      hs[t] = m_ser;
      capture = (t >= 2*N) && ($urandom_range(15) == 0);
      #1;
      checks += 2;
      if (m_valid !== exp_valid) begin failures++; $display("FAIL cycle %0d m_valid", t); end
      if (m !== exp_m) begin failures++; $display("FAIL cycle %0d m=%h expected %h", t, m, exp_m); end
      exp_valid = capture;
      if (capture) begin
        caps++;
        for (int k = 0; k < 2*N; k++) exp_m[k] = hs[t - (2*N-1-k)];
      end
      @(negedge clk);
    end
    checks++;
    if (caps < 10) begin failures++; $display("FAIL too few captures"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
