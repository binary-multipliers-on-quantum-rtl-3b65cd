// mult_width_check: testbench helper that exercises one multiplier at one
// operand width N. Unit 0 is array_multiplier (a new random operand pair
// every cycle, product expected 4N-1 cycles later), unit 1 is
// serial_parallel_multiplier (started whenever ready, product expected
// 3N+2 cycles after the start). The first operand pair is all ones times
// all ones. NPROD products are checked against integer multiplication;
// checks and failures count the comparisons, done rises at the end.
module mult_width_check #(
  parameter int N      = 8,
  parameter bit SERIAL = 1'b0,
  parameter int NPROD  = 20
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int LAT = SERIAL ? 3*N + 2 : 4*N - 1;

  logic           go, ready, out_valid;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] m;
  logic [2*N-1:0] expq [$];
  int             due  [$];

  if (SERIAL) begin : g_sp
    serial_parallel_multiplier #(.N(N)) dut (
      .clk(clk), .rst(rst), .start(go), .a(a), .b(b),
      .ready(ready), .out_valid(out_valid), .m(m)
    );
  end else begin : g_arr
    assign ready = 1'b1;
    array_multiplier #(.N(N)) dut (
      .clk(clk), .rst(rst), .in_valid(go), .a(a), .b(b),
      .out_valid(out_valid), .m(m)
    );
  end

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] w;
    for (int k = 0; k < N; k += 32) w = (w << 32) | N'($urandom);
    return w;
  endfunction

  initial begin
    int issued, seen;
    checks = 0; failures = 0; done = 0;
    go = 0; a = '0; b = '0;
    issued = 0; seen = 0;
    @(negedge rst);
    for (int t = 0; seen < NPROD && t < NPROD * (LAT + 4*N + 4); t++) begin
      @(negedge clk);
      go = 0;
      if (issued < NPROD && ready) begin
        a  = (issued == 0) ? '1 : rand_word();
        b  = (issued == 0) ? '1 : rand_word();
        go = 1'b1;
        expq.push_back((2*N)'(a) * (2*N)'(b));
        due.push_back(t + LAT);
        issued++;
      end
      #1;
      if (out_valid) begin
        checks++;
        if (due.size() == 0 || due[0] != t || m !== expq[0]) begin
          failures++;
          $display("FAIL N=%0d %s cycle %0d m=%h", N, SERIAL ? "serial" : "array", t, m);
        end
        if (due.size() != 0) begin void'(due.pop_front()); void'(expq.pop_front()); end
        seen++;
      end else if (due.size() != 0 && due[0] <= t) begin
        checks++; failures++;
        $display("FAIL N=%0d %s cycle %0d product missing", N, SERIAL ? "serial" : "array", t);
        void'(due.pop_front()); void'(expq.pop_front());
        seen++;
      end
    end
    checks++;
    if (seen != NPROD) begin
      failures++; $display("FAIL N=%0d only %0d products", N, seen);
    end
    done = 1'b1;
  end

endmodule
