// tb_array_multiplier: end-to-end check of the pipelined array multiplier
// at two widths, both streaming one operand pair per clock:
//   - N = 16 (default): corner values, then random operands with random
//     gaps in in_valid;
//   - N = 3: all 64 operand pairs back to back (exhaustive), then random.
// In every cycle t, out_valid must equal in_valid of cycle t - (4N-1) and,
// when set, m must equal the integer product of that cycle's operands. This
// checks the latency of 4N-1 cycles and the throughput of one product per
// cycle; the testbench counts cycles with back-to-back valid products.
module tb_array_multiplier;
  localparam int NB = 16, NS = 3;
  localparam int LB = 4*NB - 1, LS = 4*NS - 1;
  localparam int NCYC = 600;
  logic clk = 0, rst = 1;

  logic           vb, vb_o, vs, vs_o;
  logic [NB-1:0]  ab, bb;
  logic [NS-1:0]  as_, bs;
  logic [2*NB-1:0] mb;
  logic [2*NS-1:0] ms;

  logic [2*NB:0] hb [NCYC];   // {valid, a, b}
  logic [2*NS:0] hs [NCYC];
  int checks = 0, failures = 0, b2b_big = 0, b2b_small = 0;
  logic prev_vb = 0, prev_vs = 0;

  always #5 clk = ~clk;

  array_multiplier dut_big (
    .clk(clk), .rst(rst), .in_valid(vb), .a(ab), .b(bb), .out_valid(vb_o), .m(mb)
  );
  array_multiplier #(.N(NS)) dut_small (
    .clk(clk), .rst(rst), .in_valid(vs), .a(as_), .b(bs), .out_valid(vs_o), .m(ms)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {vb, ab, bb} = '0;
    {vs, as_, bs} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      // wide unit
      if (t == 0)      hb[t] = {1'b1, {NB{1'b1}}, {NB{1'b1}}};
      else if (t == 1) hb[t] = {1'b1, {NB{1'b1}}, NB'(1)};
      else if (t == 2) hb[t] = {1'b1, NB'(0), {NB{1'b1}}};
      else if (t < NCYC - LB) hb[t] = {($urandom_range(3) != 0), NB'($urandom), NB'($urandom)};
      else             hb[t] = '0;
      // narrow unit: exhaustive first
      if (t < 64)      hs[t] = {1'b1, 6'(t)};
      else if (t < NCYC - LS) hs[t] = {($urandom_range(3) != 0), 6'($urandom)};
      else             hs[t] = '0;
      {vb, ab, bb} = hb[t];
      {vs, as_, bs} = hs[t];
      #1;
      if (t >= LB) begin
        logic [2*NB-1:0] p;
        p = (2*NB)'(hb[t-LB][2*NB-1:NB]) * (2*NB)'(hb[t-LB][NB-1:0]);
        checks++;
        if (vb_o !== hb[t-LB][2*NB]) begin
          failures++; $display("FAIL N=16 cycle %0d out_valid=%0b", t, vb_o);
        end else if (vb_o) begin
          checks++;
          if (mb !== p) begin
            failures++; $display("FAIL N=16 cycle %0d m=%h expected %h", t, mb, p);
          end
        end
        if (vb_o && prev_vb) b2b_big++;
        prev_vb = vb_o;
      end
      if (t >= LS) begin
        logic [2*NS-1:0] p;
        p = (2*NS)'(hs[t-LS][2*NS-1:NS]) * (2*NS)'(hs[t-LS][NS-1:0]);
        checks++;
        if (vs_o !== hs[t-LS][2*NS]) begin
          failures++; $display("FAIL N=3 cycle %0d out_valid=%0b", t, vs_o);
        end else if (vs_o) begin
          checks++;
          if (ms !== p) begin
            failures++; $display("FAIL N=3 cycle %0d m=%h expected %h", t, ms, p);
          end
        end
        if (vs_o && prev_vs) b2b_small++;
        prev_vs = vs_o;
      end
      @(negedge clk);
    end
    $display("back-to-back products: N=16 %0d, N=3 %0d", b2b_big, b2b_small);
    checks++;
    if (b2b_big == 0 || b2b_small < 63) begin
      failures++; $display("FAIL throughput of one product per cycle never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
