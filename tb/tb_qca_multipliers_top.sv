// tb_qca_multipliers_top: end-to-end test of both multipliers at their
// default width (16 bits), driven at the same time through the top level.
//   - Array multiplier: random operand pairs every cycle with random bubbles
//     in arr_in_valid; each product must appear 4N-1 = 63 cycles later.
//   - Serial-parallel multiplier: start raised at random; accepted starts
//     must give their product 3N+2 = 50 cycles later, ready must return
//     every 2N = 32 cycles, starts while busy must be ignored.
// Mechanisms counted (each must occur): array products on consecutive
// cycles (full throughput), array pipeline bubbles, serial-parallel starts
// accepted back to back, serial-parallel starts ignored while busy, and
// serial-parallel idle cycles with ready high and no start.
module tb_qca_multipliers_top;
  localparam int N = 16;
  localparam int LA = 4*N - 1;
  localparam int LS = 3*N + 2;
  localparam int NCYC = 3000;
  logic clk = 0, rst = 1;

  logic           arr_in_valid, arr_out_valid, sp_start, sp_ready, sp_out_valid;
  logic [N-1:0]   arr_a, arr_b, sp_a, sp_b;
  logic [2*N-1:0] arr_m, sp_m;

  logic [2*N:0]   ha [NCYC];         // {valid, a, b} of the array unit
  logic           ev [NCYC + LS];    // expected serial-parallel out_valid
  logic [2*N-1:0] ep [NCYC + LS];
  int last_acc = -1000;
  int arr_prods = 0, arr_b2b = 0, arr_bubbles = 0;
  int sp_prods = 0, sp_b2b = 0, sp_ignored = 0, sp_idle = 0;
  logic prev_ov = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  qca_multipliers_top dut (.*);

  task automatic chk(input string what, input logic ok, input int t);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d %s", t, what); end
  endtask

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NCYC + LS; t++) begin ev[t] = 0; ep[t] = '0; end
    {arr_in_valid, arr_a, arr_b} = '0;
    {sp_start, sp_a, sp_b} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      ha[t] = (t < NCYC - LA) ? {($urandom_range(4) != 0), N'($urandom), N'($urandom)} : '0;
      {arr_in_valid, arr_a, arr_b} = ha[t];
      sp_start = (t < NCYC - LS) && ($urandom_range(2) != 0);
      sp_a = N'($urandom); sp_b = N'($urandom);
      #1;
      // array multiplier
      if (t >= LA) begin
        chk("arr_out_valid", arr_out_valid == ha[t-LA][2*N], t);
        if (arr_out_valid) begin
          chk($sformatf("arr_m %h", arr_m),
              arr_m == (2*N)'(ha[t-LA][2*N-1:N]) * (2*N)'(ha[t-LA][N-1:0]), t);
          arr_prods++;
          if (prev_ov) arr_b2b++;
        end else if (ha[t-LA][2*N] == 1'b0) arr_bubbles++;
        prev_ov = arr_out_valid;
      end
      // serial-parallel multiplier
      chk("sp_ready", sp_ready == (t - last_acc >= 2*N), t);
      chk("sp_out_valid", sp_out_valid == ev[t], t);
      if (ev[t]) begin
        chk($sformatf("sp_m %h expected %h", sp_m, ep[t]), sp_m == ep[t], t);
        sp_prods++;
      end
      if (sp_start && sp_ready) begin
        if (t - last_acc == 2*N) sp_b2b++;
        last_acc = t;
        ev[t + LS] = 1;
        ep[t + LS] = (2*N)'(sp_a) * (2*N)'(sp_b);
      end else if (sp_start) sp_ignored++;
      else if (sp_ready) sp_idle++;
      @(negedge clk);
    end
    $display("array: %0d products, %0d back to back, %0d bubbles", arr_prods, arr_b2b, arr_bubbles);
    $display("serial-parallel: %0d products, %0d back to back, %0d busy starts ignored, %0d idle cycles",
             sp_prods, sp_b2b, sp_ignored, sp_idle);
    chk("array full-throughput streaming seen", arr_b2b > 0, NCYC);
    chk("array bubbles seen", arr_bubbles > 0, NCYC);
    chk("serial-parallel back-to-back starts seen", sp_b2b > 0, NCYC);
    chk("serial-parallel busy starts seen", sp_ignored > 0, NCYC);
    chk("serial-parallel idle cycles seen", sp_idle > 0, NCYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
