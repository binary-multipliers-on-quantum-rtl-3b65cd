// tb_serial_parallel_multiplier: end-to-end check of the serial-parallel
// multiplier at two widths:
//   - N = 16 (default): corner values, then random operands;
//   - N = 3: all 64 operand pairs, then random ones.
// start is raised at random, also while the unit is busy (those starts must
// be ignored), and often in the very cycle ready returns (back to back).
// Checked for each accepted start in cycle c: ready is low for the next
// 2N-1 cycles and high again in cycle c+2N; out_valid pulses in cycle
// c+3N+2 and m then equals the product. out_valid must not pulse otherwise.
// The LSB latency is checked too: in cycle c+N+3 the newest bit in the
// output converter's shift register must be m_0 of that product.
module tb_serial_parallel_multiplier;
  localparam int NB = 16, NS = 3;
  localparam int NCYC = 5000;
  logic clk = 0, rst = 1;

  logic st_b, rdy_b, ov_b, st_s, rdy_s, ov_s;
  logic [NB-1:0]   ab, bb;
  logic [NS-1:0]   as_, bs;
  logic [2*NB-1:0] mb;
  logic [2*NS-1:0] ms;

  // expected out_valid and product per cycle
  logic            ev_b [NCYC + 100];
  logic [2*NB-1:0] ep_b [NCYC + 100];
  logic            ev_s [NCYC + 100];
  logic [2*NS-1:0] ep_s [NCYC + 100];
  logic            el_b [NCYC + 100];   // expected LSB arrival, N+3 after start
  logic            lb_b [NCYC + 100];
  logic            el_s [NCYC + 100];
  logic            lb_s [NCYC + 100];
  int last_acc_b = -1000, last_acc_s = -1000;
  int acc_b = 0, acc_s = 0, ign_b = 0, ign_s = 0, b2b_b = 0, b2b_s = 0, exh = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_parallel_multiplier dut_big (
    .clk(clk), .rst(rst), .start(st_b), .a(ab), .b(bb), .ready(rdy_b), .out_valid(ov_b), .m(mb)
  );
  serial_parallel_multiplier #(.N(NS)) dut_small (
    .clk(clk), .rst(rst), .start(st_s), .a(as_), .b(bs), .ready(rdy_s), .out_valid(ov_s), .m(ms)
  );

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
    for (int t = 0; t < NCYC + 100; t++) begin
      ev_b[t] = 0; ep_b[t] = '0; ev_s[t] = 0; ep_s[t] = '0;
      el_b[t] = 0; lb_b[t] = 0; el_s[t] = 0; lb_s[t] = 0;
    end
    st_b = 0; ab = '0; bb = '0; st_s = 0; as_ = '0; bs = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      // stimulus; no new starts near the end so every product is checked
      st_b = (t < NCYC - 4*NB) && ($urandom_range(3) != 0);
      ab = (acc_b == 0) ? '1 : (acc_b == 1) ? '0 : NB'($urandom);
      bb = (acc_b == 0) ? '1 : NB'($urandom);
      st_s = (t < NCYC - 4*NS) && ($urandom_range(3) != 0);
      {as_, bs} = (exh < 64) ? 6'(exh) : 6'($urandom);
      #1;
      // ready must follow the 2N-cycle period
      chk("ready N=16", rdy_b == (t - last_acc_b >= 2*NB), t);
      chk("ready N=3",  rdy_s == (t - last_acc_s >= 2*NS), t);
      // outputs
      chk("out_valid N=16", ov_b == ev_b[t], t);
      if (ev_b[t]) chk($sformatf("m N=16 %h expected %h", mb, ep_b[t]), mb == ep_b[t], t);
      chk("out_valid N=3", ov_s == ev_s[t], t);
      if (ev_s[t]) chk($sformatf("m N=3 %h expected %h", ms, ep_s[t]), ms == ep_s[t], t);
      if (el_b[t]) chk("LSB latency N=16", dut_big.u_m_conv.shreg[2*NB-2] == lb_b[t], t);
      if (el_s[t]) chk("LSB latency N=3", dut_small.u_m_conv.shreg[2*NS-2] == lb_s[t], t);
      // bookkeeping of accepted and ignored starts
      if (st_b) begin
        if (rdy_b) begin
          if (t - last_acc_b == 2*NB) b2b_b++;
          last_acc_b = t; acc_b++;
          ev_b[t + 3*NB + 2] = 1;
          ep_b[t + 3*NB + 2] = (2*NB)'(ab) * (2*NB)'(bb);
          el_b[t + NB + 3] = 1;
          lb_b[t + NB + 3] = ab[0] & bb[0];
        end else ign_b++;
      end
      if (st_s) begin
        if (rdy_s) begin
          if (t - last_acc_s == 2*NS) b2b_s++;
          last_acc_s = t; acc_s++; exh++;
          ev_s[t + 3*NS + 2] = 1;
          ep_s[t + 3*NS + 2] = (2*NS)'(as_) * (2*NS)'(bs);
          el_s[t + NS + 3] = 1;
          lb_s[t + NS + 3] = as_[0] & bs[0];
        end else ign_s++;
      end
      @(negedge clk);
    end
    $display("N=16: %0d products, %0d back to back, %0d busy starts ignored", acc_b, b2b_b, ign_b);
    $display("N=3 : %0d products, %0d back to back, %0d busy starts ignored", acc_s, b2b_s, ign_s);
    chk("every mechanism seen", b2b_b > 0 && b2b_s > 0 && ign_b > 0 && ign_s > 0 && exh >= 64, NCYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
