// tb_sp_ps_converter: checks the parallel-to-serial converter for A at the
// default width. Words are loaded at random moments, sometimes before the
// previous word has been shifted out. After a load in cycle c, a_ser in
// cycle c+1+i must be a_i for i < N and 0 afterwards, until the next load.
module tb_sp_ps_converter;
  localparam int N = 16;
  localparam int NCYC = 1000;
  logic clk = 0, rst = 1;
  logic load, a_ser;
  logic [N-1:0] a;
  logic [N-1:0] last_a;
  int last_load, loads = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sp_ps_converter dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    load = 0; a = '0;
    last_load = -1000; last_a = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      // expected output of this cycle, from loads of earlier cycles
      if (t - last_load - 1 < N) exp = last_a[t - last_load - 1];
      else                       exp = 1'b0;
      load = ($urandom_range(24) == 0);
      a = N'($urandom);
      #1;
      checks++;
      if (a_ser !== exp) begin
        failures++; $display("FAIL cycle %0d a_ser=%0b expected %0b", t, a_ser, exp);
      end
      if (load) begin last_load = t; last_a = a; loads++; end
      @(negedge clk);
    end
    checks++;
    if (loads < 10) begin failures++; $display("FAIL too few loads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
