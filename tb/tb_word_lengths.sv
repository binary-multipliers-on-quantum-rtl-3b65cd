// tb_word_lengths: runs both multipliers over a range of operand word
// lengths, the way their scaling is evaluated: the array multiplier at
// 2, 4, 8 and 32 bits and the serial-parallel multiplier at 2, 4, 8, 32,
// 64 and 128 bits (3 and 16 bits are covered by the other testbenches;
// a 64- or 128-bit array has 4096 to 16384 cells and is left out to keep
// the simulation build short). Each instance checks its products, latency
// included, against integer multiplication.
module tb_word_lengths;
  localparam int NU = 10;
  logic clk = 0, rst = 1;
  int   c [NU];
  int   f [NU];
  logic d [NU];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mult_width_check #(.N(2),   .SERIAL(0)) u_a2   (.clk, .rst, .checks(c[0]), .failures(f[0]), .done(d[0]));
  mult_width_check #(.N(4),   .SERIAL(0)) u_a4   (.clk, .rst, .checks(c[1]), .failures(f[1]), .done(d[1]));
  mult_width_check #(.N(8),   .SERIAL(0)) u_a8   (.clk, .rst, .checks(c[2]), .failures(f[2]), .done(d[2]));
  mult_width_check #(.N(32),  .SERIAL(0)) u_a32  (.clk, .rst, .checks(c[3]), .failures(f[3]), .done(d[3]));
  mult_width_check #(.N(2),   .SERIAL(1)) u_s2   (.clk, .rst, .checks(c[4]), .failures(f[4]), .done(d[4]));
  mult_width_check #(.N(4),   .SERIAL(1)) u_s4   (.clk, .rst, .checks(c[5]), .failures(f[5]), .done(d[5]));
  mult_width_check #(.N(8),   .SERIAL(1)) u_s8   (.clk, .rst, .checks(c[6]), .failures(f[6]), .done(d[6]));
  mult_width_check #(.N(32),  .SERIAL(1)) u_s32  (.clk, .rst, .checks(c[7]), .failures(f[7]), .done(d[7]));
  mult_width_check #(.N(64),  .SERIAL(1)) u_s64  (.clk, .rst, .checks(c[8]), .failures(f[8]), .done(d[8]));
  mult_width_check #(.N(128), .SERIAL(1)) u_s128 (.clk, .rst, .checks(c[9]), .failures(f[9]), .done(d[9]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int u = 0; u < NU; u++) if (!d[u]) all_done = 0;
    end while (!all_done);
    for (int u = 0; u < NU; u++) begin
      checks += c[u]; failures += f[u];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
