// tb_array_wide: runs the array multiplier at a 64-bit word length, a size
// used in its scaling evaluation, kept apart from tb_word_lengths because
// the 4096-cell array takes a few minutes to build for simulation. Twenty
// products (all ones times all ones, then random operands, one per cycle)
// are checked against integer multiplication at the expected cycle,
// 4N-1 = 255 cycles after their operands.
module tb_array_wide;
  logic clk = 0, rst = 1;
  int   c, f;
  logic d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mult_width_check #(.N(64), .SERIAL(0)) u_a64 (.clk, .rst, .checks(c), .failures(f), .done(d));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (d);
    @(posedge clk);
    checks = c; failures = f;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
