// tb_arr_mult_cell: random stimulus for one array multiplier cell.
// Every cycle new random a_in, b_in, s_in, c_in are applied. The outputs in
// cycle t are compared with a reference computed from the inputs of earlier
// cycles: s_out = bit 0 of a*b + s + c from cycle t-2, c_out = bit 1 of it
// from cycle t-1, a_out = a_in of cycle t-3, b_out = b_in of cycle t-1.
module tb_arr_mult_cell;
  localparam int NCYC = 400;
  logic clk = 0, rst = 1;
  logic a_in, b_in, s_in, c_in, a_out, b_out, s_out, c_out;
  logic [3:0] hist [NCYC];   // {a, b, s, c} applied in each cycle
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arr_mult_cell dut (.*);

  function automatic logic [1:0] ref_add(input logic [3:0] v);
    return 2'(int'(v[3] & v[2]) + int'(v[1]) + int'(v[0]));
  endfunction

  task automatic check(input string what, input logic got, input logic exp, input int t);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s got %0b expected %0b", t, what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a_in, b_in, s_in, c_in} = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NCYC; t++) begin
      hist[t] = 4'($urandom);
      {a_in, b_in, s_in, c_in} = hist[t];
      #1;
      if (t >= 2) check("s_out", s_out, ref_add(hist[t-2])[0], t);
      if (t >= 1) check("c_out", c_out, ref_add(hist[t-1])[1], t);
      if (t >= 3) check("a_out", a_out, hist[t-3][3], t);
      if (t >= 1) check("b_out", b_out, hist[t-1][2], t);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
