// tb_tsd_array_sizes: the adder at three other array shapes (1 x 1 x 1,
// 4 x 3 x 8 and 2 x 5 x 12 numbers x digits). With random operands issued every
// cycle, each result must equal the sum of its operands and arrive exactly
// 2 cycles after it was applied, whatever the size.
module tb_tsd_array_sizes;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  tsd_size_check #(.M(1), .N(1), .ND(1))  u_small  (.clk(clk));
  tsd_size_check #(.M(4), .N(3), .ND(8))  u_medium (.clk(clk));
  tsd_size_check #(.M(2), .N(5), .ND(12)) u_wide   (.clk(clk));

  initial begin
    wait (u_small.done && u_medium.done && u_wide.done);
    checks   = u_small.checks + u_medium.checks + u_wide.checks;
    failures = u_small.failures + u_medium.failures + u_wide.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
