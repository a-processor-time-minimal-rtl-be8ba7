// tb_ptm_array: self-checking test of the cylindrical array at n = 6 (even,
// plain cylinder), n = 5 and n = 7 (odd, skewed wrap) and n = 2 (smallest).
module tb_ptm_array;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c6, f6, c5, f5, c7, f7, c2, f2;
  logic d6, d5, d7, d2;
  int checks, failures;

  ptm_array_run #(.N(6), .REPS(4)) u6 (.clk(clk), .checks(c6), .failures(f6), .finished(d6));
  ptm_array_run #(.N(5), .REPS(4)) u5 (.clk(clk), .checks(c5), .failures(f5), .finished(d5));
  ptm_array_run #(.N(7), .REPS(3)) u7 (.clk(clk), .checks(c7), .failures(f7), .finished(d7));
  ptm_array_run #(.N(2), .REPS(3)) u2 (.clk(clk), .checks(c2), .failures(f2), .finished(d2));

  initial begin
    @(posedge clk);
    wait (d6 && d5 && d7 && d2);
    checks = c6 + c5 + c7 + c2;
    failures = f6 + f5 + f7 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c6 + c5 + c7 + c2, f6 + f5 + f7 + f2 + 1);
    $finish;
  end
endmodule
