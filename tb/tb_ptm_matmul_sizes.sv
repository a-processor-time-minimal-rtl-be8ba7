// tb_ptm_matmul_sizes: the array at the larger sizes worked through for it:
// n = 13 (odd, skewed cylinder, 127 processors), n = 14 (even, 147
// processors) and n = 20 (300 processors, 58 steps).  Each runs two products
// under ptm_mm_checker.
module tb_ptm_matmul_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;

  `define PTM_INST(NN, REPS_)                                                          \
    logic rst_n_``NN, start_``NN, busy_``NN, done_``NN, fin_``NN;                      \
    logic signed [15:0] a_``NN [NN][NN];                                               \
    logic signed [15:0] b_``NN [NN][NN];                                               \
    logic [$clog2(3*NN+1)-1:0] step_``NN;                                              \
    logic signed [39:0] c_``NN [NN][NN];                                               \
    logic cv_``NN [NN][NN];                                                            \
    logic [NN*(2*NN-1)-1:0] f_``NN;                                                    \
    int ck_``NN, fl_``NN;                                                              \
    ptm_matmul #(.N(NN)) u_dut_``NN (.clk(clk), .rst_n(rst_n_``NN), .start(start_``NN),\
      .a_mat(a_``NN), .b_mat(b_``NN), .busy(busy_``NN), .done(done_``NN),             \
      .step(step_``NN), .c_mat(c_``NN), .c_valid(cv_``NN), .pe_fire(f_``NN));          \
    ptm_mm_checker #(.N(NN), .REPS(REPS_)) u_chk_``NN (.clk(clk), .rst_n(rst_n_``NN), \
      .start(start_``NN), .a_mat(a_``NN), .b_mat(b_``NN), .busy(busy_``NN),           \
      .done(done_``NN), .step(step_``NN), .c_mat(c_``NN), .c_valid(cv_``NN),          \
      .pe_fire(f_``NN), .checks(ck_``NN), .failures(fl_``NN), .finished(fin_``NN));

  `PTM_INST(13, 2)
  `PTM_INST(14, 2)
  `PTM_INST(20, 2)

  initial begin
    @(posedge clk);
    wait (fin_13 && fin_14 && fin_20);
    checks = ck_13 + ck_14 + ck_20;
    failures = fl_13 + fl_14 + fl_20;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ck_13 + ck_14 + ck_20, fl_13 + fl_14 + fl_20 + 1);
    $finish;
  end
endmodule
