// tb_ptm_matmul: end-to-end test of the matrix-product array.
//
// Three copies of the design run side by side: the default size n = 6 and the
// odd sizes n = 5 and n = 7, whose wrap-around links are skewed.  Each is
// driven and checked by ptm_mm_checker (results, 3n-2 step latency, per-step
// processor activity, mechanism counts).
module tb_ptm_matmul;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;

  `define PTM_INST(NN, REPS_, DUTP)                                                   \
    logic rst_n_``NN, start_``NN, busy_``NN, done_``NN, fin_``NN;                      \
    logic signed [15:0] a_``NN [NN][NN];                                               \
    logic signed [15:0] b_``NN [NN][NN];                                               \
    logic [$clog2(3*NN+1)-1:0] step_``NN;                                              \
    logic signed [39:0] c_``NN [NN][NN];                                               \
    logic cv_``NN [NN][NN];                                                            \
    logic [NN*(2*NN-1)-1:0] f_``NN;                                                    \
    int ck_``NN, fl_``NN;                                                              \
    ptm_matmul DUTP u_dut_``NN (.clk(clk), .rst_n(rst_n_``NN), .start(start_``NN),    \
      .a_mat(a_``NN), .b_mat(b_``NN), .busy(busy_``NN), .done(done_``NN),             \
      .step(step_``NN), .c_mat(c_``NN), .c_valid(cv_``NN), .pe_fire(f_``NN));          \
    ptm_mm_checker #(.N(NN), .REPS(REPS_)) u_chk_``NN (.clk(clk), .rst_n(rst_n_``NN), \
      .start(start_``NN), .a_mat(a_``NN), .b_mat(b_``NN), .busy(busy_``NN),           \
      .done(done_``NN), .step(step_``NN), .c_mat(c_``NN), .c_valid(cv_``NN),          \
      .pe_fire(f_``NN), .checks(ck_``NN), .failures(fl_``NN), .finished(fin_``NN));

  `PTM_INST(6, 4, )
  `PTM_INST(5, 4, #(.N(5)))
  `PTM_INST(7, 3, #(.N(7)))

  initial begin
    @(posedge clk);
    wait (fin_6 && fin_5 && fin_7);
    checks = ck_6 + ck_5 + ck_7;
    failures = fl_6 + fl_5 + fl_7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ck_6 + ck_5 + ck_7, fl_6 + fl_5 + fl_7 + 1);
    $finish;
  end
endmodule
