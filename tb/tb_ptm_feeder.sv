// tb_ptm_feeder: self-checking test of the step controller and input schedule.
//
// For n = 6 with random matrices it checks, cycle by cycle, that start gives
// one clear pulse, that busy lasts exactly 3n-2 steps with step counting
// 1 .. 3n-2, that done rises after the last step, and that in step t every
// edge input carries a(i, t-i+1) and b(t-j+1, j) with the right tags, or
// nothing outside 1 <= k <= n.  A start while busy must be ignored.
module tb_ptm_feeder;
  import ptm_pkg::*;

  localparam int N = 6;
  localparam int DATA_W = 16;
  localparam int STEP_W = $clog2(3 * N + 1);

  logic clk = 1'b0;
  logic rst_n, start, clear, busy, done;
  logic signed [DATA_W-1:0] a_mat [N][N];
  logic signed [DATA_W-1:0] b_mat [N][N];
  a_tag_t a_tag [N];
  logic signed [DATA_W-1:0] a_data [N];
  logic b_vld [N];
  logic signed [DATA_W-1:0] b_data [N];
  logic [STEP_W-1:0] step;

  int checks = 0, failures = 0;

  ptm_feeder #(.N(N), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin a_mat[r][c] = '0; b_mat[r][c] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 check(!busy && !done && !clear, "idle after reset");
    for (int rep = 0; rep < 4; rep++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          a_mat[r][c] = DATA_W'($urandom);
          b_mat[r][c] = DATA_W'($urandom);
        end
      start = 1'b1;
      #1 check(clear == 1'b1, "clear with accepted start");
      @(posedge clk); #1;
      start = (rep == 2);   // hold start high in one run: must not restart
      for (int t = 1; t <= 3 * N - 2; t++) begin
        #1;
        check(busy && !done, $sformatf("busy in step %0d", t));
        check(int'(step) == t, $sformatf("step count %0d", t));
        check(!clear, "no clear while busy");
        for (int r = 0; r < N; r++) begin
          int k;
          k = t - r;
          if (k >= 1 && k <= N) begin
            check(a_tag[r].valid && a_tag[r].first == (k == 1) && a_tag[r].last == (k == N),
                  $sformatf("a tag row %0d step %0d", r + 1, t));
            check(a_data[r] == a_mat[r][k-1], $sformatf("a data row %0d step %0d", r + 1, t));
            check(b_vld[r] && b_data[r] == b_mat[k-1][r], $sformatf("b col %0d step %0d", r + 1, t));
          end else begin
            check(!a_tag[r].valid && !b_vld[r], $sformatf("no input row %0d step %0d", r + 1, t));
          end
        end
        @(posedge clk); #1;
      end
      start = 1'b0;
      #1 check(!busy && done, "done after 3n-2 steps");
      @(posedge clk); #1;
      check(!busy && done, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
