// ptm_mm_checker: host and scoreboard for one ptm_matmul of size N.
//
// It resets the design, then runs REPS products of random signed matrices
// (the first with extreme operands), back to back.  For every product it
// checks the timing (done exactly 3N-2 steps after start, busy and step in
// between), the activity of every processor against the schedule model in
// tb_map_pkg, all ceil(3N^2/4) processors busy in the middle step, and C
// against a product computed here.  It also counts how often each mechanism
// of the array is used, judged from the schedule model in steps whose
// activity matched: external a and b inputs, neighbour links, cylindrical
// wrap-around links, skewed wrap links (odd N), processors switching to their
// second column in the very next step, and full concurrency.  A mechanism that
// never occurs counts as a failure (the skew only for odd N).
module ptm_mm_checker #(
  parameter int N      = 6,
  parameter int REPS   = 3,
  parameter int DATA_W = 16,
  parameter int ACC_W  = 40,
  parameter int STEP_W = $clog2(3 * N + 1)
) (
  input  logic                     clk,
  output logic                     rst_n,
  output logic                     start,
  output logic signed [DATA_W-1:0] a_mat   [N][N],
  output logic signed [DATA_W-1:0] b_mat   [N][N],
  input  logic                     busy,
  input  logic                     done,
  input  logic [STEP_W-1:0]        step,
  input  logic signed [ACC_W-1:0]  c_mat   [N][N],
  input  logic                     c_valid [N][N],
  input  logic [N*(2*N-1)-1:0]     pe_fire,
  output int                       checks,
  output int                       failures,
  output logic                     finished
);
  import tb_map_pkg::*;

  localparam int GRID = N * (2 * N - 1);
  localparam int P    = (3 * N * N + 3) / 4;
  localparam int MID  = (3 * N - 2 + 1) / 2;

  int n_ext_a, n_ext_b, n_nb_a, n_nb_b, n_wrap, n_skew, n_switch, n_full;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL (N=%0d): %s", N, what);
    end
  endtask

  // Classify the links used in step t (model only).
  task automatic count_links(input int t);
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++) begin
        int k, d1, d2, s1, s2, q1, q2;
        k = k_at(N, i, j, t);
        if (k != 0) begin
          place(N, i, j, d1, d2);
          if (j == 1) n_ext_a++;
          else begin
            n_nb_a++;
            place(N, i, j - 1, s1, s2);
            if (s1 > d1) n_wrap++;
            if (d2 - s2 != 1 && d2 - s2 != -1) n_skew++;
          end
          if (i == 1) n_ext_b++;
          else begin
            n_nb_b++;
            place(N, i - 1, j, s1, s2);
            if (s1 > d1) n_wrap++;
            if (d2 - s2 != 1 && d2 - s2 != -1) n_skew++;
          end
          // second column of a processor, starting right after the first
          if (k == 1) begin
            for (int i2 = 1; i2 <= N; i2++)
              for (int j2 = 1; j2 <= N; j2++)
                if (grid(N, i2, j2) == grid(N, i, j) && i2 + j2 + N == i + j) n_switch++;
          end
        end
      end
  endtask

  function automatic logic [GRID-1:0] expect_fire(input int t);
    logic [GRID-1:0] m;
    m = '0;
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++)
        if (k_at(N, i, j, t) != 0) m[grid(N, i, j)] = 1'b1;
    return m;
  endfunction

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    n_ext_a = 0; n_ext_b = 0; n_nb_a = 0; n_nb_b = 0; n_wrap = 0; n_skew = 0; n_switch = 0; n_full = 0;
    rst_n = 1'b0; start = 1'b0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin a_mat[r][c] = '0; b_mat[r][c] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int rep = 0; rep < REPS; rep++) begin
      int cycles;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          if (rep == 0) begin
            a_mat[r][c] = (r % 2 == 0) ? -16'sd32768 : 16'sd32767;
            b_mat[r][c] = -16'sd32768;
          end else begin
            a_mat[r][c] = DATA_W'($urandom);
            b_mat[r][c] = DATA_W'($urandom);
          end
        end
      @(posedge clk); #1 start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      cycles = 0;
      while (!done && cycles < 10 * N) begin
        logic [GRID-1:0] ef;
        int t;
        cycles++;
        t = cycles;
        check(busy && int'(step) == t, $sformatf("busy, step %0d", t));
        ef = expect_fire(t);
        check(pe_fire == ef, $sformatf("activity in step %0d", t));
        if (pe_fire == ef) begin
          count_links(t);
          if ($countones(pe_fire) == P) n_full++;
        end
        if (t == MID) check($countones(pe_fire) == P, "all processors busy in middle step");
        @(posedge clk); #1;
      end
      check(cycles == 3 * N - 2, $sformatf("product took %0d steps, expected 3n-2 = %0d", cycles, 3 * N - 2));
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          longint s;
          s = 0;
          for (int k = 0; k < N; k++) s += longint'(a_mat[i][k]) * longint'(b_mat[k][j]);
          check(c_valid[i][j] && c_mat[i][j] == ACC_W'(s), $sformatf("c(%0d,%0d)", i + 1, j + 1));
        end
    end
    $display("N=%0d mechanisms: ext_a=%0d ext_b=%0d nb_a=%0d nb_b=%0d wrap=%0d skew=%0d second_column=%0d full_concurrency=%0d",
             N, n_ext_a, n_ext_b, n_nb_a, n_nb_b, n_wrap, n_skew, n_switch, n_full);
    check(n_ext_a > 0 && n_ext_b > 0, "external inputs used");
    check(n_nb_a > 0 && n_nb_b > 0, "neighbour links used");
    check(n_wrap > 0 || N < 2, "cylindrical wrap-around used");
    check(n_switch > 0, "second column on a processor used");
    check(n_full >= REPS, "full concurrency in every product");
    check(n_switch == REPS * ((N * N) / 4), "floor(n^2/4) processors take a second column");
    if (N % 2 == 1) check(n_skew > 0, "skewed wrap used");
    finished = 1'b1;
  end
endmodule
