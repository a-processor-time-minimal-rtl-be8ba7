// ptm_array_run: drives one ptm_array of size N through REPS random products.
//
// The harness plays the host: in step t it presents a(i,k) and b(k,j) to the
// edge inputs by the input rule (row i of A and column j of B at k = t-i+1 and
// k = t-j+1), with the first/last tags.  Each step it compares pe_fire with
// the schedule of tb_map_pkg and every c_valid flag with "node (i,j,n) has
// run"; after step 3N-2 it compares C with a product computed here.  It
// also checks that exactly ceil(3N^2/4) processors ever fire and that all of
// them fire in the middle step ceil((3N-2)/2).
module ptm_array_run #(
  parameter int N    = 6,
  parameter int REPS = 3
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  import ptm_pkg::a_tag_t;
  import tb_map_pkg::*;

  localparam int DATA_W = 16;
  localparam int ACC_W  = 40;
  localparam int GRID   = N * (2 * N - 1);
  localparam int P      = (3 * N * N + 3) / 4;
  localparam int MID    = (3 * N - 2 + 1) / 2;

  logic rst_n, clear;
  a_tag_t                   a_in_tag  [N];
  logic signed [DATA_W-1:0] a_in_data [N];
  logic                     b_in_vld  [N];
  logic signed [DATA_W-1:0] b_in_data [N];
  logic signed [ACC_W-1:0]  c_out     [N][N];
  logic                     c_valid   [N][N];
  logic [GRID-1:0]          pe_fire;

  ptm_array #(.N(N), .DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.*);

  logic signed [DATA_W-1:0] a [N][N];
  logic signed [DATA_W-1:0] b [N][N];
  logic [GRID-1:0] ever;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL (N=%0d): %s", N, what);
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

  task automatic drive(input int t);
    for (int r = 0; r < N; r++) begin
      int k;
      k = t - r;
      a_in_tag[r] = '0; a_in_data[r] = '0; b_in_vld[r] = 1'b0; b_in_data[r] = '0;
      if (t > 0 && k >= 1 && k <= N) begin
        a_in_tag[r]  = '{valid: 1'b1, first: (k == 1), last: (k == N)};
        a_in_data[r] = a[r][k-1];
        b_in_vld[r]  = 1'b1;
        b_in_data[r] = b[k-1][r];
      end
    end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    ever = '0;
    rst_n = 1'b0; clear = 1'b0; drive(0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int rep = 0; rep < REPS; rep++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          if (rep == 0) begin            // extreme operands once
            a[r][c] = -16'sd32768;
            b[r][c] = (c % 2 == 0) ? -16'sd32768 : 16'sd32767;
          end else begin
            a[r][c] = DATA_W'($urandom);
            b[r][c] = DATA_W'($urandom);
          end
        end
      @(posedge clk); #1 clear = 1'b1;
      @(posedge clk); #1 clear = 1'b0;
      for (int t = 1; t <= 3 * N - 2; t++) begin
        int cnt;
        drive(t);
        #1;
        check(pe_fire == expect_fire(t), $sformatf("activity in step %0d", t));
        cnt = $countones(pe_fire);
        if (t == MID) check(cnt == P, $sformatf("all %0d processors busy in middle step (saw %0d)", P, cnt));
        check(cnt <= P, "never more than ceil(3n^2/4) busy");
        ever |= pe_fire;
        for (int i = 1; i <= N; i++)
          for (int j = 1; j <= N; j++)
            check(c_valid[i-1][j-1] == (i + j + N - 2 < t),
                  $sformatf("c_valid(%0d,%0d) in step %0d", i, j, t));
        @(posedge clk); #1;
      end
      drive(0);
      #1;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          longint s;
          s = 0;
          for (int k = 0; k < N; k++) s += longint'(a[i][k]) * longint'(b[k][j]);
          check(c_valid[i][j] == 1'b1, "all valid after 3n-2 steps");
          check(c_out[i][j] == ACC_W'(s), $sformatf("c(%0d,%0d)", i + 1, j + 1));
        end
      check($countones(ever) == P, $sformatf("exactly %0d processors used", P));
    end
    finished = 1'b1;
  end
endmodule
