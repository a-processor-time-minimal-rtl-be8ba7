// tb_ptm_matmul_full: the design at its default size (n = 6: 27 processors,
// 16 steps) through complete products, checked by ptm_mm_checker.
module tb_ptm_matmul_full;
  localparam int N = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, busy, done, fin;
  logic signed [15:0] a_mat [N][N];
  logic signed [15:0] b_mat [N][N];
  logic [$clog2(3*N+1)-1:0] step;
  logic signed [39:0] c_mat [N][N];
  logic c_valid [N][N];
  logic [N*(2*N-1)-1:0] pe_fire;
  int checks, failures;

  ptm_matmul dut (.*);

  ptm_mm_checker #(.N(N), .REPS(6)) u_chk (.*, .finished(fin));

  initial begin
    @(posedge clk);
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
