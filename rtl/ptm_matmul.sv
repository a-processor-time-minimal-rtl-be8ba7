// ptm_matmul: processor-time-minimal n x n matrix product, C = A * B.
//
// The standard triple loop c(i,j) = sum_k a(i,k) b(k,j) is the n x n x n
// directed mesh.  It cannot finish in fewer than 3n-2 steps (its longest
// path), and in step ceil((3n-2)/2) ceil(3n^2/4) of its nodes must run at
// once, so no time-minimal machine has fewer processors.  This design meets
// both bounds: ptm_feeder counts the 3n-2 steps and feeds A and B into the
// edge of ptm_array, a cylindrically connected mesh of exactly ceil(3n^2/4)
// processors that keeps C in place (the C-stationary choice; the array
// definition allows any one of the three matrices to stay).  The
// architecture follows the source of this design; the control handshake, the
// word widths and the parallel result port are this design's own.
//
// Interface
//   start               pulse; A and B must stay stable while busy
//   a_mat, b_mat        signed DATA_W-bit operands, [row][column]
//   busy, step          steps 1 .. 3n-2 are running; the current step
//   done                product complete (set one clock after step 3n-2)
//   c_mat, c_valid      c(i,j) at ACC_W bits, read in place
//   pe_fire             processors active in this step (grid index, ptm_pkg)
// Timing: start in cycle 0, step t in cycle t, done from cycle 3n-1.
// Reset (rst_n) is synchronous and active low.
module ptm_matmul
  import ptm_pkg::*;
#(
  parameter int N      = 6,
  parameter int DATA_W = 16,
  parameter int ACC_W  = 40,
  parameter int STEP_W = $clog2(3 * N + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] a_mat   [N][N],
  input  logic signed [DATA_W-1:0] b_mat   [N][N],
  output logic                     busy,
  output logic                     done,
  output logic [STEP_W-1:0]        step,
  output logic signed [ACC_W-1:0]  c_mat   [N][N],
  output logic                     c_valid [N][N],
  output logic [N*(2*N-1)-1:0]     pe_fire
);

  a_tag_t                   a_tag  [N];
  logic signed [DATA_W-1:0] a_data [N];
  logic                     b_vld  [N];
  logic signed [DATA_W-1:0] b_data [N];
  logic                     clear;

  ptm_feeder #(
    .N     (N),
    .DATA_W(DATA_W),
    .STEP_W(STEP_W)
  ) u_feeder (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .a_mat (a_mat),
    .b_mat (b_mat),
    .a_tag (a_tag),
    .a_data(a_data),
    .b_vld (b_vld),
    .b_data(b_data),
    .clear (clear),
    .busy  (busy),
    .done  (done),
    .step  (step)
  );

  ptm_array #(
    .N     (N),
    .DATA_W(DATA_W),
    .ACC_W (ACC_W)
  ) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .a_in_tag (a_tag),
    .a_in_data(a_data),
    .b_in_vld (b_vld),
    .b_in_data(b_data),
    .c_out    (c_mat),
    .c_valid  (c_valid),
    .pe_fire  (pe_fire)
  );

endmodule
