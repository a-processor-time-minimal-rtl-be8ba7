// ptm_feeder: step controller and input schedule for the cubical-mesh array.
//
// A product takes 3n-2 steps.  On start the feeder pulses clear for one cycle,
// then counts steps 1 .. 3n-2, one per clock, and raises done after the last.
// In step t it drives, for every row i, a(i,k) with k = t-i+1 onto the input
// of the processor of column (i,1), and for every column j, b(k,j) with
// k = t-j+1 onto the input of the processor of column (1,j), whenever
// 1 <= k <= n.  That is the input rule of the array: a(i,j) and b(j,i) enter
// in step i+j-1.  The a operand carries first (k = 1) and last (k = n) tags so
// that the processors know where a k-column begins and ends.
//
// Interface
//   start          pulse, accepted when not busy
//   a_mat, b_mat   the operand matrices; the host keeps them stable while busy
//   a_*[i-1], b_*[j-1]   operands for the edge processors (see above)
//   clear          one-cycle pulse in the cycle start is accepted
//   busy, step     busy during steps 1 .. 3n-2; step is the current step
//   done           set after step 3n-2 until the next start
// The counter, the tags and the start/clear/done protocol are this design's
// own; the step count and the input rule follow the array's definition.
// Reset (rst_n) is synchronous and active low.
module ptm_feeder
  import ptm_pkg::*;
#(
  parameter int N      = 6,
  parameter int DATA_W = 16,
  parameter int STEP_W = $clog2(3 * N + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] a_mat [N][N],
  input  logic signed [DATA_W-1:0] b_mat [N][N],
  output a_tag_t                   a_tag  [N],
  output logic signed [DATA_W-1:0] a_data [N],
  output logic                     b_vld  [N],
  output logic signed [DATA_W-1:0] b_data [N],
  output logic                     clear,
  output logic                     busy,
  output logic                     done,
  output logic [STEP_W-1:0]        step
);

  localparam int LAST_STEP = 3 * N - 2;

  assign clear = start && !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      step <= '0;
    end else if (clear) begin
      busy <= 1'b1;
      done <= 1'b0;
      step <= STEP_W'(1);
    end else if (busy) begin
      if (int'(step) == LAST_STEP) begin
        busy <= 1'b0;
        done <= 1'b1;
        step <= '0;
      end else begin
        step <= step + STEP_W'(1);
      end
    end
  end

  // Skewed input: row i (index r = i-1) is at k = t - r in step t.
  always_comb begin
    for (int r = 0; r < N; r++) begin
      int k;
      k = int'(step) - r;  // 1-based k of a(r+1, k) and of b(k, r+1)
      a_tag[r]  = '0;
      a_data[r] = '0;
      b_vld[r]  = 1'b0;
      b_data[r] = '0;
      if (busy && k >= 1 && k <= N) begin
        a_tag[r]  = '{valid: 1'b1, first: (k == 1), last: (k == N)};
        a_data[r] = a_mat[r][k-1];
        b_vld[r]  = 1'b1;
        b_data[r] = b_mat[k-1][r];
      end
    end
  end

  step_in_range : assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> (int'(step) >= 1 && int'(step) <= LAST_STEP));

endmodule
