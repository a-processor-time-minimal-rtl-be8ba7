// ptm_pe: inner-product step processor of the cubical-mesh systolic array.
//
// Each processor executes whole k-columns of the n x n x n mesh: for column
// (i,j) it performs c(i,j) += a(i,k)*b(k,j) at steps i+j-1 .. i+j+n-2, one k per
// step.  The c partial sum stays in the processor (the k-arcs of the mesh), the
// a operand moves on to the processor of column (i,j+1) and the b operand to
// the processor of column (i+1,j), one step later.  A processor carries one or
// two columns (NCOLS); the second starts the step after the first ends, and
// both results are held in place (c_res[0], c_res[1]).  This much follows the
// array's definition.  The operand tags, the per-slot forwarding masks, the
// input multiplexer and the result slots are this design's own choices.
//
// Interface
//   a_nb_*  / b_nb_*   operand from the neighbouring processor (registered there)
//   a_ext_* / b_ext_*  operand from outside, for processors on the input edge
//                      (HAS_EXT_A / HAS_EXT_B); the two sources are never valid
//                      in the same step
//   a_out_* / b_out_*  registered operands for the successors; an operand is
//                      not forwarded from a column at the j = n (a) or i = n (b)
//                      edge of the mesh (FWD_A / FWD_B per slot), so no stray
//                      operand reaches an idle processor
//   fire               this processor executes a mesh node in this step
//   c_res / c_done     result of each slot, valid once c_done is set
//   clear              starts a new product: empties the slots (one cycle)
// Timing: one mesh node per clock; operands are consumed in the step they
// arrive and appear on a_out/b_out in the next step.  A slot's result is
// registered at the end of the step that executes k = n.  Arithmetic is signed
// two's complement, accumulated at ACC_W bits without saturation.
// Reset (rst_n) is synchronous and active low.
module ptm_pe
  import ptm_pkg::*;
#(
  parameter int                    DATA_W    = 16,
  parameter int                    ACC_W     = 40,
  parameter int                    NCOLS     = 1,
  parameter bit                    HAS_EXT_A = 1'b0,
  parameter bit                    HAS_EXT_B = 1'b0,
  parameter logic [MAX_COLS-1:0]   FWD_A     = '1,
  parameter logic [MAX_COLS-1:0]   FWD_B     = '1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           clear,
  input  a_tag_t                         a_nb_tag,
  input  logic signed [DATA_W-1:0]       a_nb_data,
  input  a_tag_t                         a_ext_tag,
  input  logic signed [DATA_W-1:0]       a_ext_data,
  input  logic                           b_nb_vld,
  input  logic signed [DATA_W-1:0]       b_nb_data,
  input  logic                           b_ext_vld,
  input  logic signed [DATA_W-1:0]       b_ext_data,
  output a_tag_t                         a_out_tag,
  output logic signed [DATA_W-1:0]       a_out_data,
  output logic                           b_out_vld,
  output logic signed [DATA_W-1:0]       b_out_data,
  output logic                           fire,
  output logic signed [ACC_W-1:0]        c_res  [MAX_COLS],
  output logic        [MAX_COLS-1:0]     c_done
);

  a_tag_t                   a_tag;
  logic signed [DATA_W-1:0] a_data, b_data;
  logic                     b_vld;
  logic signed [ACC_W-1:0]  acc, prod, acc_next;
  logic                     slot;  // column now running: 0 = first, 1 = second

  // Operand selection: external input on the edge processors, else neighbour.
  always_comb begin
    if (HAS_EXT_A && a_ext_tag.valid) begin
      a_tag  = a_ext_tag;
      a_data = a_ext_data;
    end else begin
      a_tag  = a_nb_tag;
      a_data = a_nb_data;
    end
    if (HAS_EXT_B && b_ext_vld) begin
      b_vld  = 1'b1;
      b_data = b_ext_data;
    end else begin
      b_vld  = b_nb_vld;
      b_data = b_nb_data;
    end
  end

  assign fire     = a_tag.valid & b_vld;
  assign prod     = ACC_W'(a_data) * ACC_W'(b_data);
  assign acc_next = a_tag.first ? prod : acc + prod;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc        <= '0;
      slot       <= 1'b0;
      c_done     <= '0;
      a_out_tag  <= '0;
      a_out_data <= '0;
      b_out_vld  <= 1'b0;
      b_out_data <= '0;
      for (int s = 0; s < MAX_COLS; s++) c_res[s] <= '0;
    end else begin
      a_out_tag  <= '0;
      b_out_vld  <= 1'b0;
      if (clear) begin
        slot   <= 1'b0;
        c_done <= '0;
      end else if (fire) begin
        acc        <= acc_next;
        a_out_tag  <= '{valid: FWD_A[slot], first: a_tag.first, last: a_tag.last};
        a_out_data <= a_data;
        b_out_vld  <= FWD_B[slot];
        b_out_data <= b_data;
        if (a_tag.last) begin
          c_res[slot]  <= acc_next;
          c_done[slot] <= 1'b1;
          if (NCOLS > 1) slot <= 1'b1;
        end
      end
    end
  end

  // Both operands of a mesh node arrive in the same step, and an edge
  // processor never sees an external and a neighbour operand together.
  a_b_together : assert property (@(posedge clk) disable iff (!rst_n)
                                  a_tag.valid == b_vld);
  one_a_source : assert property (@(posedge clk) disable iff (!rst_n)
                                  !(HAS_EXT_A && a_ext_tag.valid && a_nb_tag.valid));
  one_b_source : assert property (@(posedge clk) disable iff (!rst_n)
                                  !(HAS_EXT_B && b_ext_vld && b_nb_vld));
  slots_in_range : assert property (@(posedge clk) disable iff (!rst_n)
                                    !(fire && a_tag.last && c_done[slot]));

endmodule
