// ptm_array: the processor-time-minimal systolic array for the n x n x n mesh.
//
// ceil(3n^2/4) inner-product step processors (ptm_pe) are placed at the
// locations (pi1, pi2) of the processor-time map in ptm_pkg and connected
// where the mesh has arcs.  Processor (p1,p2) receives a from the processor of
// column (i,j-1) and b from that of column (i-1,j), for the columns (i,j) it
// carries.  For even n these are the grid points (p1-1 mod n, p2+1) and
// (p1-1 mod n, p2-1): a hexagonally shaped mesh wrapped into a cylinder along
// p1.  For odd n the wrap-around links are skewed (a link that wraps drops two
// rows in p2).  The wiring is not written out by hand: it is computed at
// elaboration from the map, so any n >= 2 builds.  The map and the
// connectivity follow the source of this design; the grid numbering and the
// result port are this design's own.
//
// Interface
//   a_in_* [i-1]   a(i,k) for row i, into the processor of column (i,1);
//                  the host presents a(i,k) in step i+k-1 with first = (k==1)
//                  and last = (k==n)
//   b_in_* [j-1]   b(k,j) for column j, into the processor of column (1,j),
//                  presented in step k+j-1
//   c_out  [i-1][j-1], c_valid   c(i,j), held in place by the processor that
//                  computed it; valid from the step after node (i,j,n)
//   pe_fire[g]     processor at grid point g executes a node this step
//                  (g = p1*(2n-1) + p2 + n-1; 0 where no processor stands)
//   clear          one-cycle pulse before a new product
// Timing: node (i,j,k) executes in step i+j+k-2; the whole product takes
// 3n-2 steps, one step per clock.
module ptm_array
  import ptm_pkg::*;
#(
  parameter int N      = 6,
  parameter int DATA_W = 16,
  parameter int ACC_W  = 40
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  a_tag_t                   a_in_tag  [N],
  input  logic signed [DATA_W-1:0] a_in_data [N],
  input  logic                     b_in_vld  [N],
  input  logic signed [DATA_W-1:0] b_in_data [N],
  output logic signed [ACC_W-1:0]  c_out     [N][N],
  output logic                     c_valid   [N][N],
  output logic [N*(2*N-1)-1:0]     pe_fire
);

  localparam int GRID = N * (2 * N - 1);

  a_tag_t                   a_tag_o [GRID];
  logic signed [DATA_W-1:0] a_dat_o [GRID];
  logic                     b_vld_o [GRID];
  logic signed [DATA_W-1:0] b_dat_o [GRID];
  logic signed [ACC_W-1:0]  res     [GRID][MAX_COLS];
  logic [MAX_COLS-1:0]      done    [GRID];

  for (genvar g = 0; g < GRID; g++) begin : g_site
    localparam int NC = ncols(N, g);
    if (NC > 0) begin : g_pe
      localparam int SA = src_a(N, g);
      localparam int SB = src_b(N, g);
      localparam int EA = ext_a_row(N, g);
      localparam int EB = ext_b_col(N, g);
      localparam logic [MAX_COLS-1:0] FA = fwd_a_mask(N, g);
      localparam logic [MAX_COLS-1:0] FB = fwd_b_mask(N, g);

      if (!links_unique(N, g)) begin : g_bad_map
        $error("ptm_array: grid point %0d would need two a or b links", g);
      end

      a_tag_t                   a_nb_tag, a_ext_tag;
      logic signed [DATA_W-1:0] a_nb_data, a_ext_data, b_nb_data, b_ext_data;
      logic                     b_nb_vld, b_ext_vld;

      if (SA >= 0) begin : g_a_nb
        assign a_nb_tag  = a_tag_o[SA];
        assign a_nb_data = a_dat_o[SA];
      end else begin : g_a_none
        assign a_nb_tag  = '0;
        assign a_nb_data = '0;
      end
      if (SB >= 0) begin : g_b_nb
        assign b_nb_vld  = b_vld_o[SB];
        assign b_nb_data = b_dat_o[SB];
      end else begin : g_b_none
        assign b_nb_vld  = 1'b0;
        assign b_nb_data = '0;
      end
      if (EA > 0) begin : g_a_ext
        assign a_ext_tag  = a_in_tag[EA-1];
        assign a_ext_data = a_in_data[EA-1];
      end else begin : g_a_noext
        assign a_ext_tag  = '0;
        assign a_ext_data = '0;
      end
      if (EB > 0) begin : g_b_ext
        assign b_ext_vld  = b_in_vld[EB-1];
        assign b_ext_data = b_in_data[EB-1];
      end else begin : g_b_noext
        assign b_ext_vld  = 1'b0;
        assign b_ext_data = '0;
      end

      ptm_pe #(
        .DATA_W   (DATA_W),
        .ACC_W    (ACC_W),
        .NCOLS    (NC),
        .HAS_EXT_A(EA > 0),
        .HAS_EXT_B(EB > 0),
        .FWD_A    (FA),
        .FWD_B    (FB)
      ) u_pe (
        .clk       (clk),
        .rst_n     (rst_n),
        .clear     (clear),
        .a_nb_tag  (a_nb_tag),
        .a_nb_data (a_nb_data),
        .a_ext_tag (a_ext_tag),
        .a_ext_data(a_ext_data),
        .b_nb_vld  (b_nb_vld),
        .b_nb_data (b_nb_data),
        .b_ext_vld (b_ext_vld),
        .b_ext_data(b_ext_data),
        .a_out_tag (a_tag_o[g]),
        .a_out_data(a_dat_o[g]),
        .b_out_vld (b_vld_o[g]),
        .b_out_data(b_dat_o[g]),
        .fire      (pe_fire[g]),
        .c_res     (res[g]),
        .c_done    (done[g])
      );
    end else begin : g_empty
      assign a_tag_o[g] = '0;
      assign a_dat_o[g] = '0;
      assign b_vld_o[g] = 1'b0;
      assign b_dat_o[g] = '0;
      assign pe_fire[g] = 1'b0;
      assign done[g]    = '0;
      for (genvar s = 0; s < MAX_COLS; s++) begin : g_res
        assign res[g][s] = '0;
      end
    end
  end

  // Results are read where they were computed.
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      localparam int G = loc_of(N, i + 1, j + 1);
      localparam int S = slot_of(N, i + 1, j + 1);
      assign c_out[i][j]   = res[G][S];
      assign c_valid[i][j] = done[G][S];
    end
  end

endmodule
