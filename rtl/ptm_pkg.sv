// ptm_pkg: shared types and the processor-time map of the cubical-mesh array.
//
// The n x n x n directed mesh has nodes (i,j,k), 1 <= i,j,k <= n.  Node (i,j,k)
// is the inner-product step c(i,j) += a(i,k)*b(k,j).  The map m sends it to
//   step      tau(i,j,k) = i + j + k - 2
//   location  pi1(i,j)   = (i + j - ceil(n/2) - 1) mod n
//             pi2(i,j)   = i - j                (n even, or ceil(n/2)+1 <= i+j <= ceil(3n/2))
//                          i - j + 1            (n odd and i+j <  ceil(n/2)+1)
//                          i - j - 1            (n odd and i+j >  ceil(3n/2))
// The map is taken unchanged from the source of this design.  Everything else
// here (the grid numbering, the slot order, the neighbour search) is this
// design's own way of turning the map into wiring at elaboration time.
//
// Locations are numbered on a grid of n rows (pi1 = 0..n-1) and 2n-1 columns
// (pi2 = -(n-1)..n-1): index = pi1*(2n-1) + pi2 + n - 1.  Only ceil(3n^2/4) of
// the grid points carry a processor.  A processor carries one or two k-columns;
// slot 0 is the one with the smaller i+j (it runs first), slot 1 the other.
// All functions are constant functions, used to build the array.
package ptm_pkg;

  // Tag that travels with an a operand: valid, and the first (k=1) and last
  // (k=n) step of the k-column it belongs to.  b operands carry only valid.
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } a_tag_t;

  localparam int MAX_COLS = 2;  // columns a processor can carry (Lemma 1, 2)

  function automatic int cdiv2(input int x);
    return (x + 1) / 2;
  endfunction

  function automatic int tau(input int i, input int j, input int k);
    return i + j + k - 2;
  endfunction

  function automatic int pi1(input int n, input int i, input int j);
    int v;
    v = (i + j - cdiv2(n) - 1) % n;
    if (v < 0) v += n;
    return v;
  endfunction

  function automatic int pi2(input int n, input int i, input int j);
    int s;
    s = i + j;
    if ((n % 2 == 0) || ((s >= cdiv2(n) + 1) && (s <= cdiv2(3 * n)))) return i - j;
    else if (s < cdiv2(n) + 1) return i - j + 1;
    else return i - j - 1;
  endfunction

  function automatic int grid_w(input int n);
    return 2 * n - 1;
  endfunction

  function automatic int grid_size(input int n);
    return n * (2 * n - 1);
  endfunction

  // Grid index of the processor that carries column (i,j).
  function automatic int loc_of(input int n, input int i, input int j);
    return pi1(n, i, j) * grid_w(n) + pi2(n, i, j) + n - 1;
  endfunction

  // Number of processors: ceil(3n^2/4).
  function automatic int num_pe(input int n);
    return (3 * n * n + 3) / 4;
  endfunction

  // Number of columns carried by grid point g (0 = no processor there).
  function automatic int ncols(input int n, input int g);
    int c;
    c = 0;
    for (int i = 1; i <= n; i++)
      for (int j = 1; j <= n; j++)
        if (loc_of(n, i, j) == g) c++;
    return c;
  endfunction

  // Slot (0 or 1) of column (i,j) on its processor.
  function automatic int slot_of(input int n, input int i, input int j);
    int g, s;
    g = loc_of(n, i, j);
    s = 0;
    for (int i2 = 1; i2 <= n; i2++)
      for (int j2 = 1; j2 <= n; j2++)
        if ((loc_of(n, i2, j2) == g) && (i2 + j2 < i + j)) s++;
    return s;
  endfunction

  // i (sel=0) or j (sel=1) of the column in slot s of grid point g; 0 if none.
  // The (at most two) columns found are put in order of i+j.
  function automatic int col_ij(input int n, input int g, input int s, input int sel);
    int ci [MAX_COLS];
    int cj [MAX_COLS];
    int c;
    c = 0;
    for (int t = 0; t < MAX_COLS; t++) begin
      ci[t] = 0;
      cj[t] = 0;
    end
    for (int i = 1; i <= n; i++)
      for (int j = 1; j <= n; j++)
        if ((loc_of(n, i, j) == g) && (c < MAX_COLS)) begin
          ci[c] = i;
          cj[c] = j;
          c++;
        end
    if ((c == MAX_COLS) && (ci[1] + cj[1] < ci[0] + cj[0])) begin
      int ti, tj;
      ti = ci[0]; tj = cj[0];
      ci[0] = ci[1]; cj[0] = cj[1];
      ci[1] = ti; cj[1] = tj;
    end
    if (s < 0 || s >= MAX_COLS) return 0;
    return (sel == 0) ? ci[s] : cj[s];
  endfunction

  // Grid point that sends a (j-arc) to g: the processor of column (i,j-1), for
  // any column (i,j) with j > 1 carried by g.  -1 if g only has j = 1 columns.
  function automatic int src_a(input int n, input int g);
    for (int i = 1; i <= n; i++)
      for (int j = 2; j <= n; j++)
        if (loc_of(n, i, j) == g) return loc_of(n, i, j - 1);
    return -1;
  endfunction

  // Grid point that sends b (i-arc) to g: the processor of column (i-1,j).
  function automatic int src_b(input int n, input int g);
    for (int i = 2; i <= n; i++)
      for (int j = 1; j <= n; j++)
        if (loc_of(n, i, j) == g) return loc_of(n, i - 1, j);
    return -1;
  endfunction

  // 1 when every column carried by g agrees on its a and b sources, so that a
  // single link of each kind serves the processor (Lemma 3 of the map).
  function automatic bit links_unique(input int n, input int g);
    for (int i = 1; i <= n; i++)
      for (int j = 1; j <= n; j++)
        if (loc_of(n, i, j) == g) begin
          if ((j > 1) && (loc_of(n, i, j - 1) != src_a(n, g))) return 1'b0;
          if ((i > 1) && (loc_of(n, i - 1, j) != src_b(n, g))) return 1'b0;
        end
    return 1'b1;
  endfunction

  // Row i (1..n) of A that enters at grid point g (it carries column (i,1)); 0 if none.
  function automatic int ext_a_row(input int n, input int g);
    for (int i = 1; i <= n; i++)
      if (loc_of(n, i, 1) == g) return i;
    return 0;
  endfunction

  // Column j (1..n) of B that enters at grid point g (it carries column (1,j)); 0 if none.
  function automatic int ext_b_col(input int n, input int g);
    for (int j = 1; j <= n; j++)
      if (loc_of(n, 1, j) == g) return j;
    return 0;
  endfunction

  // Per-slot forwarding masks: bit s set when the column in slot s has a
  // successor along j (j < n) for FWD_A, along i (i < n) for FWD_B.
  function automatic logic [MAX_COLS-1:0] fwd_a_mask(input int n, input int g);
    logic [MAX_COLS-1:0] m;
    m = '0;
    for (int s = 0; s < MAX_COLS; s++) begin
      int jj;
      jj = col_ij(n, g, s, 1);
      m[s] = (jj != 0) && (jj < n);
    end
    return m;
  endfunction

  function automatic logic [MAX_COLS-1:0] fwd_b_mask(input int n, input int g);
    logic [MAX_COLS-1:0] m;
    m = '0;
    for (int s = 0; s < MAX_COLS; s++) begin
      int ii;
      ii = col_ij(n, g, s, 0);
      m[s] = (ii != 0) && (ii < n);
    end
    return m;
  endfunction

endpackage
