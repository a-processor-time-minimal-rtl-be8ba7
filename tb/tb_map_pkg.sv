// tb_map_pkg: reference model of the cubical-mesh schedule, for the testbenches.
//
// Written apart from the design's own package: given n and a step t it says
// which grid point executes which mesh node, so that a testbench can check the
// activity of every processor and classify the links a step uses.  Grid index
// of location (p1,p2) is p1*(2n-1) + p2 + n - 1, as on the array's pe_fire port.
package tb_map_pkg;

  function automatic int ceil_half(input int x);
    return x / 2 + x % 2;
  endfunction

  // Location of k-column (i,j): returns p1 and p2.
  function automatic void place(input int n, input int i, input int j, output int p1, output int p2);
    int s, lo, hi;
    s  = i + j;
    lo = ceil_half(n) + 1;
    hi = ceil_half(3 * n);
    p1 = ((s - ceil_half(n) - 1) % n + n) % n;
    p2 = i - j;
    if (n % 2 == 1) begin
      if (s < lo) p2 = p2 + 1;
      if (s > hi) p2 = p2 - 1;
    end
  endfunction

  function automatic int grid(input int n, input int i, input int j);
    int p1, p2;
    place(n, i, j, p1, p2);
    return p1 * (2 * n - 1) + p2 + n - 1;
  endfunction

  // k of the node that column (i,j) runs in step t, or 0 if it is idle then.
  function automatic int k_at(input int n, input int i, input int j, input int t);
    int k;
    k = t - i - j + 2;
    return (k >= 1 && k <= n) ? k : 0;
  endfunction

endpackage
