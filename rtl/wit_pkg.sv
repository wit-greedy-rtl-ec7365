// wit_pkg: shared constants, types and helper functions of the weighted
// iterative greedy (WIT-Greedy) surface-code decoder.
//
// The decoder works on one syndrome type (X or Z) of a planar surface code of
// distance D. Each code cycle delivers one layer of D rows x (D-1) ancillas
// (the layout of a planar code whose two boundaries are the left and right
// edges). A node is named by its {x, y, z}: column, row and layer number.
// The pairing window holds N_ACT nodes; its pairing table has one entry per
// unordered pair (i, j), i < j, and one entry (i, i) per node that stands for
// "node i to the boundary", N_ACT*(N_ACT+1)/2 entries in all.
//
// Weight table layout (one word per address, WW bits):
//   pair   (a older than or as old as b): ((dz*NPL + n_a)*NPL + n_b)
//   boundary of node a                  :  WIN*NPL*NPL + n_a
// with n = y*COLS + x, NPL = ROWS*COLS, dz = z_b - z_a (< WIN).
// The all-ones weight marks a pair that may never be matched.
package wit_pkg;

  // Entry index -> (i, j) of the pairing table. Entries are ordered by row of
  // the upper triangle: (0,0),(0,1),...,(0,N-1),(1,1),(1,2),...
  function automatic int pair_i(input int n, input int e);
    int k = e;
    for (int i = 0; i < n; i++) begin
      if (k < n - i) return i;
      k -= n - i;
    end
    return 0;
  endfunction

  function automatic int pair_j(input int n, input int e);
    int k = e;
    for (int i = 0; i < n; i++) begin
      if (k < n - i) return i + k;
      k -= n - i;
    end
    return 0;
  endfunction

  function automatic int num_entries(input int n);
    return n * (n + 1) / 2;
  endfunction

endpackage
