// tree_mult_pkg: sizing helpers shared by the tree multiplier modules.
//
// The multiplier forms an N x N grid of partial product nodes P[i][j] and adds
// them along the diagonals i + j = k. These functions give, for a grid of side
// n, how many nodes sit on diagonal k and how wide the running sum of a
// diagonal adder node has to be. They are evaluated at elaboration time only.
//
// Carry bound used for the width: the carry entering diagonal k is at most
// n - 1 (if it is at most n - 1, the node sums at most n + n - 1 = 2n - 1 and
// passes on floor((2n - 1) / 2) = n - 1). A node's sum therefore never exceeds
// 2n - 1 and fits in $clog2(2n) bits.
package tree_mult_pkg;

  // Number of grid positions (i, j), 0 <= i, j < n, with i + j == k.
  function automatic int unsigned diag_len(int unsigned n, int unsigned k);
    if (k >= 2 * n - 1) return 0;
    return (k < n) ? k + 1 : 2 * n - 1 - k;
  endfunction

  // Smallest multiplicand index on diagonal k.
  function automatic int unsigned diag_first(int unsigned n, int unsigned k);
    return (k < n) ? 0 : k - n + 1;
  endfunction

  // Width of the carry passed between neighbouring diagonal adder nodes.
  function automatic int unsigned carry_width(int unsigned n);
    return (n < 2) ? 1 : $clog2(2 * n);
  endfunction

endpackage
