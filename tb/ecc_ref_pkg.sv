// ecc_ref_pkg: reference model of the (K+R, K) Hsiao code for the testbenches.
//
// Builds the parity-check columns by enumerating bit positions a < b < c
// (highest position outermost), which lists the weight-3 columns in increasing
// numeric order, then the weight-5 columns by the same rule on five positions.
// Enough for R up to 7 and K up to the number of such columns.
package ecc_ref_pkg;

  typedef logic [7:0] col_t;

  function automatic void ref_columns(int k, int r, ref col_t cols[$]);
    cols.delete();
    for (int c = 2; c < r; c++)
      for (int b = 1; b < c; b++)
        for (int a = 0; a < b; a++)
          if (cols.size() < k) cols.push_back(col_t'((1 << a) | (1 << b) | (1 << c)));
    // weight 5, in increasing value
    for (int v = 0; v < (1 << r); v++)
      if ($countones(v) == 5 && cols.size() < k) cols.push_back(col_t'(v));
  endfunction

  // Parity bits of data word d (low k bits used).
  function automatic logic [7:0] ref_parity(logic [63:0] d, int k, int r);
    col_t       cols[$];
    logic [7:0] p;
    ref_columns(k, r, cols);
    p = '0;
    for (int j = 0; j < k; j++)
      if (d[j]) p ^= cols[j];
    return p;
  endfunction

endpackage
