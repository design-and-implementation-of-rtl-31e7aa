// Shared constants and sizing functions of the compressor-based multiply-accumulate design.
//
// The multiplier adds its partial products one column at a time. Column k (weight 2**k) of an
// NxN product holds pp_count(N, k) partial products x[i]&y[k-i] plus every carry bit that
// column k-1 produced. One compressor per column turns its col_bits(N, k) bits into one product
// bit and floor(col_bits/2) carry bits, all of which go to column k+1. These functions give
// those counts at elaboration time so that each column gets a compressor of the right size.
package mac_pkg;

  // Operand width of the main configuration (8-bit multiplier and 8-bit MAC).
  localparam int unsigned DEFAULT_WIDTH = 8;
  // Width of the second configuration evaluated (16-bit multiplier and 16-bit MAC).
  localparam int unsigned WIDE_WIDTH = 16;
  // Bits per block of the carry-select adder.
  localparam int unsigned CSLA_BLOCK = 4;

  // Number of partial products x[i]&y[j] with i+j == k in an n x n product.
  function automatic int pp_count(int n, int k);
    if (k < 0 || k > 2 * n - 2) return 0;
    if (k < n) return k + 1;
    return 2 * n - 1 - k;
  endfunction

  // Number of carry bits column k receives from column k-1.
  function automatic int carries_in(int n, int k);
    int c;
    c = 0;
    for (int j = 0; j < k; j++) c = (pp_count(n, j) + c) / 2;
    return c;
  endfunction

  // Number of bits the compressor of column k adds.
  function automatic int col_bits(int n, int k);
    return pp_count(n, k) + carries_in(n, k);
  endfunction

  // Largest number of carry bits any column of an n x n product passes on.
  function automatic int max_carries(int n);
    int m;
    m = 1;
    for (int k = 0; k < 2 * n; k++)
      if (col_bits(n, k) / 2 > m) m = col_bits(n, k) / 2;
    return m;
  endfunction

endpackage
