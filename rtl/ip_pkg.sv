// ip_pkg: types and elaboration-time helpers shared by the counter-based
// inner-product (merged arithmetic) arrays.
//
// The array computes P = sum_{k=0}^{L-1} A_k * B_k for M-bit A_k and N-bit B_k.
// Each processing element (PE) at bit position (i,j) counts how many of the L
// partial-product bits A_k(i)&B_k(j) are one; the counts are then weighted by
// 2^(i+j) and summed by a reduction tree.
//
// For two's-complement operands the modified Baugh-Wooley form is used:
// the PEs on the sign row (i = M-1, j < N-1) and the sign column
// (j = N-1, i < M-1) count NAND instead of AND, and the constant
//   eps = L * (-2^(M+N-1) + 2^(M-1) + 2^(N-1))
// is added to the tree output. These rules follow the source description;
// the helper functions are this design's own way of expressing them.
package ip_pkg;

  // Reduction tree style: the Dadda tree is the one drawn in the architecture
  // figures, the Wallace tree the alternative that is also evaluated.
  typedef enum logic {
    TREE_DADDA   = 1'b0,
    TREE_WALLACE = 1'b1
  } tree_e;

  // Width of the per-PE ones counter: floor(log2 L) + 1, enough to hold L.
  function automatic int unsigned cnt_width(input int unsigned len);
    return $clog2(len + 1);
  endfunction

  // Width of the inner product result: M + N + counter width bits hold the
  // unsigned maximum L*(2^M-1)*(2^N-1) and the signed range.
  function automatic int unsigned prod_width(input int unsigned m, input int unsigned n,
                                             input int unsigned len);
    return m + n + cnt_width(len);
  endfunction

  // True for the PEs that use a NAND gate (darker PEs of the signed array).
  function automatic bit pe_is_nand(input bit is_signed, input int unsigned i,
                                    input int unsigned j, input int unsigned m,
                                    input int unsigned n);
    return is_signed && ((i == m - 1) != (j == n - 1));
  endfunction

  // Baugh-Wooley error constant, eq. (16), reduced modulo 2^64 (callers keep
  // only the low result bits).
  function automatic longint signed_eps(input int unsigned m, input int unsigned n,
                                        input int unsigned len);
    longint per_term;
    per_term = -(longint'(1) <<< (m + n - 1)) + (longint'(1) <<< (m - 1))
               + (longint'(1) <<< (n - 1));
    return longint'(len) * per_term;
  endfunction

endpackage
