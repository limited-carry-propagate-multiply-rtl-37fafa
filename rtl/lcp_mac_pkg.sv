// lcp_mac_pkg: elaboration-time helpers shared by the limited carry-propagate
// multiply-accumulate unit.
//
// The MAC lays its radix-4 Booth partial products out as W-bit "dot rows"
// (see booth_pp_gen) and cuts the dot diagram into column blocks, each summed
// by its own carry-propagate multi-operand adder.  The functions below give
// the column span of every row, count the rows that reach into a column range
// and pick the k-th of them, so that the operand lists of the blocks and the
// widths of their carry outputs follow from the parameters alone.
//
// Row i (0 <= i < NPP) occupies:
//   row 0            : bits 0 .. N+3       (product bits and e, e, ~e)
//   row i, 0<i<NPP-1 : bits 2i-2 .. 2i+N+2 (s_{i-1} at 2i-2, product, ~e, 1)
//   row NPP-1        : bits 2i-2 .. W-1    (the last row carries the run of
//                                            sign-extension ones to the top)
// The negation bit of the last row, s_last, is not in any row.
package lcp_mac_pkg;

  // Lowest column a dot of row i can occupy.
  function automatic int row_lo(input int i);
    return (i == 0) ? 0 : 2 * i - 2;
  endfunction

  // Highest column a dot of row i can occupy.
  function automatic int row_hi(input int i, input int n, input int w);
    if (i == 0) return n + 3;
    if (i == n / 2 - 1) return w - 1;
    return 2 * i + n + 2;
  endfunction

  // True when row i has dots in columns [lo, hi).
  function automatic bit row_in(input int i, input int lo, input int hi,
                                input int n, input int w);
    return (row_lo(i) < hi) && (row_hi(i, n, w) >= lo);
  endfunction

  // Number of rows among first..last that reach into columns [lo, hi).
  function automatic int rows_in(input int lo, input int hi, input int first,
                                 input int last, input int n, input int w);
    int cnt;
    cnt = 0;
    for (int i = first; i <= last; i++)
      if (row_in(i, lo, hi, n, w)) cnt++;
    return cnt;
  endfunction

  // Index of the k-th (from 0) row among first..last reaching into [lo, hi).
  function automatic int nth_row(input int k, input int lo, input int hi,
                                 input int first, input int last,
                                 input int n, input int w);
    int cnt;
    cnt = 0;
    for (int i = first; i <= last; i++)
      if (row_in(i, lo, hi, n, w)) begin
        if (cnt == k) return i;
        cnt++;
      end
    return first;
  endfunction

  // Extra bits a sum of nop WIDTH-bit operands needs above WIDTH.
  function automatic int carry_w(input int nop);
    return (nop <= 1) ? 0 : $clog2(nop);
  endfunction

endpackage
