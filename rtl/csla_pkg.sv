// csla_pkg: shared elaboration-time helpers for the square-root carry-select
// adder (SQRT-CSLA).
//
// A SQRT-CSLA splits an N-bit addition into groups whose widths grow by one
// bit from group to group, so that the carry words of a wider group are ready
// by the time the select carry from the narrower groups below it arrives.
// The group widths used here are 2, 2, 3, 4, 5, 6, ... bits from the least
// significant end; the last group holds whatever bits remain (it may be
// narrower than its predecessor). This progression is a design choice: the
// square-root structure is the document's, the exact widths are not given.
//
// Examples: N=16 -> 2,2,3,4,5   N=32 -> 2,2,3,4,5,6,7,3
//           N=64 -> 2,2,3,4,5,6,7,8,9,10,8
// All functions are constant functions, meant for parameters and generate.
package csla_pkg;

  // Nominal width of group k before clipping to N: 2, 2, 3, 4, 5, ...
  function automatic int unsigned nominal_size(input int unsigned k);
    return (k == 0) ? 2 : k + 1;
  endfunction

  // Bit offset of group k (sum of the widths of groups 0..k-1), clipped to n.
  function automatic int unsigned group_offset(input int unsigned n, input int unsigned k);
    int unsigned off;
    off = 0;
    for (int unsigned j = 0; j < k; j++) begin
      off += nominal_size(j);
      if (off >= n) return n;
    end
    return off;
  endfunction

  // Width of group k, the last group clipped so the groups cover exactly n bits.
  function automatic int unsigned group_size(input int unsigned n, input int unsigned k);
    int unsigned off;
    off = group_offset(n, k);
    return (off + nominal_size(k) > n) ? n - off : nominal_size(k);
  endfunction

  // Number of groups needed to cover n bits.
  function automatic int unsigned group_count(input int unsigned n);
    int unsigned k;
    k = 0;
    while (group_offset(n, k) < n) k++;
    return k;
  endfunction

endpackage
