// mcsa_pkg: constants and sizing functions shared by the modified carry save
// adder (mcsa), the graph-based multiple constant multiplier (gb_mcm) and the
// transposed-form FIR filter (gb_fir).
//
// The final carry-propagate stage of an N-bit mcsa spans result bits
// [N:0] (bit N+1 is its carry out). It is cut into a first group of
// FIRST_W bits, which ripples on its own, followed by groups of GRP_W bits,
// each of which is precomputed and then picked by a multiplexer when its
// carry-in arrives. The last group takes whatever bits remain. The default
// group widths follow the sizing rule for n-bit adders: the first group is
// log2(n)+1 bits wide, and each later group holds log2(n) values (its
// log2(n)-1 sum bits plus its carry). For n = 16 this gives the groups
// {c4,s[4:0]}, {c7,x[7:5]}, {c10,x[10:8]}, {c13,x[13:11]} and x[17:14].
package mcsa_pkg;

  // Adder width and input sample width of the multiplier and filter.
  localparam int unsigned DEF_ADD_N  = 16;
  localparam int unsigned DEF_DATA_W = 8;

  // Constants of the multiple constant multiplication and the partial
  // product that the graph shares between them.
  localparam int unsigned COEF_H0 = 29;
  localparam int unsigned COEF_H1 = 43;
  localparam int unsigned COEF_SHARED = 7;

  // Default width of the first (rippling) group: log2(n) + 1.
  function automatic int unsigned mcsa_first_w(int unsigned n);
    return $clog2(n) + 1;
  endfunction

  // Default width of every later (carry-selected) group: log2(n) - 1 sum bits.
  function automatic int unsigned mcsa_grp_w(int unsigned n);
    return $clog2(n) - 1;
  endfunction

  // Number of carry-selected groups covering result bits [n:first_w].
  function automatic int unsigned mcsa_num_groups(int unsigned n, int unsigned first_w,
                                                  int unsigned grp_w);
    return (n + 1 - first_w + grp_w - 1) / grp_w;
  endfunction

  // Lowest result bit of carry-selected group g (g = 0 is the second group).
  function automatic int unsigned mcsa_grp_lo(int unsigned first_w, int unsigned grp_w,
                                              int unsigned g);
    return first_w + g * grp_w;
  endfunction

  // Width of carry-selected group g; the last group may be narrower.
  function automatic int unsigned mcsa_grp_width(int unsigned n, int unsigned first_w,
                                                 int unsigned grp_w, int unsigned g);
    int unsigned lo;
    lo = first_w + g * grp_w;
    return (lo + grp_w > n + 1) ? (n + 1 - lo) : grp_w;
  endfunction

endpackage
