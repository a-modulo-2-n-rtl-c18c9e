// Shared constants and elaboration-time functions of the double-LSB (DLSB)
// modulo 2^n+1 multiplier.
//
// DLSB operand packing used on every port of this design: an (n+1)-bit
// vector d[n:0] where d[n:1] is the ordinary n-bit number x_{n-1}..x_0 and
// d[0] is the second least significant bit x0'.  The value is d[n:1] + d[0],
// so every code word lies in [0, 2^n] and 2^n is the all-ones word.
//
// The functions below describe the shape of the partial product reduction
// tree (ppr_tree).  The multiplier starts from n+2 rows of n bits plus one
// extra bit in column 0.  Each level groups its rows in threes; a group of
// three goes through a modular carry-save row (mcsa) and becomes two rows,
// left-over rows pass down.  Exactly one half-adder row (hcsa) is used: it
// takes two rows plus the extra column-0 bit.  It sits on the first level
// that has two left-over rows, or, if there is none, after the last level.
// With n = 4 this gives CSA I, II, III and a final HCSA; with n = 5 it gives
// CSA I, II (with a half-adder row beside it), III and IV.
package modmul_pkg;

  // Default operand width n: the smaller of the two sizes evaluated (8, 16).
  localparam int unsigned DEFAULT_N = 8;

  // Number of rows entering level lvl (level 0 is the partial product matrix).
  function automatic int unsigned ppr_rows(int unsigned n, int unsigned lvl);
    int unsigned r;
    r = n + 2;
    for (int unsigned l = 0; l < lvl; l++) begin
      if (r > 2) r = 2 * (r / 3) + (r % 3);
    end
    return r;
  endfunction

  // Number of carry-save levels needed to reach two rows.
  function automatic int unsigned ppr_levels(int unsigned n);
    int unsigned l;
    l = 0;
    while (ppr_rows(n, l) > 2) l++;
    return l;
  endfunction

  // Level that carries the half-adder row; ppr_levels(n) means a final
  // stage of its own after the last carry-save level.
  function automatic int unsigned ppr_hlevel(int unsigned n);
    for (int unsigned l = 0; l < ppr_levels(n); l++) begin
      if (ppr_rows(n, l) % 3 == 2) return l;
    end
    return ppr_levels(n);
  endfunction

  // Total number of stages in the tree, the half-adder stage included.
  function automatic int unsigned ppr_stages(int unsigned n);
    return (ppr_hlevel(n) == ppr_levels(n)) ? ppr_levels(n) + 1 : ppr_levels(n);
  endfunction

  // Number of prefix levels of an n-bit parallel prefix adder: ceil(log2 n).
  function automatic int unsigned prefix_levels(int unsigned n);
    int unsigned l;
    l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

endpackage
