// modmul_pkg: compile-time helpers shared by the modulo (2^n + 1) multiplier.
//
// The Wallace tree of the multiplier reduces its operand rows level by level:
// every group of three rows becomes two (a sum row and a carry row), leftover
// rows pass straight through, so a level with r rows leaves r - floor(r/3).
// csa_rows/csa_levels give the row count per level and the depth of the tree
// (for n + 1 = 17 rows the depth is 6, as in the stage-count table of the
// design). clog4 gives the number of radix-4 lookahead levels of the adders.
package modmul_pkg;

  // ceil(log4(n)), at least 1 so that a 1..4 bit adder still has one level
  function automatic int clog4(int n);
    int l = 1;
    int s = 4;
    while (s < n) begin
      s = s * 4;
      l++;
    end
    return l;
  endfunction

  // number of rows that enter level `level` of the Wallace tree
  function automatic int csa_rows(int rows, int level);
    int r = rows;
    for (int l = 0; l < level; l++) r = r - r / 3;
    return r;
  endfunction

  // number of carry-save levels needed to bring `rows` rows down to two
  function automatic int csa_levels(int rows);
    int l = 0;
    int r = rows;
    while (r > 2) begin
      r = r - r / 3;
      l++;
    end
    return l;
  endfunction

endpackage
