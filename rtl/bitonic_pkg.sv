`timescale 1ns/1ps
// bitonic_pkg: stage numbering of a bitonic sorting network. For N = 2^L
// inputs there are L(L+1)/2 stages (15 for N = 32). Stage s belongs to merge
// size k and distance j, enumerated k = 2, 4, ..., N and, within each k,
// j = k/2, k/4, ..., 1. In a stage, element i is compared with i ^ j; the
// pair is put in ascending order when (i & k) == 0, descending otherwise, so
// the whole network sorts ascending (smallest value at element 0).
package bitonic_pkg;

  function automatic int unsigned num_stages(int unsigned n);
    int unsigned l = $clog2(n);
    return l * (l + 1) / 2;
  endfunction

  function automatic int unsigned stage_k(int unsigned s);
    int unsigned k = 2, j = 1, c = 0;
    while (c != s) begin
      if (j == 1) begin k = k * 2; j = k / 2; end
      else j = j / 2;
      c++;
    end
    return k;
  endfunction

  function automatic int unsigned stage_j(int unsigned s);
    int unsigned k = 2, j = 1, c = 0;
    while (c != s) begin
      if (j == 1) begin k = k * 2; j = k / 2; end
      else j = j / 2;
      c++;
    end
    return j;
  endfunction

endpackage
