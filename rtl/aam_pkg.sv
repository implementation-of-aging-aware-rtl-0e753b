// Shared types and constants of the aging-aware variable-latency multiplier.
//
// bypass_e selects which kind of low-power array sits inside the multiplier:
// a column-bypassing array, whose full-adder columns are switched off by
// multiplicand bits that are 0, or a row-bypassing array, whose rows are
// switched off by multiplicator bits that are 0. The same choice decides
// which operand the adaptive hold logic inspects, since the operand that
// drives the bypass is the one that predicts how long the array takes.
package aam_pkg;

  typedef enum logic {
    BYPASS_COLUMN = 1'b0,  // bypass driven by the multiplicand
    BYPASS_ROW    = 1'b1   // bypass driven by the multiplicator
  } bypass_e;

  // Ceiling of log2 for elaboration-time sizing (ceil_log2(1) = 0).
  function automatic int unsigned ceil_log2(input int unsigned v);
    int unsigned r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

endpackage
