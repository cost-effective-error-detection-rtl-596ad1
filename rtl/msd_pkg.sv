// msd_pkg: constants and helper functions shared by the Mersenne modulo
// shadow-datapath blocks.
//
// Residues are kept modulo M = 2^N - 1 (a Mersenne number). Because
// 2^N = 1 (mod M), a bit of weight 2^i has the residue weight 2^(i mod N):
// every wide vector folds onto N columns, and a carry out of the top column
// wraps back into column 0. Residues are not normalized: both 0 and M
// (all ones) stand for zero.
//
// The defaults follow the document's 32-bit main datapath. The residue width
// N = 3 (mod 7) is this design's choice among the 2-, 3- and 4-bit bases the
// document evaluates.
package msd_pkg;

  // Residue width: the shadow datapath works modulo 2^MSD_N - 1.
  localparam int unsigned MSD_N     = 3;
  // Operand width of the main datapath.
  localparam int unsigned MSD_W     = 32;
  // Accumulator width of the main MAC (full product width).
  localparam int unsigned MSD_ACC_W = 64;

  // Residue (mod 2^n - 1) of 2^k, as an n-bit value: a single set bit.
  function automatic int unsigned pow2_res(int unsigned k, int unsigned n);
    return 32'd1 << (k % n);
  endfunction

  // Smallest multiple of n that is >= x.
  function automatic int unsigned round_up(int unsigned x, int unsigned n);
    return ((x + n - 1) / n) * n;
  endfunction

endpackage
