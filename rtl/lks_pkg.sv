// lks_pkg: sizes and prefix-cell operators shared by the hybrid adders.
//
// The proposed adder is 32 bits wide and split into an 8-bit approximate
// low part and a 24-bit exact high part; the three-phase Hybrid PPA1 splits
// the same 32 bits into 8 approximate, 12 Kogge-Stone and 12 Ladner-Fischer
// bits. Those widths are the ones the design is described with.
//
// A prefix node carries a (generate, propagate) pair. The black cell combines
// a node with the node below it:
//   (G, P) = (G_hi | P_hi & G_lo, P_hi & P_lo)
// The Ling form of the Kogge-Stone tree uses the same operator on
// (pseudo-carry H, shifted propagate) pairs, see ling_ks_adder.
package lks_pkg;

  localparam int unsigned LKS_WIDTH = 32;  // total operand width
  localparam int unsigned LKS_APPROX_BITS = 8;   // bits 0..7 approximate
  localparam int unsigned PPA1_KS_BITS = 12; // Hybrid PPA1: bits 8..19
  localparam int unsigned PPA1_LF_BITS = 12; // Hybrid PPA1: bits 20..31

  typedef struct packed {
    logic g;  // group generate (or Ling pseudo-carry)
    logic p;  // group propagate
  } gp_t;

  // Black cell: combine the higher group with the adjacent lower group.
  function automatic gp_t black_cell(gp_t hi, gp_t lo);
    black_cell.g = hi.g | (hi.p & lo.g);
    black_cell.p = hi.p & lo.p;
  endfunction

  // Number of prefix levels a Kogge-Stone tree needs over n nodes.
  function automatic int unsigned prefix_levels(int unsigned n);
    prefix_levels = (n <= 1) ? 0 : $clog2(n);
  endfunction

endpackage
