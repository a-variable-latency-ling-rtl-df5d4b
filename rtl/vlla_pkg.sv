// vlla_pkg -- constants, types and prefix-operator helpers shared by the
// 32-bit variable latency Ling adder (VLLA).
//
// The adder works on two interleaved Ling chains: the even chain holds the
// pairs (G_2k, P_2k-1) and the odd chain the pairs (G_2k+1, P_2k), k = 0..15.
// Each chain is a 16-element Brent-Kung prefix network. The word width, the
// 14 exact low bits and the 4-element blocks left after the second prefix
// row follow the adder described in the text; they are fixed by the shape
// of the truncated network and are therefore package constants, not module
// parameters.
package vlla_pkg;

  localparam int unsigned VLLA_W     = 32;           // operand width
  localparam int unsigned CHAIN_N    = VLLA_W / 2;   // elements per Ling chain
  localparam int unsigned BLK_N      = 4;            // elements per row-2 block
  localparam int unsigned N_BLK      = CHAIN_N / BLK_N;
  localparam int unsigned EXACT_LSBS = 14;           // Ling carries 0..13 are exact

  typedef logic [VLLA_W-1:0] word_t;

  // One (generate, propagate) pair of a prefix network.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Row-2 blocks of both chains: blk[chain][block].
  typedef gp_t [1:0][N_BLK-1:0] blk_t;

  // The associative prefix operator of eq. (3): hi o lo.
  function automatic gp_t gp_dot(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Lowest chain element that the speculative network folds into element k
  // (Brent-Kung rows 3..5 removed). Elements 0..6 reach element 0 (exact).
  function automatic int unsigned spec_lo(int unsigned k);
    if (k <= 6)       return 0;
    else if (k <= 10) return 4;
    else if (k <= 14) return 8;
    else              return 12;
  endfunction

  // Group generate G_[hi:lo] of eqs. (14)/(15): indices step by two, so
  // G_[hi:lo] = G_hi + P_hi-1 G_hi-2 + P_hi-1 P_hi-3 G_hi-4 + ... + (..) G_lo.
  function automatic logic grp_g(word_t gg, word_t pp, int hi, int lo);
    logic acc;
    acc = gg[lo];
    for (int i = lo + 2; i <= hi; i += 2) acc = gg[i] | (pp[i-1] & acc);
    return acc;
  endfunction

  // Group propagate P_[hi:lo] = P_hi P_hi-2 ... P_lo.
  function automatic logic grp_p(word_t pp, int hi, int lo);
    logic acc;
    acc = 1'b1;
    for (int i = lo; i <= hi; i += 2) acc &= pp[i];
    return acc;
  endfunction

endpackage
