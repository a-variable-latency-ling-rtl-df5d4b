// vlla_error_correct -- error correction unit of the variable latency Ling
// adder.
//
// It has two recovery paths, both from the design:
//
//  * Grounding (E_u and E_r): the upper half-sums are all one and a carry
//    enters bit 14, so the exact upper sums are all zero and the carry-out
//    is one. s_gnd keeps the 14 exact low bits of the speculative sum and
//    grounds bits 31..14; cout_gnd is one. This path is meant to be used in
//    the first cycle. Grounding only the upper 18 sums and driving the
//    carry-out to one are this implementation's reading of "the sums are
//    directly grounded".
//
//  * Completion (E_s): the three prefix rows that the speculative network
//    removed are put back. Per Ling chain, Brent-Kung row 3 forms the
//    8-element groups (7:0) and (15:8) from the row-2 blocks, row 4 the
//    full group (15:0) and row 5 the group (11:0). These give the exact
//    Ling carries at the block ends, elements 3, 7, 11 and 15. Every other
//    speculative element k, whose span stops at block base spec_lo(k), is
//    then extended by one more operator: H_k = H*_k + P*_k H_(block end
//    below). A second post-processing unit forms the exact sums. How the
//    restored rows are merged with the speculative carries is not spelled
//    out in the design; this single fix-up row is the simplest choice.
//    The completion path is combinational; the adder gives it two clock
//    cycles from its held operands.
module vlla_error_correct
  import vlla_pkg::*;
(
  input  word_t d,          // half-sums
  input  word_t p,          // bit propagates
  input  word_t h_spec,     // speculative Ling carries H*_i
  input  word_t hp_spec,    // group propagate of each H*_i span
  input  blk_t  blk,        // row-2 block groups, blk[chain][block]
  input  word_t s_spec,     // speculative sum
  output word_t s_gnd,      // sum on the grounding path
  output logic  cout_gnd,   // carry-out on the grounding path
  output word_t s_fix,      // exact sum on the completion path
  output logic  cout_fix    // exact carry-out on the completion path
);

  // Grounding path
  always_comb begin
    s_gnd    = s_spec & word_t'((1 << EXACT_LSBS) - 1);
    cout_gnd = 1'b1;
  end

  // Completion path: restored rows 3..5, per chain
  gp_t  [1:0][N_BLK-1:0] bend;     // exact prefix at each block end
  word_t                 h_fix;

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      gp_t g15_8;
      bend[c][0] = blk[c][0];                          // (3:0), already exact
      bend[c][1] = gp_dot(blk[c][1], blk[c][0]);       // row 3: (7:0)
      g15_8      = gp_dot(blk[c][3], blk[c][2]);       // row 3: (15:8)
      bend[c][3] = gp_dot(g15_8, bend[c][1]);          // row 4: (15:0)
      bend[c][2] = gp_dot(blk[c][2], bend[c][1]);      // row 5: (11:0)
    end
  end

  // Fix-up row: extend every span that stops above element 0
  always_comb begin
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < CHAIN_N; k++) begin
        int unsigned lo;
        lo = spec_lo(k);
        if (k % BLK_N == BLK_N - 1)
          h_fix[2*k + c] = bend[c][k / BLK_N].g;
        else if (lo == 0)
          h_fix[2*k + c] = h_spec[2*k + c];
        else
          h_fix[2*k + c] = h_spec[2*k + c]
                         | (hp_spec[2*k + c] & bend[c][lo / BLK_N - 1].g);
      end
  end

  vlla_postproc u_post (
    .d    (d),
    .p    (p),
    .h    (h_fix),
    .s    (s_fix),
    .cout (cout_fix)
  );

endmodule
