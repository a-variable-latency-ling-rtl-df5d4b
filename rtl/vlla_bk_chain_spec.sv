// vlla_bk_chain_spec -- one 16-element Ling chain of the speculative
// Brent-Kung prefix network.
//
// The exact Brent-Kung network over 16 elements has seven prefix rows:
//   row 1: 2-element groups (odd k)          row 5: element 11 <- 7
//   row 2: 4-element groups (k = 3 mod 4)     row 6: elements 5, 9, 13
//   row 3: 8-element groups (k = 7, 15)       row 7: even elements 2..14
//   row 4: element 15 <- 7
// With the (G,P) forming row in front that makes the eight rows of the
// exact Ling adder. The speculative network drops rows 3, 4 and 5, the
// middle three, as the design prescribes. Rows 6 and 7 then fold in the
// 4-element block below instead of the full prefix, so elements 0..6 stay
// exact and every higher element k spans elements k..spec_lo(k):
//   k = 7..10 -> down to 4,  k = 11..14 -> down to 8,  k = 15 -> down to 12.
//
// Outputs: the (generate, propagate) of every element's span and the four
// row-2 block groups, which the correction unit uses to rebuild the removed
// rows. Keeping the span propagate in the down-sweep cells is this
// implementation's choice; it lets the correction unit extend a span with a
// single extra operator. Purely combinational: four operator levels.
module vlla_bk_chain_spec
  import vlla_pkg::*;
(
  input  gp_t [CHAIN_N-1:0] el,    // chain elements (G, P)
  output gp_t [CHAIN_N-1:0] pfx,   // speculative span of each element
  output gp_t [N_BLK-1:0]   blk    // row-2 4-element block groups
);

  gp_t [CHAIN_N-1:0] r1, r2, r6, r7;

  always_comb begin
    // row 1: pairs
    for (int k = 0; k < CHAIN_N; k++)
      r1[k] = (k % 2 == 1) ? gp_dot(el[k], el[k-1]) : el[k];
    // row 2: 4-element blocks
    for (int k = 0; k < CHAIN_N; k++)
      r2[k] = (k % 4 == 3) ? gp_dot(r1[k], r1[k-2]) : r1[k];
    // rows 3..5 removed
    // row 6: elements 5, 9, 13 take the block ending two below them
    for (int k = 0; k < CHAIN_N; k++)
      r6[k] = (k % 4 == 1 && k >= 5) ? gp_dot(r2[k], r2[k-2]) : r2[k];
    // row 7: even elements take the element right below them
    for (int k = 0; k < CHAIN_N; k++)
      r7[k] = (k % 2 == 0 && k >= 2) ? gp_dot(r6[k], r6[k-1]) : r6[k];
  end

  assign pfx = r7;

  always_comb
    for (int j = 0; j < N_BLK; j++) blk[j] = r2[BLK_N*j + BLK_N-1];

endmodule
