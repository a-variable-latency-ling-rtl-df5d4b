// vlla_spec_prefix -- speculative prefix-processing unit of the variable
// latency Ling adder.
//
// Instead of true carries it computes Ling carries H_i = c_i+1 + c_i, which
// obey H_i = G_i + P_i-1 H_i-2. The even Ling carries therefore form one
// 16-element prefix chain over the pairs (G_2k, P_2k-1) and the odd ones a
// second chain over (G_2k+1, P_2k), with P_-1 = 0. Each chain is a
// Brent-Kung network with its three middle rows removed (see
// vlla_bk_chain_spec), which breaks the long carry chain: H_0..H_13 are
// exact, H_14..H_31 only look back over at least four pairs (eight bits).
//
// Interface: gg/pp are the intermediate G_i/P_i from the pre-processing
// unit. h is H*_i, hp the group propagate of the span behind H*_i, and blk
// the row-2 block groups of both chains, blk[chain][block], chain 0 = even.
// Purely combinational.
module vlla_spec_prefix
  import vlla_pkg::*;
(
  input  word_t gg,   // intermediate generates G_i
  input  word_t pp,   // intermediate propagates P_i
  output word_t h,    // speculative Ling carries H*_i
  output word_t hp,   // group propagate of the span of H*_i
  output blk_t  blk   // row-2 block groups of both chains
);

  gp_t [1:0][CHAIN_N-1:0] el, pfx;
  logic [VLLA_W:0]        pp_m1;   // pp_m1[i] = P_i-1, with P_-1 = 0

  assign pp_m1 = {pp, 1'b0};

  always_comb begin
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < CHAIN_N; k++) begin
        el[c][k].g = gg[2*k + c];
        el[c][k].p = pp_m1[2*k + c];
      end
  end

  for (genvar c = 0; c < 2; c++) begin : g_chain
    vlla_bk_chain_spec u_chain (
      .el  (el[c]),
      .pfx (pfx[c]),
      .blk (blk[c])
    );
  end

  always_comb begin
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < CHAIN_N; k++) begin
        h [2*k + c] = pfx[c][k].g;
        hp[2*k + c] = pfx[c][k].p;
      end
  end

endmodule
