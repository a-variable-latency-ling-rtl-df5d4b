// vlla_preproc -- pre-processing unit of the variable latency Ling adder.
//
// For every bit it forms the half-sum d_i = a_i ^ b_i, the generate
// g_i = a_i & b_i and the (OR-type) propagate p_i = a_i | b_i, and from
// them the Ling intermediate pairs G_i = g_i | g_i-1 and P_i = p_i & p_i-1
// that feed the two interleaved prefix chains. These are the equations of
// the design. The adder has no carry-in, so g_-1 = p_-1 = 0 (G_0 = g_0,
// P_0 = 0); that boundary choice is this implementation's.
//
// Purely combinational, one gate level plus one for G/P.
module vlla_preproc
  import vlla_pkg::*;
(
  input  word_t a,    // augend
  input  word_t b,    // addend
  output word_t d,    // half-sums
  output word_t g,    // bit generates
  output word_t p,    // bit propagates (OR)
  output word_t gg,   // Ling intermediate generates G_i
  output word_t pp    // Ling intermediate propagates P_i
);

  always_comb begin
    d  = a ^ b;
    g  = a & b;
    p  = a | b;
    gg = g | {g[VLLA_W-2:0], 1'b0};
    pp = p & {p[VLLA_W-2:0], 1'b0};
  end

endmodule
