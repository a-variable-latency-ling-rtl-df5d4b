// vlla_error_detect -- error detection unit of the variable latency Ling
// adder.
//
// The speculative network only loses carries that enter the upper 18 bits
// across a removed prefix row, i.e. carries that run from one 4-element
// block of a Ling chain into the next. E_u checks for such a carry at the
// six block boundaries, bits 14/15, 22/23 and 30/31 (eq. 18 of the design):
//   E_u = p31 P[30:24] G[23:17] + p23 P[22:16] G[15:9] + p15 P[14:8] G[7:1]
//       + p30 P[29:23] G[22:16] + p22 P[21:15] G[14:8] + p14 P[13:7] G[6:0]
// where G[hi:lo] and P[hi:lo] are the stride-2 group terms of vlla_pkg.
// E_u is conservative: it can be true while the speculative sum happens to
// be right, but it is never false when the sum is wrong.
//
// Signed operands of opposite sign with a non-negative sum make the longest
// carry chain: every half-sum d_31..d_14 is one and a carry enters bit 14,
// so the upper sum bits are all zero. E_r flags that case (eq. 20):
//   E_r = d31 d30 ... d14 p13 G[13:1]
// and the correction unit grounds the upper sums in the same cycle. Only
// the remaining errors ask for the second cycle (eq. 21):
//   E_s = not(d31 d30 ... d14) E_u.
// All three equations are the design's. Purely combinational.
module vlla_error_detect
  import vlla_pkg::*;
(
  input  word_t d,     // half-sums
  input  word_t p,     // bit propagates
  input  word_t gg,    // intermediate generates G_i
  input  word_t pp,    // intermediate propagates P_i
  output logic  e_u,   // a speculative carry may be wrong
  output logic  e_r,   // upper half-sums all one and carry into bit 14
  output logic  e_s    // a correction cycle is needed
);

  logic all_d_hi;      // d_31 .. d_14 all one

  always_comb begin
    all_d_hi = &d[VLLA_W-1:EXACT_LSBS];

    e_u = (p[31] & grp_p(pp, 30, 24) & grp_g(gg, pp, 23, 17))
        | (p[23] & grp_p(pp, 22, 16) & grp_g(gg, pp, 15,  9))
        | (p[15] & grp_p(pp, 14,  8) & grp_g(gg, pp,  7,  1))
        | (p[30] & grp_p(pp, 29, 23) & grp_g(gg, pp, 22, 16))
        | (p[22] & grp_p(pp, 21, 15) & grp_g(gg, pp, 14,  8))
        | (p[14] & grp_p(pp, 13,  7) & grp_g(gg, pp,  6,  0));

    e_r = all_d_hi & p[13] & grp_g(gg, pp, 13, 1);
    e_s = ~all_d_hi & e_u;
  end

endmodule
