// vlla_postproc -- post-processing unit of the variable latency Ling adder.
//
// Turns Ling carries back into sums: the true carry into bit i is
// c_i = p_i-1 & H_i-1, so s_i = d_i ^ (p_i-1 & H_i-1) and the carry-out is
// c_32 = p_31 & H_31, as in the design's post-processing equations. Bit 0
// has no carry-in (s_0 = d_0), which is this implementation's choice.
//
// Purely combinational. The adder uses it twice: once on the speculative
// Ling carries and once, inside the correction unit, on the exact ones.
module vlla_postproc
  import vlla_pkg::*;
(
  input  word_t d,     // half-sums
  input  word_t p,     // bit propagates
  input  word_t h,     // Ling carries H_i
  output word_t s,     // sum
  output logic  cout   // carry-out c_32
);

  word_t c;            // true carries c_i

  always_comb begin
    c    = {p[VLLA_W-2:0] & h[VLLA_W-2:0], 1'b0};
    s    = d ^ c;
    cout = p[VLLA_W-1] & h[VLLA_W-1];
  end

endmodule
