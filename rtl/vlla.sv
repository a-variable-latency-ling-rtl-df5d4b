// vlla -- 32-bit variable latency Ling adder (VLLA), top level.
//
// A Ling adder whose Brent-Kung prefix network has its three middle rows
// removed is fast but can miss a carry that travels more than eight bits
// into the upper 18 bits. Such long carry chains are rare, so the adder
// speculates: it delivers the speculative sum after one clock cycle unless
// the error detection flag E_s is set, in which case the correction unit
// restores the removed rows and the exact sum follows one cycle later. The
// one long-chain case that is common for signed data (operands of opposite
// sign with a non-negative sum, flag E_r) is repaired in the first cycle by
// grounding the upper sum bits. Every result is exact; only its latency
// varies, giving an average of (1 + P(E_s)) cycles per addition.
//
// Datapath: operand register -> pre-processing -> speculative prefix ->
// post-processing, with error detection and correction beside it, and a
// result register at the end. The unit split and the 1-or-2 cycle
// behaviour are the design's; the handshake, the registers and the reset
// are this implementation's.
//
// Interface and timing (all on the rising clock edge, active-low
// asynchronous reset):
//   * Operands are taken when in_valid && in_ready.
//   * The result appears with out_valid one cycle after the operands were
//     taken, or two cycles when E_s was set (out_corrected = 1).
//     out_grounded marks a result produced by the grounding path.
//   * in_ready is low during the first cycle of an addition that needs
//     correction: the operand register then holds its value so the
//     completion path sees stable inputs for two cycles. in_ready therefore
//     depends combinationally on E_s, as in other variable latency adders.
//   * Timing constraint: the path from the operand register through the
//     correction unit to the result register is a two-cycle path; every
//     other path is single-cycle.
module vlla
  import vlla_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,        // operands a, b present
  output logic  in_ready,        // operands taken this cycle if in_valid
  input  word_t a,               // augend
  input  word_t b,               // addend
  output logic  out_valid,       // one-cycle pulse per result
  output word_t sum,             // sum S
  output logic  cout,            // carry-out c_32
  output logic  out_corrected,   // result came from the completion path
  output logic  out_grounded     // result came from the grounding path
);

  typedef enum logic {
    ST_SPEC,                     // first cycle of an addition (or idle)
    ST_FIX                       // second cycle: completion path result
  } state_t;

  state_t state;
  word_t  a_q, b_q;              // operand register
  logic   v_q;                   // operand register holds an addition

  // Speculative Ling adder
  word_t d, g, p, gg, pp;
  word_t h_spec, hp_spec, s_spec;
  blk_t  blk;
  logic  cout_spec;

  vlla_preproc u_pre (
    .a  (a_q),
    .b  (b_q),
    .d  (d),
    .g  (g),
    .p  (p),
    .gg (gg),
    .pp (pp)
  );

  vlla_spec_prefix u_prefix (
    .gg  (gg),
    .pp  (pp),
    .h   (h_spec),
    .hp  (hp_spec),
    .blk (blk)
  );

  vlla_postproc u_post (
    .d    (d),
    .p    (p),
    .h    (h_spec),
    .s    (s_spec),
    .cout (cout_spec)
  );

  // Error detection and correction
  logic  e_u, e_r, e_s;
  word_t s_gnd, s_fix;
  logic  cout_gnd, cout_fix;

  vlla_error_detect u_detect (
    .d   (d),
    .p   (p),
    .gg  (gg),
    .pp  (pp),
    .e_u (e_u),
    .e_r (e_r),
    .e_s (e_s)
  );

  vlla_error_correct u_correct (
    .d        (d),
    .p        (p),
    .h_spec   (h_spec),
    .hp_spec  (hp_spec),
    .blk      (blk),
    .s_spec   (s_spec),
    .s_gnd    (s_gnd),
    .cout_gnd (cout_gnd),
    .s_fix    (s_fix),
    .cout_fix (cout_fix)
  );

  // Control
  logic need_fix;                // first cycle of an addition that needs E_s

  assign need_fix = (state == ST_SPEC) && v_q && e_s;
  assign in_ready = !need_fix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_SPEC;
      v_q   <= 1'b0;
      a_q   <= '0;
      b_q   <= '0;
    end else begin
      state <= need_fix ? ST_FIX : ST_SPEC;
      if (in_ready) begin
        v_q <= in_valid;
        if (in_valid) begin
          a_q <= a;
          b_q <= b;
        end
      end
    end
  end

  // Result register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      sum           <= '0;
      cout          <= 1'b0;
      out_corrected <= 1'b0;
      out_grounded  <= 1'b0;
    end else begin
      out_valid     <= v_q && !need_fix;
      out_corrected <= 1'b0;
      out_grounded  <= 1'b0;
      if (v_q && !need_fix) begin
        if (state == ST_FIX) begin
          sum           <= s_fix;
          cout          <= cout_fix;
          out_corrected <= 1'b1;
        end else if (e_u && e_r) begin
          sum           <= s_gnd;
          cout          <= cout_gnd;
          out_grounded  <= 1'b1;
        end else begin
          sum           <= s_spec;
          cout          <= cout_spec;
        end
      end
    end
  end

  // The second cycle always belongs to a held addition.
  a_fix_held : assert property (@(posedge clk) disable iff (!rst_n)
                                (state == ST_FIX) |-> v_q);
  // Grounding (all upper half-sums one) and E_s exclude each other.
  a_gnd_excl : assert property (@(posedge clk) disable iff (!rst_n)
                                !(e_s && e_r));
  // The operand register does not change during a correction.
  a_op_hold  : assert property (@(posedge clk) disable iff (!rst_n)
                                need_fix |=> ($stable(a_q) && $stable(b_q)));

endmodule
