// vlla_ref_pkg -- reference model for the variable latency Ling adder
// testbenches.
//
// Everything here is computed from the operands with integer arithmetic or
// bit-serial loops, not with the prefix structure of the RTL:
//   * a speculative Ling carry H*_i is g_i plus the carry into bit i of the
//     partial addition of bits [i-1 : lob], where lob is the lowest bit the
//     truncated network reaches (bit 2*spec_lo - 1 + chain parity);
//   * E_u, E_r and E_s are evaluated term by term from the bit generates
//     and propagates with a recursive group function;
//   * the exact result is a + b.
// It also holds the operand generators for the three input distributions
// (uniform; half uniform / half Gaussian with sigma 256; half uniform /
// half Gaussian with sigma 30000).
package vlla_ref_pkg;

  typedef logic [31:0] w32_t;

  function automatic int lo_elem(int k);
    return (k <= 6) ? 0 : (k <= 10) ? 4 : (k <= 14) ? 8 : 12;
  endfunction

  // Lowest operand bit that speculative Ling carry i looks at (-1: none).
  function automatic int lo_bit(int i);
    return 2 * lo_elem(i / 2) + (i % 2) - 1;
  endfunction

  // Carry out of the addition of bits [hi-1 : lo] of a and b (carry-in 0).
  function automatic logic part_carry(w32_t a, w32_t b, int hi, int lo);
    logic [32:0] sa, sb, s;
    if (lo < 0) lo = 0;
    if (hi <= lo) return 1'b0;
    sa = 33'(a) >> lo;
    sb = 33'(b) >> lo;
    sa &= (33'd1 << (hi - lo)) - 33'd1;
    sb &= (33'd1 << (hi - lo)) - 33'd1;
    s  = sa + sb;
    return s[hi - lo];
  endfunction

  // Speculative Ling carry H*_i.
  function automatic logic ref_h(w32_t a, w32_t b, int i);
    return (a[i] & b[i]) | part_carry(a, b, i, lo_bit(i));
  endfunction

  // Exact Ling carry H_i = g_i + c_i.
  function automatic logic ref_h_exact(w32_t a, w32_t b, int i);
    return (a[i] & b[i]) | part_carry(a, b, i, 0);
  endfunction

  // Group (generate, propagate) of chain elements khi..klo of chain c.
  // Element k covers bits 2k+c and 2k+c-1; the group propagate is the OR
  // propagate of bits [2khi+c-1 : 2klo+c-2], zero if that reaches bit -1.
  function automatic logic [1:0] ref_grp(w32_t a, w32_t b, int c, int khi, int klo);
    int   hi, lob;
    logic gr, pr;
    hi  = 2 * khi + c;
    lob = 2 * klo + c - 1;
    gr  = (a[hi] & b[hi]) | part_carry(a, b, hi, lob);
    if (lob - 1 < 0) pr = 1'b0;
    else begin
      pr = 1'b1;
      for (int j = lob - 1; j <= hi - 1; j++) pr &= a[j] | b[j];
    end
    return {gr, pr};
  endfunction

  function automatic w32_t ref_spec_sum(w32_t a, w32_t b, output logic cout);
    w32_t s;
    s[0] = a[0] ^ b[0];
    for (int i = 1; i < 32; i++)
      s[i] = a[i] ^ b[i] ^ ((a[i-1] | b[i-1]) & ref_h(a, b, i - 1));
    cout = (a[31] | b[31]) & ref_h(a, b, 31);
    return s;
  endfunction

  // Bit-level G_i, P_i and recursive stride-2 groups.
  function automatic logic bG(w32_t a, w32_t b, int i);
    return (a[i] & b[i]) | ((i > 0) ? (a[i-1] & b[i-1]) : 1'b0);
  endfunction
  function automatic logic bP(w32_t a, w32_t b, int i);
    return (i > 0) ? ((a[i] | b[i]) & (a[i-1] | b[i-1])) : 1'b0;
  endfunction
  function automatic logic gG(w32_t a, w32_t b, int hi, int lo);
    if (hi == lo) return bG(a, b, hi);
    return bG(a, b, hi) | (bP(a, b, hi - 1) & gG(a, b, hi - 2, lo));
  endfunction
  function automatic logic gP(w32_t a, w32_t b, int hi, int lo);
    if (hi == lo) return bP(a, b, hi);
    return bP(a, b, hi) & gP(a, b, hi - 2, lo);
  endfunction

  function automatic logic ref_eu(w32_t a, w32_t b);
    w32_t p;
    p = a | b;
    return (p[31] & gP(a, b, 30, 24) & gG(a, b, 23, 17))
         | (p[23] & gP(a, b, 22, 16) & gG(a, b, 15,  9))
         | (p[15] & gP(a, b, 14,  8) & gG(a, b,  7,  1))
         | (p[30] & gP(a, b, 29, 23) & gG(a, b, 22, 16))
         | (p[22] & gP(a, b, 21, 15) & gG(a, b, 14,  8))
         | (p[14] & gP(a, b, 13,  7) & gG(a, b,  6,  0));
  endfunction

  // E_r: all half-sums 31..14 one and a carry into bit 14.
  function automatic logic ref_er(w32_t a, w32_t b);
    w32_t d;
    d = a ^ b;
    return (&d[31:14]) & part_carry(a, b, 14, 0);
  endfunction

  function automatic logic ref_es(w32_t a, w32_t b);
    w32_t d;
    d = a ^ b;
    return !(&d[31:14]) && ref_eu(a, b);
  endfunction

  // ---- operand generators ----
  function automatic real urand01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  // Gaussian integer, mean 0, by Box-Muller, as a 32-bit two's complement.
  function automatic w32_t gauss(real sigma);
    real u1, u2, z;
    u1 = urand01();
    u2 = urand01();
    z  = $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2) * sigma;
    return w32_t'($rtoi(z < 0.0 ? z - 0.5 : z + 0.5));
  endfunction

  // dsel 0: uniform; 1: half uniform / half Gaussian sigma 256;
  // 2: half uniform / half Gaussian sigma 30000. The choice between the
  // uniform and the Gaussian source is made once per addition, for both
  // operands together.
  function automatic void gen_pair(int dsel, output w32_t a, output w32_t b);
    real sigma;
    sigma = (dsel == 1) ? 256.0 : 30000.0;
    if (dsel == 0 || $urandom_range(1, 0) == 0) begin
      a = $urandom;
      b = $urandom;
    end else begin
      a = gauss(sigma);
      b = gauss(sigma);
    end
  endfunction

endpackage
