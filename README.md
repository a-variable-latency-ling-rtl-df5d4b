# Variable Latency Ling Adder (32-bit, Brent-Kung)

This is a 32-bit adder that is right every time. It usually takes one clock
cycle and sometimes two. It is built around a Ling adder whose Brent-Kung
prefix network is cut short. Three rows of the network are removed, so the
critical path is shorter and the clock can be faster. The cost is that a
carry running a long way into the upper bits can be missed. Such carries
are rare, so the adder speculates:

* Usually the short network is right, and the sum is registered after **one
  cycle**.
* An error detector spots every addition where the short network might be
  wrong (flag `E_s`). For those, a correction unit puts the missing rows
  back, and the exact sum is registered after **two cycles**.
* One long-carry case is very common for signed data: two operands of
  opposite sign whose sum is zero or positive. The detector recognises it
  separately (flag `E_r`). Its upper sum bits are known to be zero, so it
  is repaired in the first cycle by forcing those bits to zero ("grounding").

The average latency is therefore `T_avg = (1 + P(E_s)) * T_clk`.

## Ling carries and the two chains

The pre-processing unit forms, for every bit, the half-sum `d = a ^ b`, the
generate `g = a & b` and the OR-type propagate `p = a | b`. From these it
forms the pairs

    G_i = g_i | g_(i-1)        P_i = p_i & p_(i-1)        (g_-1 = p_-1 = 0)

Instead of the carries `c_i`, the adder computes Ling carries
`H_i = c_(i+1) | c_i`. They obey

    H_i = G_i | P_(i-1) & H_(i-2)

Even Ling carries depend only on even ones, and odd ones only on odd ones.
The adder therefore runs two independent 16-element prefix chains:

* the even chain works on the elements `(G_2k, P_2k-1)`, with `P_-1 = 0`;
* the odd chain works on the elements `(G_2k+1, P_2k)`.

Each chain uses the usual operator `(g1,p1) o (g0,p0) = (g1 | p1 g0, p1 p0)`.
Each chain is half as long as a conventional carry network. The true
carries come back in post-processing:

    c_i = p_(i-1) & H_(i-1)     s_i = d_i ^ c_i     c_32 = p_31 & H_31

## The truncated Brent-Kung network

Including the row that forms the (G,P) pairs, a 16-element Brent-Kung chain
has eight rows. The rows numbered 1–7 below make up the prefix network
itself:

| row | exact network                 | speculative network |
|-----|-------------------------------|---------------------|
| 1   | 2-element groups (odd k)      | kept                |
| 2   | 4-element blocks (k = 3, 7, 11, 15) | kept          |
| 3   | 8-element groups (7:0), (15:8) | **removed**        |
| 4   | (15:0)                        | **removed**         |
| 5   | (11:0)                        | **removed**         |
| 6   | k = 5, 9, 13                  | kept                |
| 7   | even k = 2..14                | kept                |

Without rows 3–5, rows 6 and 7 combine with the 4-element block just below,
not with the full prefix. The span covered by each element `k` is then:

| elements k | span of H*       | bits of the word |
|------------|------------------|------------------|
| 0..6       | k..0 (exact)     | H_0..H_13        |
| 7..10      | k..4             | H_14..H_21       |
| 11..14     | k..8             | H_22..H_29       |
| 15         | 15..12           | H_30, H_31       |

So the low 14 Ling carries are exact. The upper 18 always look back over at
least four pairs, which is eight operand bits. For example, `H*_14` combines
`G_14, G_12, G_10, G_8`. In the RTL, `vlla_bk_chain_spec` spells out the
rows, and `vlla_pkg::spec_lo` holds the span table.

## Error detection

The short network can only lose a carry that crosses a removed row. Such a
carry enters a 4-element block from the block below it. The detector
checks the block boundaries, at bits 14/15, 22/23 and 30/31:

    E_u = p31 P[30:24] G[23:17] + p23 P[22:16] G[15:9] + p15 P[14:8] G[7:1]
        + p30 P[29:23] G[22:16] + p22 P[21:15] G[14:8] + p14 P[13:7] G[6:0]

`G[hi:lo]` and `P[hi:lo]` are group terms that step by two indices, so they
stay in one chain:

* `P[30:24] = P30 P28 P26 P24`
* `G[23:17] = G23 + P22 G21 + P22 P20 G19 + P22 P20 P18 G17`

`E_u` is conservative. It is never false when the speculative sum is wrong,
but it is often true when the sum is right. Every term only asks whether a
carry *could* reach a boundary. It does not check whether the speculative
carry above that boundary was already one.

For signed operands, the long chain typically comes from opposite signs
with a non-negative sum. Then `d_31..d_14` are all one and a carry enters
bit 14, so every upper sum bit is zero:

    E_r = d31 d30 ... d14 p13 G[13:1]        (p13 G[13:1] is exactly c_14)
    E_s = not(d31 d30 ... d14) E_u

When all upper half-sums are one, `E_u` equals `E_r`. So `E_s` and `E_r`
never hold together (the top module asserts this). Every wrong speculative
result has exactly one of the two flags set.

## Recovery

`vlla_error_correct` holds both repair paths:

* **Grounding** (`E_u & E_r`): the 14 exact low sum bits are kept, bits
  31..14 are forced to zero, and the carry-out is 1. This path is
  combinational with the speculative adder, so its result is registered in
  the first cycle.
* **Completion** (`E_s`): for each chain, rows 3, 4 and 5 are rebuilt from
  the row-2 blocks. This gives the exact prefix at the block ends, elements
  3, 7, 11 and 15. Every other speculative element is then extended by one
  operator, `H_k = H*_k | P*_k & H_(end of the block below)`, using the span
  propagate `P*_k` that the speculative network keeps for this purpose. A
  second post-processing unit forms the exact sum.

## Timing and handshake (`vlla`)

    a,b --> [operand reg] --> pre --> spec prefix --> post --> s_spec --+
                                 |         |                           |
                                 +--> detect (E_u,E_r,E_s)              +--> [result reg]
                                 +--> correct (s_gnd, s_fix) ----------+

* Operands are taken on a rising edge when `in_valid && in_ready`.
* `out_valid` pulses one cycle after the operands were taken. When `E_s` is
  set, it pulses two cycles after. `out_corrected` and `out_grounded` say
  which path produced the result.
* In the first cycle of a corrected addition, `in_ready` is low. The
  operand register then holds, so the completion path sees stable inputs
  for two cycles. `in_ready` therefore depends combinationally on `E_s`.
* Timing constraint: the path from the operand register through the
  completion logic to the result register is a **two-cycle path**. All
  other paths take one cycle.
* Reset is asynchronous and active-low. It clears every register.
* With operands back to back, throughput is one result per cycle, minus
  one bubble per correction.

## How far it can be trusted

Each unit has a self-checking testbench, and each testbench has been shown
to fail when its unit is broken. The testbenches compare the RTL with a
reference model (`tb/vlla_ref_pkg.sv`). The model does not reuse the prefix
structure. It computes speculative Ling carries as partial integer
additions over the span each one covers, and it evaluates the detection
equations bit by bit.

The end-to-end test `tb_vlla` runs directed cases and then 100 000
additions from each of three operand distributions. It checks every sum
and carry-out against `a + b`, every latency (1 or 2 cycles), the path
flags, and the total cycle count `N + corrections`. It also requires that
each mechanism occurs at least once: one-cycle result, correction,
grounding, input stall and idle gap.

Measured with the detector exactly as given by the equations above:

| operands                               | P(E_s) | T_avg (cycles) | speculative sum wrong |
|----------------------------------------|--------|----------------|-----------------------|
| uniform 32-bit                          | 0.169  | 1.17           | 0.9 %                 |
| 1/2 uniform, 1/2 Gaussian sigma = 256   | 0.211  | 1.21           | 13 % (mostly grounded)|
| 1/2 uniform, 1/2 Gaussian sigma = 30000 | 0.304  | 1.30           | 13 %                  |

For mixed distributions, the source (uniform or Gaussian) is chosen once per
addition, for both operands.

**Where this departs from published figures.** This adder has been
described as having a correction rate below 10 % for all three
distributions, with the sigma = 256 mix the lowest. The equations above give
the higher rates in the table. The conservative `E_u` flags about 17 % of
uniform additions, while fewer than 1 % actually need correcting. The RTL
follows the equations. A tighter detector would need terms that also test
the speculative carry above each boundary. That would be a change to the
design, not a bug fix.

## Choices not fixed by the design

* No carry-in: `s_0 = d_0`, `g_-1 = p_-1 = 0`, and `P_0 = 0`.
* Grounding clears sum bits 31..14 only and sets the carry-out to 1. These
  are the values `a + b` actually has in that case.
* The insides of the completion path: restored rows 3–5 plus a single
  fix-up row. To support this, the speculative network keeps group
  propagates in its down-sweep cells.
* The valid/ready handshake, the operand and result registers, the
  two-cycle path and the asynchronous reset.
* Width and structure are fixed at 32 bits. The constants in `vlla_pkg`
  document the shape; they are not a general width parameter.

A few outputs are constant by construction. The span propagate is 0 for
elements whose span reaches bit -1. On the grounding path, the upper sum
bits are 0 and the carry-out is 1.

## Files

| file | content |
|------|---------|
| `rtl/vlla_pkg.sv` | constants, `gp_t`, prefix operator, span table, stride-2 group functions |
| `rtl/vlla_preproc.sv` | d, g, p, G, P |
| `rtl/vlla_bk_chain_spec.sv` | one 16-element chain of the truncated Brent-Kung network |
| `rtl/vlla_spec_prefix.sv` | two chains: speculative Ling carries, span propagates, row-2 blocks |
| `rtl/vlla_postproc.sv` | Ling carries to sums and carry-out |
| `rtl/vlla_error_detect.sv` | E_u, E_r, E_s |
| `rtl/vlla_error_correct.sv` | grounding path and completion path |
| `rtl/vlla.sv` | top: registers, control, result selection, assertions |
| `tb/vlla_ref_pkg.sv` | reference model and operand generators |
| `tb/tb_*.sv` | one self-checking testbench per unit, `tb_vlla` end to end |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. From the project root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/vlla_pkg.sv tb/vlla_ref_pkg.sv tb/tb_vlla.sv --top-module tb_vlla
    ./obj_dir/Vtb_vlla

Replace `tb_vlla` with `tb_vlla_preproc`, `tb_vlla_spec_prefix`,
`tb_vlla_postproc`, `tb_vlla_error_detect` or `tb_vlla_error_correct` to
test a single unit. `tb_vlla` takes well under a second. To change how many
additions it runs per distribution, change `N_PER_DIST`.
