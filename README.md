# GF(2^m) divider: two Euclid steps per clock, reductions in parallel

This is a sequential circuit that computes the quotient A(x) / B(x) in the
binary field GF(2^m), that is A(x) * B(x)^-1 mod G(x), in **m clock cycles**.
Division is the slowest field operation in, for example, elliptic-curve
arithmetic over GF(2^m). Dividers built on the extended Euclid algorithm
usually need about 2m cycles, one Euclid step per cycle. This design does two
steps per cycle. The obvious way to do that puts two modular reductions in
series, each costing an AND and an XOR. The two reductions are reordered so
that they run side by side. The per-cycle critical path therefore grows by
only about one XOR delay over a one-step-per-cycle divider (estimated
3 T_XOR + 2 T_AND), and the latency halves.

The RTL follows the algorithm and bit-slice structure of the article "Fast
Hardware Algorithm for Division in GF(2^m) Based on the Extended Euclid's
Algorithm With Parallelization of Modular Reductions" (its Algorithm DEEA).
The start/busy/done sequencing, the reset and the loading of operands are
this implementation's own, because the article does not describe them.

## What is computed

Field elements are m-bit vectors. Bit i is the coefficient of x^i. G(x) is
the field polynomial, given as an (m+1)-bit vector. Bit m and bit 0 must be 1
and G must be irreducible. For any A and any nonzero B, `result` satisfies

    result * B = A  (mod G)

With A = 1, the divider computes an inverse. B = 0 has no defined result.

## The iteration

The state is two polynomial pairs and a counter:

| register | width | initial | role |
|---|---|---|---|
| Reg-R | m+1 | B | remainder sequence, its top bit r_m is tested |
| Reg-S | m+1 | G | the other remainder; s_m is always 1 |
| Reg-U | m   | A | co-factor of R, kept reduced mod G |
| Reg-V | m   | 0 | co-factor of S; holds the quotient at the end |
| Reg-G | m+1 | G | field polynomial |
| Reg-Delta | m+1 | 2^m | 1-hot code of abs(delta), see below |
| Reg-sgn | 1 | 0 | delta < 0 |

Here delta is the running degree difference between R and S. One Euclid step
(the one-step-per-cycle form this design starts from) is:

    swap  = (delta < 0) & r_m
    R     = (R - r_m*S) * x          S = swap ? R : S
    U     = (U - r_m*V) * x mod G    V = swap ? U : V
    delta = (swap ? -delta : delta) - 1

After 2m such steps V holds (A/B) * x^m. A second loop would then divide V by
x m times to remove that factor. Subtraction in GF(2) is XOR.

**Merging the divisions by x.** Every step does exactly one
multiplication-by-x of the U/V pair. Half of them can be replaced by a
division by x of the new V, which removes the x^m factor during the main loop.
Each clock cycle therefore performs two steps. The first step multiplies U by
x, and the second divides the selected V by x.

**Parallel reductions.** Done literally, a cycle would reduce U' = (U -
r_m V) x mod G and only then use U' in the second step, giving two
AND-XOR reductions in series. The reorder is as follows:

    first step  (unreduced): U' = (U - r_m*V) * x         degree <= m, u'_0 = 0
                              V' = swap ? U : V            degree <  m
    second step:              U  = (U' mod G) - r'_m*V'
                              V  = swap' ? U'/x : (V'/x mod G)

This works for three reasons:
- V' needs no reduction.
- U'/x needs no reduction, because u'_0 is always 0.
- U' mod G needs only one conditional XOR with G, controlled by its top bit u'_m.

The reduction of U' (controlled by u'_m) and the reduction of V'/x
(controlled by v'_0) are independent and run at the same time. Bit by bit,
for 0 <= j < m:

    u'_j   = u_{j-1} ^ (r_m & v_{j-1})
    v'_j   = swap ? u_j : v_j
    new u_j = u'_j ^ (u'_m & g_j) ^ (r'_m & v'_j)
    new v_j = swap' ? u'_{j+1} : v'_{j+1} ^ (v'_0 & g_{j+1})

R and S go through the same two steps, with no reduction. Because s_m = 1,
subtracting S when r_m = 1 clears bit m before the shift:

    r'_j = r_{j-1} ^ (r_m & s_{j-1}),     s'_j = swap ? r_j : s_j
    new r_j = r'_{j-1} ^ (r'_m & s'_{j-1}), new s_j = swap' ? r'_j : s'_j

The second step needs r'_m = r_{m-1} ^ (r_m & s_{m-1}), which sits on the
critical path: r_m -> r'_m -> swap' / u_j.

## Tracking delta without an adder

delta is stored as a sign bit and a 1-hot magnitude,
Delta = 2^(m - abs(delta)). Delta_m = 1 means delta = 0. A step makes abs(delta)
grow exactly when delta = 0, or when delta < 0 and no subtraction happens.
In that case delta stays (or becomes) negative. In every other case
abs(delta) shrinks and delta ends up >= 0. The controller computes:

    swap   = sgn & r_m
    shift1 = Delta_m  | (sgn & ~r_m)      (= sign after step 1, sgn')
    swap'  = shift1 & r'_m
    shift2 = Delta'_m | (shift1 & ~r'_m)  (= sign after step 2, next sgn)

Delta-calc moves the hot bit down one place when shift = 1 and up one place
when shift = 0, once per step. An assertion in `gf2m_divider` checks that
Delta stays 1-hot.

## Structure and files

All datapath blocks are combinational bit-slice arrays between the registers:

| file | contents |
|---|---|
| `rtl/gf2m_divider.sv` | top: registers, sequencer, controller, three calc arrays |
| `rtl/rs_calc.sv` | m+1 `rs_cell` slices, the R/S update |
| `rtl/uv_calc.sv` | m `uv_cell` slices plus one `uv_cell2` (produces u'_m) |
| `rtl/delta_calc.sv` | m+1 `delta_cell` slices, the 1-hot counter |
| `rtl/rs_cell.sv`, `uv_cell.sv`, `uv_cell2.sv`, `delta_cell.sv` | one bit slice each |
| `rtl/div_controller.sv` | swap, swap', shift1, shift2 |
| `rtl/load_reg.sv` | register with load (initial value) / update / hold |
| `rtl/div_sequencer.sv` | iteration counter, busy and done |

The only parameter is `M` (field degree), with default 128.

## Interface and timing

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin a division; ignored while `busy` |
| `a`, `b` | in | M | dividend, divisor (b != 0) |
| `g` | in | M+1 | field polynomial, read only on the load edge |
| `busy` | out | 1 | iterations in progress |
| `done` | out | 1 | `result` valid; stays high until the next start |
| `result` | out | M | A/B mod G (the content of Reg-V) |

The rising edge that sees `start = 1` while `busy = 0` loads the registers.
The following M edges each perform one iteration (two Euclid steps). `done`
is high after the M-th, so the result is available M cycles after the load
edge. A new `start` may be given in the cycle `done` is high. Back-to-back
divisions therefore take M+1 cycles each, because the load takes a cycle of
its own. The published throughput of one result per m cycles counts only the
iteration cycles.

## Cost

Coarse synthesis of the default M = 128 top gives:
- 772 two-input ANDs, 765 XORs and 774 1-bit multiplexers in the datapath. The
  published counts are 6m+7 = 775, 6m+3 = 771 and 6m+4 = 772.
- 781 flip-flops. That is 6m+5 state bits plus the 8-bit iteration counter;
  the published register count is 6m+4.

The extra state bit is most likely Reg-G's top bit. It is always 1 and could
be left unstored. This RTL keeps the full m+1-bit Reg-G.

## Departures and readings

- **Reduction of V'/x.** It is controlled by the constant coefficient v'_0,
  as division by x mod G requires.
- **Second-step V source.** The second step selects U'/x (not U') when
  swap' = 1. This follows the bit-level equations, and it keeps V at m bits.
- **Controller inputs.** The first half step tests Delta_m and the second
  tests Delta'_m, so each step sees the delta it acts on.
- **Sequencing and reset.** Operand loading, the iteration counter,
  `start`/`busy`/`done` and the reset are not specified by the source. The
  simplest working choices were made, which gives the M+1-cycle
  back-to-back rate noted above.
- **Two-level counter.** A two-level 1-hot counter is suggested as an
  area-saving option for Reg-Delta. Only its sizing rule is given
  (delta_h * delta_l >= m+1, each about sqrt(m)), not its design, so it is
  not implemented.
- **Timing not verified.** The critical-path estimate (3 T_XOR + 2 T_AND),
  and the 0.18 um synthesis results it leads to, are not reproduced here.
  Only the logic structure and the cycle count are verified.

## Verification

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=F`.
- **Cells and controller:** exhaustive over all inputs. The controller is
  checked against an integer model of delta.
- **Calc arrays:** random vectors at M = 128 against whole-polynomial models
  (shift, XOR, select, reduce).
- **`tb_gf2m_divider`:** every (a, b) pair at M = 8 and 2000 random divisions
  at M = 16. Each quotient is checked by multiplying back with
  `gf2m_ref_pkg::gf_mul` and each latency against M. It also counts the
  mechanisms of the design, and counts a failure for any that never occurs:
  swap, swap', abs(delta) growing and shrinking in each half step, a negative
  delta, a start ignored while busy, and a start given while a result is
  shown.
- **`tb_gf2m_divider_full`:** the default M = 128 top with
  G = x^128 + x^7 + x^2 + x + 1. Runs directed cases (1/x, a/a, 0/b) and 30
  random divisions.
- **`tb_gf2m_divider_workloads`:** M = 256 with x^256 + x^10 + x^5 + x^2 + 1,
  and M = 512 with x^512 + x^8 + x^5 + x^2 + 1.

To run one testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_gf2m_divider \
        tb/gf2m_ref_pkg.sv tb/div_check.sv tb/tb_gf2m_divider.sv rtl/*.sv
    ./obj_dir/Vtb_gf2m_divider

For a cell testbench, pass its own file and `rtl/*.sv` with
`--top-module tb_<cell>`. Every testbench runs in about a second of
wall-clock time once built. Building takes longer at M = 512, up to a minute.

To use a different field, set `M` and drive `g` with an irreducible
polynomial of that degree. No other part of the RTL depends on the field.
