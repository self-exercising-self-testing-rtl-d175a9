# Self-exercising, self-testing k-order comparator

A *k-order comparator* tells whether two n-bit words differ in fewer than k
bit positions. For k = 1 it is the ordinary equality comparator. For larger k
it accepts words that are "close" in Hamming distance, which is what an
error-correcting decoder, a cache tag protected by a (k-1)-error-correcting
code, or a network host matching a coded destination address needs: compare
the coded words directly instead of decoding first.

The comparator here is also **self-exercising**. A small on-chip test
vector generator can replace the operands at any time. It feeds the
comparator an alternating stream of inputs that sit just inside and just
outside the threshold. A one-bit reference signal runs alongside, and together
with the comparator output it must form a complementary (double-rail) pair on
every test cycle. Any stuck-at fault on the difference lines, the XOR gates,
the threshold stage, the generator or the reference breaks that pairing within
one test period of 4n vectors.

Default size: n = 16, k = 2. Both are parameters (`N`, `K`, 1 <= K <= N).

## Structure

```
            op_a ──┐                     ┌──────────────────────────────┐
                   ├─mux─┐               │ kcmp_comparator              │
   tvg_a ──────────┘     ├── a ─────────►│  kcmp_xor_row   x = a ^ b    │
                         │               │        │                     │
            op_b ──┐     ├── b ─────────►│  module D: lt_k = |x| < K    ├──► z1 = match
   tvg_b ──────────┴─mux─┘               └──────────────────────────────┘
      ▲                  ▲ test_en
 ┌────┴─────────────┐
 │ kcmp_tvg         │   kcmp_cnci: toggle flip-flop ───────────────────────► z0 (= ~q)
 │  A, B twisted    │
 │  rings, alternate│
 └──────────────────┘
```

| module | role |
|---|---|
| `kcmp_se_top` | the whole circuit: generator, operand multiplexers, comparator, indicator, outputs `z0`/`z1` |
| `kcmp_comparator` | XOR row + module D; `ANALOG_D` selects logic or transistor-level model for D |
| `kcmp_xor_row` | N XOR gates; `x[i]` = 1 where the operands differ |
| `kcmp_threshold` | module D as logic: 1 while fewer than K bits of `x` are set |
| `kcmp_ratioed_d_model` | behavioural DC model of the transistor circuit of module D (simulation only) |
| `kcmp_tvg` | test vector generator: two twisted-ring shift registers shifted alternately |
| `kcmp_johnson_sr` | one N-bit shift register with inverted feedback |
| `kcmp_cnci` | code / non-code indicator, a toggle flip-flop |
| `kcmp_pkg` | default sizes and the generator phase type |

## Module D: a threshold gate built from a ratioed pull-down

The threshold stage is what makes this comparator cheap. The obvious design
would count the differing bits with an adder tree and then compare the count
with k. Module D instead is one node, V_out. An always-on pmos load (t1)
pulls it up. N parallel nmos transistors (q_1..q_N) pull it down, each gated
by one XOR output. With no q_i on, V_out sits at VDD. Each extra conducting
q_i pulls it lower. The transistor sizes are chosen so that V_out is still a
valid logic 1 with k-1 transistors on and already a valid logic 0 with k on.
A two-inverter buffer then restores the level.

With t1 saturated and the conducting q_i in their linear region, the node
settles where

    beta_p (VDD + VTP)^2 / 2 = lambda * beta_n ((VDD - VTN) V - V^2 / 2),   beta = KP W/L

for lambda conducting inputs. Let f(V) = (2(VDD-VTN)V - V^2) / (VDD+VTP)^2. The
two level conditions then bound the pmos/nmos aspect ratio
W/L = (Wp/Wn) / (Lp/Ln):

    (k-1) (KPn/KPp) f(VIH_MIN)  <=  W/L  <=  k (KPn/KPp) f(VIL_MAX)

The window closes for k > f(VIH_MIN) / (f(VIH_MIN) - f(VIL_MAX)).

Reference point (1.0 um CMOS process: VTN = 0.7522 V, VTP = -0.8433 V,
KPn = 1.207e-4, KPp = 3.434e-5 A/V^2, VDD = 5 V), with the buffer's input
levels set to VIH_MIN = 2.5 V and VIL_MAX = 1.9 V:

| k | W/L window | example sizing |
|---|---|---|
| 2 | 3.049 .. 5.099 | area: Wn = Ln = 1 um, Wp = 4, Lp = 1 (W/L = 4); delay: Wn = 4 um, Wp = 16, Lp = 1 |
| 3 | 6.098 .. 7.648 | area: Wp = 7, Lp = 1 (W/L = 7); delay: Wn = 4 um, Wp = 28 |
| 4..6 | narrowing; 15.246 .. 15.296 at k = 6 | |
| 7 | empty | not realisable with these noise margins |

Keeping Wn and Ln at their minimum gives the smallest area. A wider nmos speeds
up the falling output but forces a proportionally wider pmos load.

The circuit draws static current whenever the operands differ: about 1.2 mA at
W/L = 4. It draws none when they are identical. That suits uses where mismatches
are rare, such as error correction or direct-mapped cache tags. It does not
suit set-associative tag arrays, where all but one way mismatch on every access.

In RTL, module D is `kcmp_threshold`, a synthesizable equivalent: a ones-counter
that saturates at K (clog2(K+1) bits), compared with K. It is not the adder tree
that the ratioed circuit replaces. It just gives a logic flow the same function.
`kcmp_ratioed_d_model` evaluates the equation above with `real` arithmetic. It
reports `vout`, the static current `idd`, and `level_ok` (V_out outside the band
(VIL_MAX, VIH_MIN)). It warns at elaboration when W/L falls outside the window.
Its logic output `lt_k` follows after a fixed transport delay: `D0_NS` when it
falls, `D1_NS` when it rises. These are circuit-simulation figures for a given
sizing, not something the model derives. Set them together with the sizes:

| k | sizing (Wn/Ln, Wp/Lp in um) | fall D0 | rise D1 |
|---|---|---|---|
| 2 | 1/1, 4/1 (default) | 3.67 ns | 2.42 ns |
| 2 | 1/1, 7/2 | 3.35 ns | 2.68 ns |
| 2 | 4/1, 13/1 | 2.09 ns | 1.78 ns |
| 2 | 4/1, 16/1 | 2.35 ns | 1.67 ns |
| 3 | 1/1, 7/1 | 3.59 ns | 1.90 ns |
| 3 | 4/1, 25/1 | 2.16 ns | 1.51 ns |

The fall delay is measured with exactly k inputs switching on together, which
is the slowest case. A larger pmos load speeds up the rise, but it also adds
load capacitance and so slows the fall. The delay-optimised sizings (Wn = 4 um)
are faster. That advantage shrinks as k grows, because the pmos grows with it.

## Test vector generator and the double-rail test response

Shift registers A and B are N-bit twisted rings: the last cell feeds the first
through an inverter. Bit 0 is the first, leftmost cell. Such a register cycles
through 2N states. Two of them whose states are s steps apart (s <= N) differ in
exactly s cells.

- Reset: B = all zeros, A = K ones in cells 0..K-1 followed by zeros, so A is
  K steps ahead of B and `A ^ B` has weight K.
- The registers never shift together. A phase bit (`tvg_phase_e`) shifts B on
  one test cycle and A on the next. The distance therefore runs K, K-1, K, K-1, ...
- After 2N shifts of each register, i.e. **4N vectors**, both are back at
  reset. Over that period every XOR gate sees all four input combinations.
  Every line X_i is 1 in some weight-K vector and 0 in some weight-(K-1) vector.

A fault-free comparator therefore outputs z1 = 0, 1, 0, 1, ... in test mode.
`kcmp_cnci` toggles on every test cycle (q = 0, 1, 0, 1, ...). Its inverted
output drives z0. **In test mode z0 != z1 on every cycle.** An external
two-rail checker, or a tester, watches the pair. Examples of what breaks it:

- X_i stuck-at-0 (or q_i stuck-open): a weight-K vector with X_i = 1 looks like
  weight K-1, so z1 = 1 where 0 was expected.
- X_i stuck-at-1 (or q_i stuck-on): a weight-(K-1) vector with X_i = 0 looks
  like weight K.
- z1 or z0 stuck, or a pull-up or pull-down path stuck open, so the output
  fails to rise or to fall: the alternation breaks.
- A stuck shift-register cell or a broken indicator loses the alternation.

Stuck-on faults in the buffer transistors are not covered by this scheme. They
are either harmless or need an n-dominant transistor sizing, which is outside
the RTL.

Each register shifts on every other vector, so in effect the registers run at
half the rate of the indicator flip-flop. The RTL uses one clock at the vector
rate and gates the two shift enables by phase. That is equivalent to clocking
the indicator at twice the frequency of the registers.

## Top-level interface (`kcmp_se_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one test vector per rising edge |
| `rst_n` | in | 1 | asynchronous, active low; loads A, B, phase and indicator |
| `test_en` | in | 1 | 1 = test phase, 0 = normal comparison |
| `op_a`, `op_b` | in | N | functional operands |
| `match` | out | 1 | 1 when the compared words differ in fewer than K bits (same net as `z1`) |
| `z1`, `z0` | out | 1 | test response pair; complementary in every test cycle |
| `tvg_a`, `tvg_b` | out | N | generator state, for observation |

The comparison path from `op_a`/`op_b` (or the generator registers) to `match`
is purely combinational. `z0` comes straight from a flip-flop. The generator and
the indicator only advance while `test_en` is high, and they hold their state
otherwise. Test cycles can therefore be interleaved with normal comparisons
(for example, during idle cycles) without losing the alternation. During test
cycles `match` carries the test response, not a comparison of the operands.

Parameters: `N` (16), `K` (2), `ANALOG_D` (0: synthesizable logic; 1: the
transistor-level DC model, simulation only), `WP_UM`/`LP_UM` (pmos load size used
by the model, default 4 um / 1 um; use about 7 / 1 for K = 3), `D0_NS`/`D1_NS`
(the model's output delays, default 3.67 / 2.42 ns). With `ANALOG_D = 1` the
clock period must exceed both delays.

## Where this RTL departs from, or adds to, the original method

- Module D is transistor-level in the original. Here it is threshold logic, and
  the transistor behaviour lives in a separate DC model. That model carries the
  published delays as fixed per-instance figures and does not compute them.
- The DC model follows the method's own assumption that t1 is saturated across
  the band of interest. That assumption is what produces the published W/L windows. A strict
  square-law reading would put t1 in its linear region there.
- The model's windows ([3.049, 5.099] for k = 2, [6.098, 7.648] for k = 3) come
  out slightly wider than the published ones ([3.046, 5.090], [6.092, 7.641]).
  This is taken to be rounding in the published figures.
- One published delay-optimised 3rd-order sizing, W/L = 7.75 (Wp = 31 um), lies
  above the analytic window. In the model its low level at three differing bits
  is 1.94 V: still below the 2.2 V switching point assumed for the buffer, but
  0.04 V above VIL_MAX.
- The buffer switching point (2.2 V) is a choice. The method only requires that
  the buffer's transition region lie inside [1.9 V, 2.5 V].
- Single clock with shift enables instead of two clock rates. Asynchronous reset.
  `test_en`-controlled operand multiplexers. z0 taken from the inverted
  flip-flop output. All of these are choices made here.
- Not built: the n-dominant sizing against buffer stuck-on faults, and the
  applications (error-correcting decoders, fault-tolerant cache tags, broadcast
  address matching). Those need codes and memory designs that are specified
  elsewhere.

## Verification

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a cycle-count watchdog.

| testbench | what it shows |
|---|---|
| `tb_kcmp_se_top` | default-size top (N = 16, K = 2): normal comparisons at every distance, one complete 4N test period (return to reset state checked), 2000 cycles of random mode switching. It counts every mechanism (match, mismatch, weight-K and weight-(K-1) vectors, switches in both directions, completed periods, operands overridden in test mode) |
| `tb_kcmp_se_top_model` | top with the transistor-level model of D, K = 2 (W/L = 4) and K = 3 (W/L = 7) |
| `tb_kcmp_selftest` | fault coverage: for N = 16/K = 2, N = 16/K = 3 and N = 8/K = 1, every single stuck-at fault on X lines, XOR inputs, shift-register cells, z0 and z1; 40 + 40 multiple stuck-at sets; stuck-open pull-up / pull-down. Each fault gets one 4N-vector period. All 246 / 246 / 166 faults are detected, and the fault-free circuit never flags |
| `tb_kcmp_ratioed_d_model` | 16 published sizings for k = 2 and 3, each with its fall/rise delay checked to 10 ps; mid-window sizings for k = 1, 4, 5, 6; k = 7 must fail; an undersized load must fail; static current |
| `tb_kcmp_comparator`, `tb_kcmp_threshold`, `tb_kcmp_xor_row`, `tb_kcmp_tvg`, `tb_kcmp_johnson_sr`, `tb_kcmp_cnci` | unit tests against closed-form references (for example, the generator state after m vectors is a = J(K + floor(m/2)), b = J(ceil(m/2))) |

`kcmp_tvg` also carries an assertion that the weight of `A ^ B` matches its
phase.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/kcmp_pkg.sv \
    tb/tb_kcmp_se_top.sv --top-module tb_kcmp_se_top -o sim
./obj_dir/sim
```

Replace the testbench name for the others. `tb_kcmp_selftest` also needs
`tb/kcmp_selftest_harness.sv`, which `-Itb` finds. Each runs in well under a
second. All RTL except `kcmp_ratioed_d_model` is synthesizable. At the defaults
the top is 34 flip-flops plus about 90 word-level cells.
