# PRESTO: a pseudorandom pattern generator with preselected toggling

Scan-based logic BIST shifts pseudorandom data into the scan chains, and
pseudorandom data toggles about half of the scan cells on every shift cycle.
That switching activity burns far more power during test than the circuit ever
sees in normal use. The generator in this repository keeps the usual PRPG and
phase shifter, but puts a row of **hold latches** between them. A latch that is
enabled passes its PRPG bit on; a latch that is disabled keeps its last bit, so
every phase shifter output built only from held latches feeds its scan chain a
constant. How many latches may toggle, and when, is programmed with a few 4-bit
codes. The result is pseudorandom test data with a chosen toggling rate.

The same hardware also serves as a **test data decompressor**. The random
elements that decide hold and toggle are then replaced by deterministic
control, and a tester channel steers the PRPG. A test can therefore mix
LBIST patterns with compressed deterministic patterns and still set their
shift power.

Beside it, `lp_lfsr` is a small, separate low-power generator. It is an
8-bit LFSR that inserts an intermediate vector between successive test vectors.

```
            +------+   state   +--------------+   h   +---------------+  out[31:0]
 in (ATE) ->| PRPG |---------->| hold latches |------>| phase shifter |-----------> scan chains
            | 32 b |     |     |   H1..H32    |       | 3-input XORs, |
            +------+     |     +--------------+       |  registered   |
                |        |            ^ en[31:0]      +---------------+
                |        |            |
                |        |    en = lp_off | first_cycle | (tcr & t_eff)
                |        |            |
                |   +----v-----------------+     +------------------------+
                |   | weighted logic V     |     | mode_control           |
                |   |  (switching code)    |     |  T flip-flop: t_eff    |
                |   +----------+-----------+     |  weighted logic H or   |
                |              v                 |  4-bit down counter    |
                |   +----------------------+     +------------------------+
                |   | shift reg -> toggle  |              ^
                |   | control register tcr |       Toggle / Hold codes
                |   +----------------------+
                |              ^ reload once per pattern
                +--------- pattern_counter
```

## Files

| File | Contents |
|---|---|
| `rtl/presto_pkg.sv` | widths, mode enum, `presto_cfg_t`, tap tables |
| `rtl/prpg.sv` | 32-bit external-XOR LFSR with tester injection |
| `rtl/weighted_logic.sv` | 4-gate programmable probability source |
| `rtl/code_registers.sv` | mode, switching, Toggle and Hold code registers |
| `rtl/toggle_control.sv` | shift register and toggle control register |
| `rtl/pattern_counter.sv` | pattern sequencing, reload and first-cycle pulses |
| `rtl/mode_control.sv` | T flip-flop, period multiplexers, down counter, No Hold |
| `rtl/hold_latches.sv` | the 32 hold latches |
| `rtl/phase_shifter.sv` | 32 registered three-input XORs |
| `rtl/presto.sv` | the PRESTO generator |
| `rtl/lp_lfsr.sv` | 8-bit low-power LFSR with intermediate vectors |
| `rtl/presto_top.sv` | both generators side by side |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_switching_profile` |
| `tb/presto_ref_pkg.sv` | cycle-accurate reference model used by the two PRESTO testbenches |

## Three levers on toggling

Each hold latch `i` is enabled in a cycle when

```
en[i] = lp_off | first_cycle | (tcr[i] & t_eff)
```

1. **Which latches may toggle: the toggle control register `tcr`.** Once per
   pattern, `tcr` is loaded from a 32-bit shift register. In LBIST mode the
   shift register is filled one bit per cycle by *weighted logic V*. This is
   a pseudorandom source whose probability of a 1 is set by the 4-bit
   **switching code**. A `tcr` bit of 0 freezes its latch for the whole
   pattern. Every phase shifter output reads three latches, so a scan chain
   stays constant for the whole pattern when all three of its latches are
   frozen.
2. **When they may toggle: the T flip-flop.** `t_eff = 0` is a *hold period*:
   every latch is frozen, whatever `tcr` says. `t_eff = 1` is a *toggle
   period*: the latches selected by `tcr` follow the PRPG. Each pattern's
   shifting is thus cut into alternating hold and toggle periods. This also
   stops a single long chain from toggling without pause.
   With Toggle code `0000` in LBIST mode, T never leaves the toggle period,
   and only lever 1 remains.
3. **Off switch.** Switching code `0000` sets `lp_off`, which enables every
   latch, in either mode. The generator is then an ordinary PRPG plus phase shifter.

### The weighted logic

Four AND gates give 1s with probabilities 1/2, 1/4, 1/8 and 1/16. They do this
by AND-ing one, two, three and four PRPG bits. Each code bit enables one gate
and the enabled gates are ORed. This gives fifteen probabilities besides code
0000. For independent inputs, P(1) = 1 − Π(1 − p) over the enabled gates:

| code | P(1) | code | P(1) | code | P(1) | code | P(1) |
|---|---|---|---|---|---|---|---|
| 0000 | 0 | 0100 | 0.250 | 1000 | 0.500 | 1100 | 0.625 |
| 0001 | 0.0625 | 0101 | 0.297 | 1001 | 0.531 | 1101 | 0.648 |
| 0010 | 0.125 | 0110 | 0.344 | 1010 | 0.563 | 1110 | 0.672 |
| 0011 | 0.180 | 0111 | 0.385 | 1011 | 0.590 | 1111 | 0.692 |

`code[3]` drives the 1/2 gate and `code[0]` the 1/16 gate. The PRPG bits each
block reads are listed in `presto_pkg` (`V_TAPS`, `H_TAPS`). A second
instance, *weighted logic H*, drives the T flip-flop.

## Hold and toggle periods

`mode_control` holds the T flip-flop. How a period ends depends on the mode.

**LBIST mode (random lengths).** Four 2-input multiplexers pass the **Toggle
code** to weighted logic H during a toggle period, and the **Hold code**
during a hold period. Whenever H outputs 1, T flips. A period therefore ends
with a per-cycle probability P(code), and lasts on average 1/P(code) cycles.
For example, Hold code `0001` gives hold periods of about 16 cycles, and Toggle
code `1111` gives toggle periods of about 1.4 cycles. A large Toggle code
together with a small Hold code gives short bursts of toggling between long
quiet stretches. Note that Hold code `0000` in LBIST mode means a hold period
never ends.

**Decompressor mode (exact lengths).** The weighted logic is bypassed and a
4-bit down counter times the periods:

* On the first-cycle edge of each pattern (see below), T is loaded from the
  input `t_init` and the counter from `offset`.
* On every later shift cycle the counter counts down. When it reads 0, T
  flips, and the counter is loaded with the code of the period that starts:
  the Hold code when entering a hold period, the Toggle code when entering a
  toggle period.
* A period with code `c` therefore lasts `c + 1` shift cycles. The first
  period of a pattern lasts `offset + 1`.
* **No Hold:** a Hold code of `0000` forces `t_eff = 1`, so the whole pattern
  is shifted in toggle mode.

## Decompressor mode: pattern timeline

In decompressor mode the test data is deterministic. It comes from the tester,
whose channel `in` is XORed into the PRPG feedback every cycle (continuous
reseeding). The toggle control register is filled straight from PRPG bit 31
rather than through weighted logic V, so its contents are encoded in the
tester data too. The switching code keeps only its off switch: code 0000
still enables every latch. With the defaults, each
pattern takes 64 cycles:

```
cycle in pattern   0 ............ 30   31             32 ............... 63
phase              initialization      init (last)    shift (32 words)
scan_en (1 later)  0                   0              1
                                       first_cycle=1:
                                        - all 32 latches load the PRPG
                                        - tcr <= shift register
                                        - T <= t_init, counter <= offset
```

During initialization the tester fills the PRPG and the shift register, and
nothing is shifted into the scan chains. On the first-cycle edge, every latch
takes its PRPG bit. So the first shift word is fully deterministic, and the
hold/toggle control only acts from then on. The per-pattern inputs `t_init`
and `offset` are sampled on that edge only.

In LBIST mode a pattern is just `SHIFT_LEN` shift cycles, and `tcr` is
reloaded on the last cycle of each pattern.

## Interface and timing of `presto`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | rising-edge clock; synchronous active-high reset |
| `start` | in | 1 | run enable; with `start` low all state is frozen |
| `in` | in | 1 | tester channel, used in decompressor mode |
| `cfg_we`, `cfg_in` | in | 1, 13 | writes `{mode, sw_code, toggle_code, hold_code}` and restarts the pattern count |
| `t_init`, `offset` | in | 1, 4 | per-pattern decompressor settings |
| `out` | out | 32 | scan chain inputs |
| `scan_en` | out | 1 | `out` holds a shift word this cycle |
| `pattern_out_end` | out | 1 | `out` holds the last word of a pattern |
| `toggle_mode` | out | 1 | `t_eff` of the current cycle |

Latency: the PRPG state of cycle *k* enters the enabled latches at the end of
cycle *k*. The latch word of cycle *k* appears on `out`, XORed by the phase
shifter, in cycle *k + 1*, together with `scan_en`. The reset state is LBIST
mode with all codes 0 (plain PRPG), seed `32'h1`, T = 1 (toggle) and `tcr`
all ones.

Parameters of `presto`: `SHIFT_LEN` (shift cycles per pattern, default 32),
`INIT_LEN` (decompressor initialization cycles, default 32) and `SEED`. The
widths (32-bit PRPG, 32 chains) live in `presto_pkg`. The submodules are
parameterized, so other sizes mean editing the package constants and the tap
tables.

## The 8-bit low-power LFSR

`lp_lfsr` takes a different route to low power: it lowers the number of bit
flips between the successive vectors applied to the circuit under test.
An 8-bit external-XOR LFSR (x^8 + x^6 + x^5 + x^4 + 1) produces the test
vectors T1, T2, and so on. For every bit, a logic block forms
`Tk[i] AND Tk+1[i]` and `Tk[i] OR Tk+1[i]`. The next vector is available one
LFSR stage lower, so this costs no extra state. A multiplexer picks one of
the two: OR on odd bits, AND on even bits. Either choice equals the bit of
`Tk` or of `Tk+1`. The output sequence is T1, I1, T2, I2, ... Each bit that
changes between Tk and Tk+1 changes exactly once, either on the way into Ik or
on the way out of it. The number of flips per applied vector is therefore
halved on average, and no step has more flips than the direct Tk → Tk+1 step.
`load` with `seed` sets the initial seed vector. `en` advances one output
vector, and `is_inter` marks intermediate vectors.

## What follows the design description and what is this implementation's

Follows the description: the PRPG, hold latches and 3-input XOR phase shifter;
the 32-bit width and 32 outputs; the four weighted AND gates with their
probabilities and the OR; the 4-bit switching, Toggle and Hold registers; the
shift register and once-per-pattern toggle control register reload; the T
flip-flop with its AND gating and Toggle/Hold multiplexers; in decompressor
mode, the 4-bit down counter with offset and initial T value, No Hold on code
0000, the first-cycle reload and tester channel injection; the 8-bit
external-XOR LFSR with AND/OR logic blocks, multiplexers and intermediate
vectors.

Choices made here, where the description gives no detail:

* Feedback polynomials, seeds, which PRPG bits feed each weighted logic block,
  phase shifter taps (j, j+11, j+23) and the code-bit-to-gate order.
* Hold latches are clock-enabled flip-flops, not level-sensitive latches, so
  the design is fully synchronous. The phase shifter output is registered.
* Switching code 0000 turns low-power mode off. This is read from the
  statement that there are fifteen usable codes.
* Pattern length 32 and initialization length 32. A period of code `c` lasts
  `c + 1` cycles, and the counter reloads with the code of the new period.
* One tester channel, XORed into the LFSR feedback. `t_init` and `offset`
  arrive as ports; how the tester would deliver them is not specified.
* LBIST and decompressor operation are one module with a mode bit. In
  decompressor mode the switching code acts only through its 0000 off switch.
* The `lp_lfsr` multiplexer selection (fixed, alternating AND/OR) and its
  T/I output interleaving.
* The programming port, reset values and the status outputs `scan_en`,
  `pattern_out_end` and `toggle_mode`.

The PRPG is an LFSR. A ring generator is the other PRPG structure the
description allows; it is not built here.

Not included: the scan chains and circuit under test, the tester, and any
procedure for choosing codes or encoding compressed patterns. Those are
software or external equipment.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

* `tb_presto` and `tb_presto_top` compare every output, every cycle, with the
  reference model in `tb/presto_ref_pkg.sv`. Their runs cover LBIST,
  low-toggle and decompressor patterns, No Hold, gated `start` and mode
  switches.
* `tb_presto` also checks statistics. The `tcr` density is about 0.5 for code
  1000 and about 0.07 for code 0001. Chain toggling falls from about 51 %
  (plain) to about 1 % with switching code 0001, Toggle code 1000 and Hold
  code 0001. Every decompressor pattern has exactly 32 shift words.
* `tb_presto_top` runs both generators at their default sizes, which is the
  complete design. It counts how often each mechanism occurs and fails if
  one never does. The mechanisms are: plain PRPG, control register reload,
  hold and toggle periods, chains constant for a whole pattern, both mode
  switches, first-cycle reload, tester injection, No Hold, counter expiry,
  stalls, intermediate vectors and seed loads.
* `tb_switching_profile` prints the switching profile of two LBIST patterns
  on 15 chains, one character per shift word: `0`/`1` for a steady value and
  `~` for a change, under a row of T/H period marks. It checks that chains
  change only after toggle cycles, and that each pattern has both kinds of
  period. It also checks that some, but not all, chains stay constant for the
  whole pattern. An excerpt (switching code 0010, Toggle and Hold codes 0100):

  ```
  period  |TTTTTHHHHHTTTTTTHHHHHTTTTTHHHTTT|TTTTTTTTTHHHHHHHHHHHHHTTTHHHHHHH
  chain 0 |1111~0000000~~0000000~~0~~000~~0|11111111111111111111111111111111
  chain 2 |00000000000000000000000000000000|00~~~~~111111111111111~~~0000000
  chain 3 |000~111111111~0~11111~0~1~000000|1~00~1~~111111111111111~~1111111
  ```
* The block testbenches check, for example, the exact 1s count of every
  weighted logic code over all 1024 input combinations. They also check the
  decompressor period lengths against `t_init`, `offset` and the codes, and
  the mean LBIST period lengths against 1/P(code).

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/presto_pkg.sv tb/presto_ref_pkg.sv tb/tb_presto_top.sv --top-module tb_presto_top
./obj_dir/Vtb_presto_top
```

Replace `tb_presto_top` with any other `tb_<module>` to test one block. Every
testbench finishes in under a second.
