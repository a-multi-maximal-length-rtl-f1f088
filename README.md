# Multi maximal length PRBS generator (3-stage, period 112)

A 3-stage linear feedback shift register (LFSR) on its own produces one
maximal-length pseudorandom bit sequence (PRBS) of 2^3 - 1 = 7 bits and then
repeats. This design stretches the period of the same three flip-flops to 112
bits with two small tricks:

1. **Tap switching.** The feedback of a 3-stage register can come from either
   intermediate tap, t1 (output of stage D0) or t2 (output of stage D1), each
   XORed with the last stage. Both taps are maximal length (7 bits), and 7
   shifts bring the register back to where it started. Flipping the tap every
   7 clocks therefore strings two different 7-bit patterns into a 14-bit
   period.
2. **Preset changing.** At the end of every 7-clock segment the register is
   reloaded with a new start value. The start values run 000, 001, ..., 111,
   so a full tour of presets takes 8 x 7 = 56 clocks. The tap is switched once
   per tour, giving 2 x 8 x 7 = 112 bits before the output repeats.

Only one intermediate tap is active at a time, so the feedback path is a
single 2-input XOR plus the zero-escape OR, whatever the length of the
sequence.

Two generators are provided: `prbs14_gen` (tap switching only, period 14)
and the main one in `prbs_top` (tap switching and presets, period 112). The
top instantiates both side by side on a common clock and reset.

## The shift register and the zero escape (`lfsr_core`)

```
          +------------------------------------------------+
          |                                                |
  prt0 -> OR -> [D0] --+--> OR <- prt1 -> [D1] --+--> OR <- prt2 -> [D2] --+
                       |   (shift)              |                          |
                       t1                       t2                         t3
                       |                        |                          |
                       +--> switch (tap_sel) <--+                          |
                                 |                                         |
                                 +--------------> XOR <--------------------+
                                                   |
                       AND(!Q0,!Q1,!Q2) ---------> OR ---> prbs_o (and D0 input)
```

* `prbs_o = (Q2 xor tap) or (Q == 000)`, with `tap = Q0` for `TAP_T1` and
  `Q1` for `TAP_T2`. The second term keeps the register out of the all-zero
  lock-up: from 000 the output is 1 and the next state is 001 (bit 0 = D0).
  This is what makes 000 usable as a preset.
* On every clock the register shifts: `D0 <- prbs_o`, `D1 <- Q0`, `D2 <- Q1`.
* Each stage input is ORed with its preset `prt_i` and then gated by its
  active-low clear `clr_ni`. With `prt = B` and `clr_n = B` the register
  takes the value `B` on that clock edge, whatever it held.
* Both taps give period 7 through all seven nonzero states:
  t1 is the feedback `Q2 xor Q0`, t2 is `Q2 xor Q1`.

`prbs_o` is combinational from the register and the tap select, so a new bit
is valid every cycle, one clock after the state it depends on was loaded.

## Counters, switch control and presets

| block | what it is | role |
|---|---|---|
| `mod_counter` (counter 1) | modulo 7, counts every clock | one-clock `Hit` on the 7th clock of each segment |
| `mod_counter` (counter 2) | modulo 8, counts counter 1's `Hit` | bits B2..B0 = the next preset; its own `Hit` once per 56 clocks |
| `control_logic_unit` | gates: `PRT_i = B_i & Hit`, `!CLR_i = B_i \| !Hit` | turns B into a load of the register during `Hit` |
| `switch_control` | JK flip-flop in toggle mode (J = K = `Hit`) | flips the tap select on each `Hit` it receives |

In `prbs14_gen` the switch control is driven by the modulo-7 counter and the
register is never preset (all `prt` low, all `clr_n` high). In `prbs_top`
counter 1's `Hit` drives counter 2 and the control and logic unit, and
counter 2's `Hit` drives the switch control.

## Timing of the period-112 sequence

Clocks are counted from the release of reset; cycle `c` is the `c`-th cycle
(0-based) and edge `k` ends cycle `k-1`.

| cycles | segment j | register at start of segment | tap |
|---|---|---|---|
| 0-6 | 0 | 000 (reset) | t2 |
| 7-13 | 1 | 001 | t2 |
| ... | ... | ... | t2 |
| 49-55 | 7 | 111 | t2 |
| 56-62 | 8 | 000 | t1 |
| ... | ... | ... | t1 |
| 105-111 | 15 | 111 | t1 |
| 112- | 16 = 0 | 000 | t2 |

* `seg_end_o` (counter 1's `Hit`) is high in cycles 6, 13, 20, ...; on the
  edge that ends such a cycle the register loads the value shown on
  `preset_o`, and counter 2 advances.
* Counter 2 resets to 1, not 0: the preset of segment 0 is applied by reset
  itself, so the first preset loaded by the counter is 001. Counter 2's
  `Hit` is taken at count 0, which is the edge that loads 000 again (edges
  56, 112, ...); the tap is switched on exactly that edge.
* Within a segment the register shifts freely for 6 clocks. The 7th output
  bit of a segment still comes from the shifting register; the new preset
  only takes effect on the edge after it.

The first 112 output bits after reset are

```
1011100 0111001 1110010 1001011 1011100 1100101 0101110 0010111
1110100 1101001 0111010 1010011 1110100 0011101 1001110 0100111
```

(grouped by segment; the first row uses t2, the second t1). They repeat with
period exactly 112: no shorter period divides the sequence. Segments are not
all different: presets 000 (through the zero escape) and 100 lead to the
same next state 001 under either tap, so segments 0 and 4 of each half are
identical. The period-14
generator's output, from cycle 7 on, repeats the 7-bit t1 pattern and the
7-bit t2 pattern of its current state in turn.

## Design choices beyond the original description

* **When the clears act (`AsyncClear`).** The original circuit drives the
  flip-flops' asynchronous clear pins with `!CLR`. By default
  (`AsyncClear = 0`) the clear acts on the clock edge, together with the
  OR-gate preset, so every segment shifts out all 7 bits of its own sequence
  before the load. With `AsyncClear = 1` (a parameter of `prbs_top` and
  `lfsr_core`) the drawn behaviour is modelled at cycle level, still without
  asynchronous pins: during the last cycle of a segment the stages that the
  coming preset clears already read as 0, which changes that cycle's output
  bit in some segments (20 of the 448 bits of four periods). The period is 112
  in both modes, and the register starts every segment from its preset in
  both.
* **Which tap comes first.** The switch control starts low after reset and
  low selects t2, so each period starts with t2. (Drawings of the same
  generator elsewhere put t1 in the first half; reset the switch control to
  `TAP_T1` to get that order. The period stays 14 or 112.)
* **Counter details.** Counter encodings (binary, B0 least significant),
  one-clock `Hit` pulses, counter 2's reset value of 1 and its `Hit` at count
  0 are choices that reproduce the described order of presets (000 first,
  then 001 after the first seven clocks, repeating every 56 clocks, tap
  change after the first 56 clocks).
* **Reset.** All flip-flops use an asynchronous active-low reset `rst_ni`;
  the register resets to 000, counter 1 to 0, counter 2 to 1, the switch
  control to t2.
* **Start of `prbs14_gen`.** It starts from 000 as well; the zero escape
  brings it into the sequence, so its first 7 bits include that transient
  and the strict period of 14 holds from cycle 7 on.

## Not included

* The extension to 224 bits with an up-down counter is only mentioned in the
  original description, with no indication of where the counter goes or how
  its direction is set.
* A 4-stage version (quoted at 720 bits) is not built. Note that only two of
  the three intermediate taps of a 4-stage register give maximal-length
  sequences (x^4 + x^2 + 1 is not primitive), so simply scaling `N` to 4 with
  three switched taps would not give 720.
* There is no mode input that selects the 56-bit or 7-bit outputs; a 7-bit
  maximal-length sequence is available from `lfsr_core` with `tap_sel` held.

## Files

| file | contents |
|---|---|
| `rtl/prbs_pkg.sv` | shared constants (`NStages`, `SegLen`, `NPresets`, `FullLen`) and `tap_sel_e` |
| `rtl/lfsr_core.sv` | shift register, tap switch, XOR, zero escape, preset/clear gates |
| `rtl/mod_counter.sv` | modulo counter with `Hit` |
| `rtl/switch_control.sv` | toggle flip-flop for the tap switch |
| `rtl/control_logic_unit.sv` | preset and clear gates |
| `rtl/prbs14_gen.sv` | period-14 generator |
| `rtl/prbs_top.sv` | top: period-112 generator plus the period-14 generator |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/prbs_top_async_tb.sv` | the top with `AsyncClear = 1` |

`lfsr_core` is parameterised in `N`, `TapT1`, `TapT2`, `ResetState` and
`AsyncClear`; the generators use the package constants for 3 stages.

## Simulation

Every testbench is self-checking: it compares the design with a reference
model written from the behaviour (not the structure), prints
`TB_RESULT checks=<n> failures=<m>` and stops; a watchdog ends it with a
failure if it hangs. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/prbs_pkg.sv tb/prbs_top_tb.sv --top-module prbs_top_tb
./obj_dir/Vprbs_top_tb
```

`prbs_top_tb` runs the complete design at its only size for four periods
(448 clocks). It checks every output bit, the register contents, the
segment-end strobe spacing (7 clocks), the preset order, the tap switches
(every 56 clocks), the period-14 generator, and that the output period is
exactly 112. It also counts each mechanism (preset loads, every preset value,
switches in both directions, zero escapes) and fails if one never occurs.
The other testbenches cover the blocks: maximal length of both taps from all
nonzero states and random preset/clear traffic (`lfsr_core_tb`), the two
counter configurations (`mod_counter_tb`), toggling (`switch_control_tb`),
all 16 input combinations of the preset gates (`control_logic_unit_tb`) and
the period-14 generator (`prbs14_gen_tb`). `prbs_top_async_tb` runs the top
with `AsyncClear = 1` against its own reference and checks that it differs
from the default design only in the last cycle of a segment.

The RTL also carries concurrent assertions (active with `--assert`): the
counters stay in range, counter 2 only hits together with counter 1, and the
register holds the offered preset after every segment end.
