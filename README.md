# Digital fingerprint: an FPGA ID from multiplier glitches

No two FPGAs are exactly alike: the transistors and wires of a chip differ
slightly in their delays. This circuit turns those differences into a
chip-specific ID that is never stored anywhere. It changes the inputs of a
large combinational multiplier and counts how often each product line
glitches before the product settles. The glitch pattern depends on the
delays of the exact gates the signals cross. A copied bitstream run on
another chip therefore gives another ID.

With the default sizes the multiplier is 32 x 32 bits. Each of its 64
product lines clocks a 16-bit one-hot shift register, so each line
contributes a 4-bit count and the ID is 64 x 4 = 256 bits.

## How a glitch is counted

```
seed_a, seed_b ──> 4 x 16-bit LFSR ──> 32 x 32 array multiplier ──> 64 product lines
                    (one clock edge)     (rows of ripple adders)          │
                                                                        each line is the
                                                                        CLOCK of its own
                                                                        16-bit one-hot register
                                                                          │
                                         ID register <── one-hot → 4-bit count encoders
```

- **Input stage (`lfsr`).** The operands come from registers, so all 64
  operand bits change on the same clock edge. Any glitching on the product
  is therefore caused by the multiplier's internal paths and not by skew
  between input bits. The host writes the start value of the LFSRs. The
  "input word" of a poll is just this value.
- **Glitch generator (`array_multiplier`, `full_adder`).** There are 32 rows
  of 32-bit ripple-carry adders, and row j adds `a & {32{b[j]}}` to the
  partial sum. When the operands change, the new values reach each product
  line along paths of very different lengths. The line toggles several
  times before it settles, and each rising edge is a glitch.
- **Recorder (`onehot_recorder`).** The product line drives the clock pin of
  a 16-bit shift register that starts as `...0001`. Each glitch long enough
  to meet the flip-flops' timing moves the 1 up one place. Shorter glitches
  are lost. A glitch that only just meets the timing is sometimes recorded
  and sometimes not, and that is the source of instability in the ID.
  After 15 the count wraps back to 0.
- **Readout (`glitch_count_encoder`).** The position of the 1 becomes a
  4-bit count. A `valid` flag marks a register that is not exactly one-hot.
- **Poll sequencer (`poll_ctrl`)** and the **ID register** in `df_top`.

The recorders are clocked by combinational logic on purpose. A synthesis or
timing tool will flag this, and it must not be "fixed". On an FPGA, also
keep the multiplier as the LUT-level array written here: if it is
re-synthesized into hard multiplier blocks or carry chains, the glitch
sources change.

## One poll

`poll_ctrl` runs a poll when `start` is pulsed. All its steps are
synchronous to `clk`:

| state   | clocks          | what happens |
|---------|-----------------|--------------|
| CLEAR   | `CLEAR_CYCLES`  | LFSRs forced to 0, so the product is 0. `rec_preset` is high and holds all recorders at one-hot. |
| ARM     | 1               | `rec_preset` falls while the product is still 0. |
| LOAD    | 1               | `seed_a`/`seed_b` are loaded into the LFSRs. This operand change makes the glitches. |
| STEP    | `steps`         | Optional LFSR shifts. Each one is another operand change, and its glitches add to the counts. |
| SETTLE  | `SETTLE_CYCLES` | Waits for the lines to go quiet. |
| CAPTURE | 1               | The counts are copied into `id`/`id_ok`. `done` pulses on the next clock. |

Latency from `start` to the capture edge is
`CLEAR_CYCLES + steps + SETTLE_CYCLES + 3` clocks, which is 9 clocks for a
single-word poll at the defaults. `start` is ignored while `busy` is high.
`rec_preset` comes straight from a flip-flop, because it is an
asynchronous preset. It is low out of reset and rises at the start of each
poll. Assertions in `poll_ctrl` check that the recorders are released
before any operand change.

## Choosing the input word

The ID depends on the input word as much as on the chip. Two rules make a
good word:

- **Keep the sign bits at 1 (distinguishability).** The four MSBs of a
  32-bit operand have the largest effect on how much of the array
  switches. Setting 0s into them lowers the glitch counts fastest, and
  keeping them high raises the total glitch count. Higher counts spread the
  IDs of different chips further apart.
- **Space the 1s (stability).** A 0 in `b[j]` switches off the partial
  products of row j. That row then adds no transitions of its own, and the
  glitches from the rows above pass through it as fewer, wider pulses,
  which the recorders catch every time. Leaving `N_zero` 0s between
  consecutive 1s (`1000001...` for `N_zero = 5`) trades a slightly lower
  glitch count for far fewer lines that flicker between polls. Beyond
  about 4 or 5 zeros, more spacing no longer helps.

`df_pkg::pattern_word(width, nsign, nzero)` builds such words. For example,
`pattern_word(32, 4, 5)` is `F0410410`. `df_pkg::min_nzero` measures the
spacing of a given word. Many words meet both rules. If an ID is ever
exposed, the chip can be enrolled again under a different input word.

A host measures how stable a line is the way `tb_df_top` does: poll the
same word many times (say 1000) and sum each line's count. If the sum is
more than 1% away from 1000 times the line's usual count, the line is
unstable and should be left out of the ID or given less weight.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `df_top`, `array_multiplier` | `N` | 32 | operand width. There are 2N product lines and recorders. |
| `df_top`, `lfsr` | `LFSR_W` / `WIDTH` | 16 | width of one LFSR. `2N/LFSR_W` LFSRs are used. |
| `lfsr` | `TAPS` | `16'hB400` | feedback taps, x^16+x^14+x^13+x^11+1 |
| `df_top`, `onehot_recorder` | `DEPTH` | 16 | recorder length. The count is `log2(DEPTH)` bits. |
| `df_top`, `poll_ctrl` | `STEP_W` | 16 | width of `steps` |
| `df_top`, `poll_ctrl` | `CLEAR_CYCLES` | 2 | clocks in CLEAR |
| `df_top`, `poll_ctrl` | `SETTLE_CYCLES` | 4 | clocks in SETTLE. Must cover the array's worst settling time. |

Shared constants, the state type and the word helpers are in `df_pkg`.
On the `df_top` ports, the ID is `id[k]`, the count of product bit `k`
(`logic [2N-1:0][3:0]`), and `id_ok[k]` says that recorder k was one-hot.

## What is fixed and what was chosen here

These parts follow the published fingerprint design:

- the LFSR input stage that changes all operand bits at once
- a 32 x 32 combinational multiplier built as rows of ripple-carry adders,
  with 64 outputs
- one 16-bit one-hot shift register per output, clocked by that output
- the 4-bit count per line and the 256-bit ID
- the input-word rules: 4 sign bits high and `N_zero = 5`

These are this design's own choices:

- four 16-bit LFSRs, with the polynomial above and a synchronous clear.
  LFSRs 0 and 1 form operand `a` and LFSRs 2 and 3 form operand `b`.
- unsigned multiplication, and how a row's carry-out reaches the next row
  (as the top bit of the sum it passes on)
- the asynchronous preset of the recorders, and the count wrapping modulo
  16
- the hardware poll sequencer with its states, cycle counts and
  start/busy/done handshake. The original moved this to software on an
  embedded processor.
- the ID register, the `valid`/`id_ok` flags, and the option to step the
  LFSRs during a poll

No processor is included. The ports `seed_a`, `seed_b`, `steps`, `start`,
`busy`, `done`, `id` and `id_ok` are where it would connect.

## How far the simulation goes

The RTL is logic with zero delay. In simulation each product line makes at
most one rising edge per operand change, so a simulated count is simply the
number of 0 -> 1 transitions of that product bit during the poll. The
end-to-end testbench checks exactly that, bit for bit. It cannot show
chip-to-chip variation, the stability effects or temperature effects,
because those only exist with real delays.

`tb/tb_glitch_chips.sv` goes one step further. It replaces the multiplier
with `glitch_array_multiplier`, a behavioural copy that gives every adder
cell random gate delays drawn per "chip" from a seed. Real recorders count
the glitches this model produces. The testbench shows that product lines
glitch many times, that one chip gives the same ID on every poll, and that
different chips give different IDs. The delays are invented and only show
the mechanism. They are not a timing model of any FPGA.

On four of these chips the same testbench also runs the two input-word
experiments and prints the results. With this delay model they follow the
trends described above. In the sign-bit scan, the largest glitch count of
a line falls from about 9 at `FFFFFFFF` to 1 as 0s are shifted in. In the
`N_zero` sweep, short pulses (under 20 ps) drop from about 30 per poll at
`N_zero = 0` to about 1 at `N_zero = 5`, and the largest count drops from
about 9 to 3. These numbers come from invented delays, so treat them as
an illustration only.

## Simulating

Each testbench checks itself and ends with `TB_RESULT checks=N failures=M`.
For example, to run the full-size end-to-end test (about 1,200 polls,
under a second):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/df_pkg.sv tb/tb_df_top.sv --top-module tb_df_top -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_df_top` | Full size. Random words with 0 to 100 LFSR steps, including recorder wrap-around. Also the sign-bit scan (`FFFFFFFF` with 0s shifted in from the MSB) and the `N_zero` sweep (0 to 6 and 14, with and without sign bits). Ends with a 1000-poll stability run on `F0410410`. Every ID and every poll latency is checked. |
| `tb_glitch_chips` | Delay-annotated multiplier over 60 simulated chips: recorder counts against an edge monitor, repeatable IDs, 60 distinct IDs, and edge and short-pulse totals for the baseline word `92492492` against the improved word `F0410410`. It takes a few minutes to build. |
| `tb_array_multiplier` | 32 x 32 on corner, pattern and 20,000 random operands. 4 x 4 and 8 x 8 exhaustively. |
| `tb_lfsr` | load, step, clear priority, period 65535 |
| `tb_onehot_recorder` | counting, wrap, asynchronous preset |
| `tb_glitch_count_encoder` | all one-hot inputs, and rejection of zero and multi-hot inputs |
| `tb_poll_ctrl` | strobe order and latency for 0, 1, 7 and 300 steps |

Lint and synthesis see the same sources. Give `rtl/df_pkg.sv` first, then
the module files, or let `-y rtl` find them. The design contains no
memories and no vendor primitives.
