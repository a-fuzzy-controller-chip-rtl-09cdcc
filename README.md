# An 8-bit fuzzy coprocessor

This is synthesizable SystemVerilog for a fuzzy-control coprocessor. A host
microcontroller hands it a set of 8-bit sensor values. The coprocessor evaluates
a rule base of up to 16,384 if-then rules over up to 256 inputs and returns one
8-bit crisp control output. The design is built from the article *"A Fuzzy
Controller Chip for Complex Real-time Applications"*, which describes a
1.0 µm CMOS chip of this kind.

The main idea is that every step is either a table look-up or a simple
byte-wide operation. All application knowledge lives in a knowledge base memory
(KBM) of 15-bit words:
- input membership functions (IMF) are 256-entry look-up tables, one per input
  (inputs may share one);
- rules are packed four antecedents to a word;
- output membership functions (OMF) are a 256-entry table.

The hardware only looks things up, takes MIN, MAX and bounded sums, and
integrates. So the time per output is fixed by the size of the rule base:

    clocks per output = nr * nc + 2^8 + 8 + 1        nc = ceil(ni / 4)

Here `nr` is the number of rules and `ni` the number of inputs. At the
published 100 ns clock, 1000 rules over four inputs take 1265 clocks, which is
126.5 µs or 7.9 million rules per second.

## What one control cycle does

1. **Start.** The host writes the *start information* to the control register:
   the first knowledge base (KB) number, whether the KBM is on-chip or off-chip,
   and an interrupt enable. The coprocessor reads that KB's four-word
   descriptor.
2. **Inputs, four at a time.** The coprocessor raises **IOR** ("input/output
   requested") and the host writes four input bytes, one by one, into the data
   register. Each byte is fuzzified at once: its value addresses the input's IMF
   table, and the hit entry is stored in the fuzzifier's lane. The tables of
   the group are located through the KB's IMF directory.
3. **Rule pass.** Each rule stores, per group of four inputs, one *segment*
   word. In one clock the rule decoder and the rule evaluator process one
   segment of one rule, so a pass over the rules takes `nr` clocks.
   - A rule over more than four inputs has several segments.
   - Its partial MIN is kept between passes in a 256-byte on-chip RAM.
   - In the last pass, each rule's fulfilment value is aggregated into the
     weight of its output membership function.
   - Then comes the next group of four inputs (back to step 2), or the next
     linked KB (back to step 1), or the output stage.
4. **Inference sweep.** In 256 clocks the coprocessor reads the OMF table at
   `x = 0 .. 255`. At each point it forms the fuzzy output value `mu(x)` from
   the clipped OMFs, and the defuzzifier accumulates it.
5. **Division.** Nine clocks give the rounded crisp value, by Centre of Gravity
   or Mean of Maxima. The value goes to the data register, IOR is raised again
   (with `out_rdy`), and `irq` fires if it is enabled. The host reads the
   output, which clears the flags.

One output is computed per control cycle. A system with several outputs runs
one control cycle per output, each with its own KB chain.

### Eight algorithms

Three bits of a KB descriptor choose the algorithm, `algo_t` in `fc_pkg`:

| bit | stage | 0 | 1 |
|---|---|---|---|
| `rule_bsum` | aggregation of rule fulfilments per OMF | MAX | bounded sum (saturates at 255) |
| `inf_bsum` | combining the two clipped OMFs hit at a point | MAX | bounded sum |
| `mom` | defuzzification | Centre of Gravity | Mean of Maxima |

Rules always use MIN for AND. An OMF is weighted by clipping it with its weight
(MIN). In a chain of linked KBs, each KB uses its own `rule_bsum`. The
inference and the defuzzifier use the algorithm and OMF table of the last KB in
the chain.

## Knowledge base memory layout

This is what someone writing a knowledge base needs. The memory holds 32K words
of 15 bits (`KAW = 15`), on-chip (`fc_rom`) or off-chip (the `kbm_*` pins).
The bit layouts below are this design's own. They are chosen so that each item
fits one 15-bit word, and they agree with the published per-item memory costs
(60 bits of descriptor per KB, 15 bits per rule and segment, and 15 bits per
table entry). The one addition is the IMF directory, one word per segment of
a KB, described below.

**Knowledge base descriptor (KBD).** KB `k` (0..63) sits at words `4k .. 4k+3`:

| word | bits |
|---|---|
| 0 | `[14]` link to KB k+1, `[13:8]` nc-1, `[7:0]` nr-1 |
| 1 | IMF directory start |
| 2 | `[9:7]` algorithm {mom, inf_bsum, rule_bsum}, `[6:0]` OMF page (table at 256*page) |
| 3 | SR (rule set) start address |

**Membership function entry.** IMF and OMF tables use the same 256-entry
format:

| bits | meaning |
|---|---|
| `[11]` | `nxt`: label `lbl+1` is hit too, with grade `255-mu` |
| `[10:8]` | `lbl`: first hit label |
| `[7:0]` | `mu`: its grade |
| `[14:12]` | unused |

At most two membership functions overlap at any value. Each shape is arbitrary:
the table holds it point by point.
- Input linguistic values are 1..7. `lbl = 0` means "left of value 1", so
  `(0, nxt=1, mu)` gives value 1 the grade `255-mu`.
- Output membership functions are 0..7.
- IMF tables are found through a per-KB *IMF directory* of `nc` words.
  Directory word `s` (at `imf_dir + s`) holds the start `t` of segment `s`'s
  four tables. The table of input `4s + l` is at `t + 256*l`. Its entry `v` is
  the fuzzification of input value `v`.
- Segments and KBs may point at the same tables. This sharing is what makes a
  rule over 256 inputs possible: 256 separate tables would need 64K words, twice
  the memory. One directory read per group of four inputs costs 2 clocks of host
  transfer time, and the rule and output timing are unchanged.

**Rule segment word.** Rule `r`'s segment `s` (inputs `4s .. 4s+3`) is at
`sr_start + s*nr + r`:

| bits | meaning |
|---|---|
| `[14:12]` | OMF index of the rule's consequent |
| `[3l+2:3l]` | linguistic value required of input `4s+l`; 0 = input not in the rule |

The consequent is taken from the word of the last segment.

**Linking.** A KB holds at most 256 rules. Set the link bit to chain KB `k` to
`k+1`; all 64 KBs can be chained, for 16,384 rules. Chained KBs can have
different numbers of segments (rules grouped by how many inputs they use). They
can also share tables by pointing at the same addresses.

For every KB of a chain, the host sends that KB's `nc` groups of four inputs,
starting again from input 0. Unused lanes of the last group are sent as
don't-care bytes.

## Host interface (`fc_host_if`)

The host bus is 8 bits wide, with one address line `a`, synchronous to
`clk_out`. Strobes last one clock.

| access | a=0 (control) | a=1 (data) |
|---|---|---|
| write | start: `{ie, ext, kb[5:0]}` (ignored while busy) | next input byte |
| read | status `{0000, busy, dr_full, out_rdy, ior}` | crisp output |

- IOR alone means "send four inputs"; IOR with `out_rdy` means "output ready".
- Writing an input clears IOR. Reading the output clears IOR and `out_rdy`.
- The host must not write an input while `dr_full` is set. An assertion flags
  this.
- `irq = ie & IOR`.

## Timing in detail

`fc_control` addresses the first rule word of a segment, and the OMF entry for
`x = 0`, in the clock before they are used. The rule, inference and division
states therefore take exactly `nr*nc + 256 + 9` clocks per output, matching the
published timing equation with the host transfer time set to zero.

The equation leaves out two further costs, which are part of the host transfer
time here:
- reading a KB descriptor: 5 clocks per KB;
- fuzzifying an input: 2 clocks per input after the host writes it, plus 2
  clocks per group of four (the input request and the directory read).

Results from the sweep testbench (`fc_fig1_tb`), in clocks of 100 ns:

| nr \ ni | 4 | 8 | 12 | 16 |
|---|---|---|---|---|
| 10 | 275 | 285 | 295 | 305 |
| 100 | 365 | 465 | 565 | 665 |
| 1000 | 1265 | 2265 | 3265 | 4265 |
| 3000 | 3265 | 6265 | 9265 | 12265 |

The article's performance plot reads differently from its own equation. For
example, it shows roughly 650 µs at 1000 rules and 13-16 inputs, where the
equation gives 426.5 µs, and under 20 µs at one rule, where the equation gives
26.6 µs. This design follows the equation.

Memory limits the largest cases. 10,000 rules need `10000*nc` rule words, so
with 9 or more inputs (`nc >= 3`) they do not fit 32K words. With up to 8 inputs
they fit: 10,000 rules over 8 inputs take 20,265 clocks (2.03 ms).

## Clocks and reset (`fc_clock_gen`)

`clk_xtal` (up to 20 MHz) is divided by `CLK_DIV = 2` into the 100 ns system
clock. The system clock is brought out as `clk_out`, and the host bus and the
off-chip KBM bus are synchronous to it. The off-chip memory must return the
word one `clk_out` cycle after `kbm_rd`/`kbm_addr`, which is the same timing as
the on-chip ROM.

`rst_n` is asynchronous. Its release is synchronised to a falling edge of the
system clock. The on-chip ROM contents are loaded through `rom_prog_*`, which
stands in for the mask programming of a real ROM.

## Modules

| file | block |
|---|---|
| `rtl/fc_pkg.sv` | widths, word layouts (`mf_entry_t`, `rule_word_t`, `kbd_*_t`), `algo_t`, MIN/MAX/bounded-sum functions |
| `rtl/fc_top.sv` | the coprocessor; wires the blocks by the 8-bit internal data bus and the 15-bit ROM bus |
| `rtl/fc_host_if.sv` | microcontroller interface: control/status and data registers, IOR, irq |
| `rtl/fc_clock_gen.sv` | crystal ÷ 2, reset synchroniser |
| `rtl/fc_control.sv` | control-cycle sequencer (KBD, input requests, rule passes, linking, sweep, division) |
| `rtl/fc_kbm_if.sv` | KBM address map, on-/off-chip selection, ROM bus |
| `rtl/fc_rom.sv` | on-chip KBM, 32K x 15 bits, synchronous read |
| `rtl/fc_fuzzifier.sv` | four lanes of hit IMF entries |
| `rtl/fc_rule_decoder.sv` | antecedent degrees of one rule segment (combinational) |
| `rtl/fc_rule_evaluator.sv` | MIN across segments with the 256-byte RAM, MAX/bounded-sum OMF weights |
| `rtl/fc_inference.sv` | fuzzy output value at one output point (combinational) |
| `rtl/fc_defuzzifier.sv` | CoG / MoM accumulation over the 256 points |
| `rtl/fc_divider.sv` | 9-clock restoring division with rounding |

Parameters and their defaults:
- `fc_top`: `CLK_DIV = 2`, `ROM_DEPTH = 32768`.
- Fixed sizes in `fc_pkg`: 8-bit data, 15-bit words and addresses, 4 lanes,
  8 OMFs, 256 rules per KB, 64 KBs.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.
- `fc_tb_pkg.sv` builds random but well-formed knowledge bases and holds an
  independent reference model of the whole computation.
- `fc_ext_kbm_model.sv` models an off-chip memory.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert --top-module fc_top_tb \
        -y rtl -y tb +libext+.sv -Irtl rtl/fc_pkg.sv tb/fc_tb_pkg.sv tb/fc_top_tb.sv
    obj_dir/Vfc_top_tb

`fc_top_tb` runs the full-size design (defaults untouched). It covers:
- all eight algorithms;
- 1 to 16 inputs;
- a 256-rule, four-segment KB;
- a chain of linked KBs with different segment counts;
- the 1000-rule example;
- on- and off-chip memory;
- interrupt and polling;
- an empty fuzzy output;
- rules over all 256 inputs (64 segments sharing one set of IMF tables).

It counts each of these and fails if one never happens. `fc_fig1_tb` sweeps
1 to 3000 rules over 4 to 16 inputs, plus 10,000 rules over 8 inputs and the
largest rule base, 16,384 rules in all 64 KBs linked (16,649 clocks). Both check
every crisp output against the reference model and every clock count against
the formula above.

## Where this design goes beyond the article

The article gives the block structure, the bus widths (8-bit host and data bus,
15-bit KBM and ROM bus) and the operations: look-up fuzzification with at most
two overlapping membership functions, MIN rules, MAX/BSUM aggregation and
inference, CoG/MoM, the eight algorithms, four inputs per clock, 256 rules per
KB and 64 linked KBs. It also gives the timing equation, the host protocol with
its IOR flag and interrupt, and the on-chip RAM for intermediate results.

It does not give any of the following, so they are this design's own choices:
- all word formats and the address map;
- how a link is encoded (here: next KB number);
- where the algorithm is selected (here: the KBD);
- how IMF tables are located (here: a directory with one word per segment);
- how the weighted OMF is formed (here: clipping);
- the divider;
- the register bit assignment;
- bus timing, reset, and the crystal ÷ 2 (inferred from 20 MHz and 100 ns).

The stored membership function format is complementary: the second hit label
always gets `255 - mu`. Two overlapping functions therefore always sum to full
membership. The memory is 32K x 15-bit words (60 KiB), where the article quotes
64 kB.

Two further differences from the article:
- The article's block diagram draws the off-chip KBM bus as one 15-bit
  bidirectional bus. Here it is split into a 15-bit address output, a read
  strobe and a 15-bit data input. The coprocessor only ever reads the KBM.
- The article's memory formula counts `nc` descriptors per output. Here a
  single descriptor serves a KB with any number of segments, so a chain needs
  one descriptor (60 bits) per linked KB: at least `ceil(nr/256)` per output.

Not modelled: the physical chip (cells, pads, area) and the off-chip memory
devices themselves.
