# A folded 3-D discrete wavelet transform processor

A 3-D wavelet transform can be computed as three 1-D transforms, one along
each axis, each splitting its input into a low-pass (average) and a high-pass
(detail) half. This processor does all three with a **single pair of 4-tap
filters** that is reused for every pass, a central state machine, and three
small on-chip memories that hold the input block and the results of one pass
as the input of the next. Keeping only one filter pair and one controller
keeps the circuit small and its power low; the price is that the passes run
one after the other.

The RTL follows a published low-power prototype (0.6 µm CMOS, 16-bit data,
Booth multipliers and carry look-ahead adders, 1 Kbit of cache, 25 controller
states, about 272 MHz). The block structure, widths, memory sizes and state
schedule are those of the prototype. How the data words are routed in the
second and third pass, the handshakes and the read-out port are not published
and are choices made here; they are listed under
[Where this design makes its own choices](#where-this-design-makes-its-own-choices).

## Data format

* Samples, coefficients and results are 16-bit two's-complement values.
* Everything moves in 64-bit **words** of four 16-bit **lanes**, lane 0 in bits
  15:0.
* One **block** is eight words, 32 samples.
* Each filter produces 16 outputs per block, numbered 0-15.
  Outputs 0-7 come from the first pass, 8-11 from the second, 12-15 from the
  third. Low-pass output *k* is stored in LRAM entry *k*. High-pass output *k* is
  stored in HRAM entry *k*.

## Block diagram

```
 coef_lo_in[0..2] ─► coef_module (R0 R1 R2 + 3:1 mux) ─► coef_lo ─┐
                                                                   ▼
 blk_data ─► INRAM 8x64 ──┐                                  dwt_filter (low)  ─► lo_result ─► LRAM (16x16, 64-bit read)
             LRAM ────────┼─ OR ─► [rotate 2 lanes] ─► bus ─►                                             │
             HRAM ────────┘                                  dwt_filter (high) ─► hi_result ─► HRAM (16x16, 64-bit read)
                                                                   ▲
 coef_hi_in[0..2] ─► coef_module (R0 R1 R2 + 3:1 mux) ─► coef_hi ─┘
                               controller (25 states) drives every enable, address and select
```

| Module | Role |
|---|---|
| `dwt3d_processor` | top: wires the blocks below together |
| `controller` | 25-state central controller; emits one `ctl_t` control word per cycle |
| `coef_module` (x2) | three 64-bit coefficient registers R0-R2 (one per pass) and a 3:1 multiplexer |
| `dwt_filter` (x2) | 4-tap filter tree: four multipliers, then three adders |
| `booth_mult16` | 16x16 radix-4 Booth multiplier |
| `cla_adder16` | 16-bit two-level carry look-ahead adder |
| `lp_adder_cell` | 1-bit full-adder cell with independent sum and carry paths |
| `inram` | 8 x 64-bit input cache; 64-bit write and read |
| `lh_ram` (x2: LRAM, HRAM) | 16 x 16-bit result cache; 16-bit write, 64-bit read |
| `dwt_pkg` | shared widths, the `src_e` bus-source enum, the `ctl_t` struct and `rot2()` |

The three memories hold 512 + 256 + 256 = 1024 bits in total.

## The 25-state schedule

This part of the design needs the most care. The controller waits in an idle
state until `start`. It then runs states 0 to 24, one per clock, and returns to
idle. In every computing state both filters see the same 64-bit bus word. Each
filter uses the coefficient register of the current pass. Both outputs are
written in the same cycle.

| State | Action | Bus word | Coefficients | Outputs written |
|---|---|---|---|---|
| 0 | load R0-R2 of both filters; clear LRAM and HRAM | – | – | – |
| 1-8 | `blk_req`; write `blk_data` into INRAM word s-1 | – | – | – |
| 9-16 | pass 1 | INRAM word s-9 | R0 | 0-7 |
| 17 | pass 2 | LRAM word 0 (L0-L3) | R1 | 8 |
| 18 | pass 2 | LRAM word 1 (L4-L7) | R1 | 9 |
| 19 | pass 2 | HRAM word 0 (H0-H3) | R1 | 10 |
| 20 | pass 2 | HRAM word 1 (H4-H7) | R1 | 11 |
| 21 | pass 3 | LRAM word 2 = (L8, L9, L10, L11) | R2 | 12 |
| 22 | pass 3 | LRAM word 2 rotated = (L10, L11, L8, L9) | R2 | 13 |
| 23 | pass 3 | HRAM word 2 = (H8, H9, H10, H11) | R2 | 14 |
| 24 | pass 3 | HRAM word 2 rotated = (H10, H11, H8, H9) | R2 | 15 |

`done` is high in state 24. A full transform, including the coefficient and
block loads, therefore takes exactly **25 cycles**. At 272 MHz that is about
92 ns.

The published prototype fixes the state numbering, what each group of states
does, and how many outputs each pass makes: 8, then 4, then 4. It does not say
which memory words each state reads, so the routing above is this design's own.

* **Pass 2** takes the sixteen pass-1 results as four non-overlapping words.
* **Pass 3** has only eight values to work on, the pass-2 results in entries
  8-11 of LRAM and HRAM, yet it must make four outputs per filter. Each
  four-value set is therefore filtered twice: once as stored and once rotated by
  two lanes. This is a 4-tap filter decimated by two, with periodic extension
  over four samples, and it matches the `2n` index of the usual DWT equation.

The rotation sits on the shared bus in the top module and is driven by
`ctl.rd_rot`.

A `start` that arrives while the controller is busy is ignored. The
coefficients are reloaded in state 0 of every run.

## Filter arithmetic

For a data word `d` and a coefficient word `c`:

```
result = Σ_{i=0..3} low16( signed(d[i]) × signed(c[3-i]) )   (mod 2^16)
```

* The sum is a convolution: lane *i* of the data, with lane 0 the oldest
  sample, meets coefficient lane 3-*i*.
* Each multiplier gives the full 32-bit product. Only its low 16 bits go into
  the adder tree, as in the prototype.
* The adder tree is two adders, then one. All sums wrap modulo 2^16, with no
  saturation and no scaling.
* Coefficients must therefore be integers, or fixed-point values whose scaling
  the user manages.
* The filter is combinational. A memory read, the filter and the result write
  all fit in one clock cycle.

`booth_mult16` recodes the multiplier radix-4. Each triplet
`{b[2i+1], b[2i], b[2i-1]}` selects 0, ±a or ±2a, and the eight partial
products are added.

`cla_adder16` works in two levels:

* Each bit forms generate `a&b` and propagate `a^b`.
* Carries inside a 4-bit group are the expanded sum of products of those
  signals.
* Group carries come from a second look-ahead level over the group
  generate/propagate signals.
* Every bit is an `lp_adder_cell`: a full adder whose sum (`a^b^cin`) and
  carry (majority of `a`, `b`, `cin`) are separate paths. Its carry-in comes
  from the look-ahead network. The top cell's carry is `cout`.

The prototype's transistor-level low-power cell is not modelled. Only its
logic function is.

## Memories

All three memories write synchronously and read asynchronously. The
asynchronous read is what lets one state read, filter and write back in a
single clock.

* **Idle outputs.** A memory that is not being read drives zero. The shared
  bus is the OR of the three outputs, which stands in for tri-state drivers.
  An assertion in the top checks that at most one memory is read per cycle.
* **Clear.** Each memory has a clear input. The controller clears LRAM and HRAM
  in state 0. INRAM's clear is tied off in the top, because every run rewrites
  all of INRAM.
* **Read width.** `lh_ram` is written 16 bits at a time and read 64 bits at a
  time. Word *w* is entries 4*w* to 4*w*+3, with the lowest entry in bits 15:0.

## Interface and timing of `dwt3d_processor`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (controller and coefficient registers) |
| `start` | in | 1 | sampled while idle; starts a transform |
| `coef_lo_in[3]`, `coef_hi_in[3]` | in | 64 each | coefficient words for passes 1-3, sampled in state 0 |
| `blk_req`, `blk_addr` | out | 1, 3 | states 1-8: block word wanted this cycle |
| `blk_data` | in | 64 | the requested word, in the same cycle |
| `busy`, `done`, `state` | out | 1, 1, 5 | running; last state; current state number |
| `lo_result`, `hi_result` | out | 16 | filter outputs, valid in states 9-24 |
| `rd_sel`, `rd_addr` | in | 1, 2 | read-out while idle: 0 = LRAM, 1 = HRAM; word number |
| `rd_data` | out | 64 | read-out word, combinational; zero while busy |

The external memory must answer a block request in the same cycle, because
there is no wait state. After `done`, the complete result set can be read out:

* LRAM and HRAM entries 12-15 hold the third-pass outputs.
* Entries 0-11 hold the first- and second-pass outputs.

## Where this design makes its own choices

The prototype leaves the following points open. The RTL settles them this way:

* **Cache size.** "1K" of cache is read as 1 Kbit. That is the size that the
  eight input words and the 2 x 16 outputs fill exactly; a 1 KB cache would be
  mostly unused by the schedule.
* **Data routing.** The routing of passes 2 and 3 is this design's own,
  including the two-lane rotation. See the schedule above.
* **Coefficient load.** All three coefficient registers of a filter load in the
  single state 0, from three 64-bit inputs. The prototype calls them R0-R2 and
  loads them "simultaneously" but does not describe the port.
* **Off-chip handshake and read-out.** The same-cycle off-chip answer, the idle
  state with `start`, and the read-out port are all this design's own.
* **Separate memory addresses.** LRAM and HRAM have separate read and write
  addresses.
* **Memory timing.** The memories read asynchronously and drive zero when idle.
* **Signed arithmetic.** Operands are signed. Products are truncated to their
  low 16 bits, and sums wrap.
* **Tap order.** Taps are in convolution order.
* **Booth radix.** The multiplier uses radix-4 recoding.
* **Reset.** Reset clears the coefficient registers and the controller.
  Memory contents are not reset; a run clears LRAM and HRAM and overwrites
  INRAM.

Not modelled: the I/O and power pads, the off-chip memory (the testbench stands
in for it), and anything below the logic level (cell design, layout, power).

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_lp_adder_cell` | all input combinations against `a + b + cin` |
| `tb_cla_adder16` | corner and random operands against `+` |
| `tb_booth_mult16` | corners (including -32768) and random operands against a signed multiply |
| `tb_dwt_filter` | tap order, using impulses, and random words against the formula above |
| `tb_coef_module` | reset value, parallel load, hold, the selection of each register |
| `tb_inram`, `tb_lh_ram` | random writes and reads against a reference array, zero output when idle, clear |
| `tb_controller` | the whole control word in every one of the 25 states, the 25-cycle latency, an ignored `start` |
| `tb_dwt3d_processor` | see below |

`tb_dwt3d_processor` runs the full design at its default sizes. It does 20
transforms:

* The first is a hand-worked case. With all-ones data, low-pass taps 1,1,1,1
  and high-pass taps 1,-1,1,-1, the final low-pass outputs are 32, 32, 0, 0 and
  every high-pass output is 0.
* The other 19 use random data and coefficients.

For each transform it checks the following:

* both filter outputs in every computing state, against a reference model of
  the three passes;
* the 25-cycle latency;
* all 32 result entries, read back through the read-out port.

It also counts every mechanism and fails if one never happened: coefficient
load, clear, block loads, each pass, rotated reads, a read from each memory, an
ignored start, and read-out.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dwt_pkg.sv tb/tb_dwt3d_processor.sv --top-module tb_dwt3d_processor
./obj_dir/Vtb_dwt3d_processor
```

To run another testbench, replace the last file and the top name. Only the
package has to be listed; the other modules are found through `-y rtl`.

## Changing it

* **Widths and depths.** These are package constants in `dwt_pkg` (`DW`,
  `LANES`, `IN_WORDS`, `RES_ENTRIES`, `NSETS`). The modules take them as
  parameter defaults.
* **Limits on reuse.**
  * The filter tree is written for four taps.
  * The controller's schedule is written for 8 input words and 16 outputs.
  * `cla_adder16` needs a width that is a multiple of 4.
* **Different routing.** To change the routing of passes 2 and 3, edit the
  `PH_PASS2` and `PH_PASS3` cases in `controller.sv`, and edit the matching
  reference model in `tb_dwt3d_processor.sv` and the table in
  `tb_controller.sv`.
