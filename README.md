# Online test and repair of a TSV group in a 3D IC

In a die stack, signals cross from one die to the next through
through-silicon vias (TSVs). A TSV can fail after the chip is built. A void
or a delaminated landing pad adds series resistance, so edges arrive late. A
pinhole in the sidewall insulation leaks current into the substrate, so the
far end never reaches a clean high level. This RTL catches both kinds of
defect while the chip is in use and routes the signals around the bad vias.
It needs no processor: a run takes a few dozen clocks for a small group.

The vias are split at design time into **groups**. A group of grouping ratio
**m:n** carries m signal lines over m+n vias: m regular vias and n spares.
Signal line i may use any of vias i, i+1, …, i+n. So up to n defective vias
per group can be repaired, whatever their positions. The default is m = 4,
n = 2 (four signals, six vias). The same RTL, unchanged, has been simulated
at 80:2, 240:3 and 40:1. The first two are the ratios used to size the
technique for the IWLS 2005 benchmark chips (aes_core, ethernet, des_perf:
80:2; vga_lcd, netcard: 240:3).

## Structure of one group

```
            die 1                                   die 2
 data_in ─► routing demux ─┐                 ┌─► routing mux ─► data_out
            (m × 1-to-(n+1))│   m+n TSVs      │   (m × (n+1)-to-1)
           input signal ───┴──► ═══════ ─────┴─► NAND(t2, SI) ──► status reg
           unit (test pattern)                      (test observation)   │
  status reg ◄──────────────── ══ double TSV ◄──── result of last test ◄─┘
      │                                                   │
  recovery control ──► demux selects       recovery control ──► mux selects
  (line counter, faulty accumulator, latch chain, comparator: one per die)
  sequencer                                 sequencer
```

Each die has its own copy of the sequencer, status register and recovery
control. Both copies run from the same clock and the same start pulse, so they
stay in lock step. Die 2 sees the test results directly. Die 1 gets each
result back over a **double TSV**: two vias joined at both ends, so one bad
via on the return path does no harm. Both dies then run the same repair
algorithm on the same status bits. They reach identical selects, and the
selects never have to cross the stack.

## A detection and recovery run

A one-clock pulse on `ft_start` starts a run. With T = m+n:

| clocks   | phase  | what happens |
|----------|--------|--------------|
| 1        | INIT   | SI = 0, so every NAND output is 1 and both status registers become "all faulty". A via counts as good only once it passes. |
| T        | TEST   | In test clock t, via t alone carries a 0→1 transition; all other vias are held at 0. At the end of the clock, die 2 stores NAND(t2, 1) as status bit t. The bit is 1 if the edge has not arrived. In the next clock, that bit crosses the double TSV into die 1's status bit t. |
| 1        | DRAIN  | The result of the last via reaches die 1. |
| T        | REPAIR | In repair clock j, both recovery controls look at status bit j (see below). |

`busy` is high for the 2(m+n)+2 clocks of the run: 14 at 4:2, 166 at 80:2 and
488 at 240:3. `done` pulses in the clock that follows. The scheme's nominal
cost is m+n clocks to test and m+n clocks to repair. The two extra clocks here
are INIT and the one-clock trip of the last result back to die 1. While busy,
the vias carry test patterns, not data. Afterwards `data_out` follows
`data_in` combinationally through the healthy vias. Another start pulse
re-tests the group at any time: this is the online part.

### How the delay test tells good from bad

The capture clock is the ordinary system clock. A good via brings the rising
edge above the NAND's switching threshold within one period. A resistive open
slows the edge so that it is still below the threshold at the capture edge. A
short to the substrate forms a divider with the driver, so the level never
gets there. Both therefore read as "not arrived", and the test does not tell
them apart; repair does not need to. Which defect sizes get caught depends on
the clock period: a faster test clock catches smaller defects.

`tsv_channel` is the via model used in simulation, driven by `tsv_defect`:

- **DEF_NONE**: t2 follows t1.
- **DEF_OPEN**: t2 follows t1 one clock late.
- **DEF_SHORT**: t2 is held at 0.

The model assumes every injected defect is larger than the critical
resistance. A defect too small to be caught at the chosen clock is not
modelled.

## The repair walk (the part that needs a second look)

The recovery control walks the status bits from via 0 upwards, one per clock.
It keeps two counts:

- **signal line counter**: the number of lines that already have a via;
- **faulty TSV accumulator**: the number of faulty vias seen so far.

At via j:

- **Fault-free**, and not all m lines are placed yet: the next line i gets via
  j. The renew enable of line i loads the accumulator value into its entry of
  the **latch chain**, and the line counter advances. Because every via before
  j is either used by a line below i or faulty, j = i + (faulty so far). So
  the stored select is exactly the offset the demux needs.
- **Faulty**: the accumulator adds one.

The accumulator never decreases. The selects therefore never decrease with i,
and no two lines share a via. A line's offset can exceed n only if more than n
vias are faulty. That case is exactly what the **tolerance comparator** flags:
`error` goes high when the faulty count is above n. Spare vias left after all
m lines are placed stay unused and are driven low.

Example at 4:2, with vias 1 and 3 faulty (status `001010`, via 0 on the
right): the good vias are 0, 2, 4 and 5. So lines 0…3 get selects 0, 1, 2
and 2.

The select of a line is k = ⌈log2(n+1)⌉ bits wide (2 bits for n = 2 or 3).
The latch chain is built from enabled flip-flops on the system clock, not from
transparent latches. It is reset to all zeros, so line i uses via i until the
first run.

## Interface of the top, `tsv_ft_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock shared by both dies; asynchronous active-low reset |
| `ft_start` | in | 1 | start a run (ignored while busy) |
| `data_in` / `data_out` | in / out | M | signal lines on die 1 / die 2 |
| `tsv_defect` | in | T × `tsv_defect_e` | defect of each signal via (simulation model input) |
| `ret_defect` | in | 2 × `tsv_defect_e` | defect of each via of the double return TSV (model input) |
| `busy`, `done` | out | 1 | run in progress / run finished (one clock) |
| `error_die1`, `error_die2` | out | 1 | more than N faulty vias; valid while idle |
| `status_die1`, `status_die2` | out | T | status registers (1 = faulty) |
| `sel_die1`, `sel_die2` | out | M × K | routing selects |
| `faulty_die1`, `faulty_die2` | out | ⌈log2(T+1)⌉ | number of faulty vias found |

A reset leaves the status registers at "all good". The routing is then the
identity, and `error` is low. The sequencers of the two dies are checked
against each other by an assertion in the top.

## Modules

Each file in `rtl/` holds one module or package. Its opening comment gives
its timing.

| module | die | role |
|--------|-----|------|
| `tsv_ft_pkg` | – | phase and defect enums; width helpers |
| `ft_sequencer` | both | INIT / TEST / DRAIN / REPAIR schedule, SI, busy, done |
| `input_signal_unit` | 1 | walking one-hot test transition, test/data select per via |
| `routing_demux` | 1 | m × 1-to-(n+1) demultiplexers |
| `test_observation` | 2 | one NAND(t2, SI) per via; selects the result to return |
| `routing_mux` | 2 | m × (n+1)-to-1 multiplexers |
| `tsv_status_reg` | both | m+n status bits with per-bit load |
| `recovery_block` | both | repair walk; contains the four parts below |
| `signal_line_counter`, `faulty_tsv_accumulator`, `latch_chain`, `tolerance_comparator` | both | the parts of the recovery control |
| `die1_group`, `die2_group` | 1 / 2 | all logic of one die for one group |
| `tsv_channel`, `double_tsv` | – | behavioural via models, not logic |
| `tsv_ft_top` | – | both dies plus the vias between them |

On each group, the flip-flop count is 3(m+n) + 2m·k plus the two sequencers
and counters. The 3(m+n) are the test pattern register and one status
register per die; the 2m·k are one latch chain per die. This matches the
scheme's own cost model.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=… failures=…`. For example, the end-to-end test at the
default size:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/tsv_ft_pkg.sv tb/tb_tsv_ft_top.sv --top-module tb_tsv_ft_top
./obj_dir/Vtb_tsv_ft_top
```

- `tb_tsv_ft_top` uses the default 4:2 parameters. It runs 60 detection and
  recovery runs: no defect, one open, one short, n mixed defects, n+1 defects,
  and random defects with one bad return via. Each run checks the status
  registers on both dies, the error flags, the selects against a reference
  mapping, data transfer afterwards, and the run length of 2(m+n)+2 clocks. It
  also counts each mechanism: open detected, short detected, reroute,
  tolerance error, masked return-via defect and re-test. A mechanism that never
  occurs counts as a failure.
- `tb_tsv_ft_workloads` runs the same schedule on one 80:2 group, one
  240:3 group and one 40:1 group (a 1000-signal chip can be split into
  12 groups of 80:2 plus one of 40:1, which gives 25 spare vias).
- The other testbenches test one module each. The stimulus and checks shared
  by the two end-to-end tests are in `tb/tsv_group_driver.sv`.

Every testbench finishes in well under a second.

## What is this design's own choice

The scheme fixes the block structure: transition test, NAND observation with
SI, status registers on both dies, double TSV return, line counter,
accumulator, latch chain, comparator, and the demux/mux routing. It also fixes
the m+n plus m+n clock budget. The following details are choices made here:

- **Schedule.** There is one INIT clock and one DRAIN clock, so a run takes
  2(m+n)+2 clocks, not 2(m+n). Both dies are started by one shared pulse, and
  the way a run is triggered in the field is left open.
- **Capture flip-flop.** The NAND output is captured straight into the die-2
  status bit. In INIT, SI = 0 sets every bit to faulty.
- **Return path.** Each group has one serial return bit: the result of the
  previous test clock. It travels over one double TSV.
- **Test pattern insertion.** The pattern is a one-hot register. It takes over
  each via through a 2:1 select placed after the routing demux, not through
  the demux itself.
- **Latch chain.** It is built from flip-flops, and reset to the identity
  routing.
- **Comparators.** Each die has its own comparator, so there are two error
  flags. The scheme's cost estimate counts one comparator per group.
- **Reset and idle values.** The reset state is "all vias good". Unselected
  vias are driven 0. A select code above n reads 0.
- **Via models.** The via and double-via models are cycle-level abstractions
  of analogue behaviour. They do not model the critical resistance as a
  function of the clock frequency.

## Not included

- **Chip-level replication.** A chip with S signals uses about S/m
  independent copies of the group. One copy per group is needed, and none of
  them share logic. Examples: 17 groups of 80:2 for aes_core's 1362 signals,
  or 38 groups of 240:3 for netcard's 9112. No wrapper that instantiates many
  groups is provided.
- **Grouping ratio.** Choosing the ratio is a design-time search, not
  hardware. Its result is the pair of parameters M and N.
