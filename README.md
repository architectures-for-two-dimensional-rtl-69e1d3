# LGM-1: a pipelined lattice-gas machine

This is synthesizable SystemVerilog for a special-purpose machine that
simulates a two-dimensional fluid with the FHP lattice gas. The machine is a
chain of identical LGCA chips. A host computer streams the lattice through
the chain one word (two sites) at a time, in raster order. Each chip advances
the stream by one generation and passes it on, so a chain of *k* chips does
*k* generations in a single pass. Throughput on one lattice grows linearly
with the number of chips, because every chip sees the same stream in the same
order and needs to know nothing about its position in the chain.

The RTL covers four parts:

* the **LGCA chip**: line delays, neighbourhood generator, two update
  processors and a parity test tree;
* the **LGM-1 board**: a 16-bit VMEbus slave card that drives a ten-chip
  pipeline from a workstation. It has a data-in register, a data-out
  register, a control register, a clock divider and a state machine that
  generates the chips' two clock phases;
* an **edge-site refresher** (`lgca_boundary_proc`). This is a proposed extra
  pipeline stage that keeps the sides of the lattice supplied with fresh
  fluid, so that pipelines longer than ten chips remain possible;
* a **general prototyping master board** (`proto_env`). This is a proposed
  successor to the LGM-1 board that can host any pipelined chip: wider
  registers and a programmable multi-phase clock.

## The lattice gas in one byte per site

The lattice is hexagonal, so each site has six neighbours. Particles of unit
speed move along the links between sites and scatter when they meet at a
site. Each site is stored as one byte:

| bit | name | meaning |
|-----|------|---------|
| 0 | B | the site is solid (part of an obstacle or wall) |
| 1..6 | links | a particle **leaves** the site along link 1..6 |
| 7 | C | a particle is at rest at the site |

Links are numbered 1 = left, 2 = upper left, 3 = upper right, 4 = right,
5 = lower right and 6 = lower left. Link *k* and link *k*+3 point in opposite
directions. The stored state is the set of *outgoing* particles. To update a
site, the chip therefore collects, for each link *k*, bit *k*+3 of the
neighbour on that side: the particle that the neighbour sent toward this
site. The types in `lgca_pkg` (`site_t`, `word_t`, `nbhd_t`) use this
encoding.

## The stream: words, rows and why the pairing matters

Two sites travel together in a 16-bit word. Bits 7:0 hold an odd-numbered
site and bits 15:8 the even-numbered site after it. A row of the stream is
`ROW_WORDS` = 256 words (512 sites). This row can be read in two equivalent
ways:

* one lattice row of 512 sites, where each word holds two horizontally
  adjacent sites; or
* two lattice rows of 256 sites, where each word holds one site from the
  upper row and the site below it.

The hexagonal geometry follows from the second view. Each "row pair" of
words covers two physical rows, and the lower row is offset by half a site.
Every row pair is therefore connected to its neighbours in the same way. The
neighbourhood logic then needs no row counter and no row-parity tracking,
which is the reason for this pairing. Words are sent left to right, then top
to bottom.

## Inside one chip (`lgca_chip`)

```
 data_in ─┬─► line delay 1 (256 words) ──┬─► line delay 2 (256 words) ──► parity tree ─► parity_out
          │                              │                               │
          ▼                              ▼                               ▼
       bottom taps                  middle taps                      top taps
          └──────────────► neighbourhood generator ◄─────────────────────┘
                                     │
                        L processor (odd site) + R processor (even site)
                                     │
                                 data_out
```

**Line delays** (`lgca_shift_register`). Each holds 256 words and is folded
as two 128-word halves in series. A word entering delay 1 comes out one row
later, and out of delay 2 two rows later. The delays are written as memory
arrays with a pointer rather than as 4096 flip-flops. The behaviour is the
same.

**Neighbourhood generator** (`lgca_neighborhood_gen`). It keeps a 3-word
window from each of the three rows: the word just taken in (n), the word
one row earlier (n−R), and the word two rows earlier (n−2R), plus the two
words before each. The sites updated in a step are those of word m = n−R−1.
The generator routes exactly the eight bits each site needs: its own B and C,
and one incoming link bit from each of its six neighbours. For word m the
odd (upper) site takes:

| its link | from |
|---|---|
| 1 | link 4 of the odd site of word m−1 |
| 2 | link 5 of the even site of word m−R−1 |
| 3 | link 6 of the even site of word m−R |
| 4 | link 1 of the odd site of word m+1 |
| 5 | link 2 of the even site of word m |
| 6 | link 3 of the even site of word m−1 |

The even (lower) site takes:

| its link | from |
|---|---|
| 1 | link 4 of the even site of word m−1 |
| 2 | link 5 of the odd site of word m |
| 3 | link 6 of the odd site of word m+1 |
| 4 | link 1 of the even site of word m+1 |
| 5 | link 2 of the odd site of word m+R+1 |
| 6 | link 3 of the odd site of word m+R |

Only the even sites of the top row and the odd sites of the bottom row are
stored. As in the original chip, one bottom-row site that no update uses is
still stored.

**Update processors** (`lgca_update_proc`). Each is a combinational map from
a site's arrivals to its new outgoing state. The arrival set is rotated by
three links to get the velocities. A collision rule then applies, or the
particles pass straight through. Pins C1,C0 select one of four rule sets:

| C1,C0 | classes active |
|---|---|
| 0 | 2B, 3S, C1, C2 |
| 1 | 2B, 3S, C1, C2, 3A |
| 2 | 2B, 3S, C1, C2, 4B |
| 3 | all six |

The classes, as built:

* **2B**: two head-on movers with no rest particle. The pair is turned 60°.
* **C2**: the same head-on pair with a rest particle present. The pair is
  turned in the same way and the rest particle stays.
* **3S**: three movers 120° apart. They are turned 60°.
* **3A**: a head-on pair plus a third mover *s*. The pair {s−1, s+2} becomes
  {s+1, s+4}, and the reverse.
* **C1**: a rest particle plus one mover *d* becomes two movers at d±60°,
  and the reverse.
* **4B**: four movers whose two empty links are head-on. They are turned
  60°.

All rules conserve particle number and momentum. At a boundary site (B=1),
every particle goes back along the link it arrived on, C is cleared and B
stays set.

Rules 2B and 4B have two equally likely outcomes, a left turn and a right
turn. Instead of a random number generator, the chip has two processors. The
one for odd sites always turns left (L) and the one for even sites always
turns right (R). This spreads the two outcomes over the lattice like a
checkerboard. The parameter `RIGHT` selects the variant.

**Parity tree** (`lgca_parity_gen`). This is the XOR of the 16 bits leaving
line delay 2. A word appears there 2·ROW_WORDS−1 steps after it entered the
chip. Comparing it with the parity of the input word finds stuck bits in the
line delays, which are most of the chip's area.

**Timing.** One `step` pulse is one major cycle. The chip takes `data_in` on
the clock edge where `step` is high. `data_out` is then the updated word
m = n−ROW_WORDS−1, valid from that edge until the next step. That word lies
one row above and one column behind the input. C1,C0 act combinationally, so
a change shows on `data_out` without a step.

## A chain of chips (`lgca_pipeline`)

`NCHIPS` chips (10 by default) are connected output to input, with C1,C0
shared by all of them. Chip *i*+1 takes the word chip *i* produced in the
previous step. Each hop therefore adds one step, and the whole chain has a
latency of

    L = NCHIPS · (ROW_WORDS + 2) − 1  steps   (2589 for 10 chips, 256 words)

The word leaving the chain after step n is word n−L, advanced NCHIPS
generations. The host has to handle both ends of the stream:

* it sends L filler words after the lattice to flush the chain;
* it discards the first L outputs;
* it supplies the sites along the lattice's sides.

For the side sites, the stream is a continuous raster: the last site of a
row is the neighbour of the first site of the next row. Keeping the sides
looking like surrounding fluid, for example by refreshing the side links
often, is host software and not part of this RTL.

## The LGM-1 interface board (`lgm1_top`)

The board is a VMEbus A24/D16 slave. It answers in a 256-byte window whose
upper address bits A23..A8 equal `BASE_ADDR_HI` (default 0xDFC0, which is
physical address 0xDFC000). It accepts address modifiers with AM5..AM3 = 111.
A2,A1 select the register. A3..A7 are not decoded, so the registers repeat
every 8 bytes.

| offset | register | access |
|---|---|---|
| +0 | data_in: the word fed to the first chip | read/write |
| +2 | data_out: the last chip's output, latched at the end of each major cycle | read only (writes ignored) |
| +4 | control: bit 0 START, bit 1 C0, bit 2 C1, bit 3 RUNNING | bits 0..2 read/write, bit 3 read only |

Host loop for each word of the stream:

```
write data_in  <- next word
write control  <- START | rule set
repeat read control until START == 0
read  data_out -> the word sent L iterations earlier, NCHIPS generations on
```

Inside the board:

* **VME slave** (`lgm1_vme_slave`). Synchronises AS* and DS* with two
  flip-flops, matches the address and AM bits, and decodes A2,A1. It
  acknowledges through a delay line that shifts ones while the board is
  selected. DTACK* asserts at stage `DTACK_TAP` (6 clocks after the strobes
  arrive with the default 3) and releases as soon as the master removes its
  strobes. A write takes effect on the clock where DTACK* asserts.
* **Clock divider** (`lgm1_clock_div`). Two flip-flops in a twisted ring
  divide the bus clock by four. There is no reset: all four states lie on the
  ring. The rest of the board uses the divider's output as a clock enable
  (`bdclk_en`), so the whole design has one clock.
* **Clock state machine** (`lgm1_clock_fsm`). Starting from START, it steps
  IDLE → PHI1 → GAP1 → PHI2 → GAP2 → LATCH → IDLE, one state per board clock.
  The two phases are separated by gap states and never overlap; an assertion
  checks this. The chips step on entry to PHI1. LATCH loads data_out and
  clears START, so polling START tells the host when the result is ready.
  RUNNING is high from PHI1 to LATCH.
* **Registers** (`lgm1_regs`). If the state machine clears START in the same
  clock as a bus write to control, the clear wins.

Ports of `lgm1_top`:

* VME inputs are plain signals: `vme_as_n`, `vme_ds_n[1:0]`, `vme_write_n`,
  `vme_am`, `vme_addr[23:1]` and `vme_data_w`.
* The read path is split into `vme_data_r` plus `vme_data_oe`, and
  `vme_dtack_n` is an output. The board's bus transceivers and line drivers
  are simply wires here.
* `phi1`, `phi2` and each chip's `parity_out` are brought out for
  observation.

## The edge-site refresher (`lgca_boundary_proc`)

A long pipeline has a problem at the lattice sides. The host can reset the
side links only when the stream passes through its memory, which is every
NCHIPS generations. With stale side links, the fluid leaks out or sees a
fixed pattern, and in practice the sides must be refreshed at least about
every ten generations. That is the reason the machine has ten chips.

The refresher is a pipeline stage meant to be placed between chips.

* It counts columns as words pass, with `sync` marking word 0.
* It replaces each word in the first or last column of a row pair with
  random fluid: B=0, C=0, and each link set with its own probability.
* The host computes that probability from the mean density and flow
  velocity it wants. It loads one 8-bit threshold per link direction
  (`thr[1..6]`), which gives probability (thr+1)/256.
* Twelve 16-bit LFSRs (x^16+x^15+x^13+x^4+1) make the random bits, one per
  link of each of the two sites. A link is set when the low byte of its LFSR
  does not exceed the threshold.
* It adds one step of latency, the same as each hop between chips.

In `lgm1_top` the refresher sits beside the ten-chip machine on its own
`bp_*` ports, so the machine itself behaves exactly as the ten-chip
original. To build a deeper pipeline, chain chips and refreshers.

Only the left and right sides are refreshed. The LFSR polynomial, the
seeds, the 8-bit thresholds and the whole-word replacement are this
design's own choices.

## The prototyping master board (`proto_env`)

Every pipelined special-purpose chip runs the same host loop: write data,
start, read the result. This board provides that loop in a generic form, so
a new chip needs only wiring. It is a VMEbus slave occupying one 8 KB page.
The page base comes from switches (`base_sw` = A31..A13), in the 24-bit or
32-bit address space (`a32_sw`). All accesses are aligned 32-bit words.

| offset | register |
|---|---|
| 0, 4, 8, 12 | input registers ir_0..ir_3, driving `dev_in[0..3]` |
| 16, 20, 24, 28 | output registers or_0..or_3, loaded from `dev_out[0..3]` |
| 32 | ck_per: phase length in 25 ns master-clock periods, 2..20 (50..500 ns) |
| 36 | bit 0 START (write 1 to run one major cycle), bit 1 RUNNING, bit 2 IDLE |
| 40 | user control word, driving `dev_ctl` |

The clock generator is `proto_clock_gen`. It divides the 40 MHz master
clock by ck_per and runs `NPHASES` phases (2, 4, 8 or 16) one after another.
Each phase is high for ck_per−1 master clocks and then low for one. The
phases therefore never overlap, and an assertion checks this.

Output register *j* is loaded at the end of phase `LATCH_PHASE[j]`. The
phase count and the latch phases are parameters, standing in for the
jumper block of the proposal. When the last phase ends, START is cleared,
so the host polls START in the same way as on the LGM-1 board.

The line drivers and receivers towards the chip boards are wires here. In
`lgm1_top` this board has its own `pe_*` ports and its own clock `pe_clk`;
it shares only the reset.

Two choices resolve inconsistent sources:

* **Register offsets.** The register list in prose puts the input registers
  at 0, 4, 8 and 16. The software header lays all eleven registers out
  consecutively, and that self-consistent layout is the one built.
* **Clock resolution.** The software library speaks of 10 ns resolution for
  the clock period. The hardware description's 25 ns steps are built.

## Where this design departs from the original

The organisation, the sizes (256-word delays, ten chips, 16-bit words), the
byte layout, the neighbourhood taps, the rule-set numbering, the L/R split,
the parity test, the register map, the address decoding and the clocking
scheme all follow the original machine. The following are this design's own
choices or differences:

* **One clock.** The chips used dynamic master/slave storage on two
  non-overlapping phases. Here each chip is a single-clock circuit with a
  `step` enable. The board still produces `phi1`/`phi2` with the original
  ordering and gaps, but only as outputs.
* **Collision tables.** The original processors were PLAs generated from
  truth tables that are not reproduced here. The member configurations of
  each class listed above are a standard reading of the FHP collision
  classes. The same holds for which direction counts as "R" (toward higher
  link numbers) and for C2 turning its pair by the processor's L/R
  direction. Only 2B, 4B and C2 differ between the L and R processors. One
  description of the classes also lists 3A among the L/R rules; the chip
  description names only 2B and 4B, and that is what was built.
* **3A pairs.** These are fixed: {s−1, s+2} ↔ {s+1, s+4} around the
  spectator s.
* **Bus acknowledge timing.** Which delay-line stage drives DTACK* is a
  parameter (`DTACK_TAP`), default 3.
* **Clock ratio.** The divider is fixed at four, and each phase lasts one
  board clock (`PHASE_TICKS` = 1). With a 10 MHz bus clock that gives
  400 ns phases, well above the 70 ns the chips need. The bus clock of the
  original host was also quoted as 16.7 MHz; nothing in the RTL depends on
  the frequency.
* **Reset.** The board registers and the state machine reset to zero/IDLE
  with `rst_n`. The line delays and the neighbourhood registers have no
  reset, like the original. Their contents are flushed by the stream.
* **RUNNING status bit** (control bit 3) is this design's own.
* **Register data paths.** On the original board, the data registers were
  switched between the bus and the chip array to avoid contention on shared
  wires. Here the buses are separate. data_in feeds the first chip at all
  times, and both data registers stay readable during a cycle. A host should
  not write data_in while RUNNING is set.

## Throughput

Each chip updates two sites per step. Ten chips give 20 site updates per
step, for example 140 million per second at the original chips' limit of
70 ns per phase. Through the VMEbus board, each step costs the host three
bus accesses plus polling. That host loop, not the chips, sets the speed of
the complete machine (about 7 million updates per second on the original
workstation).

A complete flow problem of 512 × 1024 sites (262,144 words) fits as it
stands:

* one 512-site row is exactly one line delay;
* the number of rows is unbounded because the lattice streams from host
  memory;
* one pass through the ten chips gives ten generations in
  262,144 + 2,589 steps.

## Testbenches

Each testbench checks against an independent reference model in
`tb/lgca_ref_pkg.sv`. The model works out neighbours from physical rows and
columns and writes each collision class as a base pattern rotated by bit
shifts. Each testbench ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_lgca_update_proc` | all 256 inputs × 4 rule sets × L/R, against the reference; mass and momentum conservation; hand-worked collisions; number of changed configurations per rule set (20, 32, 23, 35 of 128) |
| `tb_lgca_shift_register` | full 256-word delay, the join between the two halves, hold while `en` is low |
| `tb_lgca_parity_gen` | all single-bit words and random words |
| `tb_lgca_neighborhood_gen` | every tap against geometric neighbours (short rows) |
| `tb_lgca_chip` | full-size chip (256 words): latency, all rule sets, mid-stream rule changes, stalls between steps, every collision class, parity pin |
| `tb_lgca_pipeline` | 3 chips with short rows: chain latency, three generations, each chip's parity |
| `tb_lgm1_clock_div` | period of four clocks, 50% duty cycle, position of the enable |
| `tb_lgm1_clock_fsm` | phase order, non-overlap, one step and one latch per cycle, six ticks per cycle, longer phases with `PHASE_TICKS`=3 |
| `tb_lgm1_vme_slave` | address and AM match, register selects, DTACK delay and release, one write strobe per write, no response to other addresses or modifiers |
| `tb_lgm1_regs` | register read/write, read-only data_out, START clear priority |
| `tb_lgm1_top` | end to end over the VMEbus with 2 chips and short rows. Four runs with different rule sets; counts DTACKs, busy polls, each collision class, boundary reflections, parity values, ignored accesses, the rule-set switches, edge-word replacement by the refresher and one cycle of the prototyping board |
| `tb_lgm1_full` | the same host loop on the default machine (10 chips, 256-word rows, every parameter at its default) for a whole 512 × 1024 lattice at density 0.2: ten generations, about 4 million checks |
| `tb_lgca_boundary_proc` | pass-through of inner words, every edge word against a model of the LFSRs, measured link occupation against the thresholds, re-sync, disable, hold-off |
| `tb_proto_env` | every register over the bus, chip-side outputs, DTACK delay, ignored cycles (other page, other space, 16-bit, unaligned), major cycles at several periods: phase order, lengths, gaps, no overlap, output latching at the chosen phase, status bits, 24- and 32-bit spaces |
| `tb_lgm1_workload` | the full-size pipeline running a 512 × 1024 lattice at particle density 0.2 with a plate obstacle, ten generations in one pass, every computable word compared |

### Running them with Verilator

From the top of the tree (Verilator 5, which has two-state simulation and
`--timing` support):

```
verilator --binary --timing -Irtl -y rtl \
    rtl/lgca_pkg.sv tb/lgca_ref_pkg.sv tb/tb_lgm1_top.sv --top-module tb_lgm1_top
./obj_dir/Vtb_lgm1_top
```

Replace `tb_lgm1_top` with any testbench name. Of the two full-size
testbenches, `tb_lgm1_workload` runs in about 15 seconds and `tb_lgm1_full`
in about a minute.

### Synthesis

Every file in `rtl/` is synthesizable. The default `lgm1_top` comes to
about 2,600 cells and 1,160 flip-flops, plus 80 kbit of line-delay memory; the
LGM-1 machine alone is about 2,300 cells and 630 flip-flops.

## Changing the design

* **Rows.** `ROW_WORDS` sets the stream row length in words (lattice width
  2·ROW_WORDS sites, or ROW_WORDS sites per row pair).
  The pipeline latency follows the formula above.
* **Chips.** `NCHIPS` sets the number of chips, which is the number of
  generations per pass.
* **Collision rules.** These live in one `always_comb` block in
  `lgca_update_proc.sv`. The reference in `tb/lgca_ref_pkg.sv` lists the
  same classes as rotated base patterns. Change both together.
* **Board address and acknowledge.** `BASE_ADDR_HI` and `DTACK_TAP` set the
  board's address window and acknowledge delay.
