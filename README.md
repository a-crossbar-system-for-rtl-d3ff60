# Dynamic bit-sliced crossbar for a 16-PE multiprocessor

This is a crossbar that connects 16 processing elements (PEs) to each other
and can set up a new set of connections in every clock cycle. Programs with
little memory locality, such as Prolog programs, can send consecutive
references to different modules, so a switch that has to be configured in
advance does not help them. Here every PE simply names a destination PE in
each cycle. The crossbar decodes the names, settles contention with a fair
arbiter per destination, and passes the words through, all within the same
cycle. A PE that loses arbitration gets a collision signal and tries again in
a later cycle. If all 16 PEs name different destinations, all 16 transfers
happen in one cycle.

The crossbar is **bit-sliced**. A single chip switches one bit of every PE's
buses. The system stacks one chip per bit: 32 chips carry a 32-bit address
or data word and a 33rd chip carries one control bit. All chips see the same
destination numbers, requests, clock and reset. So they all make the same
arbitration decision, and the word moves as a whole.

## Hierarchy

```
crossbar_system            33 stacked slices (N_SLICES)
└── crossbar_chip          one 16x16 bit slice
    ├── p_sync             PE-side interface; produces the collision signals
    ├── decoder_array      16 x decoder_4_16   (who wants whom)
    ├── arbiter_array      16 x arbiter_1_16   (one fair arbiter per destination)
    │   └── arbiter_1_16   tree of 15 x darb_1_2
    └── x_pt_matrix        16 x x_pt_col       (256 switches)
        └── x_pt_col       16 x x_pt
xbar_pkg                   shared constants (N_PE = 16, 4-bit PE numbers, 32+1 bit words)
```

## One cycle through a chip

Everything from the pins to the outputs is combinational. The only storage
is one flip-flop per arbiter cell.

1. **Decode.** PE *i* raises `pr[i]` and drives its destination number
   `p[i]` (4 bits). Its `decoder_4_16` turns these into a one-hot row. The
   decoder array regroups the rows by destination:
   `r[j][i] = 1` means PE *i* wants PE *j*. A source can want only one
   destination. Each decoder output uses two gate levels (a NAND3 and a
   NAND2 into a NOR2) rather than one wide AND, because that is faster.
2. **Arbitrate.** The `arbiter_1_16` for destination *j* picks at most one
   requester from `r[j]` and raises `g[j][i]`.
3. **Switch.** Switch (*i*,*j*) is on while `g[j][i]` is high. It then puts
   source *i*'s address bit `pa[i]` on `ma[j]` and its data bit `pd[i]` on
   `md[j]`, and sends destination *j*'s bit `mdot[j]` back on `pdin[i]`. So
   a read (the address goes out and the data comes back) and a write (the
   address and the data go out) both finish in the cycle that was granted.
   Each destination's outputs are the OR of its column's switches. Each
   source's `pdin` is the OR over all columns. A destination that no one
   was granted sees 0.
4. **Collide.** `coll[i] = pr[i] & ~(granted anywhere)`.
5. **End of cycle.** On the **falling** edge of `clk`, every arbiter cell
   that granted something records which side it served. A cycle therefore
   runs from one falling edge to the next. The inputs are applied after a
   falling edge, and the outputs are valid (after the combinational delay)
   before the next one.

Switches hold no state. A connection lasts exactly one cycle, and a PE that
wants to keep talking to the same destination must request again.

## The fair tree arbiter (the subtle part)

`arbiter_1_16` is a binary tree of 15 `darb_1_2` cells. The leaves take the
requests in pairs (0,1), (2,3), … Each cell sends `reqc = req0 | req1` up
toward the root. The root's `grantc` is tied high. Each cell passes its
incoming `grantc` down to one of its two children.

A cell's flip-flop holds the side it served last (0 or 1):

| state | req0 req1 grantc | grant0 grant1 | next state |
|:-----:|:----------------:|:-------------:|:----------:|
| s     | x x 0            | 0 0           | s          |
| s     | 0 0 1            | 0 0           | s          |
| s     | 1 0 1            | 1 0           | 0          |
| s     | 0 1 1            | 0 1           | 1          |
| 0     | 1 1 1            | 0 1           | 1          |
| 1     | 1 1 1            | 1 0           | 0          |

When both sides request, the side not served last wins. Only the cells on
the path of the grant update their state. As a result no requester can be
served twice while another requester holds its request for 16 cycles: under
full load the tree hands out all 16 grants before repeating any of them. The
order is a bit-reversed rotation. For example, after a reset and one cycle
in which only requester 7 asked, a full load gives

    8, 0, 12, 4, 10, 2, 14, 6, 9, 1, 13, 5, 11, 3, 15, 7, 8, ...

Contention among *k* requesters for one destination is therefore resolved in
exactly *k* cycles, one transfer per cycle, if every loser keeps retrying.
This is unlike a fixed-priority arbiter, which can starve a requester
indefinitely.

Reset (`rst`, active high, asynchronous) puts every cell into state 1. The
decisions depend on this state, so **all slices must be reset together**.
Otherwise the slices of one word could pick different winners. The
`crossbar_system` asserts that all slices report the same collisions.

## Stacking slices into the system

`crossbar_system` has the ports of the PEs:

| port   | dir | shape      | meaning |
|--------|-----|------------|---------|
| `clk`, `rst` | in | 1 | shared by all slices |
| `p_mod`| in  | 16 x 4     | destination PE number from each PE |
| `pr`   | in  | 16         | request |
| `pa`   | in  | 16 x 33    | address word (+ control bit 32) from each source |
| `pd`   | in  | 16 x 33    | data word (+ control bit) from each source |
| `mdot` | in  | 16 x 33    | data word a PE returns when it is a destination |
| `ma`   | out | 16 x 33    | address delivered to each destination |
| `md`   | out | 16 x 33    | data delivered to each destination |
| `pdin` | out | 16 x 33    | data returned to each source |
| `coll` | out | 16         | collision, taken from the control slice |

Slice *k* carries bit *k* of `pa`, `pd`, `mdot`, `ma`, `md` and `pdin`.
Bit 32 (slice 32) is the control slice. The crossbar carries it like any
other bit. The PEs use it for the read and write strobes of their bus
protocol (for example "address valid" on `pa`/`ma`), and on the board it
also enables the drivers of its word. The design does not interpret it.

Example: PE 0 sends data to PE 1, and in the same cycle PE 1 sends an
address to PE 2. Set `pr = 16'h0003`, `p_mod[0] = 1`, `p_mod[1] = 2`. The
outputs are then `md[1] = pd[0]`, `ma[2] = pa[1]`, `pdin[0] = mdot[1]`,
`pdin[1] = mdot[2]` and `coll = 0`.

## Design choices and departures from the original chip

- **Collision output.** The original chip's pin-out has no collision pin,
  although the arbiter is specified to signal the losers. Each slice here
  has a `coll_pad` output: requested and not granted. The system uses the
  control slice's output.
- **Active-high, two-state logic.** The original switches are inverting
  tristate drivers on shared column wires, followed by inverting output
  pads. Here each switch produces an AND-gated value, the column ORs them,
  and the two inversions cancel. An unused destination reads 0 instead of
  floating.
- **Pads and buffers.** The input/output pads, the clock and reset pad
  drivers, and the buffer-only driver cells of the PE and destination
  interfaces (`P_PADDR`, `M_SYNC`, `M_PADDR`) are not modelled. They only
  add drive. On the board, the 74F244 drivers that split each PE signal
  into two copies, and that share connector pins between PD/PDIN and
  MDOT/MD, become single nets and separate ports.
- **No clock gating of grants.** One simulation trace of the one-of-two
  cell shows its grants forced low while the clock is high, and another
  trace of the 16-way arbiter shows a grant during clock high. The grants
  here are not gated. The cell's separate CLK/CLKB inputs are one clock.
- **Reset state 1.** The cell was initialised through its set input in its
  published simulation. That choice reproduces the printed 16-way rotation
  shown above.
- **Decoder literal grouping.** Which two address literals go into each
  decoder output's NAND2 and which go, with `pr`, into its NAND3 is this
  design's choice (`pr,g0,g1` and `g2,g3`).
- **Timing is functional only.** The original targets a 50 ns cycle with a
  chip latency under 50 ns (about 20 gate delays). This RTL has no delays,
  so it shows the same-cycle behaviour but says nothing about speed.
- **Fixed size.** The chip is 16x16 because PE numbers are 4 bits. The
  system's slice count `N_SLICES` is a parameter (default 33). The arbiter
  is written for any power-of-two `N`, but the rest of the chip uses
  `xbar_pkg::N_PE = 16`. A 16x32 processor-to-memory version (a 5-bit
  module number and 32 destination columns) is not built.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_decoder_4_16` | all 32 input combinations |
| `tb_decoder_array` | random requests and destinations |
| `tb_darb_1_2` | every row of the state table from both states; the published trace of the cell, replayed from set |
| `tb_arbiter_1_16` | single requests, alternation of pairs, the printed full-load rotation, 3000 random cycles against a reference model, every requester served once per 16 cycles under full load |
| `tb_arbiter_array` | all 16 arbiters against reference models |
| `tb_x_pt`, `tb_x_pt_col`, `tb_x_pt_matrix` | switching of random partial permutations, idle outputs 0 |
| `tb_p_sync` | collision rule and pass-through |
| `tb_crossbar_chip` | one slice under random contended traffic, with a reset mid-run |
| `tb_crossbar_system` | end to end with 4 slices: the two-transfer example, 1/2/4/8/16 simultaneous requests to distinct destinations (one cycle) and to one destination (n cycles with retries), random traffic with retries and a reset. It counts parallel transfers, 16-way cycles, collisions, retries served, read returns and the control bit, and fails if any of them never happens. |
| `tb_crossbar_system_full` | the same test with all 33 slices at default parameters |

`tb/xbar_ref_pkg.sv` holds the reference arbiter model. It descends the tree
from the root with its own per-node memory, so it does not reuse the RTL.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal \
  --top-module tb_crossbar_chip -y rtl -y tb +libext+.sv \
  rtl/xbar_pkg.sv tb/xbar_ref_pkg.sv tb/tb_crossbar_chip.sv
./obj_dir/Vtb_crossbar_chip
```

Replace the top module and file for other testbenches. Testbenches that do
not use the reference model need only `rtl/xbar_pkg.sv` and their own file.
The 33-slice system expands to 7,920 arbiter cells and 8,448 switches. Its
testbench builds in a few minutes, and the simulation itself takes seconds.

Verilator reports `SYNCASYNCNET` on `rst`: the flip-flops use it as an
asynchronous reset, and the assertions use it synchronously in their
`disable iff`. It is harmless. Synthesis reports most of `p_sync`'s outputs
as wired straight to inputs, which is intended, since that block only passes
the PE signals through apart from the collision logic.
