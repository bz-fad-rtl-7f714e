# BZ-FAD: a low-power shift-and-add multiplier

BZ-FAD ("Bypass Zero, Feed A Directly") is a radix-2 shift-and-add
multiplier. It computes `A x B` one multiplier bit per clock, like the
textbook version, but is arranged so that far fewer nodes switch per
product. The textbook circuit shifts the B register every cycle. It routes
A or 0 into the adder through a multiplexer, and the adder works even when
the multiplier bit is 0. A binary counter counts the cycles, and the whole
partial product shifts every cycle. BZ-FAD removes or reduces each of these
sources of switching:

| textbook shift-and-add                  | BZ-FAD                                                              |
|-----------------------------------------|---------------------------------------------------------------------|
| B shifts right, B(0) selects            | B stays put; a one-hot multiplexer (M1) picks B(n)                  |
| mux chooses A or 0 for the adder        | A is wired straight into the adder                                  |
| adder runs every cycle                  | adder bypassed when B(n) = 0 (Feeder and Bypass registers)          |
| binary cycle counter                    | one-hot ring counter, clock-gated block by block ("Hot Block")      |
| whole partial product shifts            | low half written bit by bit into latches (M2, P_Low); never shifts  |

This costs some area (a K-bit ring counter, two K-bit registers and K
latches) and gains nothing in speed. It is meant for places where power and
area matter more than throughput. A K x K product takes K cycles.

The RTL is parameterised. Its defaults are the configuration that was
evaluated for this architecture: 16 x 16 bits, with a ring counter in
blocks of 4 flip-flops.

## One multiplication, cycle by cycle

Write `PP` for the running partial product. The textbook algorithm, for
cycle `n = 0 .. K-1`, is:

```
PP      = HI + (B(n) ? A : 0)      // K+1 bits
P[n]    = PP[0]                    // product bit n is final
HI      = PP[K:1]                  // shift right by one
```

and after K cycles the product is `{HI, P[K-1:0]}`.

BZ-FAD keeps `HI` in one of two K-bit registers:

* **Feeder** drives one adder input (the other input is A itself).
* **Bypass** holds `HI` when no addition is needed.

MUX1 then forms `PP = B(n) ? (Feeder + A) : {0, Bypass}`. At the end of
cycle n, `PP[K:1]` is written into exactly one of the two registers. The
choice depends on the **next** multiplier bit, `B(n+1)`:

* If `B(n+1) = 1`, the next cycle adds, so `PP[K:1]` goes to Feeder.
* If `B(n+1) = 0`, the next cycle only passes the value on, so it goes to
  Bypass. Feeder is left alone.

This look-ahead is the key point. In a cycle with `B(n) = 0`, Feeder did
not change at the previous edge, and A is constant. So the adder's inputs
do not move and the adder makes no transitions at all. It is also why A
needs no 0/A multiplexer: the adder output is simply ignored in those
cycles.

`B(n+1)` comes from M1, a K-input multiplexer whose select lines are the
one-hot ring counter. In cycle n, input n of M1 is `B(n+1)`, and the last
input is a constant 0. A flip-flop stores M1's output as `B(n)` for the
following cycle. At load time it takes `B(0)` of the new operand instead.
Because `B(K)` is 0, the last partial product always lands in Bypass. That
is where the upper half of the product is read.

`PP[0]` of cycle n is product bit n. It goes to latch n of P_Low. Latch n is
transparent only while ring-counter bit n is 1 and the clock is low (the
second half of cycle n). The rising edge that ends the cycle closes it. So
the low half of the product is never shifted, and it costs K latches
instead of K flip-flops. Latches are safe here because no latch feeds
another.

Example, `A = 3`, `B = 0b0101`, K = 4 (Feeder and Bypass start at 0):

| n | B(n) | B(n+1) | PP                 | P_Low bit n | PP[3:1] written to |
|---|------|--------|--------------------|-------------|--------------------|
| 0 | 1    | 0      | Feeder+A = 0+3 = 3 | 1           | Bypass = 1         |
| 1 | 0    | 1      | {0,Bypass} = 1     | 1           | Feeder = 0         |
| 2 | 1    | 0      | Feeder+A = 0+3 = 3 | 1           | Bypass = 1         |
| 3 | 0    | 0 (end)| {0,Bypass} = 1     | 1           | Bypass = 0         |

Product = `{Bypass, P_Low} = {0000, 1111}` = 15 = 3 x 5.

## The Hot Block ring counter

A K-bit one-hot ring counter is much wider than a log2(K)-bit binary
counter. Clocking all of its flip-flops every cycle would waste the saving.
Yet only two flip-flops actually change per cycle. The Hot Block counter
therefore splits the ring into blocks of `BLOCK` flip-flops. Each block has
a small clock gator. Only the block holding the '1' (the hot block) gets
clock pulses, and for one cycle also the block the '1' is about to enter.
All other flip-flops see no clock edge.

The '1' moves from bit 0 upwards and wraps from bit `WIDTH-1` to bit 0.
Each gator watches two signals:

* **Entrance**: the input of the block's lowest flip-flop, that is, the
  top bit of the block below. When it is 1, the '1' enters on the next
  edge.
* **Exit**: the output of the lowest flip-flop of the block above. When it
  is 1, the '1' has left.

### The clock gator (`bz_hb_clock_gate`)

The gator has three parts, and its cost does not depend on the block size:

```
            +-----------------------------+
 Exit ------|1                            |
            |  M1 ---> S/~H  latch  Q ----+---> open_o
 Entrance --|0               Din <- Entrance
            +--- select = Q
 clk_o = NAND(Q, ~clk)
```

* **Closed (Q = 0):** M1 feeds Entrance to the latch's sample line, and
  Entrance is also its data input. The latch therefore follows Entrance,
  and the NAND holds the block clock at 1.
* **Entrance rises:** the latch captures 1. M1 now selects Exit, which is
  0, so the latch holds. The NAND passes the clock.
* **Exit rises:** the latch samples Entrance again. Entrance is 0 by then,
  so the latch captures 0, M1 goes back to watching Entrance, and the
  clock is shut off.

**Why no extra clock edges appear.** Entrance and Exit are flip-flop
outputs, so they change just after a rising edge. At that moment the
inverted clock is 0, and the NAND output is held at 1 whatever the latch
does. The first rising edge a newly opened block sees is the next real
clock edge, and a closing block loses its clock without a spurious pulse.
In the testbench the gator passes exactly the five edges that move the '1'
into, through and out of a 4-bit block.

**Reset.** The published gator resets its latch to 0, which closes it.
Applied to every block, this would freeze the counter: bit 0 holds the
'1' after reset, but block 0's Entrance (the top bit of the ring) is 0, so
block 0 would never be clocked. This design therefore gives the gator a
`RESET_OPEN` parameter, and only block 0's gator resets open. With that,
at most two gators are open in any cycle. The testbenches check this every
cycle.

The ring counter and the top also carry assertions. In the ring counter,
the count must stay one-hot, and one or two gators must be open at each
clock edge. In the top, the ring must be one-hot while a
product is in progress, and `done_o` must never rise while busy.

## Interface of the multiplier (`bz_fad_multiplier`)

| port            | dir | width                | meaning                                                       |
|-----------------|-----|----------------------|---------------------------------------------------------------|
| `clk_i`         | in  | 1                    | clock; everything is rising-edge except the P_Low latches     |
| `rst_i`         | in  | 1                    | active high; synchronous for control and datapath, asynchronous for the ring counter |
| `start_i`       | in  | 1                    | starts a product when `ready_o` is 1                          |
| `a_i`, `b_i`    | in  | K                    | unsigned operands, captured at start                          |
| `ready_o`       | out | 1                    | idle                                                          |
| `busy_o`        | out | 1                    | multiplication in progress                                    |
| `done_o`        | out | 1                    | one-cycle pulse: `product_o` is valid                         |
| `product_o`     | out | 2K                   | `a_i * b_i`, held until the next start                        |
| `rc_blk_open_o` | out | ceil(K/RC_BLOCK)     | which ring-counter blocks are being clocked (observation)     |

Timing:

1. `start_i` is sampled with `ready_o` high at edge E0. A and B are
   captured, Feeder and Bypass are cleared, and `B(0)` is loaded.
2. The cycles after E1 .. EK are multiplication cycles 0 .. K-1.
3. At EK, `busy_o` falls and `done_o` rises for one cycle. `product_o` is
   valid from then on.
4. A new start is accepted in the `done_o` cycle, so products can follow
   each other every K+1 cycles.
5. A start while busy is ignored. The operand inputs may change freely
   after E0.

`rst_i` must have a rising edge after power-up, because the ring counter's
reset is edge-triggered asynchronous.

Between multiplications the ring counter's clock is stopped, as
`NAND(busy, ~clk)`. At the last edge of a product the '1' wraps from bit
K-1 back to bit 0, and it rests there until the next start. The P_Low
latches are enabled only while busy, so the finished low half is not
overwritten.

## Parameters

| module                | parameter    | default | origin                                               |
|-----------------------|--------------|---------|------------------------------------------------------|
| `bz_fad_multiplier`   | `K`          | 16      | evaluated configuration                              |
| `bz_fad_multiplier`   | `RC_BLOCK`   | 4       | block size of the evaluated ring counter             |
| `bz_hb_ring_counter`  | `WIDTH`, `BLOCK` | 16, 4 | the 16-bit, 4-per-block example                     |
| `bz_hb_clock_gate`    | `RESET_OPEN` | 0       | this design's addition (see Reset above)             |

The defaults live in `bzfad_pkg`. The ring counter needs at least two
blocks (`K > RC_BLOCK`). When `BLOCK` does not divide `WIDTH`, the top block
is shorter. This is checked at 16, 32, 48 and 64 bits with blocks of 4, 6
and 8, the sizes of the published ring-counter power comparison.

## Files

| file                         | contents                                                              |
|------------------------------|-----------------------------------------------------------------------|
| `rtl/bzfad_pkg.sv`           | default sizes, block-count function                                   |
| `rtl/bz_fad_multiplier.sv`   | top: operand registers, start/done control, ring-clock gating, wiring |
| `rtl/bz_hb_ring_counter.sv`  | Hot Block ring counter                                                |
| `rtl/bz_hb_clock_gate.sv`    | its clock gator                                                       |
| `rtl/bz_hot_bit_select.sv`   | M1 one-hot multiplexer and the B(n) flip-flop                         |
| `rtl/bz_feeder_bypass.sv`    | Feeder, Bypass, adder and MUX1                                        |
| `rtl/bz_rca.sv`              | ripple carry adder (full-adder chain)                                 |
| `rtl/bz_plow_latches.sv`     | M2 and the P_Low latches                                              |

A ripple carry adder is used because it makes the fewest transitions per
addition among common adder types. Nothing in the architecture depends on
the adder type, so `bz_rca` can be swapped for any other adder.

## Simulation

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/bzfad_pkg.sv tb/tb_bz_fad_multiplier.sv --top-module tb_bz_fad_multiplier
./obj_dir/Vtb_bz_fad_multiplier
```

| testbench                       | what it checks                                                                                             |
|---------------------------------|------------------------------------------------------------------------------------------------------------|
| `tb_bz_fad_multiplier`          | default 16-bit top: corner operands, 100 uniform and 100 near-normal pairs, back-to-back starts, ignored start, exact K-cycle latency, product held while idle, at most two ring blocks clocked; also checks that bypass cycles, adding cycles, adder carry-out, Feeder loads, Bypass loads, ring hand-overs and every P_Low latch all occurred |
| `tb_bz_fad_multiplier_32`       | the same at 32 x 32 bits                                                                                    |
| `tb_bz_fad_activity`            | 100 random products at 16 bits: prints transition counts of P_Low, adder, MUX1, ring counter, Feeder and Bypass; checks that the adder output is frozen in bypass cycles, that each P_Low latch changes at most once per product, and that the ring blocks receive exactly NBLK x (BLOCK+1) = 20 clock edges per product (an ungated 16-bit ring would clock 256 flip-flop edges) |
| `tb_bz_hb_ring_counter`         | ring counter at 16/4, 18/4, 8/1 and 12/6: position and open blocks every cycle, exactly WIDTH + blocks gated clock edges per turn, re-reset                   |
| `tb_bz_hb_ring_counter_sizes`   | ring counter at 16/32/48/64 bits x blocks of 4/6/8, same checks                                                         |
| `tb_bz_hb_clock_gate`           | gator states at both clock phases, exact count of passed edges, both reset values                          |
| `tb_bz_feeder_bypass`           | PP and PP(0) every cycle against a reference, Feeder unchanged before a bypass cycle, final upper half      |
| `tb_bz_hot_bit_select`          | M1 output B(n+1), registered B(n), load and hold                                                           |
| `tb_bz_plow_latches`            | each latch keeps the value present at the end of its cycle; hold while idle                                |
| `tb_bz_rca`                     | exhaustive at 4 bits, corners and random values at 16 bits                                                 |

Verilator has only two logic states. The testbenches reset everything that
is read, and they give `rst_i` a rising edge.

## Where this RTL departs from, or adds to, the published architecture

* **Feeder/Bypass clocking.** The published circuit clocks Feeder and
  Bypass through a NAND and a NOR gate fed with the inverted clock and
  `B(n+1)`. Here both registers sit on the common clock with load enables
  derived from `B(n+1)`. The register contents are identical. The
  difference shows up only as clock-tree power, and it avoids a clock edge
  when `B(n+1)` changes while the clock is high.
* **P_Low sample lines.** The latches are qualified with the inverted clock
  (second half of the cycle) and with `busy`. Only the ring-counter bit is
  described as the sample line.
* **Block 0's clock gator resets open** (see Reset above).
* **Handshake and control.** `start/ready/done`, operand capture registers,
  unsigned operands, stopping the ring counter's clock while idle, and the
  reset style are this design's own. The published architecture shows a
  Ready output but does not define it.
* **Gates are not modelled as transistors.** The transmission-gate
  multiplexers and the 18-transistor gator are written as ordinary logic
  (multiplexer, `always_latch`, NAND).

## Trust and limits

* The functional behaviour is verified in simulation only, by the
  testbenches above.
* Nothing here measures power. `tb_bz_fad_activity` counts zero-delay RTL
  transitions, which ignore glitches and capacitance. The published
  figures for this architecture are:
  * about 30 % less power than a conventional 16-bit shift-and-add
    multiplier;
  * about 34 % more area;
  * 48.5 pJ against 69.2 pJ per multiplication;
  * a 64-bit Hot Block counter using 389 uW instead of 1591 uW.

  These come from gate-level power analysis in a 0.13 um library and are
  not reproduced here.
* The gated clocks (ring-counter blocks, and the ring clock while idle)
  and the latches are deliberate. They need the usual care in synthesis
  and static timing: clock-gating checks on the NAND outputs, and latch
  timing for P_Low. The RTL is synthesizable, but only elaboration and
  coarse synthesis have been run on it.
* Lint reports the gator's latch-through-multiplexer loop. This loop is
  the gator's structure, and it settles because M1 only ever selects a
  signal that the latch does not drive.
