# Double edge triggered flip-flop and a clock-gated streaming element

A double edge triggered (DET) flip-flop stores its input on both the rising
and the falling edge of the clock. A DET register therefore moves data at
the same rate as an ordinary single edge register clocked twice as fast.
Halving the clock frequency cuts the power spent in the clock tree and in
the flip-flops' clock pins, and that is often the largest share of a chip's
dynamic power.

This repository holds SystemVerilog for:

* **`detff`**, the DET flip-flop cell, modelled at gate level. It has two
  latch paths of opposite clock phase and an output selected by the clock.
* **`det_stream_element`**, a dataflow element with a gated clock that uses
  the DET flip-flop. A video actor (a de-blocking filter) reads from an
  input queue and writes to an output queue. A clock enabler stops the
  actor's clock while the output queue is nearly full. The element also
  contains the storage of a parallel de-blocking filter: two dual-port
  block memories and a RAM transposer for 8x8 blocks. All of it runs on the
  gated clock.

The filter arithmetic itself (horizontal and vertical filters, threshold
derivation, splitters, combiners, block buffer, select sequencing) is
**not** included. Only the names of these parts are known, not what they
compute. Their signals are ports of the top module.

## The DET flip-flop (`rtl/detff.sv`)

The transistor-level cell that this model follows has two data paths
between D and the output inverter:

```
        +--[pass, open when clk=0]--[inverter + keeper]--[pass, open when clk=1]--+
   D ---+                                                                          +--[inv]-- Q
        +--[pass, open when clk=1]--[inverter + keeper]--[pass, open when clk=0]--+
```

Each path is a latch. While the clock is low, the upper latch is transparent
and the lower path drives the output. When the clock rises, the upper latch
closes on the value D had just before the edge, and the output switches
to it. The lower latch now becomes transparent, and it closes when the
clock falls. So the output always comes from a latch that is closed. Q
changes only at clock edges, and it changes at both of them. If the clock
stops in either level, the closed latch keeps its value and Q holds. In
the circuit, feedback around each path's inverter does this job.

Compared with a design built from transmission gates, the cell uses single
n-type pass transistors. This reduces the number of transistors driven by
the clock from 10 to 6. Each pass transistor is followed by an inverter,
which restores the weak high level that an n-type device passes. These
points are about transistor sizing and level restoration. They have no
logic counterpart, so the RTL is the logic behaviour: two `always_latch`
processes and a multiplexer driven by `clk`. The two inversions in the
circuit cancel, so `q` equals the sampled `d`.

Using the model:

* `WIDTH` (default 1) makes a register of identical cells.
* D must be stable around **both** edges. Drive it from logic that changes
  away from both edges: for example, from the opposite edge, or from a
  domain that has its own setup margin.
* Synthesis gives two latches and a mux per bit. That is what the cell is,
  but FPGA tools report it as latches and a clock used as data. On an ASIC
  you would put a DET library cell in its place.
* There is no reset, because the cell has none.

## The clock-gated streaming element (`rtl/det_stream_element.sv`)

```
 up_clk domain          gated clock (gclk) domain             down_clk domain
 in_wr_* --> [stream_queue u_qin] --act_rd_*--> actor --act_wr_*--> [stream_queue u_qout] --> out_rd_*
   in_full/in_afull <--'                                              |  F, AF
                                                                      v
            clk --> [ce_controller] --EN--> [detff] --S--> [clk_gate] --> gclk
                     \___________________ clock_enabler ___________________/
```

* **`stream_queue`** is a FIFO. Its write side and read side each have
  their own clock pin. It reports full (F), almost full (AF, at least
  `AF_LEVEL` words) and empty. Both clocks must come from the same source
  clock, with one of them possibly gated. For that reason the pointers are
  compared directly, without synchronisers. Do not use it between unrelated
  clocks. Reads are first-word fall-through.
* **`ce_controller`** registers EN = NOT (F OR AF) on the free-running
  clock.
* **`detff`** retimes EN into S. It copies EN on the falling edge that
  follows, which is half a cycle before the clock gate's latch closes.
* **`clk_gate`** is a latch-and-AND clock gate. It is the generic
  equivalent of an FPGA clock buffer with enable, and it never produces a
  shortened pulse.

**Stop timing.** Suppose the output queue raises AF just after rising edge
*t*. The controller sees AF at edge *t+1*, S drops at the falling edge
after that, and edge *t+2* is missing from gclk. So the actor can still
write once after AF rises, at edge *t+1*. With the defaults (depth 16, AF
at 14), the queue holds at most 15 words and never overflows, even if the
actor writes on every gated edge without looking at the flags. Restarting
works the same way: gclk resumes two edges after both flags clear. If you
change `DEPTH` or `AF_LEVEL`, keep `AF_LEVEL <= DEPTH - 1`. If the actor
can write more than one word per edge, lower it further.

The actor itself is outside the module. Its queue-side signals (`act_*`)
and `gclk` are ports. `up_clk` and `down_clk` are the clocks of the
neighbouring elements. In a chain of elements, these would be the
neighbours' gated clocks.

### De-blocking filter storage

The following parts run on `gclk` and belong to the actor. Their ports are
top-level ports.

* **Two `block_memory` instances**, each a 32-bit true dual-port SRAM
  with 128 words. Memory `[0]` holds the left neighbour blocks for the
  first horizontal filter, and memory `[1]` holds the top neighbour blocks
  for the first vertical filter. Reads are synchronous, with one cycle of
  latency and read-before-write behaviour. If both ports write the same
  word in one cycle, port A wins. The 128 words come from eight 8x8 blocks
  of 8-bit samples, packed four samples to a word.
* **`ram_transposer`** takes an 8x8 block one row per beat and returns it
  one column per beat. This lets the vertical filters reuse the output of
  the horizontal filters without going back to memory. It has two
  ping-pong banks and valid/ready handshakes on both sides. In steady state
  it moves one row in and one column out per clock. The first column
  appears on the cycle after the last row of its block has been accepted.
  Within a row, sample *c* is at bits `[c*8 +: 8]`. Within a column, the
  sample from row *r* is at bits `[r*8 +: 8]`.

The ports use `det_stream_pkg::bm_req_t` (enable, write, address, data)
for each memory port request. The package also holds the default sizes.

## How far this follows its source, and where it does not

Taken from the source material:

* the DET cell's two-path, clock-selected structure, and its capture on
  both edges;
* the arrangement of the streaming element: queues with F and AF, a
  controller that reads the output queue's flags, a D flip-flop, a clock
  buffer with enable, and the gated clock driving the actor side;
* the 32-bit dual-port block memories and their roles;
* the 8x8 row-to-column transposer.

Choices made in this design:

* the controller's rule, and all queue sizes;
* the use of the DET cell as the enable flip-flop;
* the latch-and-AND clock gate;
* the memory depth and collision behaviour;
* the transposer's sample width, handshakes and ping-pong banks;
* asynchronous active-high `rst` everywhere except in the DET cell;
* the empty flag on the queues.

Not built, because their function is not specified: the four filter units
(luma and chroma), threshold derivation from QP, the two splitters, the two
combiners, the block buffer, the administration unit that sequences selects
S1 to S8, and the input multiplexers in front of the block memories.

The source reports FPGA utilisation figures for a complete design built with
single edge and with DET flip-flops. Those figures cannot be compared with
this RTL, because that design's contents are not known.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against a reference computed independently in the testbench, ends
with a `TB_RESULT checks=N failures=M` line, and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_detff` | Q after each rising and each falling edge; Q unchanged by D changes inside a phase; Q held while the clock is stopped high and stopped low |
| `tb_ce_controller` | EN after each edge for random F/AF; value during reset |
| `tb_clk_gate` | gclk sampled every 0.5 ns against the enable at the end of each low phase; no glitches |
| `tb_clock_enabler` | each gated edge against the flags two edges earlier |
| `tb_stream_queue` | data order and F/AF/empty against a model queue, with a gated read clock |
| `tb_block_memory` | both ports, random and same-word accesses, read-before-write, port A priority |
| `tb_ram_transposer` | every column of 76 random blocks; 16 back-to-back blocks take exactly 16*8+8 cycles |
| `tb_det_stream_element` | end to end at default parameters: see below |

`tb_det_stream_element` plays three roles: the upstream producer, an actor
that writes on every gated edge without checking flags, and a downstream
consumer whose rate changes from phase to phase. It checks that every word
arrives in order, transformed, with none lost. It also checks that the
actor never meets a full queue and that the gated clock runs once the
queues are empty. Finally, it exercises both block memories and the
transposer on the gated clock. It counts each of the following and fails if
any never occurs:

* clock stops
* clock restarts
* input-queue-full cycles
* output-almost-full cycles
* dual-port memory cycles
* both transposer banks full at once

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/det_stream_pkg.sv tb/tb_det_stream_element.sv --top-module tb_det_stream_element
./obj_dir/Vtb_det_stream_element
```

Replace the testbench name to run any other. Each one finishes in seconds.
Verilator simulates with two states, so every register that is read is
either reset or written before it is used. The lint warnings that remain
about latches in `detff` and `clk_gate` are expected, because those latches
are the storage the cells are built from.
