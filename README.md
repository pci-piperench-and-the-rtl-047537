# PCI-PipeRench in SystemVerilog

PipeRench is a pipeline-reconfigurable fabric. An application is cut into
pipeline stages ("virtual stripes"), and these are loaded into identical
hardware stages ("physical stripes"). If the application has more stages
than the chip has stripes, it still runs. The fabric *scrolls* down the
virtual pipeline: every cycle it reconfigures one physical stripe with the
next virtual stripe. The program then runs more slowly, but it needs no
recompiling.

PCI-PipeRench puts such a fabric on a PCI card as a coprocessor. The host
talks to the chip only through one stream of 32-bit words, and configuration
travels in the same stream as data. The words are grouped into **packets**.
A packet header says what the packet is for: configuration, initial state,
data, or a state dump. A header also says which chip in a chain it addresses.
The fabric runs at about three times the PCI clock and uses 128-bit words,
while PCI delivers 32-bit words. Bursts are uneven because the input and
output stages are resident only part of the time. The chip absorbs these
mismatches with:

* dual-clock FIFOs;
* an **assembly buffer** that packs one to four PCI words into a fabric word;
* an **output controller** that cuts fabric words back into PCI words.

This repository is synthesizable RTL for that chip: 16 physical stripes of
16 8-bit processing elements (PEs). It also has self-checking testbenches for
every block and an end-to-end test of two chained chips.

## Block structure

```
              PCI clock domain                 |           fabric clock domain
                                               |
 in_data ──► input_controller ──► assembly ──► [128-bit input FIFO] ──► fabric (16 stripes)
   (32b)        │   │   │         buffer       |                          ▲      │
                │   │   └─ commands ─────────► [command FIFO] ──► config_controller
                │   │                          |   (config cache, state memory, scrolling)
                │   └─ output-packet requests  |                                 │
                ▼                              |                                 ▼
 out_data ◄── output_controller ◄──────────── [128-bit output FIFO] ◄────── results / dumps
   (32b)        ▲ pass-through words
```

| file | block |
|---|---|
| `rtl/prp_pkg.sv` | word layouts (header, marker, I/O word, PE word, commands) |
| `rtl/pci_piperench.sv` | the chip (top) |
| `rtl/input_controller.sv` | packet decoder, chip-ID routing, pass-through |
| `rtl/assembly_buffer.sv` | 1–4 PCI words → 128-bit fabric word |
| `rtl/async_fifo.sv` | dual-clock FIFO (input, output, command) |
| `rtl/config_controller.sv` | loading, scrolling, state save/restore, stall, drain, dump |
| `rtl/config_cache.sv` | configuration cache, one stripe configuration per line |
| `rtl/fabric.sv` | ring of physical stripes |
| `rtl/stripe.sv` | one stripe: 16 PEs, crossbar, registers |
| `rtl/pe.sv` | processing element: shifter, 3-LUT, carry, zero detect |
| `rtl/output_controller.sv` | output packets, state-dump packets, pass-through merge |

The top module `pci_piperench` has two clock/reset pairs (`pci_clk`,
`pci_rst_n`, `pipe_clk`, `pipe_rst_n`; the resets are asynchronous and active
low). It has a 32-bit valid/ready input stream (`in_*`) and a 32-bit
valid/ready output stream (`out_*`), both in the PCI domain. Three status
outputs are for monitoring: `busy`, and, in the fabric domain, `fab_stall`
and `fab_swap`.

All the crossings between the two clocks go through Gray-pointer FIFOs. The
input FIFO carries assembled data words. The output FIFO carries results and
state-dump rows. A small command FIFO carries everything else: configuration
writes, state writes, start, end of stream and dump. The configuration cache
and the state memory sit in the fabric domain. So the fabric side owns every
memory, and nothing else crosses the clock boundary.

## Packets

A packet is an optional **header**, then a **marker**, then `size` content
words. Bit 31 tells the two apart.

| word | bits |
|---|---|
| header | `[31]=1`, `[30:29]` type (0 data, 1 configuration, 2 initial state, 3 state dump), `[28:25]` chip ID, `[24:16]` reserved, `[15:0]` cache line |
| marker | `[31]=0`, `[30]` flush bit, `[29:16]` reserved, `[15:0]` size |

* **Flush bit.** 0 means "this is the last packet of the stream: drain the
  pipeline afterwards". 1 means more packets follow, and the pipeline keeps
  its contents and waits. A stream of unknown length is a series of packets
  with flush = 1, ended by a packet with flush = 0. That last packet may have
  zero length.
* **Cache line.** This is where a configuration packet starts writing, at 16
  words per line. It is also where an initial-state packet starts writing, at
  4 words per 128-bit state row, and where a dump starts reading. For a data
  packet it is the line of the application to run.
* **Header lifetime.** A data header stays active until the flush packet. A
  configuration, initial-state or dump header applies only to the next marker.
* **Dump size.** For a dump, `size` is the number of 32-bit state words to
  return. The chip answers with a bare packet: a marker of that size, then
  the words.
* **Output packets.** Each data packet produces one bare output packet. Its
  length is `size / (PCI words per fabric input word) × (PCI words per fabric
  output word)`. Its marker carries the input packet's flush bit, so the next
  chip in a chain drains too.

### Chaining chips

The `out_*` port of one chip drives the `in_*` port of the next. Routing
works without jumpers or address registers:

* A header with chip ID 0 belongs to this chip.
* A header with a non-zero chip ID is passed on with the ID decremented by
  one. Chips are therefore addressed by their position in the chain.
* A marker that arrives while this chip holds no header is a *bare packet*
  for a chip further down. The marker and its content words are passed on
  untouched.

The output of chip *k* is a bare packet, and it becomes the input of chip
*k+1* when that chip has been sent a data header. A chip that has run out of
input holds its partial results until the next packet arrives. A pass-through
packet waits until every output packet this chip has already been asked for
has been sent, so packets never interleave on the output.

## Application layout and the I/O word

An application occupies consecutive cache lines. Word 0 of its first line is
the **I/O controller configuration word**. The next V lines are its virtual
stripes in pipeline order. A whole application therefore loads with a single
configuration packet.

| bits | field |
|---|---|
| `[3:0]` | assembly initial mask |
| `[5:4]` | assembly shift size |
| `[7:6]` | assembly initial shift count (PCI words per fabric word − 1) |
| `[9:8]` | output start slot |
| `[11:10]` | output slot step |
| `[13:12]` | output word count (PCI words per fabric word − 1) |
| `[19:14]` | number of virtual stripes V (1..63) |

**Assembly.** The 128-bit word is four 32-bit slots, and slot *i* is bits
`[32i+31:32i]`. Each PCI word is written into every slot whose mask bit is
set, so several set bits copy one word into several slots. Then:

* if the count is non-zero, the mask shifts left by the shift size and the
  count decrements;
* otherwise the word is complete, it goes into the input FIFO, and mask and
  count reload.

Some useful patterns:

* `0001/1/3` gives four words into slots 0–3.
* `0011/2/1` gives two words, each filling two slots.
* `1111/0/0` broadcasts one word into all four slots.

The output side is the reverse. For each 128-bit result it emits
count + 1 words, from slots start, start + step, and so on, modulo 4.

The input controller needs the I/O word as soon as a data header arrives,
but the cache lives in the other clock domain. So the input controller keeps
its own copy of word 0 of every cache line, captured as configuration packets
pass through it.

## The fabric

### Processing element

Each PE works on 8-bit words and is configured by one 32-bit word
(`pe_cfg_t`):

| bits | field | meaning |
|---|---|---|
| `[5:0]` | srca | crossbar source of A |
| `[11:6]` | srcb | crossbar source of B |
| `[19:12]` | lut | 3-input truth table; bit k of the result is `lut[{a[k], b[k], c[k]}]` |
| `[22:20]` | shamt | barrel shift of A |
| `[23]` | shr | shift right (1) or left (0) |
| `[25:24]` | cin_mode | carry into bit 0: 0, 1, or the left PE's carry-out |
| `[26]` | binv | invert B in the carry chain (subtract) |
| `[27]` | csel | LUT third input: carry (0) or the left PE's zero flag (1) |
| `[28]` | zchain | AND the left PE's zero flag into this one |

The carry chain is a ripple majority of the shifted A, B (optionally
inverted) and the carry. Some example configurations:

* `lut = 8'h96` adds.
* `lut = 8'h69` with `binv = 1` and `cin_mode = 1` subtracts.
* Chaining `cin_mode = 2` across neighbours builds 16-, 24- or 32-bit adders.
* `csel = 1` with `lut = 8'hE4` selects A or B on the left PE's zero flag.

### Stripe and crossbar

Each PE input selects one 8-bit word by a 6-bit code:

| code | source |
|---|---|
| 0–15 | registered output of PE k of the previous stripe, or byte k of the 128-bit input bus if this stripe holds virtual stripe 0 |
| 16–31 | registered output of PE k of this stripe (feedback, i.e. state) |
| 32–47 | unregistered result of PE k of this stripe, only if k is to the left; otherwise zero |
| 48–63 | zero |

Each PE has one 8-bit register. It loads the PE's result only in cycles
whose input word is valid, so bubbles in the stream do not disturb state
held in the registers.

## Loading, scrolling, state

This is the part of the design that takes the most explaining. The
configuration controller runs an application in one of two ways.

**The application fits (V ≤ 16).** Virtual stripe *v* is loaded into
physical stripe *v*, one per cycle, with its state row restored into its
registers. After that, stripes 0..V−1 all compute every cycle. Stripe 0
takes a word from the input FIFO, and the result of stripe V−1 goes to the
output FIFO in the same cycle. The fabric accepts one word per fabric cycle,
with a latency of V cycles.

**The application is larger (V > 16): scrolling.** The 16 physical stripes
form a ring: stripe *p* reads stripe *p−1*, and stripe 0 reads stripe 15.
Every cycle, the next physical stripe in round-robin order is reconfigured
with the next virtual stripe in round-robin order over 0..V−1. The other 15
stripes compute. When virtual stripe *v* is loaded into physical stripe *p*
at cycle *t*:

* stripe *p+1* receives virtual stripe *v+1* at *t+1*;
* a word that passes virtual stripe *v* in any of its 15 active cycles finds
  *v+1* already active in the next physical stripe;
* the outgoing stripe's registers are read by its successor in the very
  cycle it is reconfigured, so nothing is lost.

On every swap the outgoing stripe's registers are written to the state row
of the virtual stripe it held. The incoming stripe's registers are restored
from the state row of its own virtual stripe.

Each virtual stripe is resident for 16 cycles: 1 configuring and 15
computing. The stripe holding virtual stripe 0 therefore accepts 15 words
per pass, and a pass takes V cycles. Throughput is 15/V words per cycle. For
V = 20 at 100 MHz that is 75 M fabric words/s, still more than a 33 MHz
PCI bus delivers once four PCI words make one fabric word. The application
runs unchanged on a chip with more stripes, only faster.

Whichever stripe currently holds virtual stripe 0 reads the input bus.
Whichever holds V−1 delivers results, and only while it really holds V−1.

**Stall.** The whole fabric, scrolling included, holds still in two cases:

* the stripe holding virtual stripe 0 is active, the input FIFO is empty, and
  the stream has not ended;
* a result is due and the output FIFO is full.

**Drain and end of stream.** The input controller counts the fabric words of
the stream. After the flush packet it sends that count with an END command.
Once the fabric has taken that many words, missing inputs become bubbles
instead of stalls, and the pipeline empties. A counter of words in flight
says when it is done. Then every resident stripe's registers are written back
to the state memory, and the controller returns to idle. A state dump
afterwards therefore returns the final state.

The on-chip FIFOs need only be as deep as the number of physical stripes.
The input and output stages are resident for 16 cycles at a time, so that is
the longest burst each side has to absorb.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `P_STRIPES` | 16 | physical stripes |
| `N_PES` | 16 | PEs per stripe (`N_PES × B_BITS` must be 128) |
| `B_BITS` | 8 | PE width |
| `CACHE_LINES` | 64 | configuration-cache lines (512 bits each) and state rows (128 bits each) |
| `FIFO_DEPTH` | 16 | depth of the 128-bit input and output FIFOs |

The command FIFO is 8 entries deep, and the output-request queue in the
output controller holds 4 entries.

## What follows the PCI-PipeRench description and what is this design's own

These follow the published architecture:

* the geometry (16 stripes of 16 8-bit PEs, a 128-bit fabric word, 32-bit PCI);
* the two clock domains joined by dual-clock FIFOs;
* the assembly buffer's mask, shift-size and shift-count mechanism;
* the packet fields and their meanings, the packet type codes and header/marker
  indicator;
* chip-ID decrementing and bare-packet pass-through;
* the flush bit and its polarity (0 = drain after this packet), cached configurations, and state save/restore on swap;
* FIFO depth equal to the number of physical stripes;
* the I/O word stored with the application in the cache;
* the scrolling scheme of pipeline reconfiguration.

These are this design's own choices:

* All bit positions: header, marker, I/O word, PE configuration, crossbar codes.
* The command FIFO between the controllers, and the input controller's copy
  of the I/O words.
* One 8-bit register per PE. The architecture allows several registers per
  PE, and the number for this chip is not stated.
* Unregistered same-stripe sources limited to PEs on the left, so that no
  configuration can form a combinational loop.
* The output disassembly pattern: start, step, count.
* Copying the flush bit into output markers.
* The stall and drain rules, the words-in-flight counter, and the state
  memory with one 128-bit row per cache line.
* The cache size of 64 lines. The source gives no size.
* Combinational reads of the cache and state memory, so that one stripe can
  be loaded every cycle. A silicon version would use a prefetched synchronous
  RAM.
* The FIFO size. With 16-deep input and output FIFOs of 128 bits, the two
  hold 512 bytes. The source quotes 256 bytes in total for the on-chip FIFOs
  while also asking for a depth equal to the stripe count. This design keeps
  the depth rule.

Not in the RTL:

* the PCI interface chip and the card's 32-bit FIFOs, which are off-the-shelf
  parts. The chip's `in_*` and `out_*` stream ports are where they connect.
* the host-side API that builds packets. The testbenches build packets the
  same way.

Known limitations:

* The output packet length must be an exact multiple. Data packet sizes
  should be multiples of the PCI words per fabric input word.
* A pass-through packet that arrives while this chip still owes output can
  wait for data that is queued behind it. Keep pass-through traffic for other
  chips ahead of, or after, a chip's own stream.
* The chip has two clocks and so two synchronizer chains. `busy` combines
  flags from both domains and is meant for monitoring only.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Shared packet and configuration helpers are
in `tb/prp_tb_pkg.sv`.

| testbench | what it checks |
|---|---|
| `tb_async_fifo` | order and contents under random traffic on unrelated clocks, the full and empty flags |
| `tb_assembly_buffer` | six mask/shift patterns against a slot model, back-pressure |
| `tb_pe` | add, subtract, carry chaining, AND, shifts, zero detect, zero-flag select |
| `tb_stripe` | state restore, accumulator through the crossbar, left-neighbour source, bubbles, hold |
| `tb_fabric` | 16 loaded stripes, +16 per byte, latency, wrap-around start |
| `tb_config_cache` | word writes against a model, line reads |
| `tb_config_controller` | a fitting app, a 20-stripe scrolled app (throughput 15/20), initial state, input-empty and output-full stalls, drain, save, dump |
| `tb_input_controller` | all packet kinds, chip-ID decrement, bare pass-through, output-packet lengths, END count |
| `tb_output_controller` | disassembly patterns, zero-length packet, short dump row, pass-through ordering |
| `tb_pci_piperench` | two full-size chips in a chain, described below |

`tb_pci_piperench` runs two full-size chips in a chain, with PCI at 30 ns
and the fabric at 10 ns:

* configuration routed through chip 0;
* a two-packet stream: a 3-stripe application on chip 0 feeding a 20-stripe
  scrolled application on chip 1, with host back-pressure that fills the
  output FIFOs;
* an accumulator run with initial state, then a state dump.

It counts each mechanism and fails if any of them never happens: stall,
swap, header pass-through, bare pass-through, output-full stall, drain,
dump. It takes about a minute.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/prp_pkg.sv tb/prp_tb_pkg.sv $(ls rtl/*.sv | grep -v prp_pkg) \
  tb/tb_pci_piperench.sv \
  --top-module tb_pci_piperench -o sim
./obj_dir/sim
```

Lint warnings that remain are explained in the opening comment of the
module concerned:

* unused reserved bits of packed words;
* the async reset of the FIFO pointers, which also appears in the FIFO's
  assertions.
