# Loran-C digital word generator

A Loran-C navigation receiver finds position from the *differences* in arrival
time of pulses from several transmitters. Each station of a chain repeats its
pulse group once per group repetition interval (GRI). For the US East Coast
chain the GRI is 99 300 µs. To measure these differences, a small computer
needs each pulse's arrival time as a number: "this pulse arrived
*t* µs into the current GRI".

This RTL is that converter: a memory-mapped peripheral for a 6502-based host
(the KIM-1 single-board computer). It does four things:

- It counts microseconds in BCD.
- Once per GRI it can reset the count, so the count is the time within the GRI.
- When the receiver front end sends a pulse, it freezes the count in latches and
  interrupts the host.
- The host then reads the frozen time as three bytes.

The whole design has about 60 flip-flops. Its logic is simple. The subtle parts
are the interplay of the interrupt, the latches and the host's read sequence,
and the timing, which the sections below cover.

## Block structure

```
                 +--------------+   sel[3] (write 3XX3)   +---------------+
 addr, phi2 ---->| addr_decoder |------------------------>| control_flags |--> flags[7:0]
                 +--------------+                         +---------------+
                    | sel[2:0] (read 3XX0..3XX2)            | irq_en  | sync_en
                    | sel[0]  (read 3XX0)                   v         v
                    |                          +---------------+  +-----------+
 lirq ------------- | ------------------------>| control_logic |  | gri_logic |
                    |                          +---------------+  +-----------+
                    |                 sample |        | irq_n      ^   | clr
                    v                        v        +-->         |   v
               +------------------+  count  +-------------+        |
 dout, oe <----| tristate_latches |<--------| bcd_counter |--------+
               +------------------+         +-------------+
```

| Module | Role |
|---|---|
| `loran_word_gen` | Top level; wires the blocks below. |
| `bcd_counter` | Six decade counters in a chain, one count per 1 MHz clock. |
| `gri_logic` | With GRI sync on, restarts the counter after count 99 299. |
| `addr_decoder` | Decodes page `3XXX` and A2..A0 into eight selects, enabled by phi2. |
| `control_flags` | Write-only 8-bit register at `3XX3`. |
| `control_logic` | Turns a front-end pulse into one capture strobe and one interrupt. |
| `tristate_latches` | Holds the captured time and puts the selected byte on the bus. |
| `loran_pkg` | Register map, flag bits, default sizes, BCD helper functions. |

## Register map

The peripheral uses the whole 4 KiB page `3000`–`3FFF`. Only A15..A12 and
A2..A0 are decoded. A11..A3 are ignored, so every register repeats every eight
bytes across the page.

| Address | Access | Contents |
|---|---|---|
| `3XX0` | read | time digits 5 and 4 (bits 7..4 = digit 5). **Reading it also clears the interrupt.** |
| `3XX1` | read | time digits 3 and 2 |
| `3XX2` | read | time digits 1 and 0 (units of µs in bits 3..0) |
| `3XX3` | write | control flags |
| `3XX4`–`3XX7` | — | decoded, unused |

There is no read/write input. Reads and writes use different addresses, and the
decoder is only enabled during phi2, so the address alone says which register
is meant. The flip side is that software must never write `3XX0`–`3XX2`. Such
an access is treated as a read: the peripheral drives `dout_oe`, and an access
to `3XX0` clears the pending capture. A read of `3XX3` returns nothing:
`dout_oe` stays low.

Control register bits:

| Bit | Meaning |
|---|---|
| 2 | interrupt enable: `irq_n` may go low |
| 1 | GRI sync enable: the counter restarts every `GRI_US` counts |
| 7..3, 0 | spare; stored and visible on the `flags` port |

The usual values are these:

- `$06`: interrupt on, sync on.
- `$04`: interrupt on, free-running.
- `$02`: interrupt off, sync on.
- `$00`: both off.

## Time counter and GRI sync

`bcd_counter` counts 0 → 999 999 and wraps, one step per clock. With a 1 MHz
clock each step is one microsecond. When sync is on, `gri_logic` requests a
clear whenever the count is `GRI_US − 1` (99 299) or more. The counter then
goes 99 299 → 0, so each GRI holds exactly 99 300 counts.

Two details matter:

- **Synchronous clear.** The clear takes effect at a clock edge. Some
  discrete-logic versions instead let the counter reach 99 300 and clear it
  asynchronously. The values seen at clock edges are the same.
- **Turning sync on while the count is past the GRI.** This can only happen
  after free-running. The counter restarts on the next clock. A pure equality
  decoder would instead run on until the count wrapped around.

The counter has six digits, but within a GRI only five are ever non-zero. The
sixth digit (bits 7..4 of `3XX0`) matters only when free-running beyond
99 999 µs. Software that works only within a GRI can mask it off.

## Capture and interrupt: the sequence

This is the part to understand before changing anything.

1. The front end raises `lirq` for about 10 µs. The signal is asynchronous.
2. `control_logic` samples `lirq` at each clock and keeps the previous sample.
   A 0→1 change gives a `sample` strobe one clock long, however long the pulse
   lasts.
3. At the end of that clock, the latches copy the counter and the *pending*
   flip-flop is set.
4. `irq_n = !(pending && irq_en)`. The interrupt line stays low until the
   capture is read. It does not pulse.
5. The host reads `3XX2`, `3XX1` and `3XX0`. The read of `3XX0` clears
   *pending*, which releases `irq_n`. That is why `3XX0`, the most significant
   byte, must be read **last**.
6. While a capture is pending, new pulses are ignored. The latches cannot
   change between the three reads, and each pulse gives at most one interrupt.

The routine the host is expected to run for each interrupt:

```
    write $02 to 3003     ; mask the interface interrupt
    read 3002             ; digits 1,0
    read 3001             ; digits 3,2
    read 3000             ; digits 5,4 - clears the pending capture
    write $06 to 3003     ; unmask
```

The enable flag gates only the interrupt *output*. With the interrupt masked,
pulses are still captured and *pending* is still set. A host can therefore poll
instead: read the three bytes, the last being `3XX0`. A capture left pending
while the interrupt was masked raises `irq_n` as soon as the flag is set again.

### Timing

All logic runs on one clock, `clk`, which is the host's 1 MHz system clock.
Suppose `lirq` is first seen high at clock edge *k*:

| Edge | Event |
|---|---|
| *k* | sampled `lirq` rises; `sample` goes high if nothing is pending |
| *k*+1 | latches hold the count that was current between *k* and *k*+1; `irq_n` falls |

So the captured time is the count that edge *k* produced, the edge at which
the pulse was first sampled. Add one microsecond of sampling uncertainty, since
the pulse is asynchronous.
This offset is the same for every pulse, so it cancels out of time differences.

## Bus interface

The 6502 bus is modelled synchronously, one `clk` period per bus cycle:

- **`phi2`** is high for the clock of an access.
- **Reads** are combinational. In the same clock, `addr` and `phi2` produce
  `dout` and `dout_oe`.
- **Writes and the interrupt clear** take effect at the clock edge that ends
  the access.
- **Data bus.** The original interface drives the shared bus through tri-state
  latches. Here the data bus is split into `din`, `dout` and `dout_oe`, and the
  system merges `dout` onto the bus when `dout_oe` is high.
- **Reset.** `rst_n` is a synchronous, active-low reset. It clears the count,
  the latches, the flags (interrupt and sync off) and the pending flip-flop.

Top-level ports of `loran_word_gen`:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | 1 MHz clock; one count per edge |
| `rst_n` | in | 1 | synchronous reset, active low |
| `phi2` | in | 1 | high during a bus access |
| `addr` | in | 16 | address bus |
| `din` | in | 8 | write data |
| `dout` | out | 8 | read data |
| `dout_oe` | out | 1 | high while `dout` is driven |
| `irq_n` | out | 1 | interrupt request, active low, level |
| `lirq` | in | 1 | pulse from the receiver front end |
| `flags` | out | 8 | control register contents |

Parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `DIGITS` | 6 | BCD digits in the counter and the latches; at most 6, since only three read addresses exist |
| `GRI_US` | 99300 | GRI in counts (µs); 99300 is the East Coast chain |

For another chain, set `GRI_US` to ten times its GRI designator. For example,
GRI 7980 gives 79 800.

## Where this RTL departs from the discrete original

The design follows a board built from TTL and CMOS parts. These are the places
where this RTL is a modern re-expression rather than a copy:

- **Clocking.** There is one synchronous clock domain and a synchronous reset.
  The board has a power-up state that is not specified, and it uses
  asynchronous counter clears.
- **Pulse edge detection.** Two flip-flops and an AND gate stand in for the
  board's one-shot and synchronizer. They guarantee one strobe per pulse.
- **Ignoring pulses while a capture is pending.** This is a choice made here,
  to keep the latched time stable while the host reads it.
- **Counter length.** The board's block diagram has six BCD digits, but its
  schematic shows five counter and five latch packages. This RTL builds six.
  In a GRI of 99 300 µs the top digit is always zero, so the two are the same
  in synchronised operation.
- **Data bus.** There are no on-chip tri-states; see the bus interface above.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the module
with a model written independently inside the testbench, and each ends by
printing `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_bcd_counter` | 1.4 million clocks with random enable and clear, against an integer model; includes the 999 999 → 0 wrap |
| `tb_gri_logic` | every count 0–199 999 with sync off and on |
| `tb_addr_decoder` | all 65 536 addresses, phi2 low and high; aliasing counts |
| `tb_control_flags` | random writes against a model register |
| `tb_control_logic` | 3000 random 10-clock pulses, random masking and clears; one strobe per pulse, pulses ignored while pending, two-edge latency to `irq_n` |
| `tb_tristate_latches` | random captures and byte reads; byte order |
| `tb_loran_word_gen` | the whole design at default parameters (see below) |
| `tb_gri_chain` | a chain workload: three stations of eight pulses each, 1000 µs apart, over four GRIs of 99 300 µs; every reading must be exact, repeat from GRI to GRI, and give the scheduled station spacings |

`tb_loran_word_gen` plays both the host and the front end. It runs the
interrupt routine above for each pulse, and it checks `irq_n` on every clock
and every byte read against its own model. It runs these phases:

1. Three full GRIs with sync on.
2. Free-running past 99 300.
3. Sync turned back on while the count is past the GRI.
4. Interrupt masked, with polled reads and extra pulses while a capture is
   pending.
5. Reads with the interrupt left enabled, to check that only the `3XX0` read
   releases `irq_n`.
6. Free-running through the full six-digit wrap.

It also makes accesses at aliased and out-of-page addresses. It counts how often
each of these happened and fails if any never did. About 1.1 million clocks
simulate in about a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/loran_pkg.sv rtl/*.sv \
    tb/tb_loran_word_gen.sv --top-module tb_loran_word_gen -Mdir obj
./obj/Vtb_loran_word_gen
```

For a single block, list `rtl/loran_pkg.sv`, that block's file and its
testbench, for example `rtl/control_logic.sv tb/tb_control_logic.sv`.

Not modelled: the host computer, its memory board, and the analog receiver
front end that produces `lirq`. The testbench stands in for the host's bus
cycles and for the front end's pulses.
