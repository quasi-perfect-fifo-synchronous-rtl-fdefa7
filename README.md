# Quasi-perfect FIFO and the UNICON channel controller

A FIFO is normally a RAM with a read pointer, a write pointer and control logic
around them. The design here has no RAM and no pointers. It is a chain of
identical locations. Each location has a data register and one status
flip-flop that says whether the register holds a word. A word written at the top
falls on its own, one location at a time, until it reaches the lowest empty
location. When a word is read from the bottom, the words above it fall after it.
The control is the same small circuit repeated in every location, so the FIFO
grows in depth by adding locations and in width by adding register bits. Top
and bottom can be used at the same time.

This RTL builds two versions of the FIFO and one application:

* **Synchronous FIFO** (`qp_sync_fifo`). Every flip-flop and register runs on
  one system clock. Each location's control is one JK flip-flop and one AND
  gate.
* **Asynchronous FIFO** (`qp_async_fifo`). There is no clock. Each location has
  a toggle flip-flop, two AND gates and a one-shot. The one-shot's pulse moves
  a word down one location.
* **UNICON channel controller** (`qp_unicon_controller`). A channel controller
  moves 512-word pages between a 36-bit central memory (CM) and the UNICON
  laser mass memory, which is real-time and 16 bits wide. A 16-word x 16-bit
  synchronous FIFO sits between them as an elastic buffer.

`qp_top` puts the controller and the asynchronous FIFO side by side. The two
share only the reset.

## The rules of the chain

Locations are numbered from 0 (top) to DEPTH-1 (bottom). `Q(i)` = 1 means
location `i` is full.

| event    | condition                   | effect                                     |
|----------|-----------------------------|--------------------------------------------|
| write    | `~Q0` (top empty)           | word into REG0, Q0 set                     |
| move     | `Q(i) & ~Q(i+1)`            | strobe `LOAD(i+1)`: REG(i) -> REG(i+1)    |
| read     | `Q(DEPTH-1)` (bottom full)  | bottom word leaves (into HR), location freed |
| 3/4-full | lowest 3/4 of the locations full  | `Q3.Q2.Q1` for four locations       |
| 3/4-empty| top 3/4 of the locations empty    | `~Q2.~Q1.~Q0` for four locations    |

In the synchronous FIFO, location `i` computes `LOAD(i+1) = Q(i) & ~Q(i+1)`
with its AND gate (`qp_sync_sc`). Its JK flip-flop gets `J = LOAD(i)`, the
strobe from the location above, and `K = LOAD(i+1)`, its own strobe. On one
clock edge a location can empty while the one below it fills, so a word moves
one location per clock. J and K can never both be 1: J needs the location
empty and K needs it full. A location that is full, with a full location
below it, holds its word. So words stack up from the bottom with no gaps once
they settle, and several words can be falling at once.

### Timing to expect (synchronous)

* A write sets Q0 at the write edge. The word reaches location `i` `i` clocks
  later, and the bottom of an empty 16-word FIFO after 16 clocks.
* After a write, `top_empty` stays low for one clock while the word moves on
  to location 1. The write port therefore runs at most at **half the clock
  rate**.
* A read frees the bottom location at the read edge. The hole then climbs
  one location per clock. The read port also runs at most at half the clock
  rate.
* `wr_fifo` while the top is full, or `rd_fifo` while the bottom is empty,
  breaks the protocol. The assertions in `qp_sync_fifo` report it. The FIFO
  also ignores such a request: the write is gated by `~Q0` and the read by
  `Q(bottom)`.

`USE_HR = 1` adds the holding register HR at the bottom. A read copies the
bottom word into HR, and `data_out` shows it from the next cycle on. With
`USE_HR = 0`, `data_out` is the bottom register itself. The controller uses it
this way and keeps its own HR beside the FIFO.

## The asynchronous FIFO

Each location of `qp_async_fifo` has these parts:

* `qp_async_sc`: a D flip-flop wired as a toggle (D = ~Q). Its clock is the AND
  of the two active-low strobes that touch the location: `~STROBE(i)` fills it
  and `~STROBE(i+1)` empties it. The flip-flop toggles at the end (rising
  edge) of either strobe. A second AND gate forms `trig = Q(i) & ~Q(i+1)`.
* `qp_oneshot`: `trig` fires the one-shot. Its inverted output is
  `~STROBE(i+1)`, a low pulse of `PULSE_NS`.
* `qp_data_reg`: the data register, clocked by the rising edge of the strobe
  into the location.

At the end of the pulse three things happen together. Register `i+1` takes
the word, flip-flop `i` toggles to empty and flip-flop `i+1` toggles to full.
That makes `trig(i+1)` true if there is room below, and the word goes on. The
pulse must outlast the register's set-up time plus its delay, about 20 ns for
Schottky parts. A real one-shot of the Fairchild 9602 type cannot pulse
shorter than about 70 ns, so the one-shot sets the speed: one location per 70
ns by default. The top is free again 70 ns after a write.

The default is three locations (`DEPTH = 3`). The bottom feeds a stage outside
the FIFO through `strobe_out_n` (`~STROBE3`) and `next_empty` (`~Q3` of that
stage). The outside stage takes `data_out` at the rising edge of
`strobe_out_n` and must then drop `next_empty`. The testbenches model it as a
fourth location. To write, pulse `wr_fifo_n` low while `top_empty` is high.
The data is taken at the rising edge of the pulse.

`qp_oneshot` is a behavioural model with a `#` delay and does not synthesize.
The rest of the asynchronous FIFO is ordinary logic with clocks derived from
the strobes. That is how the circuit works, so expect clock-domain warnings
from lint and timing tools.

## The UNICON channel controller

```
           CM (36 data bits + parity)
                  |
              +-------+
              |  MDR  |  37 bits, 36<->16 bit multiplexing, parity
              +-------+
                  | G0 (MDR half or checksum word)
                  v          G1 (data bus)
              +-------+  <------------------------+
              | FIFO  |  16 words x 16 bits        |
              +-------+                            |
               |     \--> back to MDR (read page)  |
               v                                   |
              +-------+                            |
              |  HR   |  16 bits                   |
              +-------+                            |
                  | G2                             |
   UMP <----------+----------- 16-bit data bus ----+----> UNICON
```

CM-CONTROL (`qp_cm_control`) and UNICON-CONTROL (`qp_unicon_control`) share no
control signal. The FIFO is their only coupling. The MISR (`qp_misr`) holds the
CM word count and the status bits. The checksum (`qp_checksum`) and the gates
sit in `qp_unicon_controller`.

**Write page (CM -> UNICON).**

1. The supervising minicomputer (UMP) may first write header words into the
   FIFO through G1 (`ump_wr`), keeping the top-empty rule.
2. `ump_start` with `ump_op = OP_WRITE` starts both control sections.
3. For each of the 512 CM words, CM-CONTROL requests the word (`cm_req`
   until `cm_ack`) and loads it into the MDR. It checks parity (odd, over 37
   bits). It then writes bits 31:16 and then bits 15:0 into the FIFO through
   G0, each time waiting for `fifo_top_empty`.
4. CM-CONTROL then writes the eight 16-bit words of the checksum.
5. Meanwhile, on each `uc_demand` from the UNICON, UNICON-CONTROL reads the
   FIFO bottom into HR. In the next cycle it drives HR onto the bus (G2,
   `bus_out_en`) with `uc_out_valid`.
6. If a demand finds the FIFO bottom empty, DRE (data rate error) is set. That
   demand is not counted, so the page still completes.

**Read page (UNICON -> CM).**

1. Each `uc_in_valid` word from the UNICON goes into the FIFO top through G1.
   If the top is full, DRE is set and the word is lost.
2. CM-CONTROL reads two FIFO words into the MDR halves. It writes the MDR to
   CM with a freshly generated parity bit and counts the word.
3. After 512 words it reads the eight checksum words. A non-zero total sets
   the checksum error.

**Checksum.** The checksum is one parity symbol over GF(2^128): the XOR of
the page's 128-bit symbols. Each symbol is made of 8 consecutive 16-bit
words, so word `k` of the page lands in lane `k mod 8`. The checksum is
computed on the MDR side of the FIFO in both directions, so the FIFO itself
is covered by the check.

**Why 16 words are enough.** The UNICON moves a 16-bit word every 3.2 us, so
a 32-bit word every 6.4 us. Sixteen FIFO words are eight 32-bit words, about
49 us of buffering. That is about 35 CM cycles of 1.4 us. CM-CONTROL fills the
FIFO faster than the UNICON drains it. A DRE needs a CM stall of several tens
of microseconds.

**Status.** `misr_word = {DRE, parity error, checksum error, done, 2'b00,
count[9:0]}`. `misr_status.done` is set when both sections have finished.
`ump_start` clears the MISR. `ump_cancel` returns both sections to idle. The CM address is `{page_q, count[8:0]}`. The page
number is taken from `ump_page` at start, so central memory can hold 4096
pages of 512 words.

**CM priority.** While a page is moving, the controller raises `cm_priority`
when the FIFO has run 3/4-empty on a write page, or 3/4-full on a read page.
This is the early warning that other users of central memory are starving
the transfer. The memory system can then give the controller a higher
access priority before a DRE happens. How the memory grants that priority is
outside this design.

## What follows the source design and what is this design's own

These follow the published design:

* The location structure, the transfer rules, the JK/AND control and the LOAD
  equations.
* The 3/4 status equations for four locations.
* The HR.
* The toggle, gate and one-shot structure of the asynchronous FIFO, with its
  20 ns and 70 ns figures.
* The controller's block structure: MDR 37 bits, gates G0/G1/G2, 16x16 FIFO,
  16-bit HR and data bus, MISR, two independent control sections.
* The 512-word page, the 128-bit checksum and the DRE rules.

These are this design's own choices:

* The rising clock edge (the original flip-flop triggers on the falling edge)
  and the asynchronous active-low reset everywhere.
* The 3/4 rule for depths other than 4.
* The 6-bit width of the asynchronous FIFO.
* A non-retriggerable one-shot.
* Which 32 of the 36 CM bits travel (bits 31:0, high half first). Bits 35:32
  come back as zero on a read.
* Odd parity.
* The checksum lane order, and checking by a zero total.
* The header path through G1 from the UMP.
* Pulse-per-word UNICON strobes with a one-cycle demand-to-data delay.
* A request/acknowledge CM handshake.
* The CM address `{page, word}`: a 12-bit page number, given on `ump_page` at
  start, followed by the 9-bit word number. The 4096-page figure is the size
  of the minicomputer's own address space in CM; this design uses it for the
  transfer page as well.
* The control state machines.
* The MISR layout.
* The cancel input.
* The 16-bit transfer count set by the UMP. The UNICON side moves header +
  1024 data + 8 checksum words on a write.
* The split data bus (`bus_in`, `bus_out`, `bus_out_en`) in place of a
  tri-state bus.

Not built: the UMP minicomputer, central memory and the UNICON device. They
are outside the controller and appear only as ports and as testbench models.
The magnetic tape controller that used the asynchronous FIFO is not described,
so the asynchronous FIFO stands alone.

## Files

| file | contents |
|------|----------|
| `rtl/qp_pkg.sv` | sizes, `op_e`, `misr_status_t` |
| `rtl/qp_sync_sc.sv`, `rtl/qp_data_reg.sv`, `rtl/qp_cnet.sv`, `rtl/qp_sync_fifo.sv` | synchronous FIFO |
| `rtl/qp_async_sc.sv`, `rtl/qp_oneshot.sv`, `rtl/qp_async_fifo.sv` | asynchronous FIFO |
| `rtl/qp_mdr.sv`, `rtl/qp_checksum.sv`, `rtl/qp_misr.sv`, `rtl/qp_cm_control.sv`, `rtl/qp_unicon_control.sv`, `rtl/qp_unicon_controller.sv` | controller |
| `rtl/qp_top.sv` | both designs |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameter defaults are the sizes of the application:

* `qp_sync_fifo`: `WIDTH = 16`, `DEPTH = 16` (DEPTH must be a multiple of 4).
* Controller: `PAGE = 512`.
* `qp_async_fifo`: `DEPTH = 3`, `PULSE_NS = 70`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. Any testbench builds with plain Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/qp_pkg.sv tb/tb_qp_top.sv --top-module tb_qp_top
./obj_dir/Vtb_qp_top
```

`tb_qp_top` runs the whole design at its default sizes, in a few seconds:

1. A full 512-word write page (header, 1024 data words, checksum) at the
   UNICON's pace, using a 10 MHz clock, 32 cycles per UNICON word and 14 per
   CM word.
2. The same page read back into CM.
3. A write page with a bad-parity word and a long CM stall, which gives a
   parity error and a DRE.
4. A read page with a corrupted word, which gives a checksum error.
5. A read page with a CM stall, which gives a DRE and a cancel.
6. Fall-through, fill and random traffic on the asynchronous FIFO.

It counts each mechanism (G0, G1, LOAD HR, FIFO-to-MDR, 3/4-full, 3/4-empty,
several words falling at once, both kinds of DRE, parity error, checksum
error, cancel, CM priority on both kinds of page, asynchronous full) and fails if one never happened.
`tb_qp_unicon_controller` runs the same scenarios with 16-word pages. The CM model in
both checks that every address carries the page number given at start.
`tb_qp_sync_fifo` checks the 16-location FIFO and also a 4-location one, whose
flags it follows clock by clock against the printed 3/4 equations.

## How far to trust it

Every module passes its own testbench. The testbenches check against models
written independently of the RTL: the transfer rules as a cycle model of the
flags, the XOR lanes, the parity, the word order through a scoreboard, and
the exact cycle and nanosecond latencies given above. For each module, a
deliberately broken copy was shown to make its testbench fail.

Lint and elaboration are clean apart from these warnings:

* Warnings about `rst_n` being used both asynchronously and in assertion
  `disable iff` clauses.
* Derived clocks in the asynchronous FIFO, which are intended.

The asynchronous FIFO has been checked only in zero-delay event simulation
with ideal one-shots. Real gate delays, one-shot tolerance and hazards on the
gated flip-flop clocks need analysis at the circuit level before it is built.
