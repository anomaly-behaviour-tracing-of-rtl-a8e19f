# Control-flow trace monitor for a CHERI RISC-V core

Memory-safety hardware such as CHERI stops a legitimate program from misusing
pointers, but it cannot tell whether the program that is running behaves the
way it normally does. This design adds that second layer. It sits in the
programmable logic of a Zynq device, next to a 64-bit, five-stage CHERI
RISC-V core. It watches the core's instruction stream and keeps only the
points where control flow can change. For each such point it packs a compact
record: the PC, the instruction, per-event performance counts, elapsed cycles
and the argument registers a0..a3. The records go into a deep FIFO. A DMA
engine moves them into the ARM processor's memory. Software on the ARM side
compares the PC sequences with a profile of normal runs, using 10-grams.

The same wrapper gives the core the rest of what it needs to run on the
board: a dual-port program memory that software can load, and a console made
of two character FIFOs that software reaches through GPIO lines.

The RTL covers everything in the programmable logic except the core itself.
The core, the ARM processing system, and the vendor AXI GPIO and BRAM
controller cores are outside the RTL. Their signals are plain ports of the
top module, `pynq_wrapper`.

```
              tr_* (pc, instr, 39 event bits, x0..x31)
 RISC-V core ───────────────────────► cms ──AXIS 1024b──► axis_fifo (2048) ──► dma_s2mm ──► hp_* AXI4 (PS memory)
     │  mem_a_*                                                                  ▲
     ├──────────► bram_tdp ◄──── ps_b_* (program loader)                          └── dma_* (software control)
     │  con_*
     └──────────► console_io (2 x axis_fifo + edge_detect) ◄──── ps_* (GPIO)
```

## The trace record

Each record is one 1024-bit word, declared as `trace_item_t` in `rtl/cms_pkg.sv`.
The fields, from bit 0 upward:

| bits        | field     | content |
|-------------|-----------|---------|
| 63:0        | `pc`      | PC of the collected instruction |
| 95:64       | `instr`   | its instruction word (a compressed instruction sits in bits 15:0) |
| 159:96      | `ticks`   | clock cycles since the previous record |
| 432:160     | `hpc`     | 39 counts of 7 bits, event *i* in bits 160+7*i .. 166+7*i |
| 471:433     | `hpc_ovf` | one bit per event: that count wrapped and is only known modulo 128 |
| 727:472     | `gpr_a`   | a0, a1, a2, a3 (x10..x13), a0 lowest |
| 1023:728    | `pad`     | zero |

The DMA writes a record as 16 little-endian 64-bit words, lowest word first.
The records lie back to back, 128 bytes apart. In software, word *k* of
record *j* is at `base + 128*j + 8*k`.

The field list and widths are fixed by the monitoring scheme. The bit order
and the zero padding are this implementation's choice. Change `cms_pkg` if
your software expects another layout.

## What the monitor keeps: the filter

`cms` looks at an instruction when the core reports it on `tr_valid`. That is
the cycle in which it moves from pipeline stage 1 to stage 2. It keeps:

* every control transfer: conditional branches, `jal`, `jalr` (which covers
  calls and returns), and the compressed `c.j`, `c.beqz`, `c.bnez`, `c.jr`
  and `c.jalr`;
* the next instruction reported after a control transfer, whatever it is.

The second rule is what makes the trace useful. A branch's own record says
where the branch was. The follower's record says where control went. A
taken branch and a not-taken one differ only in the follower's PC. Two
control transfers in a row each produce a record.

Decoding uses opcode bits only (`is_ctrl_xfer` in `cms_pkg`). `c.jal` is not
listed because that encoding is `c.addiw` on RV64.

## What the counts mean

`cms` runs 39 event counters of 7 bits and one 64-bit cycle counter. The core
drives `tr_ev[i]` high in every cycle in which event *i* happens. Each bit is
one performance event. The set is the 37 event types that were non-zero in
the reference workload, plus trap and interrupt. The RTL does not fix which
bit is which event.

A record's counts cover the cycles after the previous record, up to and
including the record's own cycle. The counters then restart from zero, so
summing a field over a run gives the total for that event. `ticks` is the
distance in cycles between this record and the previous one. The last reset
cycle counts as a record, so the first record's `ticks` is the number of
cycles since reset.

Seven bits is tight on purpose: it keeps 39 counters inside the record. A
counter that passes 127 wraps. Its `hpc_ovf` bit is then set in that record,
and the software must treat the count as "at least 128, value mod 128".

## Back-pressure and loss

`cms` has one output register. It offers a record with `m_tvalid` in the
cycle after the instruction's `tr_valid`. The trace FIFO normally takes
records at one per cycle, so the register is free again at once.

The FIFO can fill up, for example when the core runs for a long time without
a DMA. A record in the register then waits. A later record that is due
meanwhile is lost, and `cms_overrun` pulses for one cycle. The counts of a
lost record are not cleared. They carry over into the next record that is
stored, so event and cycle totals stay exact across the loss. The records
already stored are the first FIFO-depth-plus-one records after the last
drain, in order. The core is never stalled. The wrapper has no input that
could stall it.

## Trace FIFO and DMA

`axis_fifo` holds 2048 records by default, so 256 KiB of storage. Its array
is read synchronously into a one-word output register: block-RAM style with
first-word-fall-through. A word written into an empty FIFO shows on the
output two clock edges later. `trace_count` tells software how many records
are waiting.

`dma_s2mm` is the stream-to-memory half of a DMA engine. Software first
allocates a contiguous buffer, aligned to 128 bytes. It then sets
`dma_dst_addr` (a byte address) and `dma_n_items` (a count of records), and
pulses `dma_start`.

The engine takes that many records from the FIFO. It writes each one as a
single AXI4 INCR burst of 16 64-bit beats through the `hp_*` write channels,
which go to the PS high-performance port. 16 beats is also the AXI3 burst
limit of those ports. The 128-byte alignment keeps every burst inside one
4 KiB page.

* The address and data channels of a record proceed independently.
* The next record is taken as soon as the current one's address and last
  beat are both accepted, so a full FIFO drains at one beat per clock.
* Write responses are always accepted. `dma_items_done` counts the records
  whose response has come back.
* `dma_busy` stays high until the last response. `dma_done` then stays high
  until the next start.
* An error response (SLVERR or DECERR) sets `dma_error` until the next start.
* A start while busy is ignored.

At 8 bytes per cycle, a 100 MHz clock gives 800 MB/s at the port. Observed
end-to-end rates in a real system are set by the PS side, not by this
engine.

The usual flow: run the program, read `trace_count`, then start a DMA of
that many records.

## Console

`console_io` holds two byte FIFOs, 64 characters each by default:

* The processor writes characters it prints with `con_out_valid`/`con_out_ready`.
  Software sees the oldest one on `ps_out_char` while `ps_out_avail` is high.
* Software places a character on `ps_in_char`. The processor takes it with
  `con_in_valid`/`con_in_ready`.

Software drives the strobes `ps_out_rd` and `ps_in_wr` as plain GPIO bits.
It cannot make a pulse exactly one clock long. So each strobe passes through
`edge_detect`, and only its rising edge acts, for exactly one clock. Software
sets the bit, then clears it, and one character moves however long the bit
stayed high. The action happens two clock edges after the rising edge is
sampled.

Software must wait for that before it looks at `ps_out_char` again. A GPIO
read-back is far slower than this, so the wait is never an issue. A read
strobe while `ps_out_avail` is low does nothing. A write strobe while
`ps_in_full` is high does nothing.

## Program memory

`bram_tdp` is a true dual-port RAM of 16384 x 64 bits (128 KiB), with one
byte-enable per byte.

* Port A (`mem_a_*`) belongs to the core.
* Port B (`ps_b_*`) belongs to the software loader, which writes the program
  binary before the core starts.

Both ports read first: the read data is the word before that cycle's write,
one clock later. If both ports write the same byte in one cycle, port B
wins. Addresses are word addresses. Mapping the core's byte addresses, for
example 0x8000_0000 and up, onto them is left to the core's bus adapter.

## Files

| file | content |
|------|---------|
| `rtl/cms_pkg.sv` | record type, widths, control-transfer decoder |
| `rtl/cms.sv` | filter, event and cycle counters, record builder |
| `rtl/axis_fifo.sv` | valid/ready FIFO, used for the trace and both console FIFOs |
| `rtl/dma_s2mm.sv` | stream-to-memory DMA |
| `rtl/edge_detect.sv` | GPIO rising-edge to one-clock pulse |
| `rtl/console_io.sv` | console FIFOs with GPIO strobes |
| `rtl/bram_tdp.sv` | dual-port program memory |
| `rtl/pynq_wrapper.sv` | top: everything above wired together |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_stack_mission.sv` | workload: training runs, attack run, 10-gram detection |
| `tb/axi_mem_model.sv` | behavioural AXI4 write slave standing in for PS memory; checks burst rules |

Top parameters: `TRACE_DEPTH` (2048), `CON_DEPTH` (64), `MEM_AW` (14, the
memory holds 2^MEM_AW words), `HP_W` (64, the DMA word), `PA_W` (32, the PS
address width) and `LEN_W` (16, the DMA record count).

## Simulating

All testbenches print `TB_RESULT checks=N failures=M` and stop. Each has a
cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/cms_pkg.sv tb/tb_pynq_wrapper.sv \
          --top-module tb_pynq_wrapper -o sim && obj_dir/sim
```

Swap in any other testbench name. `cms_pkg.sv` must come first. Every
testbench runs in well under a second.

* `tb_cms` checks every record field against a reference model of the rules
  above. Its traffic mixes random instruction kinds with long branch-free
  stretches, where counters wrap, and with phases of stalled output, where
  records are lost.
* `tb_pynq_wrapper` uses the default sizes. It does the following in order:
  * loads and reads back a program;
  * runs console traffic both ways through the GPIO strobes;
  * collects a run of about 1300 records;
  * drains the run by DMA and compares every record;
  * overfills the FIFO, checks that exactly the first 2049 records survive,
    and checks that overrun fired.
  It counts each of these mechanisms and fails if one never happened.
* `tb_stack_mission` drives a control-flow model of a small vulnerable
  program. The program reads a line of "cookies" and then calls a function
  pointer. A crafted input turns that pointer into a call to `success` at
  0x800002A4 instead of `no_cookies`. The testbench then:
  * runs 10 training inputs, 200 cookies in which every cookie type is
    followed by every type;
  * builds the set of 10-grams of collected PCs from those runs;
  * runs the crafted input and checks that it yields unseen 10-grams;
  * checks that PCs appear inside `success` and none inside `no_cookies`.
  The program is a stand-in written for this test. Its record counts,
  200-450 per run, are smaller than a real program's.

## Where this departs from the original system, and what is assumed

* **Register buses are reduced to plain ports.** The original uses AXI-Lite
  GPIO, an AXI BRAM controller on port B and AXI-Lite DMA registers. Here
  those are simple enable and register-style ports that an AXI-Lite adapter
  would drive. The DMA's memory side is a real AXI4 write master. The stream
  has no `tlast`/`tkeep`.
* **Only the stream-to-memory DMA direction is built.** The wrapper needs
  nothing else.
* **The CHERI metadata of the registers is not taken in.** The core can
  export it, but the record keeps only the integer part of a0..a3, so the
  ports carry only that.
* **Sizes that are this design's choice:** console FIFO depth (64), memory
  size (128 KiB) and width (64), DMA word width (64), address width (32),
  length field (16).
* **Behaviour that is this design's choice:** the record bit order; the
  exact cycle at which counts are cut; reset acting as a record boundary;
  the one-record output register with loss on overrun; the rising-edge,
  one-register edge detector; read-first memory with port-B priority; one
  clock domain with synchronous active-low reset.
* **Compressed-instruction decoding** is this design's reading of "branch,
  jump or return". The core implements the C extension, so compressed
  control transfers are included.
* **The event-bit order** on `tr_ev` is not defined here. It depends on how
  the core exports its events.

## Changing it

* **More or fewer events, or wider counters:** change `N_EVENTS` / `HPC_W`
  in `cms_pkg`. `PAD_W` is derived and must stay non-negative (728 of the
  1024 bits are used now).
* **Another filter:** edit `is_ctrl_xfer`, or the `collect` expression in
  `cms`.
* **Deeper trace buffer:** `TRACE_DEPTH`. `LEN_W` must hold a full FIFO's
  count.
* **A wider PS port:** `HP_W` must divide 1024, and 1024/`HP_W` beats
  must stay within the port's burst limit.
