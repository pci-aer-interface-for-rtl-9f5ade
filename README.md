# PCI-AER interface

Neuromorphic chips talk to each other by Address-Event Representation (AER). Each time a
neuron or pixel spikes, its address goes onto a shared digital bus with a REQ/ACK
handshake. The information is carried by *when* the addresses appear: the intervals
between events (inter-spike intervals) are the signal. A tool that replays a sequence
of events from a PC into an AER system, or captures the traffic of one, therefore has
to keep the timing as well as the addresses.

This RTL is the digital core of such a tool, for a PCI card. It is written after the
CAVIAR PCI-AER board described in the paper *PCI-AER interface for Neuro-inspired
Spiking Systems*. It has two independent paths that run at the same time:

* **Host to AER (playback).** Event words are read from host memory by bus mastering
  into the OFIFO. The OUT-AER state machine sends each address at the time its word asks
  for. When an acknowledge comes back late, the lost time is recovered from the
  following events, so the stream keeps its overall time profile.
* **AER to host (capture).** The IN-AER state machine acknowledges incoming events and
  stores each address with the number of ticks since the previous event in the IFIFO.
  Bus-master writes then move the words to host memory.

A register block behind BAR0 controls both paths, and an interrupt block signals
the host. The PCI protocol engine itself (configuration space, BAR decoding, bus
arbitration) is an external bridge core and is not part of this RTL; the top level
exposes the simple user-side signals such a core provides.

## The event word

Host memory, both FIFOs and the FIFO register all use the same 32-bit word:

| bits  | field | meaning |
|-------|-------|---------|
| 31:16 | `dt`   | ticks between the previous event and this one |
| 15:0  | `addr` | AER address |

A tick is one clock cycle (30 ns on a 33 MHz PCI clock). A configuration bit stretches
it to 16 cycles (480 ns), so one word can describe gaps up to 65535 × 480 ns ≈ 31 ms.

The word `0xFFFF_FFFF` is a **wait-only word**. It stands for a pause of 65535 ticks and
carries no event. The OUT-AER machine waits that long and fetches the next word without
sending anything, so longer pauses are written as several wait-only words. The IN-AER
machine writes the same word when 65535 ticks pass with no event. A captured stream can
therefore be played back with the same timing. One side effect: an event with address
`0xFFFF` and `dt` = 65535 cannot be expressed.

## Playback timing and delay recovery

This is the part of the design that needs the most care.

A naive player waits `dt` after each event's handshake. Then every slow acknowledge
pushes all later events back, and the error accumulates. `aer_out_fsm` instead keeps one
signed **credit** counter:

* When a word is fetched, its `dt` is added to the credit.
* On every tick the credit goes down by one. This happens in every state: while waiting,
  during the REQ/ACK handshake, and while fetching the next word.
* An event is sent as soon as the credit is no longer positive.

So the credit is always "time until the next event is due". If the handshake of
event *k* takes longer than `dt(k+1)`, the credit is already negative when word *k+1*
arrives. Event *k+1* then goes out at once, and the remaining negative amount (the debt)
is subtracted from the wait for event *k+2*, and so on. The events return to the
absolute schedule `t(k) = t(0) + Σ dt` as soon as the gaps allow it. Example, with a
handshake that normally takes about 8 cycles:

| event | dt | due at | ACK delay | sent at | credit when sent |
|-------|----|--------|-----------|---------|------------------|
| 0     | –  | 0      | 100       | 0       | 0                |
| 1     | 30 | 30     | short     | ~106    | −76 (late)       |
| 2     | 30 | 60     | short     | ~114    | −54 (late)       |
| …     | 30 | …      | short     | …       | debt shrinks by ~22 per event |
| 5     | 30 | 150    | short     | 150     | 0 (back on schedule) |

Details that follow from this scheme:

* In steady state, an event leaves exactly `dt` ticks after the previous one, as long as
  the handshake and fetch fit into `dt`.
* A late event leaves 6 cycles after the acknowledge falls (two synchroniser stages,
  REQ/ACK release, fetch, decision).
* The `late` output pulses for every event sent behind its schedule.
* The credit is 24 bits (`CW`) and saturates at its most negative value. That is
  about 8 million ticks of debt.
* **OFIFO underrun:** while the machine waits for a word, the timer stops. A debt is
  kept across the gap. A word that arrives after a gap waits its full `dt`, counted
  from its fetch. A late host therefore does not produce a burst of catch-up events.
* **Disabling** the machine (CONFIG bit 0) clears the credit. Software can use this to
  start a new sequence with no debt left over.
* The prescaler is free-running. With the ×16 tick, an event can therefore be up to 15
  cycles off its nominal `16·dt`.

## Capture path

`aer_in_fsm` runs a four-phase handshake on the input bus:

1. When the synchronised REQ goes high, it takes the address.
2. It pushes `{ticks, address}` into the IFIFO and raises ACK.
3. When REQ goes low, it drops ACK.

The tick counter counts the cycle of the event itself and then restarts. The stored
`dt` values therefore add up exactly to the time between events. Every request is taken
with the same latency. When a player is looped back into the capture port, each
captured `dt` is therefore the distance between the player's REQ edges.

If the IFIFO is full, the request is not acknowledged. The sender is held back and
`stalled` is raised, so events are never dropped. The stall time appears in the next
captured `dt`. If the IFIFO is full at the moment a wait-only word would be written, the
counter holds and that stretch of time is lost.

## Host interface

### PCI core boundary

The top level `pci_aer_top` expects a PCI bridge core with these user-side signals:

* **Target (BAR0):** `tgt_wr` / `tgt_rd` are one-cycle strobes with a byte offset
  `tgt_addr[5:0]` and `tgt_wdata`. `tgt_rdata` is combinational and valid in the strobe
  cycle. Reading the FIFO register pops the IFIFO in that cycle.
* **Master:** `mst_req`, `mst_we`, `mst_addr` and `mst_wdata` are held until the core
  answers with a one-cycle `mst_ack` (and `mst_rdata` for reads). Each request moves one
  word; bursting is left to the core.
* **Interrupt:** `irq` is active high and registered.

### Register map (BAR0)

| offset | access | register | contents |
|--------|--------|----------|----------|
| 0x00 | R   | master last-transfer count | words moved by the current or last bus-master transfer (16 bits) |
| 0x04 | R/W | master address | host byte address of the next bus-master transfer |
| 0x08 | R/W | FIFO access | write: push one word into the OFIFO; read: pop one word from the IFIFO (0 if empty). Ignored while a bus-master transfer runs |
| 0x0C | R/W | interrupt | [3:0] pending (write 1 to clear), [11:8] enable |
| 0x10 | R   | status | [0] OFIFO empty, [1] OFIFO full, [2] IFIFO empty, [3] IFIFO full, [4] OUT-AER busy, [5] master busy, [6] IN-AER stalled, [19:8] OFIFO level, [31:20] IFIFO level |
| 0x14 | R/W | config | [0] OUT-AER enable, [1] IN-AER enable, [2] OUT ×16 tick, [3] IN ×16 tick, [4] start master transfer (reads 0), [5] direction (0: host→OFIFO, 1: IFIFO→host), [31:16] length in words |

Interrupt sources: 0 master transfer done, 1 OFIFO empty (while OUT-AER is enabled),
2 IFIFO at least half full, 3 IFIFO full. Each sets its pending bit on a rising edge.

### Bus master

`pci_aer_dma` starts one cycle after CONFIG is written with bit 4 set. It uses the length
and direction written in that same access and the address in register 0x04. Word
addresses advance by 4.

* **Host → OFIFO:** waits whenever the OFIFO is full, so a long sequence can be started
  in one transfer while the player is already draining it.
* **IFIFO → host:** stops early when the IFIFO is empty. The last-transfer count then
  tells the driver how many captured words it received.

A transfer takes at least two cycles per word (request, acknowledge). At the end,
`done` raises interrupt source 0.

A typical playback-and-capture session:

1. Write the stream to a host buffer.
2. Set the master address and enable the done interrupt.
3. Write CONFIG = `len<<16 | start | out_en | in_en`.
4. On each done interrupt, start an IFIFO→host transfer with a generous length.
   Read the count and repeat until everything has come back.

## Module hierarchy

```
pci_aer_top
├── pci_aer_regs      BAR0 decoder and registers
├── pci_aer_dma       bus-master engine
├── aer_fifo          OFIFO (512 × 32)
├── aer_out_fsm       OUT-AER player with delay recovery
│   └── aer_sync      ACK synchroniser
├── aer_in_fsm        IN-AER capture
│   └── aer_sync      REQ synchroniser
├── aer_fifo          IFIFO (512 × 32)
└── pci_aer_irq       interrupt latch and mask
pci_aer_pkg           word format, wait-only word, register offsets, CONFIG struct
```

Everything runs in the PCI clock domain. The only asynchronous inputs are the AER REQ and
ACK lines, each through a two-flop synchroniser. The AER address is bundled data: it is
sampled after the synchronised REQ, so it must be stable when REQ rises. Reset is
asynchronous and active low. Top-level parameters: `OFIFO_DEPTH`, `IFIFO_DEPTH`
(power of two, default 512).

## Performance

| path | cycles | at 33 MHz |
|------|--------|-----------|
| bus master, per word | 2 + core latency | ≤ 16.5 Mwords/s |
| OUT-AER, back-to-back events, receiver answering instantly | 8 per event | 4.1 Mevent/s |
| loop-back (OUT-AER into IN-AER), back-to-back | about 14 per event | 2.4 Mevent/s |

The original board was reported to run up to 16 Mevent/s peak and about 10 Mevent/s
typical. The PCI side of this RTL can reach that order of rate. The AER handshakes as
built here cannot: with both lines synchronised to a 30 ns clock, a full four-phase
cycle costs several clock periods. A faster clock for the two AER machines, or
prefetching the next word during the handshake, would be the place to start.
Neither is implemented.

## What follows the original design and what is chosen here

Taken from the published design:

* the two parallel paths and their blocks: PCI core, decoder, IRQ, OFIFO, OUT-AER
  machine, IN-AER machine, IFIFO, bus mastering;
* the 16/16 split of the event word;
* the time difference counted in 30 ns clock cycles, scalable by 16;
* a special word that waits the longest time without sending an event;
* late acknowledges discounted from the next waits, with a negative result carried to
  the following event;
* capture stores the ticks since the previous event;
* the names and order of the six BAR0 registers.

Chosen here, where the original gives no detail:

* the encoding of the wait-only word, and its use on the capture side;
* active-high four-phase handshakes with two-flop synchronisers;
* stalling the sender on a full IFIFO;
* the ×16 option on the capture side;
* the credit width and saturation;
* the timer stopping while the OFIFO is empty;
* all register offsets and bit layouts, and the placement of the transfer length in
  CONFIG;
* the interrupt sources and their edge-triggered, write-one-to-clear latch;
* the early stop of IFIFO→host transfers;
* the FIFO depth (512 words);
* the user-side protocol of the PCI core.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end and has a cycle-count watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_aer_out_fsm` | exact event times against an absolute schedule; late events sent at the earliest moment; recovery after a 400-cycle ACK delay; back-to-back bursts; wait-only word; ×16 tick |
| `tb_aer_in_fsm`  | captured `dt` equal to the sender's REQ spacing; wait-only word after 65535 ticks; ACK withheld and `stalled` while the IFIFO is full; ×16 tick |
| `tb_aer_fifo`    | random push/pop against a queue model, full and empty limits (depth 16) |
| `tb_pci_aer_irq` | edge capture, write-one-to-clear and masking against a cycle model |
| `tb_pci_aer_regs`| every register, strobes, start pulse, blocking rules, status layout |
| `tb_pci_aer_dma` | both directions with back-pressure and random core latency, early stop, zero length, words per cycle |
| `tb_pci_aer_top` | end-to-end at default sizes (see below) |
| `tb_pci_aer_loopback_tis` | loop-back workload: nine test images × four event-generation methods at rising load (see below) |

`tb_pci_aer_loopback_tis` is a workload run in the style of the original board's
self-test. The output bus is looped back into the input bus, and the testbench plays
nine synthetic 8×8 test images whose grey levels follow a Gaussian histogram. The
images get brighter from one to the next, so the event load of a fixed-length frame
rises from about 10 % to 90 % of the loop's fastest rate. Each image is turned into
events in four ways: scan, uniform, random and exhaustive. These are simple versions
of the named synthetic-AER generation methods, described in the testbench header.
Events are moved by alternating bus-master transfers in 256-word chunks. For every
run the testbench checks that each event returns in order with its address and is
never early. It prints the mean difference between sent and captured inter-spike
intervals. That error grows with load, as the delay-recovery scheme runs out of slack
between events. Methods that put many events at the same instant, like uniform and
random, show errors even at light load.

`tb_pci_aer_top` runs the whole design with its default parameters. `pci_host_model` in
`tb/` plays the PCI core's master side and host memory. The AER output is looped into
the AER input. The testbench:

* plays a 901-word stream (bursts, one wait-only word, a slow-ACK region) while it is
  being transferred, so the OFIFO fills and the master waits;
* lets the IFIFO fill until the loop stalls, and detects that through the IFIFO-full
  interrupt;
* drains the IFIFO with repeated transfers that stop early;
* checks that every captured event has the right address and is never earlier than its
  schedule, that most are exactly on it, and that the last one is back on it;
* finally exercises polled FIFO access with both prescalers on.

It counts each of these mechanisms and fails if one never occurs.

To run one with plain Verilator, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pci_aer_pkg.sv tb/tb_pci_aer_top.sv --top-module tb_pci_aer_top -o sim
./obj_dir/sim
```

For lint: `verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/pci_aer_pkg.sv rtl/pci_aer_top.sv`.
Verilator reports some warnings, and they are expected: unused package constants,
unused status pulses (`sent`, `late`, `wait_done`, `overflow`) that the top level does not
route to a register, and the low address bits that word-aligned accesses ignore.

## Not included

* The PCI bridge core. Use any core that offers a target strobe interface and a
  single-word master request/acknowledge, or adapt `pci_aer_top`'s ports to the one at
  hand.
* Board-level AER connectors and buffers.
* Polarity conversion: many AER systems use active-low REQ/ACK, so invert at the pins
  if needed.
