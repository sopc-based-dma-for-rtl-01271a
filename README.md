# Stream DMA adapter for a PCI Express data acquisition card

A data acquisition (DAQ) card has to move a continuous stream of samples
into memory, either host memory over PCI Express or memory on the card,
without losing any, and it often has to capture what happened *before* a
trigger as well as after it. This RTL is the part of such a card that sits
between the sample source and two scatter-gather DMA controllers. It
buffers 128-bit sample blocks across the clock boundary, and decides block
by block which of the two DMA channels receives each one. It marks packet
boundaries so that the DMA controllers close their descriptors at the
right place. It also records where in the buffers events such as the
trigger landed.

The top also holds the memory-side interconnect on the DMA path:

* a round-robin arbiter that lets the six Avalon-MM masters of the two DMA
  controllers share one clock-crossing bridge;
* behind that bridge and behind the two bridges of the memory-to-memory
  DMA, a router that sends each transfer either to host memory through
  the PCI Express core or to the card's DDR3 memory, depending on its
  address;
* at each of the two memories, a round-robin arbiter over the three
  bridges.

The DMA controllers, the PCI Express hard IP and its Avalon-MM bridge, the
clock-crossing bridges and the DDR3 controller are standard FPGA vendor
components. They are not part of this RTL and connect at the ports of the
top module `pcie_daq_dma`.

```
        clk_s (sample clock)                  :  clk2 (100 MHz DMA clock)
                                              :
 ext_* -------->+-----+    +-----------+    +-:--------+    +------------+
                | MUX |--->| daq_input |--->|  fifoin  |--->| stream_fsm |--> st1_* (DMA channel 1)
 sample_sim --->+-----+    | overrun   |    | 4096 x   |    | SD0..SDEND |--> st2_* (DMA channel 2)
                           +-----------+    | 133 bit  |    +-----+------+
                                            +-:--------+          | counters, events
                                              :             +-----+------+
 csr_* (host, via BAR2) ----------------------:------------>|  daq_regs  |--> irq --> rxm_irq[0]
                                              :             +------------+

        clk2                                   :  clk1 (125 MHz)
 dma_m_* (6) --> avmm_arbiter --> b2s_* [bridge B2] b2m_* --> router --+
                                       :                               |    +-------------+
 b3m_* (memory DMA writes, bridge B3) -----------------> router -------+--->| arbiter 3:1 |--> txs_* (host, < 64 GB)
 b4m_* (memory DMA reads, bridge B4)  -----------------> router -------+--->| arbiter 3:1 |--> ddr_* (board, >= 64 GB)
                                       :                                    +-------------+
                           every router has one output to each of the two arbiters
```

## Sample blocks and tags

The unit of data is a **block**: 128 bits of samples (16 bytes) plus tags
that travel with it. The source gives four tags with each block:

| tag | bit | meaning |
|---|---|---|
| EvPretrig | 0 | trigger: samples after this block are post-trigger |
| EvError | 1 | error reported by the source |
| EvApp | 2 | application event |
| EvAppEOP | 3 | application event that may also end the current DMA phase |
| EvOverrun | 4 | added by the adapter: blocks were dropped just before this one |

The source is never stalled, because a converter cannot wait. If a block
arrives while the input FIFO is full, it is dropped and counted
(`dropped`). The next block that is written carries EvOverrun. The FIFO
stores all 133 bits (`block_t` in `daq_pkg`), so each tag reaches the
DMA side together with its own samples.

## The acquisition state machine

`stream_fsm` is the core of the design. Blocks leave the FIFO only in
state **SD1**, to channel 1, or in state **SD2**, to channel 2. Each
channel has a buffer size register (`rDMA1`, `rDMA2`, in bytes) and a
32-bit byte counter (`wCnt1`, `wCnt2`). A counter is loaded from its
buffer size at the start of a phase and counts down by 16 per block. The
counter expiring, or an event, ends the phase. The last block of a phase
is sent with EOP and the first block of the next one with SOP. The DMA
controller therefore finishes its current descriptor exactly at the phase
boundary.

```
SD0 ──DMA_ena1──► SD1 ──(wCnt1 expired | B1toTrg&EvPretrig | SH1&EvAppEOP)──► SD1E
SD1E ──► SD2     dual mode, or pre-trigger mode with TrgSig set
SD1E ──► SD1     single mode with cyclic set, or pre-trigger mode without TrgSig (ring)
SD1E ──► SDEND   single mode, not cyclic
SD2 ──(wCnt2 expired | SH2&EvAppEOP)──► SD2E
SD2E ──► SD1     cyclic;   SD2E ──► SDEND otherwise
SDEND ──(DMA_ena1 and DMA_ena2 both clear)──► SD0
```

The control bits select one of three modes:

* **Single DMA1** (`B1toB2=0, B1toTrg=0`). One buffer on channel 1. With
  `cyclic` set, the counter is reloaded and the buffer is filled again.
* **Dual DMA1/DMA2** (`B1toB2=1, B1toTrg=0`). A channel 1 buffer, then a
  channel 2 buffer. With `cyclic` set, the pair repeats.
* **Pre-trigger** (`B1toTrg=1`). Channel 1 runs as a ring: every time
  `wCnt1` expires, the phase ends and starts again. The DMA controller is
  expected to rewrite the same buffer (for example in a park mode). The
  block tagged EvPretrig ends the ring phase and sets TrgSig. The machine
  then switches to channel 2 for `rDMA2` bytes of post-trigger samples.
  When B1toTrg is set, the B1toB2 bit is ignored: only the trigger decides
  whether the machine stays in the ring or moves on.

To find the trigger position, software reads the EvPretrig event
registers. They hold the bytes still left in the channel 1 buffer after
the trigger block, and the number of channel 1 buffers already finished
(ring wraps). The trigger block sits at byte offset
`rDMA1 - EV_WCNT - 16` in the ring.

**Unblocking.** In continuous modes the host must empty a buffer before
it is written again. With the `ublk_en` control bit set, every new cycle
waits in SD1E (single cyclic) or SD2E (dual or pre-trigger) until software
writes the unblock bit. While it waits, blocks pile up in the FIFO, and if
software is too slow they overflow and are reported with EvOverrun. The
pre-trigger ring and the SD1E→SD2 step never wait.

**Stopping.** A phase ends only on its counter or on an event. Clearing
DMA_ena1 does not cut a phase short. To stop a cyclic run, clear `cyclic`
and let the current sequence finish in SDEND. Then clear both enables to
return to SD0.

**Idle.** While the machine is in SD0 with DMA_ena1 clear, it discards
whatever reaches the FIFO output. Each acquisition therefore starts with
fresh samples.

## Validating data on the host side

The host can check that data in memory really came from the DMA in two
ways:

* **Error port.** The tags of each block go out on the 8-bit Avalon-ST
  `error` port of its channel, bits [4:0]. A DMA controller configured for
  it folds them into the descriptor status.
* **Events byte.** With the `evins` control bit set, data bits [127:120]
  of every block are replaced by `{2'b00, EOP, EvOverrun, EvAppEOP, EvApp,
  EvError, EvPretrig}`. The host can then check events directly in the
  buffer. Sixteen bits of sample space are lost with this option.

## The memory path: arbitration and address regions

Each DMA controller has three Avalon-MM masters: the data write master,
the descriptor read master and the descriptor write-back master. All six
go through bridge B2. The bus is 128 bits wide with 37-bit byte addresses
and bursts of up to 16 beats (`avmm_pkg`). Burst counts are 5 bits wide.

**`avmm_arbiter`** (clk2) merges the six masters into one.

* **Round robin.** When no burst is in progress, the grant goes to the
  first requesting master after the one served last. While all masters
  request, each is served in turn.
* **Bursts stay whole.** A granted write burst keeps the grant until its
  last beat is accepted, so beats from different masters never mix.
* **Read data goes back to its master.** A read is one command cycle. The
  arbiter records each accepted read (master number and beat count) in a
  small FIFO (`MAX_PEND` = 8 entries). Read data comes back in command
  order, and the FIFO steers each beat to the master that asked for it.
  When the FIFO is full, reads wait and writes may still go ahead.
* **Timing.** The arbiter adds no cycle: requests pass to the slave
  combinationally. Masters that are not granted see `waitrequest`.

Master order on `dma_m_req` is:

| index | master |
|---|---|
| 0 | channel 1 data write |
| 1 | channel 1 descriptor read |
| 2 | channel 1 descriptor write-back |
| 3, 4, 5 | the same three for channel 2 |

A DMA controller starts a descriptor write-back only after the data of
its transfer has been written. Both go through the same in-order path,
so the status cannot overtake the data on its way to the bridge. The
error-port validation (below) depends on this ordering.

**`avmm_region_router`** (clk1, the 125 MHz PCI Express core clock) sits
behind bridge B2. Bridges B3 and B4 carry the write and read masters of
the memory-to-memory DMA controller (not part of this RTL), and each of
them gets a router of its own. A router splits the address space at
64 GB (2^36):

* **Host memory** (below 64 GB) goes to the PCI Express core's Txs slave,
  with the address unchanged.
* **Board DDR3** (64 GB and up) goes to the DDR3 controller, with 64 GB
  subtracted from the address.
* **Bursts.** A write burst goes wholly to the region of its first beat.
* **Read order.** The two memories answer with very different latencies,
  so a read to one region waits (`waitrequest`) while reads to the other
  region still have data outstanding. Without that wait, a fast DDR3
  answer could overtake a slow host answer and break the in-order
  guarantee the arbiter relies on. Reads to the same region are not held
  back.

**Memory-side arbiters.** The host path (Txs) and the DDR3 controller are
each shared by the three bridges. Each memory has its own `avmm_arbiter`
(three inputs, same rules as above). A transfer from one bridge to host
memory and one from another bridge to DDR3 therefore proceed in the same
cycle. Only transfers to the same memory take turns.

## Registers

The registers sit on an Avalon-MM slave on clk2, with 32-bit words and no
wait states. Read data comes back with `readdatavalid` one cycle after
`read`.

| word | name | access | contents |
|---|---|---|---|
| 0 | CTRL | rw | bit0 unblock (write-1 pulse, reads 0), 1 DMA_ena1, 2 DMA_ena2, 3 B1toB2, 4 B1toTrg, 5 cyclic, 6 SH1, 7 SH2, 8 ublk_en, 9 evins, 10 simulator source |
| 1 | STATUS | ro | [2:0] state (SD0=0 .. SDEND=5), 3 TrgSig, 4 waiting for unblock |
| 2, 3 | RDMA1, RDMA2 | rw | buffer sizes in bytes: non-zero multiples of 16 |
| 4, 5 | WCNT1, WCNT2 | ro | byte counters |
| 6, 7 | NBUF1, NBUF2 | ro | finished buffers per channel since leaving SD0 |
| 8 | EVFLAGS | w1c | [4:0] one flag per tag, 5 DMA1 phase done, 6 DMA2 phase done |
| 9 | IRQMASK | rw | `irq` = OR of the flags enabled here |
| 10+2e | EV_WCNT(e) | ro | for event e (0 EvPretrig .. 4 EvOverrun): bytes left in the channel buffer after the last block with that event |
| 11+2e | EV_NBUF(e) | ro | finished buffers of that channel at that time; bit 31 set if it was channel 2 |
| 20 | SIMRATE | rw | simulator: one block every SIMRATE+1 sample clocks |
| 21, 22 | SIMEVAT, SIMEVTAG | rw | simulator: block number that carries tags SIMEVTAG[3:0] |
| 23 | FIFOUSED | ro | blocks in the input FIFO |

A typical pre-trigger run looks like this:

1. Write RDMA1 and RDMA2 with the ring and post-trigger sizes.
2. Write IRQMASK with bit 0, so the trigger raises an interrupt.
3. Write CTRL with DMA_ena1, DMA_ena2, B1toB2 and B1toTrg set.
4. On the interrupt, read EV_WCNT(0) and EV_NBUF(0) to locate the
   trigger.
5. Wait for the DMA2 phase flag (EVFLAGS bit 6).
6. Clear CTRL to return to SD0.

## Samples simulator

`sample_sim` replaces the converter for testing. Each block holds eight
16-bit samples that count up by one, lowest sample in bits [15:0], and the
next block continues the count. A gap in the count therefore shows exactly
how many samples were lost. The simulator runs while CTRL bit 10 and
DMA_ena1 are both set. It restarts its count from 0 each time it is
enabled.

## Clocks, resets and timing

* Two clock domains: the sample clock `clk_s` (FIFO write side, source
  MUX, simulator) and `clk2` (FIFO read side, state machine, registers).
  Gray-coded FIFO pointers cross between them through two-flop
  synchronisers.
* The simulator enable and the source select cross to `clk_s` through
  `sync_2ff`. The simulator's other settings are captured when it starts,
  so change them only while it is stopped.
* `npor_n` resets everything asynchronously. It is released separately in
  each domain by `rst_sync`.
* Throughput: one block per clk2 cycle while the receiving DMA channel is
  ready. At 100 MHz that is 16 bytes × 100 MHz = 1600 MB/s. Each decision
  state (SD1E or SD2E) costs one idle cycle per phase change.
* The FIFO holds 4096 blocks (64 KiB of samples) plus one in its output
  register.
* The Avalon-ST outputs are combinational from the FIFO output register
  and the state, with readyLatency 0. The interrupt vector `rxm_irq` is
  registered: bit 0 is the adapter, bits 1..3 are the `dma_irq` inputs
  (DMA channel 1, DMA channel 2, memory-to-memory DMA).

## Choices this RTL makes on its own

These points were not fixed by the design description and were chosen
here:

* The register map and all bit positions.
* The events-byte layout.
* The unblock mechanism (a control bit plus a write-1 pulse).
* The width of the error port.
* The RxmIrq bit assignment.
* The order of the DMA masters on the arbiter, the depth of its read FIFO,
  and the router's rule of holding a read to the other region.
* Subtracting 64 GB from board addresses.
* The simulator's rate divider and single programmable event.
* EvOverrun placed on the first block written after a gap.
* Discarding FIFO data in SD0.
* One cycle spent in SD1E/SD2E.
* The interrupt on a finished phase.
* DMA_ena2 is used only for the SDEND→SD0 return.

The input word is 133 bits: 128 sample bits, the four source tags and
EvOverrun.

Nothing here models the DMA controllers' descriptor handling, prefetching,
park mode or response queues. The testbenches stand in for them with
simple Avalon-ST sinks.

## Files

| file | contents |
|---|---|
| `rtl/daq_pkg.sv` | widths, `tags_t`, `block_t`, `ctrl_t`, state enum, register addresses |
| `rtl/pcie_daq_dma.sv` | top: adapter, memory-path arbiters and routers, reset synchronisers, RxmIrq vector |
| `rtl/avmm_pkg.sv` | Avalon-MM widths, request/response structs, 64 GB region boundary |
| `rtl/avmm_arbiter.sv` | round-robin arbiter for the DMA masters, read-data steering |
| `rtl/avmm_region_router.sv` | host/board address split, in-order reads |
| `rtl/daq_c.sv` | DAQ adapter: wires the blocks below |
| `rtl/daq_input.sv` | source MUX, overrun drop and tagging |
| `rtl/fifoin.sv` | dual-clock FIFO, first-word-fall-through read side |
| `rtl/stream_fsm.sv` | acquisition state machine, counters, SOP/EOP, events byte |
| `rtl/daq_regs.sv` | register file, event registers, irq |
| `rtl/sample_sim.sv` | samples simulator |
| `rtl/sync_2ff.sv`, `rtl/rst_sync.sv` | synchronisers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_workloads.sv` | the subsystem at measured sample rates |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/avmm_pkg.sv rtl/daq_pkg.sv tb/tb_pcie_daq_dma.sv --top-module tb_pcie_daq_dma
./obj_dir/Vtb_pcie_daq_dma
```

`tb_pcie_daq_dma` runs the whole subsystem at its default size (4096-block
FIFO) in six scenarios:

1. Single-channel one-shot.
2. Single-channel cyclic with unblocking.
3. Dual-channel cyclic from the external port, with SH1/SH2 early ends
   and the events byte.
4. Pre-trigger with ring wraps and the trigger event registers.
5. Overrun, followed by a measurement of the drain rate.
6. Memory traffic. All six DMA masters and the two memory-to-memory
   bridge ports write bursts and read at once, to both memory regions. Bridge B2 is a plain connection in this
   scenario (one clock for both sides). The two memories are models that
   stall at random and answer reads after 12 cycles (host) and 3 cycles
   (board).

It checks every block against a model of the modes and against its
source. It also counts how often each mechanism occurred and fails if any
never did. The module testbenches (`tb_stream_fsm`, `tb_fifoin`,
`tb_daq_regs`, `tb_daq_input`, `tb_sample_sim`, `tb_daq_c`,
`tb_avmm_arbiter`, `tb_avmm_region_router`) each test one block in more
detail. `tb_daq_c` uses a 16-block FIFO so that its overrun test stays
short. `tb_avmm_arbiter` uses three masters and a 4-entry read FIFO.

`tb_workloads` streams simulator data through the full-size subsystem at
four rates. Each run checks sample continuity, counts overruns and
measures the output rate:

| run | input | sink | expected |
|---|---|---|---|
| W1 | 1593 MB/s | always ready | no loss |
| W2 | 1150 MB/s | ready 3 cycles in 4 (1200 MB/s) | no loss |
| W3 | 1087 MB/s, pre-trigger | always ready | no loss |
| W4 | 1700 MB/s | always ready | overruns reported, output at 1600 MB/s |

W1 and W2 correspond to DMA writes to board memory and to host memory.
W3 crosses the pre-trigger switch.
