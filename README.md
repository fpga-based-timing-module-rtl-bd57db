# Timing Module and Optical Communication Card for a pulsed neutron source

A spallation neutron source fires a proton pulse at a target about sixty
times a second. Every detector and every neutron chopper has to know, to a
few nanoseconds, when that pulse hit, whether it was good, and how each
chopper disk was turning at the time. This repository holds the FPGA logic
of two PCI Express cards that sit in the data acquisition computers of such
a facility:

* The **Timing Module** turns the accelerator's timing signals (PT0 —
  proton on target, Tstart — extraction, beam veto, loss of lock) and the
  choppers' Top Dead Center (TDC) pulses into a delayed frame marker
  (**Tsync**), frame **veto** pulses and chopper **reference** pulses for
  the detector electronics. It also measures PT0-to-PT0 times and chopper
  periods and phases for the host computer to read.
* The **Optical Communication Card (OCC)** moves event data from the
  detector electronics into host memory, and commands from the host to the
  detectors. The detector side is a fibre link (through a TLK2501-type
  16-bit SerDes) or an LVDS link (21 signals on three pairs plus a clock
  pair). The host side is bus-master DMA over PCI Express.

Both cards use the same structure. A vendor PCI Express endpoint core (not
part of this RTL) presents a 64-bit transaction interface with active-low
handshakes (`trn_*`) and a legacy-interrupt interface (`cfg_interrupt_*`).
Behind it sit a receive engine, a transmit engine, a register block and an
INTA interrupt state machine. The application logic sits behind those. The
top level `sns_top` places the two cards side by side. Each has its own
clock, its own reset and its own ports, prefixed `tm_` and `occ_`.

All timing numbers assume the Timing Module's 9.42 ns clock (about
106.2 MHz):

| quantity | cycles | time |
|---|---|---|
| Tsync and veto pulse width (`PULSE_1US_CYC`) | 106 | ≈1 µs |
| chopper reference pulse (`CHOP_REF_CYC`) | 21231 | ≈200 µs |
| free-running divisor reset value (`DIV_60HZ_CYC`) | 1769285 | 16.667 ms (60 Hz) |
| longest Tsync delay, 16.7 ms | 1772824 | 21 bits; the register is 32 bits |

## Timing Module: from accelerator pulses to Tsync

`timing_logic` first passes every external input through a two-flop
synchroniser and a rising-edge detector. A pulse therefore becomes a
one-cycle event three clocks after its leading edge. Each event then feeds
three parts.

**Tsync generation (`tsync_gen`).** Bits 1:0 of `TSYNC_CTRL` select the
source of a frame: PT0 (0), Tstart (1), the free-running divisor (2) or
none (3). The divisor is a down counter. It reloads from `FREE_DIV` when it
reaches zero, so a new value takes effect after the current period ends.
An event from the selected source starts the delay counter, loaded from
`TSYNC_DELAY`. Tsync rises `delay + 1` cycles after the source event and
stays high for `PULSE_CYC` cycles. A new source event during the delay
restarts it.

The **PT0 overdue counter** guards against a missing PT0. It is loaded
from `PT0_OVERDUE` on every PT0 or Tstart. If it expires, `overdue_evt`
pulses `overdue_time + 1` cycles after the last strobe, then again every
`overdue_time + 1` cycles. With `TSYNC_CTRL[2]` set, the counter keeps
running and each overdue event stands in for the missing source event. The
detectors therefore still get a frame marker, and the event can also be
turned into a veto and an interrupt.

**Veto generation (`veto_gen`).** Veto causes are:

* a beam veto, if `BEAM_VMASK` allows it;
* a PT0 overdue event, if `PT0_VMASK` allows it;
* a chopper veto, if that chopper's `CHOP_VMASK` allows it;
* loss of lock, which always vetoes.

Causes are collected between Tsyncs. At each Tsync the collected bit is
shifted into a 16-deep shift register clocked by Tsync. A veto pulse goes
out one cycle after Tsync when the bit selected by `VETO_CTRL[3:0]` is
set. A setting of 0 vetoes the frame that has just ended; higher settings
veto a later frame. The same block masks the interrupt sources with
`INT_MASK` and registers them.

**Timing and phase registers.** A multiplexer selects one event stream as
the reference for both register sets: PT0 (0), Tstart (1) or Tsync (2),
set by `PHASE_SRC`. At the default setting the reference is PT0.
`pt0_time_regs` keeps sixteen registers.
Register *k* holds the time from reference event number *n − 1 − k* to
the newest event *n*. On each event the newest interval is written into register 0 and added
to every older difference, so all sixteen update in the same cycle (they
are flip-flops, not a RAM). `chopper_phase_regs` keeps, for each of the
eight choppers:

* the TDC-to-TDC period;
* the phase: the time from the last reference event to the TDC.

A reference in the same cycle as a TDC counts for the next TDC.

**Chopper reference pulses (`chopper_ref_gen`).** For each chopper, a
pulse of `REF_CYC` cycles rises `CHOP_REFDLY[i] + 1` cycles after each
Tstart.

All counters count clock cycles of the timing clock, so every time
register reads in 9.42 ns units.

## Timing Module: PCI Express side

* **`tm_rx_engine`** (states RST, WR_TLP, RD_TLP, WAIT) decodes one-DWORD
  memory and I/O reads and writes, with 3- or 4-DWORD headers. It drops
  any other TLP. Payload and register data are byte-swapped between the
  little-endian link order and register order. After a read it holds
  `trn_rdst_rdy_n` high until the transmit engine reports the completion
  sent, so only one read is outstanding at a time.
* **`tm_tx_engine`** (states RST, CPLD, CPL) sends a completion with data
  for a read, and a completion without data for an I/O write. Each takes
  two QWORD beats.
* **`tm_mem_access`** holds the BAR0 register space (2 KB, DWORD
  addresses 0x000–0x1FF):
  * 64 read/write configuration DWORDs with byte enables;
  * read-only status DWORDs at 0x040 and above;
  * read data arrives one clock after the address.

  The status registers are copied from the timing logic at every Tsync,
  so software reads one frame's consistent set. A read of the Tsync count
  therefore gives the count before the last Tsync. The interrupt status
  is sticky. Writing `INT_CLEAR` clears the written bits and tells the
  interrupt machine that the host has serviced the interrupt.
* **`intr_ctrl`** is the INTA state machine: `intr_rst` → `intr_ack` →
  `intr_srvc` → `intr_ack2` → `intr_done`. It sends Assert_INTA, waits for
  the core's `cfg_interrupt_rdy_n`, waits in `intr_srvc` until the host
  has serviced the interrupt, then sends Deassert_INTA. A request that
  arrives meanwhile is remembered. The OCC uses the same module.

### Timing Module register map (DWORD address in BAR0)

| addr | name | meaning |
|---|---|---|
| 0x000 | TSYNC_CTRL | [1:0] source: PT0, Tstart, divisor, off; [2] overdue substitutes a Tsync |
| 0x001 | TSYNC_DELAY | delay from the source event to Tsync, in clock cycles |
| 0x002 | PT0_OVERDUE | overdue time in cycles; 0 disables |
| 0x003 | FREE_DIV | divisor period in cycles; resets to 1769285 |
| 0x004 / 0x005 | BEAM_VMASK / PT0_VMASK | [0] enables the veto |
| 0x006 | INT_MASK | interrupt enables (bits as INT_STATUS) |
| 0x007 | VETO_CTRL | [3:0] veto frame delay |
| 0x008 | INT_CLEAR | write: clear these INT_STATUS bits, end the interrupt |
| 0x009 | PHASE_SRC | [1:0] phase reference: PT0, Tstart, Tsync |
| 0x010+i | CHOP_VMASK | chopper *i* veto enable |
| 0x018+i | CHOP_REFDLY | chopper *i* reference delay after Tstart |
| 0x040+k | PT0_TIME | PT0(n) − PT0(n−1−k) |
| 0x050+i / 0x058+i | CHOP_PERIOD / CHOP_PHASE | chopper *i* |
| 0x060 | INT_STATUS | [7:0] chopper vetoes, [8] beam veto, [9] PT0, [10] Tstart, [11] loss of lock, [12] overdue, [13] Tsync |
| 0x061 / 0x062 | VETO_COUNT / TSYNC_COUNT | event counts |
| 0x063 | STATUS | [0] loss of lock, [1] overdue seen, [23:8] PT0 time register *k* valid, [31:24] TDC seen per chopper |

## OCC: links

**Optical framing (`occ_tlk_sync`).** The TLK2501 takes 16 bits per clock,
so each 32-bit word goes out as its low half, then its high half, with
`tlk_tx_en` marking valid halves. The receiver pairs halves in the same
order. A receive error drops a half-built word. The receiver also counts
the words it receives.

**LVDS framing (`lvds_sync`).** The LVDS link carries 21 bits per word on
three pairs, seven bits each, most significant bit first. A fourth pair
carries the clock pattern `1100011`. The receiver finds word boundaries
by looking for that pattern in the clock pair, so it needs no alignment
help. This block runs on the bit clock. The OCC uses one clock for
everything, so an LVDS word slot lasts seven clocks. A second
`occ_tlk_sync` gated by the LVDS load strobe puts one 16-bit half per
slot into bits 15:0, with bit 16 marking a valid half. The
`OPTCVR` bit (CTRL[1], set at reset) selects which link the DMA engine
uses.

## OCC: DMA engine and buffers

`occ_dma_engine` holds the OCC registers and three circular buffers
(`circ_buffer`). Each buffer has a producer index and a consumer index. It
is empty when the two are equal and full when the producer is one behind
the consumer, so a 2048-word buffer holds 2047 words. A buffer takes or
gives up to two words per clock, to match the 64-bit bus.

* **IDMA buffer** (2048 × 32 bits = 8 KB): data going to the detectors.
* **Output FIFO** (2048 × 32 bits): data coming from the detectors, on
  its way to host memory by DMA.
* **ODMA buffer** (4096 × 32 bits = 16 KB): data coming from the
  detectors, for the host to read itself. In target-read mode (CTRL[4]
  set) link data goes here instead of the output FIFO.

The DMA engine runs three DMA-style operations:

1. **Read DMA** (host memory → IDMA). Software sets `RD_ADDR`, `RD_SIZE`
   (DWORDs per TLP) and `RD_COUNT`, then writes CTRL[3]. The engine issues
   the read requests one at a time, each at the previous address plus
   `RD_SIZE*4`. The receive engine writes completion data into the IDMA.
   When RD_COUNT × RD_SIZE DWORDs have arrived, `rd_dma_done` is set and
   an interrupt is requested. `DMA_RD_CNT` counts whole TLPs' worth of
   data received.
2. **Link transmit** (IDMA → link). Writing CTRL[0] (TX_GO) sets TX_IP. The
   engine then sends `TX_LEN` DWORDs from the IDMA to the selected link,
   clears TX_IP and requests an interrupt.
3. **Write DMA** (output FIFO → host memory). Software sets `WR_ADDR`,
   `WR_SIZE` and `WR_COUNT`, then writes CTRL[2]. For each TLP the engine
   waits until the output FIFO holds `WR_SIZE` words, then has the
   transmit engine send a memory write of that size. It repeats until
   WR_COUNT TLPs have gone, then sets `wr_dma_done` and requests an
   interrupt.

Besides DMA, the host can move data with plain register accesses
(target mode). Each write to `IDMA_DATA` pushes one DWORD into the IDMA;
a later TX_GO sends it as above. Such writes are ignored while a read DMA
is filling the IDMA. In target-read mode, `ODMA_LEN` says how many bytes
wait in the ODMA. Each read of `ODMA_DATA` returns the oldest DWORD and
removes it; a read of an empty ODMA returns 0. STATUS[1] then reports
whether the ODMA holds data, and INT_ENABLE[3] can raise an interrupt
when data arrives. Both buffers are reached through these data-port
registers in BAR0, not through a separate memory window.

Interrupts are gated by `INT_ENABLE`:

* [0] link transmit done;
* [1] write DMA done;
* [2] read DMA done;
* [3] data arriving in an empty output FIFO (or, in target-read mode,
  an empty ODMA).

`occ_rx_engine` (states RST, FMT, PAYLOAD, WAIT) takes one-DWORD register
writes and reads with 3-DWORD headers, and completions with data. It
stalls the link in WAIT until a register read has been answered.
`occ_tx_engine` (states RST, FMT, PAYLOAD) serves requests in this order:
a read completion first, then a DMA write, then a DMA read request. It
fetches write payload two DWORDs per beat.

### OCC register map (DWORD address in the 4 KB BAR0)

| addr | name | meaning |
|---|---|---|
| 0x0 | CTRL | [0] TX_GO, [1] OPTCVR (1 = optical), [2] start write DMA, [3] start read DMA, [4] TGT_RD (link data to the ODMA) |
| 0x1 | STATUS | [0] TX_IP, [1] received data available (output FIFO, or ODMA when TGT_RD), [2] write DMA done, [3] read DMA done |
| 0x2–0x4 | WR_ADDR, WR_SIZE, WR_COUNT | write DMA: byte address, DWORDs per TLP (reset 32), TLP count |
| 0x5–0x7 | RD_ADDR, RD_SIZE, RD_COUNT | read DMA, likewise |
| 0x8 / 0x9 | DMA_WR_CNT / DMA_RD_CNT | TLPs written / read so far |
| 0xA | TX_LEN | DWORDs to send on TX_GO |
| 0xB | IN_COUNT | DWORDs received from the link |
| 0xC | INT_CLEAR | write: interrupt serviced |
| 0xD / 0xE | IDMA_PROD / IDMA_CONS | IDMA indexes |
| 0xF | OFIFO_COUNT | words in the output FIFO |
| 0x10 | INT_ENABLE | interrupt enables |
| 0x11 | IDMA_DATA | write: push one DWORD into the IDMA |
| 0x12 | ODMA_DATA | read: take one DWORD from the ODMA |
| 0x13 | ODMA_LEN | bytes waiting in the ODMA |

## What is not here, and where this design chooses for itself

* The PCI Express endpoint core and transceivers, the TLK2501 and the
  clock generators are vendor parts. Their interfaces are the ports of
  `timing_module` and `occ`. The Timing Module's own optical link, which
  carries the timing signals to the card, is not built: how those signals
  are coded on the fibre is unknown. The timing signals are plain ports.
* The output FIFO is not split into an inbound message queue, a data
  queue and a command queue. The packet header and command-descriptor
  formats that split needs are not defined.
* IDMA and ODMA are reached through data-port registers in BAR0, not
  mapped as memory in a second BAR.
* Both receive engines take single-DWORD register accesses only, as in
  the programmed-I/O reference design the Timing Module follows.
  Multi-DWORD register bursts, such as 256-byte writes of the whole
  configuration, are dropped.
* Eight chopper channels are built. An older version of the Timing Module
  had room for only four.
* This design chooses the following details itself:
  * both register maps and the interrupt-enable register;
  * the Tsync source encoding;
  * overdue substitution of a Tsync;
  * the veto shift-register depth (16) and its frame-delay setting;
  * the status snapshot at Tsync;
  * the per-chopper reference delay;
  * the LVDS bit order, clock pattern and half-word framing;
  * the 32-DWORD reset TLP sizes;
  * the output FIFO depth;
  * target access through data-port registers.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if
the design hangs. `tb/tb_tlp_pkg.sv` builds and unpacks TLPs for the bus
models. With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
        rtl/sns_pkg.sv rtl/occ_pkg.sv tb/tb_tlp_pkg.sv tb/tb_sns_top.sv \
        --top-module tb_sns_top
    ./obj_dir/Vtb_sns_top

`tb_sns_top` runs both cards at their default parameters:

* Timing Module: PT0-, Tstart- and divisor-driven Tsyncs, a real 60 Hz
  divisor period, an overdue substitution, a beam veto, chopper reference
  pulses of the full 200 µs, register traffic and serviced interrupts;
* OCC: read DMA, TX_GO and write DMA over both the optical and the LVDS
  link, in loopback; then target writes into the IDMA, sent over LVDS in
  target-read mode and read back from the ODMA.

It counts each of these and fails if one never happens. It runs for about
3.6 million timing clocks. The block testbenches shorten the pulse
lengths and buffers through parameters. To simulate another module,
replace the testbench file and the top-module name.
