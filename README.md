# SP2002 Front FPGA: link receiver and aligner for the CSC track finder

The CSC track-finder sector processor (SP2002) takes in 15 optical links
from the muon port cards. Each link carries one muon stub per 25 ns bunch
crossing, sent as two 16-bit frames at 80 MHz. Every link arrives with its
own recovered clock, its own phase, and its own fibre and start-up delay.
Before any track finding can start, all 15 streams must run on one board
clock and present the **same** bunch crossing at the same moment.

The Front FPGAs do that. Each one services three links:

- It watches the optical transceiver (Finisar FTRJ-8519) and the SerDes
  (TI TLK2501) and reports their health.
- It moves each link into the global 80 MHz clock through an alignment
  FIFO.
- Together with the other four Front FPGAs, it holds back reading until the
  latest link of the whole sector has started, so everything comes out in
  step.
- It turns each aligned stream into one 32-bit stub per bunch crossing.
  This stub addresses the external lookup memories (local phi, global phi,
  global eta).
- It keeps a copy of the data in a pipeline long enough to wait for the
  Level-1 accept (L1A). On an L1A it saves the triggered bunch crossing and
  later reads it out to the DAQ (the DDU).
- Over VME it gives full control of the transceivers, loads and reads back
  the lookup memories, and can play test patterns into the transmitters.

This repository holds that chip as parameterised SystemVerilog. The default
build matches the sector processor's chosen configuration:

- 3 links per chip;
- 5 chips in an alignment group;
- this chip is the alignment master.

```
 per link (its own RX clock)           | global 80 MHz clock
                                       |
 SD,RX_DV,RX_ER,RXD -> link_monitor ---+-> status / error counter -> VME
                           |           |
                           v           |
                      alignment_fifo ==+==> demux -> stub -> lut_port x3 -> SRAMs
                      (/AF_WR out)     |      \
                                       |       +-> pipeline_fifo -> daq_readout -> DDU
 align_master (in one chip): all /AF_WR|                                \-> spy_fifo -> VME
   -> wait CSC offset -> /AF_RD -------+
                                       |  test_pattern -> TXD/TX_EN/TX_ER
                                       |  vme_regs: register map, transceiver controls
```

| module | role |
|---|---|
| `front_fpga` | top level: one Front FPGA |
| `link_monitor` | transceiver status, synchronisation detection, latched statuses, error counter |
| `alignment_fifo` (+ `async_fifo`) | per-link dual-clock FIFO, start-of-writing status |
| `align_master` | collects write statuses, applies the CSC offset, issues the common read enable |
| `demux` | 2 x 16 bit at 80 MHz to 32 bit per bunch crossing |
| `lut_port` | address register and strobes of one external LUT SRAM |
| `pipeline_fifo` | programmable delay line for the L1A latency |
| `daq_readout` (+ `sync_fifo`) | L1A DAQ FIFO, event capture, DDU request/acknowledge readout |
| `spy_fifo` | optional VME-readable copy of read-out events |
| `test_pattern` | per-link pattern FIFO played into the TLK2501 transmitter |
| `vme_regs` | 256-byte VME register window |
| `fp_pkg` | register offsets and shared types |
| `sync_bits`, `rst_sync` | two-flop synchronisers for levels and reset |

## Link monitoring and synchronisation

`link_monitor` runs on each link's receive clock. On every clock it sorts
the three status lines into one of five cases:

| SD | RX_DV | RX_ER | meaning |
|---|---|---|---|
| 1 | 1 | 0 | normal data |
| 1 | 0 | 0 | idle |
| 1 | 0 | 1 | carrier extend |
| 1 | 1 | 1 | error propagation |
| 0 | x | x | loss of signal |

SD (signal detect) is asynchronous and passes a two-flop synchroniser.
RXD, RX_DV and RX_ER are registered twice, so all of them stay in step with
SD.

**Synchronisation.** A TLK2501 link is synchronised by sending at least
three idle clocks. The first normal word after such a run does two things:

- It marks the link synchronised.
- It clears the latched statuses and the error counter. Statuses therefore
  accumulate from the most recent synchronisation.

**Latched statuses.** After that, any clock other than normal sets its
latch: LID (idle), LCE (carrier extend), LER (error) or LSD (loss of
signal).

**Error counter.** The 10-bit error counter counts carrier-extend words
when CCE is set and error words when CER is set. It saturates at 1023.

**Crossing into the global clock.**

- The counter crosses in Gray code.
- The current and latched statuses cross through two-flop synchronisers.

## Alignment across Front FPGAs

This is the part that needs the most care.

**Writing.** Each link's `alignment_fifo` starts writing with the first
normal word after synchronisation. From then on it writes on **every**
receive clock; a clock without normal data is stored as a zero word. The
FIFO therefore holds an unbroken sequence of 80 MHz frames, and position
in the FIFO equals time.

**Write status (/AF_WR).** Once all three links of a chip are writing, the
chip raises its write status `af_wr_o`.

**Release (/AF_RD).** `align_master` lives in one chip, the one that owns
the CSC offset register.

- It receives the five chips' write statuses on `af_wr_in`.
- Each status passes a two-flop synchroniser, and the master ANDs them.
- It then waits `csc_offset` more clocks and raises `af_rd`.
- `af_rd` goes back to every chip, each registers it once on `af_rd_i`,
  and it stays high until reset.

The CSC offset lets CSC data be shifted against barrel-muon data.

**Timing.** `af_rd` rises `csc_offset + 3` clocks after the last write
status rises. From then on, every alignment FIFO of every chip is read on
every global clock, so all 15 links deliver their first aligned frame on
the same clock. The FIFO output is registered, so the data follows `af_rd`
by one clock.

**Slack limit.** The earliest link keeps filling its FIFO until the
release. Each FIFO is a 64-entry RAM that holds 63 words. Therefore:

- All links of all chips must start writing within about 63 frames
  (790 ns) of each other, less the CSC offset and the synchroniser delays.
- If a link starts too early, its FIFO fills. The words that do not fit are
  dropped and the AFF flag is set. That link is then misaligned until the
  next reset and resynchronisation.

After the release, each FIFO keeps a constant residual fill equal to how
much earlier its link started than the latest one. That fill is readable as
the 6-bit word count AC.

**Frame phase.** The first frame written after synchronisation is treated
as frame 0 of a bunch crossing. The muon port cards must therefore start
their data on a bunch-crossing boundary.

**Other chips.** A chip built with `IS_MASTER=0` does not contain the
master; it ties `af_wr_in` off and ignores `af_rd_o`. On the master, any
`af_wr_in` input without a chip behind it must be tied high.

## Stubs and the lookup memories

`demux` pairs the aligned frames as `{frame1, frame0}`. It outputs one
32-bit stub per bunch crossing with a one-clock `stub_vld` strobe, one
clock after frame 1. In run mode each link's stub addresses its lookup
memories:

| LUT | size | run-mode address | data |
|---|---|---|---|
| local phi | 256K x 16 | stub bits 17..0 | to the main FPGA |
| global phi | 512K x 32 | board nets from the local phi LUT output (`gp_run_addr`) | to the main FPGA |
| global eta | 512K x 16 | stub bits 18..0 | supplied by the main FPGA |

Which stub bits form each address is a choice of this design.

The global phi address nets run between two SRAMs through board buffers.
This chip drives them (`gp_aoe`) only during its own VME accesses.

`lp_clk40` and `gp_clk40` are the 40 MHz LUT clocks, at phase 0 and phase
180 degrees. They are a divide-by-two of the global clock, kept in step so
that `lp_clk40` is high in the clock after each new stub.

**Loading and read-back (`lut_port`).** Each LUT has an address register
written in two parts:

- the high part (2 or 3 bits, at `+0x10/+0x20/+0x30`);
- then the low 16 bits (`+0x12/+0x22/+0x32`).

Each access to the data register (`+0x16`, `+0x24/+0x26`, `+0x36`) reads
or writes one word and then adds one to the address, so a table loads with
one address set-up followed by a stream of data writes.

The 32-bit global phi LUT looks like two 16-bit memories with a shared
address:

- The high half is at `+0x24` and the low half at `+0x26`.
- Each half has its own write strobe (`gph_we_n`, `gpl_we_n`).
- An access to either half advances the shared address. To load both halves
  of the same words, set the address, stream the high halves, then set the
  address again and stream the low halves.

**Access timing.**

- A VME access takes the SRAM from run mode for one clock.
- A write drives CE, WE and the data for one clock.
- A read drives CE and OE for one clock and samples the data `LAT` = 2
  clocks later, which suits a pipelined synchronous SRAM.
- The VME cycle is acknowledged when the access is done.

LUT data enters and leaves the chip on `*_dout`/`*_doe`/`*_din`, which
stand for the board buffers on the data path.

## L1A pipeline, DAQ FIFO and DDU readout

**Pipeline.** `pipeline_fifo` writes the aligned frames of all three links
side by side (48 bits) into a 512-entry RAM. It reads back the word written
`depth` clocks earlier, where `depth` is the 9-bit PC field in VME register
`0xC0`, counted in 80 MHz words. The input-to-output latency is `depth + 1`
clocks, so the longest L1A latency covered is 511 words (6.4 us). Every
Front FPGA must be loaded with the same depth.

Status flags:

- PEF: nothing has been written yet.
- PFF: the line holds at least `depth` words, so its output is valid.

**Event capture.** Raise `l1a` for one clock while the triggered bunch
crossing's frame 0 is at the pipeline output. `daq_readout` then pushes
that word and the next one (frame 1) into the 48 x 256 L1A DAQ FIFO, so one
event is two entries.

- L1As must be at least two clocks apart, which an assertion checks.
- An L1A that finds fewer than two free entries drops the whole event. This
  sets a sticky overflow bit, so the FIFO never holds half an event.
- DFF means "no room for another event", so 127 events fit.

**Readout to the DDU.**

1. A `ro_start` pulse loads the oldest event. It takes 3 clocks, during
   which `ro_busy` is high.
2. The chip drives `valid_pattern`: one bit per link, taken from bit 15 of
   that link's frame 0, which is taken to be the stub's valid flag. The DDU
   uses these bits as the first word of its block.
3. The DDU collects the words with a four-phase handshake: raise `ro_req`,
   the chip puts a word on `ro_data` and raises `ro_ack`, drop `ro_req`,
   the chip drops `ro_ack`.

Only valid links are sent, in link order, frame 0 before frame 1: that is
`2 x popcount(valid_pattern)` words. Extra requests return zero.

**Spy FIFO.** While the enable bit at `0xD0` is set, every event word
loaded for readout is also copied into `spy_fifo`, a 48 x 256 FIFO. VME
reads the oldest word one link at a time at `0xD2`, `0xD4` and `0xD6`.
Reading `0xD6` moves on to the next word. When the FIFO is full, new words
are dropped.

## Test patterns and transceiver control

Each link has a 16 x 256 pattern FIFO at `+0x08`:

- Loading: VME writes push words.
- Read-back: with TEN clear, VME reads pop words.
- Playing: with TEN set, the FIFO plays out one word per clock on TI_TXD,
  with TI_TX_EN high for each word. When it is empty, TX_EN drops and the
  TLK2501 sends idle.

TER drives TI_TX_ER directly. Looped back (LEN) or sent down a fibre, the
pattern imitates a muon port card, which is how the sector processor's
algorithms can be checked without the detector.

The link control bits drive the transceiver pins directly:

| bit | pin |
|---|---|
| PEN | TI_PRBSEN |
| LEN | TI_LOOPEN |
| ENB | TI_ENABLE |
| TD | FI_TD (transmitter disable) |

## VME register map

Each chip decodes a 256-byte window of 16-bit registers; the upper address
bits select the chip (for example 0x100 x chip number). Link *n* uses
offsets `n*0x40` to `n*0x40+0x3F`. Bit 15 is on the left in the table.

| offset | register | bits 15..0 |
|---|---|---|
| +0x00 | link control/status | LID LER LCE LSD - RER RDV SD - - PEN LEN ENB TER TEN TD (controls W/R) |
| +0x02 | error counter | - - CER CCE - - EC9..EC0 (CER/CCE W/R) |
| +0x04 | alignment FIFO status | - - AFF AEF - - - - - - AC5..AC0 |
| +0x06 | test FIFO status | - - TFF TEF - - - - TC7..TC0 |
| +0x08 | test FIFO data | W push / R pop |
| +0x10 / +0x12 | local phi address hi / lo | LP17..16 / LP15..0 |
| +0x16 | local phi data | auto-increment |
| +0x20 / +0x22 | global phi address hi / lo | GP18..16 / GP15..0 |
| +0x24 / +0x26 | global phi data high / low | auto-increment |
| +0x30 / +0x32 | global eta address hi / lo | GE18..16 / GE15..0 |
| +0x36 | global eta data | auto-increment |
| 0xC0 | pipeline depth/status | - - PFF PEF - - - PC8..PC0 (PC W/R) |
| 0xC8 | L1A DAQ FIFO status | - - DFF DEF - - - - DC7..DC0 |
| 0xD0 | spy FIFO status | SPE - SFF SEF - - - - SC7..SC0 (SPE W/R) |
| 0xD2 + 2n | spy FIFO data, link n | reading the last link advances |
| 0xE0 | CSC offset (master only) | CO4..CO0 |

After reset, ENB is 1 and everything else is 0, including the pipeline
depth; set the depth before taking L1As. Unmapped offsets read 0.

**Bus cycle.** The bus side is a simple internal cycle:

- `vme_cs` pulses for one clock, with `vme_we`, `vme_addr` and `vme_din`
  valid.
- The chip answers with a one-clock `vme_ack`; read data is on `vme_dout`
  with it.
- Registers answer on the next clock. LUT and test-FIFO data answer when
  the data arrives.
- A test-FIFO read while the FIFO is empty or playing returns 0 at once.
- An assertion checks that no new cycle starts while one is waiting.

## Clocks and reset

- `clk` is the global 80 MHz clock. Everything after the alignment FIFOs
  runs on it, and VME runs on it as well.
- `ti_rx_clk[n]` is link *n*'s receive clock. Only the link monitor and the
  write side of the alignment FIFO use it.
- `rst` is synchronous to `clk`. Each link gets its own copy, synchronised
  into its receive clock (`rst_sync`).

Signals that cross between the clock domains:

| signal | method |
|---|---|
| alignment FIFO pointers | Gray code |
| error counter | Gray code |
| status levels | two-flop synchronisers |
| CCE/CER, written over VME | two-flop synchronisers |

## Where this design makes its own choices

The register layout, the LUT sizes, the FIFO sizes and the alignment
protocol follow the SP2002 Front FPGA specification. These points are
choices or readings of this design:

**Counts and widths**

- **Group size.** Five chips of three links (15 links) form the alignment
  group. The specification also mentions eight chips, which belongs to the
  two-links-per-chip alternative.
- **DAQ FIFO width.** The DAQ FIFO is 48 bits for three links. The
  specification's text says "two links" beside a 48-bit width; the width
  was followed.
- **Address-high widths.** The LUT address-high registers have 2 bits
  (local phi) and 3 bits (global phi and eta), following the per-LUT bit
  tables. The register summary lists other widths.
- **Global eta address.** The global eta address is driven with all 19
  bits.
- **AC field.** The alignment FIFO count AC sits in bits 5..0.

**Behaviour the specification does not give**

- The VME bus cycle and its wait states.
- All reset values.
- The event format and its valid bit (bit 15 of frame 0).
- The overflow policies.
- The spy FIFO register address and access.
- How the test pattern plays out.
- Frame order inside a stub.
- The stub bits used as LUT addresses.
- The LUT clock phasing.
- The synchronous-SRAM read latency.

**Not included**

- The fast-monitoring outputs: only a reserved pin is specified.
- The FPGA configuration pins.
- Any use of BC0/BCR.
- The A-layer (DT) LUT path.

The transceivers, SRAMs, CCB and DDU logic are separate chips; their
signals are ports of `front_fpga`.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/lut_sram.sv` is a
behavioural pipelined SRAM used only by the top-level test.

The end-to-end test `tb_front_fpga` runs the top at its default parameters
(3 links, 5 chips, master) and takes a few seconds. It drives three
muon-port-card sources, each in its own receive-clock phase, with different
start-up delays and synchronisation lengths. It models the other four chips
as late write statuses. It then checks, and counts:

- synchronisation and alignment release;
- stubs aligned to one bunch crossing on every link;
- run-mode LUT addressing;
- L1A capture at the programmed depth;
- DDU readout against the recorded history;
- DAQ FIFO overflow on an L1A burst;
- latched and counted error words;
- test-pattern play-out;
- LUT loading and read-back through VME;
- the spy FIFO;
- the LUT clock phase.

Any mechanism that never happens counts as a failure.

`tb_front_fpga_group` builds a whole alignment group: five default-size
chips (15 links), with the middle one as master, wired as on the board. It
checks three things:

- The master releases the read enable exactly CSC offset + 3 clocks after
  the last chip is ready.
- All 15 links deliver the same bunch crossing on the same clock.
- The CSC offset register exists only in the master.

Run any testbench with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fp_pkg.sv tb/tb_front_fpga.sv --top-module tb_front_fpga -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_front_fpga` with `tb_link_monitor`, `tb_alignment_fifo`,
`tb_align_master`, `tb_demux`, `tb_pipeline_fifo`, `tb_sync_fifo`,
`tb_daq_readout`, `tb_spy_fifo`, `tb_test_pattern`, `tb_lut_port` or
`tb_vme_regs` to run a single block, or with `tb_front_fpga_group` for the
five-chip group.

Testbenches drive inputs on the falling clock edge. The design has no
`initial` state beyond its resets, so random initial values (as above) are
a useful test.

**Changing the size.**

- `front_fpga #(.NLINKS(2))` builds the two-links-per-chip variant. The
  register map keeps the 0x40-per-link layout.
- `IS_MASTER(0)` builds a non-master chip.
- `NFPGA` sets how many write statuses the master waits for.
