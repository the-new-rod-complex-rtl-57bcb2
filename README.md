# Readout complex for the ATLAS Cathode Strip Chambers

The ATLAS muon spectrometer's Cathode Strip Chambers (CSC) are read out by
32 chambers' worth of on-detector boards. Each chamber has five ASM-II boards,
one per layer, and each board has 192 strips. On every Level-1 Accept (L1A)
the whole chamber is read, four time samples of every strip. A rack-mounted
readout complex must then do several things:

- tell the detector electronics which analog-memory cells to digitise;
- receive the raw samples;
- reduce them to hit bits (feature extraction);
- send the result to the ATLAS readout system over 16 Read-Out Links (ROLs);
- hold off the central trigger ("busy") when it cannot keep up.

This repository holds synthesizable SystemVerilog for the firmware part of
that complex. The parts are:

- the trigger distribution;
- the analog-memory read sequencer;
- the raw-data input;
- feature extraction;
- busy collection;
- the S-Link outputs.

It is assembled into one shelf-level top module, `nrc_top`, at full size.

## The shelf

The complex is one shelf of five boards (COBs). Every COB carries:

- eight processing elements (RCEs);
- a ninth RCE on its timing module, the DTM;
- a base board that fans the trigger out to the RCEs and the busy lines back in.

```
            FTM (central trigger, busy)          FTM ...
               |        ^                          |
  +------------v--------+-----+   backplane   +----v----------------------+
  | Formatter COB (master)    |  trigger bus  | FEX COB x4 (slaves)        |
  |  DTM: TTC_TX + BUSY_DST   |-------------->|  DTM: TTC_TX + BUSY_DST    |
  |  base board: mux, fan-out |<--------------|  base board: mux, fan-out  |
  |  8 x Formatter RCE        |  busy lines   |  8 x FEX RCE (one chamber) |
  |     TTC_RX, 2 x S-Link    |               |   TTC_RX, SCA ctrl, Input, |
  +---------------------------+               |   FEX, BUSY_SRC            |
         16 ROLs                              +----------------------------+
```

| module | what it is |
|---|---|
| `nrc_top` | the shelf: 5 DTMs and base boards, 32 FEX RCEs, 8 Formatter RCEs, backplane trigger bus and busy lines |
| `dtm_rce` | one COB's DTM: trigger source selection (`ttc_tx_ppi`) and busy collection (`busy_dest_ppi`) |
| `base_board` | the trigger multiplexer and fan-out, and the masked OR of the RCE busy lines |
| `fex_rce` | one chamber: `ttc_rx_ppi` → `sca_controller` → `input_ppi` → `fex_ppi`, plus `busy_source_ppi` |
| `formatter_rce` | one `ttc_rx_ppi` and two `slink_ppi`, one per ROL |
| `nrc_pkg` | shared constants and structs: trigger stream, trigger information record, control word, configurations |
| `sync_fifo`, `glink_deconv` | helpers: a first-word-fall-through FIFO, and the lane bit-stream to 12-bit sample unpacker |

The per-RCE blocks are called "plug-ins" (`*_ppi`). On the real hardware
they sit in the RCE's FPGA, next to a processor. The processor runs the
cluster finding and the event formatting. Those are software and are not
part of this RTL: where software would act, the blocks bring out plain
ports.

## Timing model

Everything runs on one fabric clock. `bc_tick` is a one-clock enable per
40 MHz bunch crossing (BC), once every `CLK_PER_BC` clocks. The default is
11, which gives 440 MHz, close to the 450 MHz FPGA clock of the original
plan.

The trigger stream `ttc_t` carries four fields: L1A, BCR (bunch counter
reset), ECR (event counter reset) and an 8-bit trigger type. Timing rules:

- A driver changes it on `bc_tick`; receivers sample it on the next one.
- Each DTM registers its generated stream.
- The backplane trigger bus is registered once more in `nrc_top`. Slave COBs
  therefore see a trigger one bunch crossing after the master COB. This is
  this design's choice: the bus cannot be combinational, because the master's
  multiplexer output would loop back through every slave's multiplexer.

## Trigger distribution (`ttc_tx_ppi`, `base_board`, `ttc_rx_ppi`)

Each DTM selects where its COB's trigger comes from:

- the FTM, i.e. the central trigger;
- the backplane;
- its own generator.

The generator makes single L1As and ECRs on software strobes, a periodic
L1A with an optional count, and a BCR every 3564 crossings (one orbit).

One DTM in the shelf is the master. It takes the FTM or its own generator
and drives the backplane; an assertion forbids a master to listen to the
backplane. The others are slaves and take the backplane.
A COB can also be split off as its own trigger domain, for example for
commissioning. Its DTM stays a non-master but selects the FTM or its own
generator, so only that COB's RCEs see those triggers.

Every RCE has a trigger receiver. It keeps the bunch, orbit, L1 and ECR
counters. On each L1A it pushes a Trigger Information Structure (TIS) into
a 16-deep FIFO for software; the TIS holds the ECR count, the 24-bit L1ID,
BCID, orbit and trigger type. When 12 entries are waiting, the FIFO raises
almost-full, which is a busy source. On a FEX RCE the receiver also starts
the SCA controller directly.

## Reading a chamber (`sca_controller`)

The ASM-II keeps its samples in analog memories (SCAs) of 144 cells,
written round-robin at 20 or 40 MHz. It holds no state of its own: it does
exactly what a stream of 17-bit control words tells it, one word per
bunch crossing. The controller keeps a mirror of the write pointer. The
control-word layout is this design's own:

```
bit 16    write clock level (1 = a write this crossing)
bit 15    ADC clock level
bit 14    kind: 0 = write word, 1 = read word
13..8     tag: low 6 bits of the L1ID being read
7..0      cell: the write pointer (write word) or the cell to read (read word)
```

On an L1A the controller queues one entry of 32 possible. The entry holds
the L1ID and a base cell, `write pointer - latency (mod 144)`. The latency
is a configuration value measured off-line. It then reads `nslices`
consecutive cells (1 to 4), skipping cells flagged bad. One read occupies
the 12 ADC conversions of the 12 channels an SCA serves, so reads are
spaced by `12 * adc_div` crossings. `adc_div` = 6 gives a 6.67 MHz ADC
clock, and 8 gives 5 MHz.

The delicate point is that cells are not protected. If a cell's data is
older than 144 writes when its read comes up, the write pointer has passed
it. The read is still made, so framing is kept, but it is counted in
`lost_reads` and sets `overrun`.

With a 20 MHz write clock and a 6.67 MHz ADC clock, four slices take 7.2 µs.
That is exactly the depth of the memory, so a steady trigger rate up to
about 139 kHz is fine. A burst queues reads behind one another, and its
later events come back as overruns. With the 5 MHz ADC clock, four slices
already take 9.6 µs. At a latency of 30 writes the last slice is then
overwritten even for an isolated trigger.

## Receiving the data (`input_ppi`)

Each of the five layers arrives on one lane, made of two 16-bit G-Link
fibres combined into one 32-bit word per crossing. One slice is 192
channels × 12 bits, sent least-significant bit first as 72 words. There
are no framing or check bits. `glink_deconv` unpacks each lane into one
12-bit sample per clock.

Samples are written into a slot buffer. A slot holds one event: 4 slices ×
192 channels × 5 layers, each sample zero-extended to 16 bits. There are
`N_SLOT` = 4 slots. A slot is complete when every enabled lane has
delivered its slices. Its number, an event sequence number and an error
flag then go into a completion FIFO for the feature extractor. The slot is
freed when the extractor is done with it.

Failure handling:

- **Full slot buffer.** A sample that would land in a slot still in use is
  dropped and counted, and that event is marked with an error.
- **Busy.** When `AF_SLOTS` slots are in use, `almost_full` raises busy.
- **Lost lock.** A lane that loses G-Link lock for `LOCK_TIMEOUT` clocks is
  disabled and reported. Completion then no longer waits for it. Software
  re-enables it with `relink`, which realigns the lane to the slot the next
  complete event will use.

In the original plan the raw event is moved by DMA into processor memory,
and the processor forwards a pointer. Here the slot number is handed to
the extractor in firmware instead.

## Feature extraction (`fex_ppi`)

For every channel of every layer, the extractor compares each slice with a
per-channel pedestal plus threshold from a table. A slice is a hit when
`sample - pedestal > threshold`.

An out-of-time cut then removes pulses that are only decaying. A channel
keeps its hits only if some slice is larger than the slice before it; with
one slice, nothing is cut. The exact cut used by the experiment is defined
elsewhere, and this simple rising-edge test stands in for it.

Other controls:

- Channels flagged bad in the table give no hits.
- Pass-through mode, used for pedestal runs, sets every hit bit of the
  configured slices.

The extractor handles one channel, 5 layers × 4 slices, per clock. An
event takes 192 + 2 clocks, 0.44 µs at 440 MHz, against the 7.2 µs needed
to receive it. The original plan describes doing the whole array in a few
clocks; one channel per clock is this design's choice, to keep the table
and buffer reads to one word per layer. The results come out per channel
(`res_ch`, `res_hits[layer][slice]`) with the event's sequence number, for
the cluster-finding software.

## Busy (`busy_source_ppi`, `base_board`, `busy_dest_ppi`)

Each FEX RCE's busy source ORs together three inputs:

- the TIS FIFO almost-full flag;
- the input buffer almost-full flag;
- a software busy bit.

The software bit comes up set after reset. Software clears it when it is
ready to take data. The source also counts busy cycles per input, total
busy cycles and busy assertions.

The base board ORs the unmasked RCE busy lines of its COB. The DTM's busy
destination adds the backplane busy lines it is enabled for. It can send
the sum to its FTM, to the backplane, or both. In the default wiring the
slaves send to the backplane, and the master collects the backplane and
sends to the FTM. Outputs are registered, so busy takes a few clocks to go
from a FIFO to the FTM.

The counters software reads are brought out at the top:

- per FEX RCE: busy cycles, busy assertions, lost SCA reads and dropped
  samples (`fex_busy_cycles`, `fex_busy_count`, `fex_lost_reads`,
  `fex_dropped`);
- per DTM: generated L1As and cycles of busy sent to the FTM
  (`dtm_l1a_generated`, `dtm_ftm_busy_cycles`).

## S-Link outputs (`slink_ppi`)

Each Formatter RCE drives two ROLs. Each ROL carries the data of two
chambers.

Software posts 32-bit words into a 512-word FIFO, flagging the last word
of each fragment. The sender wraps every fragment between a
begin-of-fragment and an end-of-fragment control word (`link_ctrl` = 1),
with values set by parameters. It sends one word per crossing, 160 MB/s,
and sends nothing while the receiver asserts XOFF (`link_full`) or the
link is down.

Software sees the fill level (`post_space`, `post_ready`) and counts of
words, fragments and XOFF ticks.

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| `N_FEX_COB` | 4 | FEX COBs |
| `FEX_PER_COB` | 8 | FEX RCEs per FEX COB (one chamber each) |
| `N_FMT_RCE` | 8 | Formatter RCEs |
| `ROL_PER_FMT` | 2 | ROLs per Formatter RCE |
| `CLK_PER_BC` | 11 | fabric clocks per bunch crossing (at least 3) |
| `N_SLOT` | 4 | event slots per FEX RCE input buffer |
| `LOCK_TIMEOUT` | 1024 | clocks without lock before a lane is disabled |

The configuration structs `fex_cfg_t` and `dtm_cfg_t` are in `nrc_pkg`:

- `fex_cfg_t` sets the write clock rate, `adc_div`, latency, number of
  slices, pass-through and the bad-cell map.
- `dtm_cfg_t` sets master/slave, trigger source, busy masks and enables,
  and the generator.

All FEX RCEs share one configuration and one table-write bus, with one
write enable per RCE.

## Where this design departs from the original plan

- The processor hand-overs are replaced by firmware ports. This covers the
  DMA into memory, the interrupt and the pointer message to the extractor.
  The cluster finding, event formatting, Ethernet and run control are
  software or bought-in parts and are absent.
- The extractor works one channel per clock instead of in a few clocks per
  event.
- The control-word bit layout, the trigger-stream format and the S-Link
  control-word values are this design's own.
- The out-of-time cut is a simple rising-slope test.
- SCA cells are not protected against being overwritten; overruns are
  detected and counted instead.
- The backplane trigger bus adds one bunch crossing of delay for the slave
  COBs.
- Each base board has a per-RCE busy mask, which the original plan does not
  mention.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, for
example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/nrc_pkg.sv tb/tb_nrc_top.sv \
          --top-module tb_nrc_top -o sim && obj_dir/sim
```

`tb/asm2_model.sv` is a behavioural model of one chamber's five ASM-II
boards. It follows the control words: it records which write filled each
cell, queues the cells named by read words, and sends their samples back on
the five lanes. The samples are a computed pattern of pedestals plus sparse
rising pulses. It keeps the samples of the last 16 events so the
testbenches can compute the expected hits on their own.

`tb_nrc_top` runs the whole shelf at its default size: 32 chambers, 40
RCEs, 16 ROLs. It runs in a few seconds. It covers:

- FTM, software and generator triggers;
- backplane distribution;
- checks of every extracted channel of every chamber;
- pass-through;
- software busy and FIFO busy reaching the FTM, and their release;
- SCA overrun on a trigger burst;
- lane lock timeout and relink;
- framing on all 16 ROLs under random XOFF;
- one FEX COB split off as its own trigger domain.

It counts each of these and fails if one never happens.

`tb_workload_rate` drives one FEX RCE, at its default parameters, with
periodic triggers at three rates:

- 100 kHz: no overrun and no busy;
- 139 kHz, the limit of four 1.8 µs reads: still no overrun;
- 200 kHz: lost reads are flagged.

Every event is checked at all three rates.

The block testbenches also check rates: one S-Link word per crossing, and
the ADC clock, write clock and read spacing patterns of the SCA controller.

## Synthesis notes

Memories are written as arrays and are inferred as memories. At full size
the shelf has about 7 Mbit of buffer memory, mostly the input slot buffers.
The extractor's pedestal table is one memory per layer, not one
two-dimensional array, which keeps synthesis tools fast.
