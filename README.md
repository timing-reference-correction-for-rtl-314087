# BC0 timing-reference correction for iRPC front-end boards

An improved Resistive Plate Chamber (iRPC) is read out at both strip ends.
Two front-end boards (FEBs) sit on one chamber, and each has a TDC that time-stamps strip signals.
Every timestamp is taken relative to BC0, the "bunch crossing 0" marker that starts each LHC orbit (3564 bunch crossings of 25 ns).

BC0 comes from the backend board (BEB) over one optical GBT link per FEB.
The fibers have different lengths, so each FEB sees BC0 at a different instant.
A muon that crosses the chamber at one instant then gets different times on the two boards.
That difference is a fixed property of the cabling, and it disturbs the backend's trigger logic.

This RTL removes that difference in three steps:

1. The backend measures each link's round trip: it sends a flag together with a BC0, the FEB returns the flag at once, and a 2.5 ns counter times the loop.
2. It takes the fastest link as the reference. Each link's correction is half its excess loopback time, assuming the downlink and uplink of a link are equally long.
3. It writes the correction into the FEB over slow control. The FEB subtracts it from its BC0 time, so hits on both boards are measured from the same instant.

The design covers both ends of this scheme:

- the backend logic (`beb_timing`);
- the FEB logic (`feb_timing`): frame decoding, offset registers, timestamp correction and replies;
- a top (`irpc_timing_top`) that joins one backend to `N_LINKS` FEBs.

## The measurement

### Handshake

Each link runs a short handshake. Its codes ride in spare fast-control bits of the downlink and in a reply code of the uplink.

| step | backend sends (downlink) | FEB answers (uplink) |
|---|---|---|
| handshake | `LM_HS` ("SC GBT frame_1") | `UP_HS_ACK` ("SC WB frame_1") |
| established | `LM_EST` ("SC GBT frame_2") | — (FEB marks the link established) |
| measure start | `LM_FLAG` in the **same frame as a BC0** ("Flag GBT frame_1") | `UP_FLAG` in the next uplink frame ("Flag WB frame_1") |
| measure end | `LM_END` ("SC GBT frame_3") once the flag reply has arrived | — |

Timing of the flag and its reply:

- The FEB sends the flag reply in the first uplink frame after it decodes the flag, ahead of any other uplink traffic. The turnaround is therefore a constant number of frame clocks.
- The backend starts its counter on the clock edge that launches the flag frame (`start_tgl`).
- It stops the counter on the receive-clock edge after the reply frame arrives (`end_tgl`).

The start and stop events are toggles. Each one is synchronised into the counter's clock by two flip-flops. Both paths get the same synchroniser delay, so it cancels in `end − start`.

### Counters

`latency_counter` is a free-running `CNT_W`-bit counter (12 bits by default). It captures its value at start and at stop, then outputs the difference modulo 2^12.

`beb_timing` has two of these counters per link:

- a 2.5 ns counter on `clk400`, which feeds the correction;
- a 25 ns counter on the bunch-crossing clock, kept for comparison.

With 12 bits, the longest loop that can be measured is 4096 × 2.5 ns ≈ 10.2 µs.

### Correction arithmetic

`correction_calc` finds the smallest latency, `L_min`, and returns three things:

- `ref_idx`: the link that has `L_min`. On a tie, the lowest index wins.
- `corr[i] = (L[i] − L_min) >> 1`: the correction in 2.5 ns steps, rounded down.
- `corr_half[i]`: the bit that was shifted out, which is the remaining 1.25 ns half-step.

Example: latencies of 637 and 716 counts give a difference of 79, so `corr = 39` and `corr_half = 1`.

Only `corr` is written to the FEB, because the FEB timestamps here count in 2.5 ns steps. `corr_half` is an output for systems with a finer TDC.

### Where the correction is applied

The FEB timestamp logic (`tdc_ts_correction`) first subtracts a per-channel offset from every hit:
`Timestamp − Offset[ch]`.

When its BC0 correction is enabled, it also subtracts the Previous BC0. That is the offset-corrected timestamp of the last hit on channel 32, the channel that receives the BC0 pulse.

A FEB on a slower link receives BC0 late by `corr` steps, so its hits look early by the same amount.

`correction_writer` therefore writes `corr` into the **offset of the BC0 channel** (registers 0x2840/0x2841) and sets the enable bit (0x2844). The correction then acts on every hit in this way:

- The stored BC0 time becomes `t_BC0 − corr`.
- Every hit's `t − (t_BC0 − corr)` grows by `corr`.
- Channel 32 itself keeps showing the BC0-to-BC0 period (35640 steps for a full orbit), because the same offset is applied to both BC0s.

Consider the other reading: subtracting the correction from every channel's own offset. Once the BC0 subtraction is on, that cancels out. With the BC0 subtraction off, it moves hits the wrong way.

The reference link gets a correction of 0. Its FEB is written too, so that both FEBs run in the same mode.

## Frames on the links

The link logic works on **{4-bit GBT header, user frame}** words, one per 40 MHz frame clock:

- GBT header 0101 marks a frame that carries something; 0110 marks an idle frame.
- The GBT encoder, scrambler, FEC and serialiser are outside this design. The transceivers receive these words directly.

### Downlink (backend → FEB), 80 bits in five 16-bit groups G4 (bits 79:64) … G0

| frame | G4 | G3 | G2 | G1 | G0 |
|---|---|---|---|---|---|
| any | {Resync, BC0, ResetSCPath, MiscCtrl[9:0], FPGASel[2:0]} | | | | |
| slow-control request | (header) | {SVSD[6:0], WrReq, BurstAdditionalWords[7:0]} | Address | WrData0 | WrData1 |
| slow-control payload | (header) | WrData(N) | WrData(N+1) | WrData(N+2) | WrData(N+3) |

Inside a group, the first field listed is the most significant.

MiscCtrl is used as follows:

- Bit 0 marks a frame that carries slow control.
- Bits 3:1 carry the handshake code.

A write of n = BurstAdditionalWords + 1 words has this layout:

- The request frame writes WrData0 to Address and WrData1 to Address + 1.
- The remaining words follow in back-to-back payload frames, four at a time, to consecutive addresses.

A request whose FPGASel differs from the FEB's `FPGA_SEL` belongs to another FPGA of the board. It is skipped along with its payload frames. ResetSCPath aborts a burst.

### Uplink (FEB → backend), 112-bit wide-bus frame

`{code[3:0], reserved[11:0], data[95:0]}`. The codes are:

| code | meaning | data |
|---|---|---|
| `UP_HS_ACK` | handshake reply | — |
| `UP_FLAG` | flag reply | — |
| `UP_BC0_TS` | corrected BC0 timestamp, sent for every BC0 | [23:0] |
| `UP_RDATA` | slow-control read reply | [31:16] address, [15:0] data |

Uplink priority:

- The flag reply always goes first.
- Other replies wait in one-entry holding registers and leave in this order: handshake reply, read data, BC0 timestamp.
- A newer item of the same kind replaces an unsent one.

### Frame alignment

`gbt_header_aligner` finds the frame boundary on each receiver:

1. It checks the header bits of each received word.
2. On a bad header, it pulses `rxslide`, which asks the transceiver to shift the stream by one bit. It then waits `SLIDE_GAP` (32) frames for the shift to take effect.
3. After `LOCK_CNT` (24) good headers in a row, it declares the link locked.
4. After `UNLOCK_BAD` (4) bad headers in a row, it drops lock and starts searching again.

The FEB uses an 84-bit instance; the backend uses a 116-bit instance for each uplink.

## FEB register map

| address | content |
|---|---|
| 0x2800 + 2k | offset of channel k, bits 15:0 |
| 0x2801 + 2k | offset of channel k, bits 23:16 (in data bits 7:0) |
| 0x2844 | bit 0: BC0 timestamp correction enable |

Channels 0–31 are strips. Channel 32 is the BC0 calibration pulse and channel 33 the Resync pulse, both produced by the FEB's fast-control decoder.

Register behaviour:

- Reads return after one clock.
- Four write ports let a whole payload frame be written in one clock.

## Clocks and crossings

| clock | where | used by |
|---|---|---|
| `clk40` | backend, 40.0786 MHz | downlink encoders, handshake FSMs, sequencer, 25 ns counters |
| `clk400` | backend, 10 × `clk40` | 2.5 ns counters |
| `beb_rx_clk[i]` | backend, recovered from uplink i | uplink aligner and reply decoder |
| `feb_clk[i]` | FEB i, recovered from its downlink | all FEB logic and the FEB's uplink transmitter |

Crossings between these domains:

- The handshake replies cross from `beb_rx_clk` to `clk40` as toggles.
- The uplink-lock signal is synchronised into `clk40`. A `start` that arrives before a link is locked is held until it locks.
- The backend sequencer (`Q_MEAS → Q_SETTLE → Q_CALC → Q_WRITE → Q_DONE`) waits 7 frame clocks after every link reports done, then reads the 400 MHz results. Those results have been stable for many fast cycles by then.

The FEB is fully synchronous to its recovered clock. As in real iRPC FEBs, that clock is frequency-locked to the backend.

## Module hierarchy

```
irpc_timing_top          #(N_LINKS=2, CNT_W=12)
├── beb_timing           backend
│   ├── per link: gbt_header_aligner(116), beb_link_ctrl, latency_counter ×2, sc_frame_encoder
│   ├── correction_calc
│   └── correction_writer
└── per link: feb_timing #(FPGA_SEL=0)
    ├── gbt_header_aligner(84)
    ├── sc_frame_decoder
    ├── feb_offset_regs
    ├── tdc_ts_correction
    └── feb_link_ctrl
irpc_pkg                 frame structs, codes, widths, addresses
```

Each file in `rtl/` opens with a description of its interface and cycle timing.

## What follows the source design and what is this design's own

Taken from the source design:

- the 12-bit counter with 2.5 ns steps;
- the correction formula, with the fastest link as reference;
- the handshake steps and their names;
- the BC0 period of 3564 bunch crossings;
- the downlink field names, lengths and groups;
- header values 0101/0110 and lock after 24 good headers;
- 34 TDC channels with BC0 on 32 and Resync on 33;
- 24-bit timestamps and offsets;
- the offset register base 0x2800 with the low/high register pair per channel;
- subtraction of offset and Previous BC0 in the FEB.

Chosen here, because the source is silent:

- the bit order within a group, and the use of MiscCtrl bits;
- the uplink frame layout and reply codes;
- the enable register address (0x2844);
- writing the correction to the BC0 channel (explained above);
- rounding the correction down, with a separate half-step bit;
- a minimum slide spacing of 32 frames, and unlock after 4 bad headers;
- consecutive addressing of burst words, and the FPGASel filter;
- the automatic measure → compute → write sequence;
- holding a `start` until lock.

The source shows ILA probes 13 bits wide ([12:0]) next to the counter, while its text says the counter has 12 bits. `CNT_W` defaults to 12 and can be raised.

Not included, and expected around this logic:

- the GBT-FPGA core, GBTx, transceivers with their clock recovery, and optics;
- clock generation and jitter cleaning;
- the TDC itself, and the FEB readout chain;
- the configuration of the front-end ASICs.

The top brings their connections out as ports.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints a single line `TB_RESULT checks=N failures=M`.

`tb/gbt_link_model.sv` is a behavioural link model used by the system testbenches. It provides:

- whole-frame fiber delay;
- the fractional delay as a clock phase;
- a bit-slip port that acts three clocks after `rxslide`.

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb rtl/irpc_pkg.sv tb/tb_irpc_timing_top.sv \
  --top-module tb_irpc_timing_top -o sim
obj_dir/sim +verilator+rand+reset+2
```

`tb_irpc_timing_top` runs the whole system at its default parameters: two links, 12-bit counters, 34 channels and a full 3564-BX orbit. It takes about ten seconds. Its setup:

- The links have one-way delays of 60.2 ns and 158.95 ns.
- Each FEB's TDC is a model that converts simulation time into 2.5 ns counts.

It checks the following, and counts how often each mechanism happens:

- bit-slip alignment on both sides;
- every handshake step on both links;
- the measured loopback difference of 79 counts, and the resulting correction of 39;
- the register contents in both FEBs;
- the BC0 timestamp that returns each orbit (35640 counts);
- that a particle crossing both halves of the chamber at one instant gets equal corrected timestamps on both FEBs. Without the correction they differ by 39 counts.

Other system-level tests:

- `tb_irpc_workloads` runs two complete systems side by side (`tb/irpc_measure_scenario.sv`). Their link delays are chosen to reproduce two reference measurements:
  - loopbacks of 216 and 215 counts. Link 1 is the reference, the correction is 0 and the half-step bit is 1.
  - loopbacks of 637 and 716 counts, giving a correction of 39.

  The 25 ns counter reads 21 in the first case, where the reference measurement gave 22. A one-count difference like this comes from where the 25 ns clock edge falls.

- `tb_beb_timing` drives the backend against simple FEB models.
- `tb_feb_timing` drives one FEB with hand-built frames. It covers alignment, 68-word bursts, reads, FPGASel filtering and the timestamp arithmetic.

## Limits worth knowing

- The correction has 2.5 ns resolution. Its half-step is reported as `corr_half` but not applied.
- The correction assumes the downlink and uplink of a link have the same latency. Any asymmetry (for example in the transceivers) shows up as a residual offset.
- A loop longer than 4096 × 2.5 ns wraps the 12-bit counter. The difference is then wrong unless `CNT_W` is raised.
- The FEB timestamp arithmetic is modulo 2^24.
