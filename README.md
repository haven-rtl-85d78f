# HAVEN verification core: running a design under test in an FPGA while software keeps the testbench

Simulating a large design in an HDL simulator is slow, and a constrained-random
verification run may need millions of transactions. This design moves only the
design under test (DUT) and the pin-level parts of the testbench into hardware:

- a **driver** that turns transactions into signal activity on the DUT input;
- a **monitor** that turns DUT output activity back into transactions;
- **assertion checkers** that watch an interface protocol;
- **signal observers** that record waveforms.

Everything that is behavioural stays in the software testbench: test cases,
random stimulus generation, the scoreboard that predicts and compares results, and
reporting. The two halves exchange packets over a host link.

The hard part is keeping the hardware run *cycle-accurate*. The DUT must see
exactly the same sequence of input values and back-pressure that it would see in
a pure simulation, however late the host delivers data or collects results. That
way, a failure found at hardware speed can be replayed in a simulator and
debugged there. The core achieves this by running the DUT on a **gated clock**.
A DUT clock edge is only allowed when the driver has the data that cycle needs,
and when every output path has room for what that cycle may produce.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Two evaluation DUTs
are included:

- a FrameLink FIFO;
- a Bob Jenkins Lookup2 hash generator ("HGEN"), alone or as N parallel units.

## Top level and block map

```
             host link (FrameLink, 64-bit)
 host_rx ──► fl_fifo (input buffer) ──► fl_driver ──► DUT rx ┐
                                           │ cfg             │ dut_clk (gated)
                                           ▼                 ▼
 host_tx[0] ◄── out_buffer ◄── fl_monitor ◄────────── DUT tx ┘
 host_tx[1] ◄── out_buffer ◄── fl_assert_checker (RX, id 169) on DUT rx
 host_tx[2] ◄── out_buffer ◄── fl_assert_checker (TX, id 170) on DUT tx
 host_tx[3] ◄── out_buffer ◄── signal_observer  (RX bundle)
 host_tx[4] ◄── out_buffer ◄── signal_observer  (TX bundle)
                dut_clock_ctrl: ce / dut_clk from all "stall" requests
```

| module | role |
|---|---|
| `haven_top` | `haven_core` plus the DUT in the gated domain (`DUT_KIND`: `DUT_HGEN` by default, or `DUT_FIFO`) |
| `haven_core` | every hardware verification component and the clock control |
| `fl_fifo` | FrameLink FIFO. Used as the input transaction buffer, and as the FIFO DUT |
| `fl_driver` | reads host packets and plays transactions onto the DUT input |
| `fl_monitor` | captures DUT output frames and drives random back-pressure on the DUT output |
| `fl_assert_checker` | FrameLink protocol assertions as small state machines, with error reports |
| `signal_observer` | value-change records of a signal bundle, for a VCD waveform |
| `out_buffer` | per-channel output FIFO with a multi-word push port and a "no room" stall |
| `dut_clock_ctrl` | combines the stalls into `ce`, gates the DUT clock, counts DUT cycles |
| `hgen` | one streaming Lookup2 hash unit with FrameLink ports |
| `hgen_multi` | N `hgen` units behind round-robin distribution and collection |
| `haven_pkg` | FrameLink word type, packet kinds, channel numbers, assertion bits, Lookup2 mix |

All handshakes follow FrameLink conventions, with every control signal active low.
The host side is out of scope here. That covers the software driver, monitor and
scoreboard, the DPI layer, and the PCIe platform of the acceleration card. Its
interface is the FrameLink streams at the top's ports: one input stream and five
output channels.

## FrameLink

FrameLink is the streaming protocol of both the DUT interfaces and the host link.

One word (`fl_word_t`, 71 bits) contains:

- `data[63:0]`, with byte 0 in bits 7:0;
- `rem[2:0]`, the index of the last valid byte in the word;
- the delimiters `sof_n` (start of frame), `eof_n` (end of frame), `sop_n` (start of
  part) and `eop_n` (end of part).

A word moves on a clock edge where `src_rdy_n` and `dst_rdy_n` are both low. A frame
is one or more parts, and a part is one or more words. `rem` only matters on the
word that carries `eop_n`.

## Host packets

**Input stream (`host_rx`).** Every packet starts with a header word. The kind is
in `data[63:56]`.

- **Transaction** (`PK_TRANS`). `data[31:0]` is the number of idle DUT cycles to
  insert before this transaction (the random delay chosen by the generator).
  - If the header's `eof_n` is high, the DUT frame follows as payload words.
    The driver forwards them unchanged, except that it sets `sof_n` itself on the
    first word.
  - If `eof_n` is low, the packet is a pure delay.
- **Configuration** (`PK_CONFIG`). `data[31:0]` goes to the monitor:
  - bits 15:0 are the ready threshold;
  - bits 31:16 are the LFSR seed.
  The header is consumed on the fast clock, without a DUT cycle.

**Output channels (`host_tx[0..4]`).** Each channel is a separate stream.

| channel | packet |
|---|---|
| `CH_MONITOR` | header `{PK_MONITOR, 24'h0, transaction number}`, then the DUT frame's words |
| `CH_RX_ASSERT`, `CH_TX_ASSERT` | `{PK_ASSERT, checker id[15:0], violation mask[7:0], transaction number[31:0]}`, then the DUT cycle of the first violation |
| `CH_RX_OBSERVE`, `CH_TX_OBSERVE` | `{PK_OBSERVE, observer id[7:0], DUT cycle[47:0]}`, then the observed vector (2 words for a 73-bit FrameLink bundle) |

Transaction numbers count frames from 1. Each channel has its own buffer, so an
assertion report is never queued behind a long monitor frame. The host can
therefore see the report and the offending transaction number together.

## Cycle-accurate clock gating

This is the central mechanism. Here it is in detail.

**The fast clock and the DUT clock.** Everything in `haven_core` runs on the fast
clock `clk`. The DUT runs on `dut_clk`, and each rising edge of `dut_clk` is one
*DUT cycle*. Components that act on the DUT's signals update their state only
when `ce` is high. That way they see exactly the DUT cycles and nothing else. These
components are the driver's data path, the monitor, the checkers and the
observers.

**The stall rule.** `dut_clock_ctrl` computes `ce = !rst && (no stall)` from
`N_STALL` requests:

- `stall[0]`, from the driver. It is high:
  - while the driver is reading a packet header;
  - while it has a transaction in progress but the input buffer holds no next word.
  In short, the data this DUT cycle needs has not arrived yet.
- `stall[1+CH]`, from each output buffer. It is high when the buffer's free
  space, counting the word leaving this cycle, is smaller than the largest push
  its source can make in one cycle:
  - 2 words for the monitor and the checkers;
  - 3 for an observer record.

This is a worst-case bound: a DUT cycle is only spent when nothing that cycle
could produce can be lost. Because of that, there is no back-pressure path into
the DUT that the software simulation would not have.

**The gate.** `dut_clk = clk & en_lat`, where `en_lat` is a level latch that is
transparent while `clk` is low. `en` (`ce`, or reset) is therefore frozen for the
whole high phase. The gated clock cannot glitch, and an edge of `dut_clk`
coincides with an edge of `clk` on which `ce` was high. The DUT clock also runs
during reset, so a DUT with synchronous reset is reset properly.

**What makes the DUT waveform independent of the host.**

- *Ready signals.* During a stalled fast cycle nothing on the DUT side moves. The
  driver's ready signal toward the DUT and the monitor's ready signal toward the
  DUT both come from state that advances only on `ce`.
- *Back-pressure.* The monitor's `dst_rdy_n` is the random back-pressure that the
  software monitor would have applied. It comes from a 16-bit LFSR stepped once
  per DUT cycle: the DUT output is ready when `lfsr <= threshold`. The sequence
  depends on the seed and the DUT cycle number, never on host timing.
- *Idle input.* When the driver has nothing to offer, the DUT input shows a fixed
  idle word. It never shows whatever happens to be at the head of the input
  buffer.
- *Delays.* Idle gaps are counted in DUT cycles, not in fast cycles.

**How this is tested.** The end-to-end test runs the same stimulus twice:

1. with a fast host;
2. with a slow host and random output back-pressure.

It requires that the signal observers' records are bit-identical between the two
runs, and that the DUT cycle count is the same.

The latch is intentional: it is the standard glitch-free clock gate. On an FPGA
or ASIC, replace `dut_clock_ctrl`'s two lines with the vendor clock-gating or
clock-buffer primitive. On an FPGA, a BUFGCE with `ce` as its enable is the
usual choice.

## Hardware driver (`fl_driver`)

The driver is a three-state machine:

- **header**: takes the header on the fast clock (this state stalls the DUT);
- **gap**: counts idle DUT cycles;
- **data**: forwards payload words with `ce`-qualified handshakes.

It counts completed transactions (`trans_sent`). A configuration header raises
`cfg_we` for one fast cycle.

## Hardware monitor (`fl_monitor`)

On each DUT-output transfer the monitor pushes the word into the `CH_MONITOR`
buffer. On the first word of a frame it also pushes a header word first. It counts
frames (`trans_seen`) and drives the LFSR back-pressure described above.

- The reset values are seed `16'hACE1` and threshold `16'hFFFF` (always ready).
- The LFSR taps are 16, 14, 13 and 11.
- A seed of 0 is replaced by 1.
- During reset the DUT output is held not-ready.

## Assertion checkers (`fl_assert_checker`)

Each checker watches one FrameLink interface. It implements the FrameLink rules as
a small state machine (frame open, part open), which is the hardware form of a
temporal assertion.

| mask bit | name | violation |
|---|---|---|
| 0 | RESET | the checked ready signal active on the last reset cycle |
| 1 | SOF_SOP | `sof_n` without `sop_n` |
| 2 | EOF_EOP | `eof_n` without `eop_n` |
| 3 | DATA_AFTER_EOP | a word after the end of a part that does not start a new part |
| 4 | EOP_MATCH_SOP | a new part started before the previous one ended |
| 5 | EOF_MATCH_SOF | a new frame inside a frame, or a word outside any frame without `sof_n` |

Violations are collected over a frame and reported once, on the DUT cycle that
closes the frame. The report gives:

- the checker number (169 for the DUT input, 170 for the DUT output);
- the violation mask;
- the transaction number;
- the DUT cycle of the first violation.

The host can print messages such as "TX FrameLink assertion error: SOF_N without
SOP_N at checker 170, transaction 26". The RX checker checks `src_rdy_n` during
reset; the TX checker checks `dst_rdy_n`.

## Signal observers (`signal_observer`)

Each observer samples its bundle (`{word, src_rdy_n, dst_rdy_n}`, 73 bits) on
every DUT cycle. It sends a record on the first cycle after reset and on every
change. The host writes the records as VCD value changes at their DUT cycle. Since
only changes are sent, a quiet bus costs no bandwidth.

## The evaluation DUTs

**`hgen`: streaming Lookup2.** The key arrives as one FrameLink frame of any
length. The unit keeps:

- a 20-byte byte buffer;
- the three 32-bit state words `a`, `b`, `c`, which start as `0x9e3779b9`,
  `0x9e3779b9` and `INITVAL`.

On each cycle it does one of three things:

- If at least 12 bytes are buffered, it mixes them in as a full block.
- Otherwise, if the frame's last word has arrived, it adds the tail (with the
  total length in the low byte of `c`), runs the final mix, and moves to output.
- Otherwise it accepts the next input word. It only accepts a word while fewer
  than 12 bytes are buffered, so 8 more always fit.

The result is one word, with the hash in `data[31:0]` and `rem = 3`. After that
the unit takes the next frame. An 8-byte key gives its result 3 cycles after its
word was taken.

**`hgen_multi`: N units.** Frames are dealt to the units in round-robin order.
The input selector moves on after each frame's last word. Results are collected
in the same order, so output order equals input order and no tags are needed.
With `HGEN_UNITS = 16` up to 16 keys are hashed at once.

**`fl_fifo`.** A first-word-fall-through circular buffer of `DEPTH` FrameLink
words.

## Parameters

| parameter | default | where |
|---|---|---|
| `DUT_KIND` | `DUT_HGEN` | `haven_top` |
| `HGEN_UNITS` | 16 (largest evaluated system; 1, 2, 4 and 8 were also evaluated) | `haven_top` |
| `FIFO_DEPTH` | 16 words | `haven_top` (FIFO DUT) |
| `IN_DEPTH`, `OUT_DEPTH` | 64 words | `haven_core` buffers |
| `RX_CHECKER_ID`, `TX_CHECKER_ID` | 169, 170 | `haven_core` |
| `INITVAL` | 0 | `hgen` Lookup2 initial value |

The 64-bit data path, the checker number 170 for the DUT output, the assertion
names, the Lookup2 algorithm, the evaluated unit counts and the 1–36 byte
transactions come from the source design. The buffer depths, the packet encodings,
the channel split and the LFSR back-pressure details are choices made here.

## Departures from the source design

- The assertion checkers are written by hand as state machines. In the source
  design they come from SystemVerilog assertions translated automatically (via
  Büchi automata). Only FrameLink protocol checkers are provided.
- Random delays are only inserted between transactions (the header gap). Delays
  inside a frame, between words, are not modelled. The monitor's random
  back-pressure is the only random timing inside a frame.
- The host link is modelled as plain FrameLink streams: one input and five
  outputs. The acceleration card's DMA platform is not included. Merging the five
  channels onto one link is left to that platform.
- VCD files, assertion messages and scoreboard comparisons are host software and
  are not included. The testbenches take the host's role.
- The FIFO depth and all buffer depths are not given by the source design.
- Area: the source design reports Virtex-5 slice counts (for example 15,778 of
  24,320 slices for the 16-unit system). No comparable FPGA implementation was
  done here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fl_fifo` | order, full/empty behaviour, fall-through latency |
| `tb_hgen`, `tb_hgen_multi` | 300 random keys of 1–40 bytes under random gaps and back-pressure, against a C-style reference of Lookup2 in `tb_pkg`; latency |
| `tb_fl_driver` | gaps in DUT cycles, word forwarding, configuration, stall, counters |
| `tb_fl_monitor` | pushes and headers, LFSR back-pressure against a reference, reconfiguration, reset behaviour |
| `tb_fl_assert_checker` | directed cases for each rule, then 400 random frames with corrupted delimiters against a reference model |
| `tb_signal_observer` | record format; replaying the records reproduces the signal history |
| `tb_out_buffer` | the exact stall rule, order and fill level |
| `tb_dut_clock_ctrl` | `ce` rule, number of gated edges, no glitches, DUT cycle count |
| `tb_haven_core` | core with a FIFO DUT; 80 transactions with one protocol error; one report from each checker; observer replay |
| `tb_haven_top` | full default configuration (16 hash units). It runs the same 120 transactions and configuration twice, with a fast host and with a slow, back-pressuring host. It checks every hash, the assertion report for the one bad frame, identical observer records and DUT cycle counts between the runs. It counts that every mechanism occurred: input stall, output stall, DUT back-pressure, inter-transaction gap, configuration, block mix |
| `tb_workloads` (uses `tb_host_model`) | the six evaluated systems (FIFO, HGEN x1/x2/x4/x8/x16) side by side, each with 50,000 transactions of 1–36 bytes, every result checked. It prints DUT cycles per transaction; parallel units must be faster than one |

Measured with `tb_workloads` (DUT cycles per transaction, no host delays):

| FIFO | HGEN | x2 | x4 | x8 | x16 |
|---|---|---|---|---|---|
| 2.78 | 5.86 | 3.92 | 3.67 | 3.67 | 3.67 |

From four units on, the driver's one header word per transaction is the limit.
Larger runs (100,000 to 500,000 transactions) differ only in `NTRANS`.

For each block, a deliberately broken copy was made and shown to fail its
testbench.

## Simulating

With Verilator 5, for example the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/haven_pkg.sv tb/tb_pkg.sv rtl/fl_fifo.sv rtl/hgen.sv rtl/hgen_multi.sv \
  rtl/fl_driver.sv rtl/fl_monitor.sv rtl/fl_assert_checker.sv rtl/signal_observer.sv \
  rtl/out_buffer.sv rtl/dut_clock_ctrl.sv rtl/haven_core.sv rtl/haven_top.sv \
  tb/tb_haven_top.sv --top-module tb_haven_top -o sim
./obj_dir/sim
```

For the workload run, add `tb/tb_host_model.sv tb/tb_workloads.sv` and use
`--top-module tb_workloads`. Unit testbenches need `haven_pkg`, `tb_pkg`, their
module and its submodules. The testbenches are written for a two-state simulator:
everything that is read is reset or initialised. Testbench code that watches the
core samples it on the falling clock edge, and drives the core only with
nonblocking assignments. This avoids races with the gated clock.
