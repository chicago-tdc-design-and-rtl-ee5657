# Chicago TDC board: 96-channel time-to-digital converter with chained VME read-out

This is the RTL of a VME board that measures when pulses arrive on 96 LVDS drift-chamber
wires. Each wire is sampled every 1.2 ns. The samples wait in a pipeline until a Level-1
trigger (L1A) decides whether to keep them. A kept time window waits again in one of four
L2 buffers until a Level-2 trigger (L2A). It is then turned into hit counts and hit times,
which a VME master reads from several boards in one chained block transfer (CBLT).
In parallel, a fast "XFT" path reduces 18 wires to hit flags in six time windows. It sends
them out on the P3 connector every CDF clock, the 132 ns machine clock of the experiment.

The design follows the slides "Chicago TDC Design and Implementation" by Mircea Bogdan
(University of Chicago). Those slides give the block diagram, the sizes, the hit rule and
the bus protocol. Most encodings, the register map and all handshakes are this design's own
choices. They are listed under "Where this design departs or chooses" below.

## Board and chips

```
               +------------------ tdc_board ------------------+
 lvds_in[47:0] | tdc_chip #0 --+                               |
lvds_in[95:48] | tdc_chip #1 --+-- local bus -- vme_chip ------+-- VME (A32, CBLT, IACK chain)
               |    |   |                                      |
               |    |   +-- XFT flags (2 x 18 + strobe) --------+-- P3
               |    +------ calibration pulse (chip 0) --------+-- front panel
               +-----------------------------------------------+
```

A board holds two identical TDC chips of 48 wires each and one VME chip. Clocks come
from outside the RTL, as on the real board, where a PLL in each FPGA locks to a delayed
copy of the CDF clock:

| clock | period | used for |
|---|---|---|
| `clk_fast` | 1.2 ns | sampling the LVDS wires |
| `clk12` | 12 ns (11 per CDF period) | main data path, registers, VME chip |
| `clk22` | 22 ns (6 per CDF period) | XFT output, XFT DAQ |
| `cdf_clk` | 132 ns | latching L1A, L2A and B0 |

Each clock has its own synchronous, active-high reset. `cdf_sync` samples the CDF clock in
a local clock domain. On each rising edge it gives a one-clock tick, and pulses for
whichever of L1A, L2A and B0 were high at that edge.

## Main data path of a chip

1. **SERDES** (`serdes_rx`). Each wire is shifted in on `clk_fast`. Every 12 ns its ten
   newest samples become one 10-bit word: bit 9 is the oldest sample and bit 0 the
   newest. The 48 words form one 480-bit word per 12 ns.
2. **Source and mask** (`mux_mask`). This picks either the SERDES word or a row of the
   **test-data RAM** (`test_data_ram`, 512 x 480 bits, loaded over VME). The test-data
   RAM plays its rows in a loop whose length is the pipe size. A masked wire reads all
   zeros.
3. **Pipeline** (`pipe_ram`). This is a 512-word ring (6144 ns) with a read pointer
   `pipe_dly` words behind the write pointer. Its output is the data stream as it was
   `pipe_dly + 1` clocks ago. That is the data an L1A arriving now refers to.
4. **L2 buffers** (`l2_buffers`). There are four buffers of up to 64 words (768 ns).
   - An L1A claims the next buffer in circular order. The buffer then records
     `l2_len` consecutive pipeline words.
   - An L1A is accepted on every CDF clock while a buffer is free. An L1A that finds no
     free buffer is dropped and sets the overflow flag in STATUS.
   - An L2A serves the oldest filled buffer. Its words are copied, one per clock, into a
     64-word read-out RAM. The buffer counts as free from the clock the copy starts. A new
     fill starts writing at word 0 while the copy is already ahead of it, and both move one
     word per clock. So an L1A on the CDF clock after the L2A can already reuse the
     buffer.
   - At power-up, words 1, 5, 9 and 13 of every buffer hold the pattern `1111000000` on
     every wire, and all other words are zero. An L2A without an L1A therefore yields
     four hits on every wire, the largest possible event. This lets the whole read-out
     chain be tested without any input.
5. **Edge detector** (`edge_detector`). See the next section.
6. **Read-out buffers** (`readout_fifo`). These are two FIFOs that VME reads out. The
   hit-count FIFO is 16 words deep and the hit-data FIFO 256 words.

### Hit rule and result format

A hit is a run of **at least four 1 samples followed by at least four 0 samples** on one
wire. At most four hits per wire are recorded. The hit time is the index of the first 1
sample, counted in 1.2 ns units from the start of the L2 window (10 bits).

The detector works through the read-out RAM one 480-bit word per clock. For every wire it
carries a small state from word to word: the length of the current 1 run, the length of
the following 0 run, the run's start and the number of hits so far. Runs that cross a
word boundary are therefore found. The result is then written out:

- **Hit count**, 7 words per chip:
  - A header: `[31:28]` chip id, `[27:16]` event number, `[15:8]` zero, `[7:0]` number of
    hit-data words that follow.
  - Six words of 4-bit counts. Word k holds wires 8k..8k+7, with wire 8k+j in bits
    `[4j+3:4j]`.
- **Hit data**, up to 96 words per chip: 16 bits per hit, `{wire[5:0], time[9:0]}`. Two hits
  share a 32-bit word, the first in `[31:16]`. Hits are ordered by wire, then by time. An odd
  last hit is padded with `FFFF`.

The detector starts an event only when both FIFOs have room for a whole event (7 and 96
words). Otherwise it stalls, and the event waits in the read-out RAM. The read-out RAM is
released when the scan ends, so the next L2A copy can overlap the writing of results. The
results are ready about `2*l2_len + 110` clocks after an L2A: 2.1 µs for a 34-word window.
The board this design is based on took about 7.25 µs.

## XFT path

`xft_block` implements the "new style" XFT mode of the board.

- **Windows.** Six contiguous, non-overlapping time windows are defined in 12 ns units.
  `XFT_START` sets the first window's start within the CDF period (0..10). `XFT_WIDTH`
  sets each window's width (6 x 4 bits). Window k+1 begins where window k ends.
- **Flags.** A wire's flag for a window is set when four consecutive samples (4.8 ns) are
  high somewhere in the window. The previous word's last samples are included, so a run
  may span two words.
- **Wires.** The flags cover wires 0..17 of the chip (parameter `FIRST`).
- **Output.** The six 18-bit flag words of CDF period n are sent during period n+1, one
  word per 22 ns clock, on `p3_data`. `p3_strobe` marks word 0, which goes out on the
  first 22 ns clock after the *second* CDF edge counted from the start of the window
  period.

The same 18-bit stream also goes to:

- **XFT DAQ** (`xft_daq`). This is a copy of the main buffer system: a pipe, four L2
  buffers and a 64-word read-out buffer, all 18 bits wide and written on `clk22`. It
  takes the same L1A and L2A. Its pipe size and window length are separate registers.
  It is read by single VME cycles only, never by CBLT, and a write releases it.
- **XFT-OUT-RAM** (`xft_out_ram`). This is a 512-word test recorder of
  `{strobe, flags}`. It records every 22 ns while CTRL bit 1 is set, until it is full.

## VME chip and CBLT

`vme_chip` is a VME slave clocked by `clk12`. Open-collector lines are modelled as levels
with 1 = released. The data bus is split into `d_in`, `d_out` and `d_oe`.

**Single cycles** (AM `0x09`, A32/D32):

- The board answers when `A[31:27]` equals its slot number, taken from `ga_n`.
- `A[21] = 1` addresses the VME chip itself:
  - word 0 = `{cblt_en, last, first}`;
  - a write to word 1 requests reconfiguration of both TDC chips.
- `A[21] = 0` reaches TDC chip `A[20]` at local word address `A[17:2]`. The VME chip turns
  this into a one-clock request on the local bus (`tdc_pkg::lbus_req_t`). The chip
  acknowledges it one clock later.

**CBLT** (AM `0x0B`). This follows ANSI/VITA 23, with two transfers:

| CBLT address | `A[31:27]` | reads | words per board |
|---|---|---|---|
| `F0900000` | 30 | hit-count FIFOs | 14 |
| `F8800000` | 31 | hit-data FIFOs | up to 192 |

All boards with `cblt_en` set take part. A board owns the transfer when it is marked
`first`, or once its IACKIN* goes low. It answers each data strobe with the next word:
chip 0's FIFO first, then chip 1's. When both are empty, a board passes the transfer on
by driving IACKOUT* low, or ends it with BERR* if it is marked `last`. A board with
`cblt_en` clear passes IACKIN* straight to IACKOUT*, so any board can be left out of the
chain. DTACK* follows a data strobe after a few 12 ns clocks (strobe synchronisation plus the local-bus access).

## Registers of a TDC chip

These are local word addresses, reached at `A[17:2]`. All are defined in `rtl/tdc_pkg.sv`.

| addr | name | meaning | reset |
|---|---|---|---|
| 0x000 | CTRL | [0] test-data source, [1] XFT-OUT-RAM run, [2] local calibration pulse, [8] reconfigure (write), [9] clear overflow (write) | 0 |
| 0x001/2 | MASK_LO/HI | wire mask, 1 = masked | 0 |
| 0x003 | PIPE_DLY | pipe size in 12 ns words | 100 |
| 0x004 | L2_LEN | L2 window length, 1..64 words | 34 |
| 0x005 | XPIPE_DLY | XFT DAQ pipe size in 22 ns words | 50 |
| 0x006 | XL2_LEN | XFT DAQ window length | 34 |
| 0x007 | XFT_START | start of the first XFT window, 12 ns units | 0 |
| 0x008 | XFT_WIDTH | six 4-bit window widths | 2 each |
| 0x009 | CAL_DLY | calibration pulse delay after B0, 12 ns units | 0 |
| 0x00A | STATUS | [0] hit-count empty, [1] hit-data empty, [2] XFT DAQ ready, [3] L1A dropped, [25:16] XFT-OUT-RAM words | |
| 0x010 | HITCOUNT | read pops the hit-count FIFO | |
| 0x011 | HITDATA | read pops the hit-data FIFO | |
| 0x100.. | XDAQ | XFT DAQ read-out buffer (64 words); a write releases it | |
| 0x200.. | XRAM | XFT-OUT-RAM (512 words) | |
| 0x2000.. | TRAM | test-data RAM, write only, address `row*16 + slice`. Slice s holds bits `32s+31..32s` of the row | |

**Calibration pulse** (`calib_pulse`, chip 0 only). After each B0, a one-clock (12 ns)
local pulse follows `CAL_DLY` clocks later. CTRL bit 2 selects this local pulse or the
backplane pulse `cal_bp` for `cal_out`.

## Where this design departs or chooses

- **Buffer release.** An L2 buffer is free again on the CDF clock after its L2A only if
  the read-out RAM is free at that time. If the edge detector is still scanning the
  previous event, the copy waits, and so does the release.
- **Result latency.** Results are ready sooner than in the original board (see above). The
  original's 7.25 µs minimum L2A interval is therefore not a limit here. Back-to-back
  L2As queue up: the four L2 buffers and the stall on FIFO room keep everything in order.
- **First board.** The original states that no board needs to be designated first, yet
  its VME interface has `first`, `last` and `cblt_en` signals. Here they are bits of a
  board register, and exactly one board must be marked first.
- **XFT.** Only the new-style windows are built. The old-style mode reproduces a
  PROMPT/NOTSURE/LATE truth table of an earlier board that is not available. Which 18 of
  the 48 wires feed the XFT is a parameter here.
- **Own choices.** These are all this design's own:
  - the register map and local bus;
  - the header, hit-count and hit-data formats;
  - the power-up pattern;
  - the FIFO depths and the XFT-OUT-RAM size;
  - how a dropped L1A is handled.
- **Outside the RTL.** These parts are not modelled:
  - the PLLs, the CDF clock delay lines, the LVDS receivers and the bus buffers;
  - the power supplies, the configuration devices and JTAG;
  - reconfiguration of the VME chip through SYSRESET*.
  Their signals appear as ports where they touch the logic.

## Files

- `rtl/tdc_pkg.sv`: sizes, local-bus structs and the register map.
- `rtl/tdc_board.sv`: top: two chips and the VME chip.
- `rtl/tdc_chip.sv`: one TDC FPGA.
- The chip's parts: `serdes_rx`, `test_data_ram`, `mux_mask`, `pipe_ram`, `l2_buffers`,
  `edge_detector`, `readout_fifo`, `xft_block`, `xft_daq`, `xft_out_ram`, `cdf_sync`,
  `calib_pulse` and `chip_regs`.
- `rtl/vme_chip.sv`: VME slave with CBLT.
- `tb/tb_<block>.sv`: a self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.

Every parameter defaults to the original board's size: 512-word pipe, four 64-word L2
buffers, 48 wires per chip. Synthesised, the board holds about 1.4 Mbit of memory, most of
it the pipelines, test-data RAMs and L2 buffers of the two chips.

## Simulating

The testbenches need Verilator 5 with timing support. For example, the board test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tdc_pkg.sv tb/tb_tdc_board.sv --top-module tb_tdc_board
./obj_dir/Vtb_tdc_board +verilator+rand+reset+2
```

Any other block works the same way with its own testbench. `+verilator+rand+reset+2` starts
every variable at a random value, so the tests also show that everything that is read is
reset.

`tb_tdc_board` runs three boards in slots 7, 8 and 9 of a modelled crate, with all
parameters at their defaults. It takes about 20 s. It goes through these steps:

1. Read the power-up L2 content of all boards by CBLT: 42 hit-count and 576 hit-data
   words, with BERR at the end.
2. Send pulses on all 288 wires, with one wire masked, and check hit counts and relative
   times. Check that the first result word is ready within 7.25 µs of the L2A.
3. Play a pattern from the test-data RAM.
4. Send five L1As in a row: the fifth is dropped. Send four L2As: the detector stalls
   until the CBLT drains the FIFOs.
5. Read back the XFT DAQ and the XFT-OUT-RAM.
6. Produce the local calibration pulse after B0.
7. Request a reconfiguration.
8. Run a pulse test: 12 wires carry a pulse that repeats every 396 ns at a random phase to
   the CDF clock.
9. Load the boards unevenly, with 104, 8 and 20 hits, so that one hit-data CBLT returns
   52 + 4 + 10 = 66 words.

The testbench counts how often each of these mechanisms occurred, and fails if any of them
never did.
