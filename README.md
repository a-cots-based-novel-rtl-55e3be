# 3-D DRAM memory cube controller (SystemVerilog)

RTL for the logic tier of a radiation-tolerant memory cube: 14 commercial
DDR3 x16 dies stacked over one controller die, based on the design described in
"A COTS-Based Novel 3-D DRAM Memory Cube Architecture for Space Applications".
The cube looks like an ordinary x128 DDR3 memory to the host. Behind that
interface the controller adds SEC-DED protection across dies, spare-die
swapping, scrubbing, a BIST, die rebuild after a functional interrupt (SEFI),
and die power cycling.

## Organisation of the stack

* 14 dies. Logical lanes 0..7 carry data, lanes 8..12 carry check bits, and
  die 13 is a cold spare.
* Each 128-bit word is split into 16 code words of 13 bits, a Hsiao (13,8)
  SEC-DED code. Bit *i* of every die belongs to code word *i*. A die that
  fails completely therefore costs at most one bit per code word, and its
  data can be corrected on every read.
* The spare stays unpowered until a lane is retired. At that point the
  sparing block steers the lane onto die 13, and the rebuild engine powers
  it up, initialises it and rewrites the lane from the corrected data.

## Data and command paths

```
host DDR3 --> host_if --> cmd_mux --+--> EDAC encode --> sparing --> 14 x ddr_phy --> dies
                                    |                    bank_spiral (command path)
 maintenance engines --> mem_ctrl --+
dies --> ddr_phy --> sparing --> EDAC decode --> host_if (host) / engines
```

* **Normal mode.** The host owns the stack. Its commands pass through the
  MUX unchanged, and write data is encoded on the way in.
* **Maintenance mode.** The idle detector gives the stack to the controller
  whenever the host leaves room:
  * after a host REF or ZQ, the configured extra time beyond tRFC/tZQCS;
  * while the Idle pin is asserted;
  * on an SPI request;
  * during power-up.

  In maintenance mode, `mem_ctrl` runs refresh, scrub, BIST and rebuild
  traffic with an FR-FCFS scheduler, and can enter power-down. Before the
  host gets the stack back, it drains its queue and precharges all banks.
* **Bank spiraling.** Each die uses bank `(ba + die) mod 8`, so the banks in
  use are spread across the stack.

## Blocks (rtl/)

| File | Function |
|---|---|
| `m3_pkg.sv` | Widths, command encodings, Hsiao matrix, request/response types |
| `m3_top.sv` | Top level. Wires every block and holds the SPI register map |
| `hsiao_enc.sv`, `hsiao_dec.sv` | (13,8) SEC-DED encoder and decoder. The decoder has a 2-cycle pipeline |
| `edac.sv` | 16 interleaved code words per 128-bit word. Reports failing dies and keeps per-die error counters |
| `sparing.sv` | Maps 13 logical lanes to 14 physical dies; swaps one lane onto the spare |
| `bank_spiral.sv` | Per-die bank rotation |
| `cmd_mux.sv` | Host/controller MUX, with read-latency alignment |
| `idle_detector.sv` | Opens and closes maintenance windows |
| `host_if.sv` | Host DDR3 interface. Programmable x8..x128 width |
| `ddr_phy.sv` | Per-die PHY (logical). Sequences read and write data at CL and CWL |
| `mem_ctrl.sv` | Maintenance memory controller: bank state, FR-FCFS, page policy, refresh, power-down |
| `refresh_ctrl.sv` | Refresh timer. The rate doubles above the hot temperature |
| `maint_ctrl.sv` | Power-up, initialisation (MR2/MR3/MR1/MR0 + DLL reset, ZQCL), zeroization, conditioning, engine arbitration |
| `bist.sv` | Patterns: zeros, ones, checkerboard, address, March X (6n) |
| `scrubber.sv` | Background scrub with repeated write-back to find stuck bits |
| `diag_log.sv` | Error-location log with per-entry thresholds |
| `rebuild.sv` | Rebuilds one lane from the corrected data after a power cycle or swap |
| `die_manager.sv` | Detects data and current SEFIs, decides on the spare, sequences die power |
| `spi_port.sv` | SPI slave for configuration and status |

## Timing

Times are in controller clock cycles. The default clock is 300 MHz,
matching the FPGA baseline.

* **Host read latency.** Read data appears `CL + 7` cycles after the RD
  command. The host must be configured for this latency.
* **Host write data.** Write data comes with the WR command. The model uses
  one beat per column command rather than a DDR burst.
* **Power-up wait.** 210000 cycles (700 us).
* **Refresh.** tRFC is 105 cycles. The default refresh interval is tREFI,
  and it is halved when hot.
* **Decoder latency.** 2 cycles.
* **SEFI power cycle.** The die is off for 64 cycles, then held in reset for
  64 cycles, then re-initialised.

## SPI registers

A frame is 24 bits, MSB first: bit 23 is the write flag, bits 22:16 are the
register address, and bits 15:0 are the data. A read returns the addressed
register during the data bits of the same frame.

Configuration registers, addresses 0..15:

| Addr | Content |
|---|---|
| 0 | Control bits:<br>[0] scrub enable<br>[1] continuous scrub<br>[2] spiral enable<br>[4:3] page policy<br>[5] power-down enable<br>[6] software idle request<br>[9:7] host width |
| 1 | Command, written to act:<br>[0] BIST start<br>[1] conditioning request<br>[2] clear statistics<br>[5:3] BIST pattern |
| 2 | Refresh interval (0 = default) |
| 3 | Hot temperature |
| 4, 5 | Last word address used by BIST, scrub and rebuild |
| 6 | BIST per-die offset |
| 7 | Stuck threshold in [15:8], max write-back repeats in [3:0] |
| 8 | Log threshold in [15:8], SEFI error threshold in [7:0] |
| 9 | SEFI window |
| 10 | Current margin |
| 11 | Rebuild pacing |
| 12 | Conditioning period (units of 1024 cycles) |
| 13 | Conditioning die mask |
| 14 | Extra window after host REF/ZQ |
| 15 | Guard before the window closes |

Status register *r* is at SPI address 16 + *r*:

| r | Content |
|---|---|
| 0 | Flags. Mode [15:13], init done, maintenance selected, spare used, BIST pass, BIST busy, rebuild busy, scrub busy, power-down, close-page policy, lane attached, swap refused, boot |
| 1 | BIST failures |
| 2 | BIST corrected errors |
| 3 | Scrub corrected errors |
| 4 | Scrub uncorrectable errors |
| 5 | Stuck count / log overflow |
| 6 | Scrub passes |
| 7 | Log used / last entry / last die |
| 8 | SEFI current / data counts |
| 9 | Attached lane / power cycles |
| 10 | Fixes / swapped lane |
| 11 | Controller page hits |
| 12 | Controller page misses |
| 13..25 | Per-die error counters |
| 26 | Rebuilt words |
| 27 | Rebuild uncorrectable count |
| 28 | Conditioning count |
| 29 | Precharge-all count |
| 30 | Temperature |
| 31 | BIST operations |

## What follows the source design, and what is this implementation's choice

**Follows the source design:**

* 8 data + 5 ECC + 1 spare dies, with bit-interleaved SEC-DED across the dies.
* The MUX between host and controller, driven by an idle detector that uses
  refresh and ZQ slack, the Idle pin or SPI.
* Bank spiraling and the two-level FR-FCFS scheduler with open/close page
  switching.
* Scrubbing, and BIST zeroization at power-up.
* March X (6n) and the simpler patterns.
* Rebuild of a lane from ECC.
* Power cycling of a SEFI-affected die.
* Spare-die swap driven by the error log.
* Conditioning: mode-register rewrite, DLL reset and ZQ calibration.
* SPI housekeeping.

**This implementation's choices:**

* One data beat per column command instead of DDR bursts.
* The latencies listed above and all register layouts.
* SEFI detection by error count per window and by current above the mean
  plus a margin.
* "A second SEFI on the same lane retires it to the spare".
* The spare kept unpowered until used.
* Stuck-bit detection by repeated write-back.
* The engine priorities: rebuild, then scrub, then BIST.

**Differences from the source design's numbers:**

* Peak bandwidth. The source design quotes about 30 GB/s, which is DDR3-1866
  with a x128 bus. This RTL moves at most one 128-bit word per controller
  cycle, about 4.8 GB/s at 300 MHz. DDR bursts and the high-speed I/O layer
  would have to be added for full bandwidth.
* Capacity matches: 2^29 words of 128 bits is 8 GB.
* Full-array operations at 300 MHz with the stack owned by the controller:
  * address BIST: about 3.8 s;
  * March X: about 10.7 s;
  * rebuild: about 3.6 s.

  This is in line with the quoted "under 4 s" and "under 5 s". Using only
  refresh windows makes them slower.

**Not implemented as RTL.** These are physical or purchased parts:

* the DDR3 dies themselves (tb/ holds a behavioural model for simulation);
* the stack, TSVs and package;
* the power network, current sensors and power switches;
* the DDR I/O electrical layer and FPGA primitives;
* the serial RapidIO host option;
* the STT-MRAM die variant (refresh disable, anti-scribble, scrambling
  before power-down). Refresh can be slowed through register 2, and
  CL/CWL and the MR values are parameters, but the MRAM-specific steps are
  not there;
* the test board.

## Testbenches (tb/)

* There is one self-checking testbench per block, `tb_<block>.sv`. Each ends
  with a `TB_RESULT checks=N failures=M` line and has a watchdog.
* Shared models:
  * `ddr3_die_model.sv`: a DDR3 die with fault injection for stuck bits,
    SEUs and dead dies;
  * `tb_word_mem.sv`: a word-level memory used by the engine testbenches.
* `tb_m3_top.sv` runs the full-size top with no parameter overrides. It
  covers:
  * boot, initialisation and zeroization;
  * host traffic with latency checks;
  * refresh windows;
  * SEU scrub, and a stuck bit leading to a spare swap and rebuild;
  * a dead-die SEFI with power cycle and rebuild;
  * a current SEFI and conditioning;
  * March X.

  Each mechanism is counted, and one that never happens counts as a failure.

  It runs in a few seconds.

To simulate a testbench, for example the top:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/m3_pkg.sv tb/tb_m3_top.sv --top-module tb_m3_top
./obj_dir/Vtb_m3_top
```

The top testbench limits the BIST, scrub and rebuild sweeps to the first
2048 words through the last-address registers. The RTL itself is full size.
