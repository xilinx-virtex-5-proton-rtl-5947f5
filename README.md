# Virtex-5 proton test set-up: TMR shift-register DUT and high speed digital tester

This design is the logic used to measure how a Xilinx Virtex-5 FPGA behaves in a
proton beam. There are two halves.

* **The device under test (DUT) logic** runs inside the Virtex-5. It holds long
  shift-register strings protected by triple modular redundancy (TMR). A
  radiation upset in the user flip-flops, or in the configuration memory that
  defines them, shows up as wrong data at the end of a string.
* **The high speed digital tester (HSDT)** is a second FPGA on the test board.
  It feeds the strings a known pattern and checks every bit that comes out,
  then reports each error to a host PC over RS232. It also configures the DUT
  and keeps re-writing ("scrubbing") its configuration memory through the
  8-bit SelectMap port, so that configuration upsets are repaired while the
  beam is on. On request it injects configuration errors on purpose.

The top module `v5_proton_test_top` wires one tester to one DUT. Everything
that is not logic designed here is brought out as top-level ports:

* the DUT's own configuration port (SelectMap pins, INIT_B, DONE, BUSY);
* the external SRAM chip that holds the configuration file;
* the RS232 link to the host PC;
* a byte port where a USB front end can load the configuration file;
* the status lines of the DUT's internal readback self-scrubber.

## The DUT: windowed shift registers under TMR

`v5_dut` contains six strings (`wsr_tmr_chain`) per TMR domain.

* Each string is 300 flip-flops long.
* Between two stages sit 0, 4 or 8 inverters. The inverters add routing and
  logic delay in silicon. Their number is even, so the data is not
  inverted. The six strings use 0, 4, 8, 0, 4, 8 inverters.
* Every DUT clock, all bits move one stage.
* A 2-bit counter divides the clock by four. Every fourth clock the last four
  bits of the string are copied into a 4-bit window register. The windows of
  the six strings form the 24-bit `SCAN_DATA` of each domain.
* `SHIFT_CLK` is bit 1 of the counter. It rises two DUT clocks after the
  window changes and tells the tester when to sample. Every bit that leaves
  the string appears in exactly one window. Bit 3 of a window is the oldest
  bit.

**How the TMR works.** There are three copies (domains) of every flip-flop.
The input of every stage in every domain is the 2-of-3 majority
(`tmr_voter`) of the three copies of the previous stage. A single upset
copy is therefore repaired one stage later and never reaches the output.
The counter and window registers feed back on themselves, so they vote
their own state. Each domain's inputs (`D_SR`), window outputs and
`SHIFT_CLK` are separate pins.

**Two builds, selected by the parameter `GLOBAL_TMR`:**

* `GLOBAL_TMR = 1` (the default; GTMR, also called XTMR). Clocks and resets
  are also triplicated: domain *d* runs on `CLK_SR_A[d]` and `CLR[d]`. This
  build is used for the functional-interrupt tests.
* `GLOBAL_TMR = 0` (DTMR). All three domains share the clock and reset of
  domain 0. This build is used for the clock-sensitivity tests. In it, the
  clock inputs of domains 1 and 2 are unused.

**Reset.** Every reset passes through `reset_sync` in its own clock
domain. The reset asserts asynchronously. It releases synchronously, two
clock edges after `CLR` goes high, through a two-flop metastability
filter.

**Fill latency.** A bit put on `D_SR` at clock edge *t* is in the last
flip-flop after 299 more edges. It appears in the window loaded at the
next multiple of four.

## The tester

`hsdt_tester` runs on one 150 MHz clock. Its blocks:

| block | role |
|---|---|
| `uart_rx`, `uart_tx` | RS232, 8N1, 115200 baud (`CLKS_PER_BIT = 1302`) |
| `cmd_decoder` | 4-byte command words to pulses and settings |
| `sram_ctrl` | byte-wide access to the 1M x 16 configuration SRAM |
| `dut_controls` | the three copies of `CLK_SR_A`, `CLR` and `D_SR` |
| `scan_capture` (x3) | `SHIFT_CLK` synchroniser and edge detect, `SCAN_DATA` input register |
| `data_checker` (x3) | compares windows with the pattern; ErrorCnt, Burst, timeout |
| `sync_fifo` | error FIFO, 256 reports |
| `report_tx` | sends each report as 4 bytes over RS232 |
| `selectmap_master` | configures and scrubs the DUT over 8-bit SelectMap at 30 MHz |

### Commands

Every command is four bytes: opcode, D0, D1, D2. A 20-bit address is
`{D0[3:0], D1, D2}`.

| opcode | command | effect |
|---|---|---|
| 01 | Reset DUT | stops the DUT clock; `CLR` and `D_SR` low; scrubbing, injection and readback off |
| 02 | Start Test | starts the DUT clock. `CLR` stays low for 4 DUT clocks. `D0[1:0]` picks the pattern: 0 zeros, 1 ones, 2 or 3 checkerboard |
| A0 | Clock Frequency | DUT clock = 150 MHz / D0. D0 must be even and at least 2; other values are ignored |
| 81 | Write Configuration Data | the next 977488 bytes on RS232 are the configuration file, stored from SRAM address 0 |
| 04 | Start Configuration | configures the DUT from SRAM |
| 06 | Start Scrub | starts scrub passes (the DUT must be configured) |
| 0E | Inject Error On | one injected bit error per scrub pass |
| 79 / 7A | injection range low / high | the default range is x00800 to x70000 |
| 7B | End of Configuration | the last file byte a scrub pass writes. It keeps the scrub out of the block-RAM area |
| 05 | Start Readback | raises `RUN_SCAN` to the DUT's self-scrubber |
| 89 / 8A | Control / Mask register | register = `{D2, D1, D0, byte 0}`. Byte 0 is fixed in the tester (parameters `CTL_BYTE0`, `MASK_BYTE0`) |

Set the clock frequency before Start Test: the divider and the pattern are
taken at Start Test. No command stops scrubbing; Reset DUT does.

### DUT clock, reset and data

* `CLK_SR_A` is high for D0/2 tester clocks and low for D0/2.
* `D_SR` changes only on the falling edge of `CLK_SR_A`, so it is stable
  around the rising edge where the DUT samples it.
* The checkerboard toggles every DUT clock.
* The three copies of each signal come from separate flip-flops.
* The fastest DUT clock is 75 MHz (D0 = 2).

### Checking the data

`SHIFT_CLK` is asynchronous to the tester clock. In `scan_capture` it goes
through two synchroniser flops and an edge-detect flop. `SCAN_DATA` is
registered at the pins every tester clock. On a rising `SHIFT_CLK` edge the
registered value becomes the captured window. The DUT changes its window two
DUT clocks away from `SHIFT_CLK`'s rise, which is at least four tester
clocks. The capture therefore always sees stable data.

`data_checker` arms 80 windows after `CLR` releases; a 300-bit string needs
75 windows to fill. Every window is then compared per string with the
expected value:

* 0000 for the zeros pattern;
* 1111 for the ones pattern;
* 0101 or 1010 for the checkerboard. The tester does not know the window's
  phase, so either is accepted.

For each window with an error:

* `error_cnt` counts it;
* `burst` holds the current run of consecutive bad windows (0 after a clean
  one). A short burst points to a transient upset; a growing one to a stuck
  failure.
* a 32-bit report goes to the error FIFO:

| bits | content |
|---|---|
| 31:30 | domain |
| 29:24 | per-string error flags |
| 23:0 | the window |

`report_tx` sends each report as four bytes, most significant first.

Other checker behaviour:

* If a report cannot enter the FIFO before the next one is due, the older
  report is replaced and `fifo_dropped` counts it.
* A domain that sends no window for 4096 tester clocks while running raises
  `timeout`.
* Reports of the three domains are merged, lowest domain first.

### Configuration and scrubbing (`selectmap_master`)

The configuration file is 977488 bytes. It reaches the SRAM in one of two
ways:

* over RS232, after command 81 (about 85 s at 115200 baud);
* through the `usb_cfg_*` byte port (valid/ready, with a byte address).

Byte *A* is stored in 16-bit word *A*>>1: the low byte when *A* is even,
the high byte when *A* is odd. `sram_ctrl` holds each access for 2 tester
clocks, then waits 1 idle clock. Writes take priority over reads.

CCLK is the tester clock divided by 5 (30 MHz). A byte is put on `D`, with
`CSI_B` and `RDWR_B` low, at the falling CCLK edge. The DUT takes it at the
next rising edge. If `BUSY` is high at that edge, the byte is held for one
more CCLK. Bytes pass through two registers: a prefetch register that the
SRAM read fills, and the next-byte register that the falling CCLK edge
puts on the bus. A new SRAM read starts in the cycle the prefetch register
empties. An SRAM read takes about 4 tester clocks, less than one CCLK, so
one byte moves per CCLK (30 MB/s).

**Configure.**

1. `PROG_B` is pulsed low for 64 clocks.
2. The master waits for `INIT_B` to go high.
3. It streams all 977488 bytes.
4. It keeps CCLK running until `DONE` rises (`config_done`). If `DONE` has
   not risen after 65536 clocks, it raises `cfg_error`.

**Scrub.** This needs a finished configuration and Start Scrub. `PROG_B` is
not touched. Passes repeat back to back. Each pass writes:

1. a 24-byte preamble: a dummy word, the sync word `AA995566`, a write of
   the MASK register (`3000C001`, value) and a write of CTL0 (`3000A001`,
   value);
2. file bytes 0 up to the end address.

A full pass takes (977488 + 24) / 30 MHz = 32.6 ms, or about 30 passes per
second. With an end address below the block-RAM area it is shorter.

**Injection.** With Inject Error On, each pass writes one byte of the
injection range with bit 0 inverted. The address moves by `INJ_STRIDE`
each pass and wraps inside the range. The following pass writes the correct
byte back, so each injected error lasts one pass. `injections` and
`scrub_passes` count both.

### Self-scrubber lines

The DUT can also scrub itself. Its readback CRC flags an error, and its
own logic writes the frames through the internal configuration port. The
tester drives and watches that circuit through six lines:

* `RUN_SCAN` follows Start Readback.
* `SCAN_MODE` follows Start Scrub.
* `ERROR_INJECT` follows Inject Error On.
* `SCAN_ACTIVE`, `SCAN_ERROR` and `SEU_DETECT` are synchronised. Their
  rising and falling edges are counted in `rise_cnt` / `fall_cnt`.
* While readback is on, a rising `SCAN_ERROR` means the DUT's readback CRC
  found an upset. The tester then takes over and writes one full scrub pass
  over SelectMap, even if Start Scrub was never given. A request that
  arrives while a pass is running is served by the next pass.

The DUT-side self-scrubber is not part of this RTL.

## Where this design chooses for itself

These points are not fixed by the test plan this design follows. They are
reasonable choices and easy to change:

* **Voter placement.** The TMR rule asks for voters after every flip-flop
  that has a feedback path. This design votes at every string stage as
  well, as the reference drawings of the mitigation show. In a pure shift
  string that has no feedback this only adds repair points.
* **Window rate.** A window is loaded every fourth DUT clock, in step with
  `SHIFT_CLK` at a quarter of the clock rate, so each bit is seen once.
* **Configuration upload.** The file arrives on the command line (RX232)
  after command 81. The board also has a separate serial input for
  configuration data; this design does not use it.
* **Scrub clock.** `CCLK_DIV = 6` gives the 25 MHz the scrubber must also
  support.
* **RS232.** 115200 baud, 8N1. This matches the 85 s quoted for loading
  the file over RS232.
* **Pattern select.** Start Test's `D0[1:0]` selects the pattern.
* **Report format.** The report layout and the dropping policy are this
  design's own.
* **Checker settings.** The arming delay (80 windows), the timeout (4096
  clocks) and the FIFO depth (256) are this design's own.
* **SRAM.** The byte packing and the access timing are this design's own.
* **Scrub preamble.** The packet words are standard Virtex-5 configuration
  packets: the sync word, and type-1 writes to MASK and CTL0. The plan
  only says the control and mask values are placed in those registers.
* **Injection.** The injection method (one bit-0 flip per pass) is this
  design's own.
* **`SEU_DETECT`.** It is treated as an input from the DUT, like the other
  status lines, because the operator display shows its edges.
* **DUT clock.** The DUT clock is 150 MHz divided by an even number, so
  75 MHz is the only setting in the 60–100 MHz operating range. 100 MHz
  cannot be produced.
* **DUT-side I/O.** Only `SHIFT_CLK` of string 0 is brought out per
  domain. All strings of a domain are in step.

**Not built:**

* the USB front-end controller: the `usb_cfg_*` port is where it connects;
* the operator GUI's echo and "alive" indications;
* the DUT's internal readback self-scrubber;
* a non-TMR DUT build.

## Files

`rtl/` (synthesizable; package `v5test_pkg` holds the shared constants,
opcodes and the command/report types):

* DUT: `v5_dut`, `wsr_tmr_chain`, `tmr_voter`, `reset_sync`
* tester: `hsdt_tester`, `uart_rx`, `uart_tx`, `cmd_decoder`,
  `dut_controls`, `scan_capture`, `data_checker`, `sync_fifo`, `report_tx`,
  `sram_ctrl`, `selectmap_master`
* top: `v5_proton_test_top`

`tb/`: one self-checking testbench `tb_<module>` per module, plus two
behavioural models:

* `sram_model`, the 1M x 16 SRAM;
* `selectmap_slave_model`, a SelectMap slave that records the bytes and
  drives INIT_B, DONE and random BUSY.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog.

* `tb_v5_proton_test_top` runs a GTMR and a DTMR set-up side by side. It
  uses 16 clocks per RS232 bit and a 128-byte file. It goes through:
  1. loading the file over RS232 and USB;
  2. configuring, with BUSY stalls;
  3. all three patterns and dividers 2, 4 and 6;
  4. forced data upsets, which must be reported over RS232 and match
     ErrorCnt and Burst;
  5. a stalled `SHIFT_CLK`, which must raise the timeout;
  6. scrub passes with injection and an end address, checked byte by byte;
  7. the readback lines, and one scrub pass started by `SCAN_ERROR`.

  It counts each of these mechanisms and fails if any never happened.
* `tb_v5_proton_test_top_full` uses every default. It:
  1. loads the full 977488-byte file;
  2. configures the DUT with all of it;
  3. checks a 75 MHz checkerboard run;
  4. checks one scrub pass up to x3FFFF.

  It also checks that both streams move exactly one byte per CCLK.

  It takes under a minute with Verilator.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/v5test_pkg.sv tb/tb_v5_proton_test_top.sv --top-module tb_v5_proton_test_top
./obj_dir/Vtb_v5_proton_test_top
```

Replace the testbench name to run any other one.
