# Counter-array single-event-upset test system

This RTL measures how often heavy-ion strikes upset the user logic of an SRAM-based FPGA, and
how well triple modular redundancy (TMR) hides those upsets. It has two halves:

* **The DUT design**. This is the logic loaded into the FPGA under the beam: 200 free-running
  8-bit counters. Every counter value leaves the chip through one 8-bit port by way of a
  *snapshot shift register*. It comes in four builds: plain, block TMR, local TMR and
  distributed TMR.
* **The tester (LCDT, "low cost digital tester")**. It clocks and resets the DUT and checks
  every counter value that comes out. It reports each anomaly to a host PC over RS232 as a
  time-stamped record. It also keeps rewriting the DUT's configuration memory from a golden
  copy ("blind scrubbing"), and it can use that same path to inject configuration faults.

`ku_see_top` wires one tester to one DUT design, as they are wired on the test bench.

## The snapshot output scheme

The array holds 1600 counter bits. The FPGA cannot give each one a pin, and a 200-way
multiplexer would add deep logic to the structure being measured. So every counter has its own
8-bit *snapshot register*, and the 200 snapshot registers form a shift register. Only entry 0
is wired to the pins (`COUNTER`).

Time in the DUT runs in periods of 4·200 = 800 clocks:

| clock edge in the period | action |
|---|---|
| 0 | every snapshot register n loads counter n (all counters at once) |
| 4, 8, …, 796 | the bank shifts up one place: entry n−1 takes entry n |
| every edge | every counter increments by 1, mod 256 |

`COUNTER_SHIFT_CLK` runs at ¼ of the DUT clock. It rises on the edge where a new value
appears on `COUNTER`. So in each period the pins show counter 0, 1, …, 199, four clocks each.
Counter n resets to n, and the first snapshot is taken on the first edge after reset. The value
of counter n in snapshot k is therefore

    X(n,k) = (n + 800·k) mod 256

Within one snapshot, consecutive outputs go up by 1. From one snapshot to the next, each
counter goes up by 800 mod 256 = 32. An upset counter bit leaves a counter that stays
permanently offset from the pattern. An upset snapshot register spoils one value only.
(`counter_array_next` holds this next-state logic; `counter_array` adds the registers.)

## Mitigation variants

`dut_counter_array` picks the build with `SCHEME` (`ku_pkg::tmr_scheme_e`). All builds have
the same pins and the same timing.

| scheme | module | structure | an upset in one domain |
|---|---|---|---|
| none | `counter_array` | single copy | reaches the pins |
| BTMR | `counter_array_btmr` | three whole arrays; only the outputs are voted | is masked at the pins but stays in its copy; `domain_err` shows which copy is wrong |
| LTMR | `counter_array_ltmr` | only the flip-flops are tripled; one voter per bit feeds a single copy of the logic, whose result goes back into all three | is out-voted, then overwritten on the next edge |
| DTMR | `counter_array_dtmr` | everything is tripled (each domain has its own voter after the flip-flops and its own logic), with one clock; the three outputs are voted at the pins | is out-voted, and each domain's voter feedback rewrites it on the next edge |

For TMR, the whole state (counters, snapshot bank, cycle counter and shift-clock bit) is one
flat vector, so each voter covers the whole state. GTMR (a clock tree per domain) is not built.
Partitioning, which was also tested, is a placement constraint and changes nothing in the RTL.

**Synthesis caution.** A generic synthesis tool sees that the three LTMR/DTMR registers always
hold the same value, and merges them. Yosys, for example, reports the same flip-flop count as
the plain design. To get real redundancy, tell the tool to keep the copies, for example with
keep or preserve attributes, or use a TMR-aware flow.

## The tester

```
host RS232 -> uart_rx -> cmd_decoder -> controls, clock divider, scrubber commands
DUT pins   -> shift_clk_detect -> counter_checker ----------> records
                              \-> shift_clk_monitor (timeout) -> records
beam_on    -> beam_sync (status 6 on, 4 off) ----------------> records
records -> record_fifo -> msg_tx -> uart_tx -> host RS232
SRAM -> blind_scrubber -> DUT SelectMAP (32-bit)
```

### Capturing the DUT outputs

The DUT's outputs are treated as asynchronous to the tester's 100 MHz clock.
`shift_clk_detect` passes the shift clock through two synchronising flip-flops and a third
flip-flop for edge detection. It gives a one-cycle pulse 2–3 tester clocks after each rising
edge. The data pins go through the same two-flop delay inside `counter_checker`, so each pulse
finds the matching value.

### Checking and resynchronising

`counter_checker` keeps its own counter number, which steps 0…199 on each pulse, and one stored
value per counter. The expected value of counter n is:

* in the first snapshot after a counter reset: n;
* after that: its stored value + 32 (mod 256).

Whatever value arrives is stored, whether it matched or not. So after an upset the tester
follows the DUT's new value, and it keeps counting later upsets instead of flagging the same
counter for ever. Two consequences help the person reading the records:

* an upset counter bit gives **one** error record;
* an upset snapshot register gives **two**: the bad value, then the good value that follows it.

`shift_clk_monitor` emits a *timeout* status when no edge has arrived for more than two
expected periods. It emits *out of timeout* when edges come back. The expected period follows
the clock divider.

Missed shift clocks leave the tester's counter number behind the DUT. The later records then
name the wrong counters until the next counter reset (command 03 or 04).

### Records

A record is 23 bytes, `ku_pkg::err_record_t`. It is sent most significant byte first, after
header `00 FA F3 21`:

| bits | field |
|---|---|
| 183:131 | zero |
| 130:128 | status: 000 data error, 001 timeout, 011 out of timeout, 010 debug, 110 beam on, 100 beam off |
| 127:96 | time stamp: tester clocks since the last tester reset |
| 95:80 | error count since the last counter reset |
| 79:64 | counter number (the tester's copy) |
| 63:48, 47:32, 31:16, 15:0 | DUT output three, two and one shift periods ago, and now |

The last four outputs let the host classify an error. If the current value is off by one
from its neighbour only, it is an isolated error. A run of such values is a burst. Status
records carry only status, time stamp and error count.

### Host link

The link is 8N1 at 115200 baud; `CLKS_PER_BIT` = 868 at 100 MHz. Messages from the tester:

| header | follows | when |
|---|---|---|
| `00 FA F3 20` | nothing | alive, every `ALIVE_CYCLES` (1 s) while the link is idle |
| `00 FA F3 22` | the 4 command bytes | echo of every command received |
| `00 FA F3 21` | 23-byte record | per record |

Priority: echo, then record, then alive. Echoes wait in an 8-deep queue. Records wait in a
16-deep buffer, which drops and counts any record that arrives when it is full
(`records_dropped`).

Host commands have no header. Each is 4 bytes: command, D0, D1, D2. A partial command is
dropped after `GAP_CYCLES` of silence.

| cmd | action |
|---|---|
| 01 | tester soft reset: checker, time stamp, record buffer, run flag; also pulses the DUT reset |
| 03 | DUT (counter) reset pulse, 16 DUT clocks long |
| 02 | start testing: comparisons and records |
| 04 | DUT reset pulse, then start testing |
| A0 | DUT clock divider {D1,D0}: 0 passes the 100 MHz clock through, D > 0 gives 100 MHz / (2·D) |
| 99 | reset the scrubber |
| 06 / 26 | start / stop scrubbing |
| 79 / 7A | injection start / end address {D2,D1,D0}, in 16-bit words |
| 7E | D0 bit 0: flip every bit in the range (1) or one bit per injection (0) |
| 0E | inject |

The usual run sequence is 01, 99 (then load the scrub file), A0, 03, 02, 06.

### Blind scrubbing and fault injection

`blind_scrubber` reads the scrub file (golden configuration plus its command header and footer)
from the SRAM. It writes the words, in order, to the DUT's 32-bit SelectMAP port, one word every
4 clocks (25 MHz), looping from the last word back to word 0 until it is stopped.

Per word:

* clock 0: address out;
* clock 1: SRAM data (one-clock latency) onto D, with CCLK low;
* clocks 2–3: CCLK high.

CSI_B and RDWR_B are low while scrubbing. Nothing is read back. The golden data simply
overwrites whatever is there, so a word with any number of upset bits is repaired within one
pass.

An inject command (0E) applies to the **next full pass**:

* In flip-all mode, that pass writes every bit of the 16-bit words in [start, end] inverted.
* In single-bit mode, it flips one bit, at a pointer. The pointer starts at bit 0 of the start
  word and moves on one bit per injection. It wraps after the end word.

Even 16-bit word addresses are bits 31:16 of a SelectMAP word. The pass after the injection
writes golden data again. Scrub files that leave out SRL/LUT-RAM and block-RAM frames need no
extra logic: the file is simply shorter (`scrub_words`).

## Files

| file | contents |
|---|---|
| `rtl/ku_pkg.sv` | sizes, scheme enum, status codes, record struct, headers, command codes |
| `rtl/counter_array_next.sv`, `rtl/counter_array_init.svh` | next-state logic and reset state of the counter array |
| `rtl/counter_array*.sv`, `rtl/dut_counter_array.sv`, `rtl/tmr_vote.sv` | DUT design and its TMR builds |
| `rtl/shift_clk_detect.sv`, `shift_clk_monitor.sv`, `counter_checker.sv` | DUT output processing |
| `rtl/uart_rx.sv`, `uart_tx.sv`, `cmd_decoder.sv`, `msg_tx.sv`, `record_fifo.sv` | host link |
| `rtl/clock_divider.sv`, `beam_sync.sv`, `blind_scrubber.sv` | DUT clock, beam marker, scrubber |
| `rtl/lcdt.sv`, `rtl/ku_see_top.sv` | tester and complete system |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ku_see_top_full.sv` | the complete system at default sizes |
| `tb/host_model.sv`, `tb/sram_model.sv` | host PC and scrub-SRAM models |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ku_see_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/ku_pkg.sv tb/tb_ku_see_top.sv
    ./obj_dir/Vtb_ku_see_top

Two testbenches cover the whole system:

* **`tb_ku_see_top`** runs two systems, one plain and one DTMR. It uses 20 counters and a fast
  serial link, and sends both systems the same host commands. It plants a counter upset and
  checks that only the plain system reports it. It also stops the shift clock, pulses the beam
  signal, divides the DUT clock, and scrubs with injection. It counts each of these mechanisms
  and fails if one never happened.
* **`tb_ku_see_top_full`** runs the default sizes: 200 counters and 115200 baud. It runs one
  complete operation, from the commands to an error record decoded by the host model. It takes
  a few seconds.

The DUT testbenches plant upsets by writing into the state registers through hierarchical
references (`dut.q`, `dut.q[domain]`).

## How far to trust it

Taken from the test report:

* the array size, the snapshot scheme and its timing, and the reset values;
* the TMR structures;
* the expected-value rule;
* the capture circuit;
* the status codes, headers, command codes and record fields;
* the scrub rate and the looping;
* the meaning of the injection commands.

This design's own choices:

* record bit positions and the error-count width;
* baud rate, alive period and buffer depths;
* the timeout threshold;
* the DUT reset length and clock-divide rule;
* the command byte order;
* SRAM and SelectMAP timing;
* the injection pointer and half-word order;
* the effect of a soft reset;
* checking the first snapshot after reset against n.

Not included:

* the FPGA's configuration logic and readback;
* the USB path that loads the scrub file;
* the host software;
* the board's power and clocking;
* the "debug check" record (status 010 is defined but never sent).

Between snapshots the tester expects an increase of 800 mod 256. The report also mentions other
builds of the counter test: 120 counters every 480 clocks, and snapshots 1200 clocks apart.
This design follows its main description: 200 counters every 800 clocks.

The report's scrub rate is about 10 Hz. For a full XCKU040 bitstream, about 4.0 M words, one
pass at 25 MHz per word takes about 160 ms. So a 100 ms scrub cycle implies a shorter scrub file
or a faster interface. The RTL's default 4 M-word SRAM address range holds the full bitstream.
