# Variable time delay through a minicomputer data channel

An analog computer cannot easily delay a signal by a time that changes while
it runs, which is what a pipeline simulation needs when the flow speed varies.
This design solves that by using the core memory of an 18-bit minicomputer
(PDP-9 class) as a circular delay line:

* an ADC samples the signal at a **fixed rate**, and every sample is stored in
  core by a **READ** data-channel transfer;
* a voltage-controlled oscillator, driven by the analog computer, sets the rate
  at which words are taken back out of core by **WRITE** transfers and sent to a
  multiplying DAC (MDAC).

A sample stays in the buffer for (buffer length) x (VCO period), so changing
the VCO voltage changes the delay. The VCO runs at 150 to 9,200 pulses/s
(110 us to 6.7 ms). A 1,000-word buffer therefore gives about 0.11 s to 6.7 s
of delay.

The computer's program does no copying. Each transfer is a *data-channel
break*: the computer steals three or four memory cycles from the running
program. The word count and current address of each direction are kept in core
registers, and the computer increments them itself. The RTL here is the
interface card that sits between the analog computer's patch panel and the
computer's IO bus. It includes the front end that turns the two free-running
pulse streams into orderly, non-overlapping break requests.

The same hardware is also wired as a 40-word recirculating function store for
a hybrid solution of an integral equation. That wiring is included as well.

## How one transfer happens

All timing is referred to **IO SYNC**, a strobe the computer issues once per
microsecond. In the RTL, `clk` runs at `CLK_PER_US` = 2 clocks per
microsecond, so IO SYNC is a one-clock strobe every second clock. The
half-microsecond pulses of the original logic are one clock long.

1. **Device flag** (`device_flag`). A request pulse sets the flag.
2. **Request** (`w104_bus_mux`, the W104 card). The next IO SYNC sets REQ, which
   drives DCH RQ to the computer.
3. **Grant.** The computer answers with DCH GR, about 2 us later. The grant is
   only accepted while ENA IN is high, which is the priority chain to
   higher-priority devices. ENA OUT passes the chain on while this device is
   not requesting.
4. **Trailing edge of the grant.**
   * It produces CLR FLAG, which resets the device flag unless the
     `repetitive` patch is set.
   * It sets **ENA**, which puts the word-count register's address on the 14 IO
     ADDR lines (`addr_select`).
5. **ENB.** The next IO SYNC sets ENB. ENB has three roles:
   * It is SELECT, wired to the force-select input of the device selector
     (`w103_device_selector`), so the IOP pulses pass as IOT pulses without a
     device code.
   * It gates the RD RQ / WR RQ / INC MB levels (`rq_logic`).
   * It qualifies IO OVERFLOW (`transfer_control`).
6. **Inside the break the computer does the work:**
   * Cycle 1: it increments the word count.
   * Cycle 2: it increments the current address.
   * Data cycle, input (READ): IOP2 → IOT2 gates the 12-bit ADC word onto the
     bus (`strobing_gate`).
   * Data cycle, output (WRITE): IOP4 → IOT4 becomes DATA AVAILABLE.
7. **MDAC load.** DATA AVAILABLE is patched to the load input of MDAC0 or MDAC1
   (`mdac_sel`). `mdac_load` makes two pulses:
   * B loads the buffer register from the bus;
   * D, 1.5 us later, copies it into the device register that drives the
     converter.
8. ENA and ENB drop after four IO SYNC periods, the length of an output break.
   When a word count reaches zero, the computer's IO OVERFLOW pulse sets MEM
   OFLO. The program then reloads the word-count and current-address registers,
   which closes the circular buffer.

From the flag to the end of the break takes about 7 to 8 us. That figure
explains the next section.

## Keeping READ and WRITE apart

The sampling clock and the VCO are unrelated, so their pulses can fall close
together or coincide. The interface has a single request path and a single
mode flip-flop, so a second request must not arrive while the first break is
still running. Three stages take care of this.

**IO SYNC alignment and tie-break** (`sync_shaper`).
* The rising edge of each raw request sets a pending flip-flop.
* At the next IO SYNC the pending request becomes a one-clock shaped pulse: A
  for READ, B for WRITE.
* If both are pending, WRITE goes first and READ waits for the following IO
  SYNC.

**7 us separation** (`pulse_separator`, built from four `mmv` one-shots).
* Every shaped pulse opens a 7 us window on its own side.
* A pulse that arrives while the other side's window is open starts a second
  7 us one-shot and is released when that one-shot ends.
* Any other pulse passes at once.
* Result: a READ and a WRITE request never leave this stage less than 7 us
  apart.
* In clocks, a delayed pulse leaves `SEP_US*CLK_PER_US + 2` clocks after it
  arrived: 16 clocks, or 8 us.

**Mode flip-flop** (`mode_select`).
* A separated READ request sets the mode to READ; a WRITE request sets it to
  WRITE.
* The OR of the two requests, registered one clock later, is the pulse that
  sets the device flag.
* The mode drives the RD ENA / WR ENA levels.

### One address line selects the direction

The READ direction uses word count / current address at core **32 / 33
(octal)**. The WRITE direction uses **22 / 23**. The two word-count addresses
differ only in IO ADDR line 14, so the address is 22 octal wired on the patch
panel, with line 14 replaced by `ENA AND (mode == READ)`. This gives 32 during
a READ break and 22 during a WRITE break. `addr_select` does this when
`vtd_sel` is high.

* IO ADDR lines are numbered 4..17, with line 17 the least significant bit.
* The RTL packs them into `io_addr[13:0]` with index 0 = line 17, so line 14 is
  index 3.
* `dch_pkg` holds these constants, and `addr_select` checks at elaboration that
  the two addresses really differ only in that line.

## Setting up a delay

Each direction's registers hold a negative word count (the computer counts up
to zero) and a current address one below the first word it will use. For an
N-word buffer at address A:

| register | READ (32/33) | WRITE (22/23), delay of D samples |
|---|---|---|
| word count | -N | -D at start, then -N |
| current address | A-1 | A-1+N-D at start, then A-1 |

* At the start, the WRITE pointer trails the READ pointer by D words.
* While the VCO runs at the sampling rate, the output is the input delayed by D
  sampling periods.
* Changing the VCO rate changes how fast the write pointer advances. The delay
  then follows the VCO: a sample written at position k is read out when the
  write pointer, moving at the VCO rate, reaches k.
* After each overflow the program reloads the registers with -N and A-1.

## Integral-equation wiring

With `ie_mode` high, the READ and WRITE requests come from `ie_timing` instead
of the external pulse inputs. The analog computer repeats 1 ms runs:

* 800 us compute, then 200 us reset.
* A slower signal R' is high for 40 runs and low for 10.
* Bit 17 of the computer's control register enables everything.

`ie_timing` produces two clocks:

* **Output clock.** A flip-flop divides the 10 us "0.01R" clock by two, giving
  a 20 us period, and is allowed only during compute. This gives 40 WRITE
  requests per run, which replay the whole 40-word store through the MDAC.
* **Input clock.** It follows the S1 signal. Its rising edge, 970 us into the
  run, is one READ request that replaces one stored value with the new ADC
  sample.

Both word counts are -40, so the store recirculates. One value is corrected per
run, and the whole function is corrected every 40 runs.

The idle input clock is high. Moving the patch from the external pulses to
this clock therefore produces one READ request. Switch `ie_mode` before the
channels are initialised.

## Files

| module | role |
|---|---|
| `dch_pkg` | word widths, the 32/22 addresses, line-14 index, `mode_e` |
| `vtd_dch_top` | the whole interface and front end, both wirings |
| `sync_shaper` | IO SYNC alignment, WRITE-first tie-break |
| `pulse_separator`, `mmv` | 7 us READ/WRITE separation |
| `mode_select` | mode flip-flop, request pulse to the flag |
| `device_flag` | device flag, with or without CLR FLAG (`repetitive`) |
| `w104_bus_mux` | REQ / grant / CLR FLAG / ENA / ENB sequencer, enable chain |
| `rq_logic` | RD RQ, WR RQ, INC MB (and add-to-memory) gated by ENB |
| `addr_select` | IO ADDR drive with the line-14 direction switch |
| `w103_device_selector` | IOP to IOT gating by device code or force-select |
| `strobing_gate` | ADC word onto the IO bus during IOT2 |
| `mdac_load` | DATA AVAILABLE, B and D pulses, buffer and device registers |
| `transfer_control` | IO OFLO pass-through and MEM OFLO flag |
| `ie_timing` | request clocks for the integral-equation wiring |

The computer, the ADC, the MDAC converters, the VCO and the analog computer's
mode control are not part of the RTL. Their signals are ports of
`vtd_dch_top`.

In `tb/`, every module has a self-checking testbench `tb_<module>.sv`:

* `pdp9_dch_model.sv` is a behavioural model of the computer side: IO SYNC,
  grants, the break cycles, and core memory with automatic reload of the
  channel registers.
* `tb_vtd_delay_1000.sv` runs the main example at full size: a 1000-word
  buffer with sampling clock and VCO both at 110 us. Every output word must be
  the sample stored 1000 periods earlier. The measured delay is 110.0095 ms:
  1000 periods plus about 10 us of break latency.
* `tb_vtd_dch_top.sv` runs the complete design at its default parameters. It
  checks every word that reaches an MDAC against a reference model of the
  circular buffer. It covers a constant delay, coincident requests, a swept VCO
  rate, the second MDAC, 45 runs of the integral-equation wiring, memory
  increment and repetitive mode. It also counts each mechanism and fails if one
  never occurred.

## Timing and limits

* **Clock.** The whole design is synchronous to one clock. Nothing except the
  one-shot widths and the B-to-D spacing depends on `CLK_PER_US`, and those are
  computed from it: 7 us and 1.5 us.
* **Request to MDAC latency.** Measured from the WRITE request edge to the load
  of the MDAC device register: 12 to 20 us. About 8 us of that is the break
  itself; the rest is the B-to-D spacing plus the separation delay when a READ
  came just before.
* **Throughput.** One break at a time: REQ is not raised again until ENB drops.
  In repetitive mode that is roughly one word per 7 us. The VCO's fastest
  period is 110 us, so this leaves a wide margin.
* **Same-side pulse spacing.** The separator assumes that pulses on the same
  side are more than 7 us apart, which the sources guarantee.

## Design choices beyond the source description

These are the points where the behaviour was inferred rather than given, so
treat them as the least certain parts:

* **W104 card.** Its internal logic is not specified. It was built from the
  described sequence:
  * REQ drops when the grant is accepted;
  * no new REQ while a break is in progress;
  * ENA and ENB end together after four IO SYNC periods.
* **Grant edge.** CLR FLAG and ENA come from the grant's trailing edge, as
  described. Some timing sketches suggest the leading edge.
* **Tie order.** WRITE is served first when both requests are pending at the
  same IO SYNC. This follows the stated priority rule. One timing sketch of the
  simultaneous case shows READ going first.
* **Pulse sources.** The sampling clock drives READ and the VCO drives WRITE.
  One passage states it the other way round; the block diagram and the rest of
  the description agree with the choice made here.
* **Address 32.** Line 14 is ANDed with the READ state, so 32 is the READ
  address.
* **Bit positions.** The ADC word goes on IO bus bits 17..6 (most significant).
  The MDACs take the same bits.
* **Device code.** The device selector's code defaults to 23 octal
  (`DEV_CODE`). With force-select in use, it only matters for programmed IOT
  instructions.
* **MEM OFLO** is a latch cleared by the next CLR FLAG.
* **Integral-equation timing.** The gating in `ie_timing` is the simplest logic
  that gives the described pulse counts. The divider is held at zero outside
  compute so every run starts in phase.
* **Reset.** IO power clear is a synchronous, active-high reset of every
  flip-flop.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/dch_pkg.sv -y rtl +libext+.sv \
  tb/pdp9_dch_model.sv tb/tb_vtd_dch_top.sv \
  --top-module tb_vtd_dch_top -Mdir obj_top
./obj_top/Vtb_vtd_dch_top
```

* The package goes first on the command line. `-y rtl` lets Verilator find
  every other module by its file name.
* The full test simulates about 70 ms of design time in a few seconds of wall
  time, including the build. It ends with
  `TB_RESULT checks=<n> failures=<m>`.
* A block testbench builds the same way, with `tb/tb_<module>.sv` as the last
  file and `--top-module tb_<module>`.
* Every testbench has a watchdog and uses only `$urandom` for random stimulus.
