# Gate-level fault emulation platform with a saboteur scan chain

Simulating a processor netlist once per possible fault is far too slow to
cover every gate input: minutes per run, tens of thousands of runs. This
design moves the job onto an FPGA. Every gate input of the device under test
(DUT) is routed through a small *saboteur* cell. All saboteurs are chained
into one shift register, and a control state machine pushes a single `1`
through that chain, so that exactly one gate input is faulted at a time. For
each fault the DUT is reset, allowed to run its program for a fixed time, and
then a reporting module prints over the serial line what the DUT did: which
fault was active, how many external memory accesses it made and the last 50
addresses it touched. An external logger compares these reports (and the
DUT's own serial output) with the fault-free run.

The intended target is a 32-bit processor integer unit with 15,384 gate
inputs, clocked at 50 MHz, running an encryption self-test for 70 ms per
fault. One sweep of all four fault types is then 4 x 15,385 tests of about
76 ms each, roughly 78 minutes.

The DUT itself (the processor netlist and the system around it) is not part
of this RTL. The top level brings out the saboteur inputs and outputs, the
DUT reset, a memory-access strobe with its address, and the DUT's serial
output, so a netlist with saboteurs inserted can be wired to it.

## The saboteur

`rtl/saboteur.sv` sits between a driving gate and one input of the gate it
drives. It has two flip-flops:

* the **scan flop** `so`, part of the chain, which says whether this site is
  faulted;
* the **delay flop** `di`, which samples the input on every clock.

With the scan flop at 0 the input passes through combinationally. With it at
1, the global two-bit fault type picks what the gate sees:

| `ft` | fault        | output            |
|------|--------------|-------------------|
| 0    | stuck-at-0   | 0                 |
| 1    | stuck-at-1   | 1                 |
| 2    | delayed      | input one clock ago |
| 3    | inverted     | inverted input    |

The delay fault is why every site costs two registers rather than one.

In this design the chain shifts on the system clock when `scan_en` is high,
rather than on a separate scan clock, so the whole platform is one clock
domain. The scan flop resets to 0 (no fault); the delay flop has no reset.

## The scan chain

`rtl/saboteur_chain.sv` instantiates `N_SITES` saboteurs (default 15,384).
Site 0 is the first flop after the scan input. After a flush of
`N_SITES` zeros, one scan step with `scan_in = 1` faults site 0; each further
step with `scan_in = 0` moves the fault one site along. `scan_out` is the
last flop of the chain.

## The test sequence (`rtl/fi_control.sv`)

```
START -> FLUSH --(N_SITES scan steps of 0)--> RESET --(RESET_CYCLES)--> RUN
RUN --(RUN_CYCLES)--> REPORT --(report_done)--> SCAN
SCAN --(N < N_SITES: advance fault, N+1)--> RESET
SCAN --(N = N_SITES)--> INC_TYPE
INC_TYPE --(type < 3: type+1)--> FLUSH
INC_TYPE --(type = 3)--> DONE
```

`N` (`fault_num`) names the fault under test. `N = 0` is the fault-free run
that follows every flush. `N = k` means site `k-1` is faulted. Each fault
type therefore runs `N_SITES + 1` tests. The first scan step after a flush
shifts in the `1`; later steps shift in `0`.

The DUT is held in reset in every state except RUN, so scanning and
reporting happen while it is stopped. Memory accesses are recorded only
during RUN. The history is cleared during RESET. `report_start` pulses in the
first REPORT clock, so the count includes the last RUN clock.

Defaults: `RUN_CYCLES` = 3,500,000 (70 ms at 50 MHz). `RESET_CYCLES` = 1000
(20 us) is this design's own choice.

## Recording and reporting

`rtl/addr_history.sv` counts the accesses made while recording is enabled
(32 bits, saturating). It also keeps the last `DEPTH` (50) addresses in a
circular buffer. Entries are read by index, with index 0 the oldest.

`rtl/fi_report.sv` formats the report. On `start` it first converts the fault
number and the access count to decimal (`rtl/bin2bcd.sv`, shift-and-add-3,
32 clocks), then sends:

```
--- FN00000000 FT0 ---
Addresses: 000021538
400056C8
...
4000081C
-----
```

Details of the format:

* The fault number has 8 decimal digits.
* The fault type has 1 digit.
* The access count has 9 decimal digits.
* Each address takes one line of 8 uppercase hex digits, oldest first.
* Every line ends in CR LF.

At most 50 address lines are printed. Fewer are printed if the DUT made
fewer accesses.

A full report is 553 characters, about 6 ms at 921600 baud. `done` pulses
once the last stop bit has left the transmitter.

`rtl/uart_tx.sv` is an 8N1 transmitter. The default divider of 54 clocks per
bit is 50 MHz / 921600 rounded down, about 0.5 % fast. Back-to-back bytes are
exactly 10 bit times apart.

`rtl/uart_mux.sv` shares the single serial line to the USB-serial bridge. It
hands the line to the reporting module while that module is active, and to
the DUT's UART otherwise. The grant changes only after the currently granted
line has been idle (high) for `IDLE_CLKS` clocks, so a switch can never cut a
character or fake a start bit. The output is registered.

## Top level (`rtl/fi_platform.sv`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock (50 MHz), synchronous active-high reset |
| `sab_in` | in | `N_SITES` | fault-free values of the DUT's gate inputs |
| `sab_out` | out | `N_SITES` | values delivered to those gate inputs |
| `dut_rst` | out | 1 | DUT reset, low only while running |
| `dut_mem_valid`, `dut_mem_addr` | in | 1, 32 | one external memory access per clock with valid high |
| `dut_uart_tx` | in | 1 | DUT serial output |
| `serial_tx` | out | 1 | to the USB-serial bridge |
| `fault_num`, `fault_type`, `state` | out | 32, 2, 3 | test under way |
| `report_active`, `grant_report`, `scan_out`, `done` | out | 1 | status |

Shared types are in `rtl/fi_pkg.sv`: the fault-type and state enums, the
clock and baud constants, and the default site count, run time and history
depth.

Parameters of the top, with their defaults:

* `N_SITES` = 15384
* `RESET_CYCLES` = 1000
* `RUN_CYCLES` = 3500000
* `CLKS_PER_BIT` = 54
* `DEPTH` = 50
* `MUX_IDLE` = 16

To target a larger core, set `N_SITES` to its number of gate inputs. The
fault number and access counter are 32 bits wide, so no other change is
needed. The chain costs two flip-flops per site, so 15,384 sites need about
31,000 flip-flops.

## Where this design makes its own choices

The following are not fixed by the platform's description. They were chosen
here:

* **Scan clock.** The chain shifts on the system clock with a scan enable,
  instead of on a separate scan clock.
* **Fault-free run.** Fault number 0 is the fault-free run of each type. The
  chain is flushed with zeros before each type.
* **Reset and recording windows.** The reset time is 1000 clocks. Memory
  accesses are recorded only during RUN.
* **Report format.** Addresses are printed as 8 hex digits. Lines end in
  CR LF. Addresses come oldest first.
* **Address history.** The history is a circular buffer, not a shifting FIFO.
* **Serial multiplexer.** The grant waits for the line to be idle.
* **Report duration.** A report takes about 6 ms, slightly under the
  7 ms the original platform needed.

The platform does not classify outcomes; that is left to the host that logs
the serial output.

## Testbenches (`tb/`)

Each RTL module has a self-checking testbench, `tb_<module>.sv`; the
decimal converter `bin2bcd` is checked through `tb_fi_report`. Each ends
with a line `TB_RESULT checks=N failures=M` and has a watchdog.

`tb/tb_fi_platform.sv` runs the whole platform at a reduced size: 12 sites,
a 400-clock run and 8 clocks per bit. The DUT is `tb/toy_dut.sv`, a
behavioural stand-in whose program counter's next-value bits pass through the
first 8 sites. The bench decodes every report from the serial line and
compares it with a reference model of the faulted DUT. That is 52 reports
over all four fault types. It also checks that these events each happen at
least once:

* a chain flush
* a scan step
* a full and a partial address history
* a fault that changes the outcome
* the serial grant going both ways
* DUT characters passing through the multiplexer

Finally, it checks that the platform reaches DONE.

The platform with every parameter at its default (15,384 sites, 70 ms run,
921600 baud) builds and runs under Verilator. Each clock costs about 0.6 ms
of simulation time with a 15,384-site chain, so one complete test (about 3.9
million clocks) takes roughly 40 minutes. That run was not carried to its
end. The largest sizes checked to completion are the 12-site end-to-end
bench above and the 37-site chain bench.

`tb/uart_sink.sv` is a serial receiver used by the testbenches.

To simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/fi_pkg.sv tb/tb_fi_platform.sv --top-module tb_fi_platform
./obj_dir/Vtb_fi_platform
```

To simulate a full-size test, remove the parameter overrides on the
`fi_platform` instance in `tb_fi_platform.sv` and set the bench's local
constants to match. Then allow for the run time given above.
