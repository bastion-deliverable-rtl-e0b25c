# Aging-fault detection instruments on an IEEE 1687 network

Transistor aging slowly eats into timing slack and analog margins. It does not break a chip at
once. The idea here is to put small monitors next to the logic and let the test-access network
that already exists (IEEE 1149.1 TAP plus IEEE 1687 "IJTAG" segment insertion bits) also carry
their results. The central piece is a *self-reconfiguring* IJTAG network. A monitor that sees a
fault opens its own path through a tree of modified SIBs, with no scan needed. The Fault
Manager that polls the network then reaches the faulty monitor in a single scan, instead of
opening one hierarchy level per scan.

Around that network sit four more structures that use the same access method:

- a BIST engine for several ADCs behind an optimized network;
- a timing-slack monitor on a small target circuit;
- an F/C/X status-flag network that turns instrument faults into interrupts, clock blocking
  and an Update-delay calibration;
- a trigger logic block that starts instruments on events.

This RTL follows the BASTION project deliverable on embedded instruments for aging-fault
detection with IEEE 1687. Where it departs from that description, the sections below say so.

All RTL is SystemVerilog-2017 and synthesizable. The only exception is the clock delay line,
which is a behavioural model.

## The self-reconfiguring fault-monitor network (`srn_system`)

### Structure (`srn_network`)

The scan path runs from TDI to TDO through three elements:

1. `SIB_ins`: a regular SIB. Its segment holds the ordinary test and debug instruments. That
   segment is outside this RTL and comes out on the `ins_*` ports.
2. `SIB0`: a regular SIB that only the Fault Manager opens.
3. `ErrorFlag`: a one-bit register.

Behind SIB0 is a balanced K-ary tree of modified SIBs (`msib`), H levels deep. Each of the
N = K^H leaves has a monitor's EMR in its segment. The EMR is a 3-bit register: a 2-bit error
code plus a mask bit. Siblings are chained in index order. As a result, on TDO the last
sibling's bit comes first, and a SIB's own bit comes out just ahead of its segment.

The defaults are K = 3 and H = 7, which gives 2187 monitors. This is the largest network of the
original evaluation and the one that was taken to layout there.

### The modified SIB

A modified SIB is a normal SIB with two extra wires:

- `open` comes either from the monitor's fault flag or from the OR of the `toopen` outputs of
  its children.
- The request is gated with the SIB's *inverted select*. The gated request sets the U flip-flop
  asynchronously and is also passed upward on `toopen`.

So a fault opens every SIB between the monitor and SIB0 at once, without a TCK edge. A SIB that
is already on the active scan path never changes under the scanner. ErrorFlag captures the OR
of the first-level requests, so one bit tells whether anything is pending.

Static timing tools report a loop for this structure. The path is U → select of the children →
their gated request → this SIB's set. The loop cannot oscillate: the set only ever drives U to
1, and U holds that value. This is explained in the `msib` header.

### Fault Manager (`fault_manager`)

The Fault Manager is a hardware tester that drives TMS/TDI and reads TDO of its own TAP. It
works in three phases:

1. **Initialisation.** It opens the tree one level per scan: the scan lengths are
   `3 + (K^(j+1)-K)/(K-1)` for j = 0..H. It then does one full scan of `3 + T + 3N` bits that
   writes every mask bit to 0. T is the number of tree SIBs.
2. **Polling.** Each poll is a 3-bit scan through SIB_ins, SIB0 and ErrorFlag, so one loop
   takes 7 TCK. If ErrorFlag reads 1, the same scan writes 1 into SIB0.
3. **Localization.** The next scan follows the path the monitors opened. A parser walks the
   bits in pre-order, last sibling first:
   - a closed SIB is a single bit;
   - an open leaf is followed by its EMR;
   - the scan ends after the SIB_ins bit.

   Each open EMR gives one `loc_valid` report with its monitor index and code. Shifting an
   EMR pulses its `clear` line, which acknowledges the monitor. The update at the end of the
   scan closes everything again.

For one fault the localization scan is `3 + K*H + 3` bits: 27 bits at the default size.
Several faults in one round cost K more bits for each extra open inner SIB, plus 3 bits for
each extra EMR. The original description also counts `1 + k*h` SIBs on the path. It adds its
own fixed overhead, so its absolute times differ from these bit counts by a few cycles.

The original text describes the poll as six TCK with two shifts (SIB0 and ErrorFlag). Its
timing diagrams show three shifted bits and a 7-TCK loop, because SIB_ins is also on the path.
This RTL follows the diagrams.

### Monitors (`fault_monitor`, `emr`)

A monitor keeps a sticky flag and the code of its first fault until it is acknowledged. The
mask resets to 1 and faults are ignored while masked. Monitors run on `clk`, which must not be
slower than TCK, because the acknowledge pulse lasts one TCK per shifted bit.

## ADC BIST network (`adc_bist_system`, `adc_bist`)

Each ADC has a digital BIST engine (`adc_bist`). The engine applies a 14-bit capacitance
configuration (`capData`) and starts charging. It then counts system clocks until the
comparator fires. `status` is 1 when that count equals the 16-bit `counterRef`, and `DataOut`
holds the count for debug. If the count saturates, the run fails.

Three engines sit behind one TAP in the optimized arrangement. Behind SIB_ins, each ADC has:

- a conf SIB with a 2-bit register: start/done and interrupt/status;
- a data SIB with a 30-bit register: capData and counterRef in, DataOut out.

A set-up scan with one ADC's SIBs open is 39 bits. A status read with the data SIB closed is 9
bits. Start crosses from TCK to the ADC clock as a toggle through a 3-flip-flop synchronizer.

The capacitor array and the comparator are analog and not part of the RTL. They connect
through `cap_cfg`, `charge` and `cmp`. The testbenches use a simple stand-in
(`tb/adc_cap_model.sv`) whose charge time depends on the configuration and on an aging
parameter.

## Timing-slack monitor (`slack_monitor`, `clk_delay_line`, `fa_target`)

The target is a one-bit full adder with registered outputs. Its combinational sum is sampled
by four flip-flops. Their clocks are ClockEnable and three copies delayed by 20 ps each, from
`clk_delay_line`, a behavioural model that needs delay cells in silicon. A healthy path is
stable across the window, so all four flip-flops agree. An aged path still moves inside the
window, so they disagree, and the pattern in `q` shows where the edge fell.

The flip-flops update one after another while the taps rise. Because of this, the mismatch is
registered on the falling edge of the last tap. `warning` then holds for one clock period.

## Status flags, clock blocking and calibration (`flag_system`)

Every supervised module owns an `fcx_cell` behind a SIB. The cell holds four bits:

- **F**: a fault was seen;
- **C**: no uncorrected fault. Its default is 1, and it drops for an uncorrected fault;
- **X**: mask;
- **CC**: enables clock blocking.

All F flags are ORed and all C flags are ANDed by plain gates, without clocks. The Instrument
Manager (`instrument_manager`) synchronizes both and raises `irq` when F = 1 and C = 0. With
CC set, the module's `clock_control` latch-based gate stops that module's clock while its own
F = 1 and C = 0. Writing 1 to the F bit by scan clears the fault.

Calibration measures how late the Update signal reaches an instrument. The steps are:

1. The CAL bit is set in one cell.
2. That cell forces F = 0 and C = 0. The manager, started by `cal_start`, waits for this F&C =
   00 state.
3. The manager raises its own Update front (`upd_cal`). The front goes through the same
   SIB-gated AND as the normal Update.
4. The cell returns the front on C. The manager counts system clocks until C rises.

`cal_count` is the round trip plus a constant 2-cycle synchronizer latency. Register layout,
from the first bit out: F (write 1 clears), X, CC, CAL, C (read only).

## Trigger logic (`trigger_logic`)

The trigger logic starts an instrument on the rising edge of `trig_src`. Start can be direct
or delayed by `start_delay` cycles. The trigger stops in one of four ways:

- when the source drops;
- `stop_delay` cycles after the source drops;
- only on `clear`;
- on `instr_done`.

After a run, the block re-arms in one of three ways: only on a new `arm`, at once, or after
`rearm_delay` cycles. The configuration is a `trig_cfg_t` input (see `trig_pkg`). The scan
register that holds it in a real network is left to the integrator.

## Top level (`bastion_top`)

The top places the five structures side by side, each with its own ports. TCK is shared by
all IJTAG networks; `clk` is the system clock. There is one piece of glue: the slack warning
drives the fault input of flag module 0. A timing-slack problem therefore shows up as an
interrupt, and with CC set as a stopped module clock. The parameter defaults are the sizes
above.

## Departures and own choices

- No instruction register: each network is the only data register of its TAP.
- Updates take effect on the rising TCK edge that leaves Update-DR.
- The poll loop is 7 TCK (see above).
- The EMR has 2 code bits and a mask bit.
- The slack comparator is written as "flip-flops disagree". It is registered after the
  window. The 20 ps stage delay is an assumed value.
- The flag network has one SIB level and four modules. The flag-register layout, F-clear by
  writing 1, and the CAL bit are own choices.
- Trigger configuration is a port; the delays are 16-bit.
- Network sizes that are not powers of K cannot be built as balanced trees and are not
  supported.

## Simulating

Each block has a self-checking testbench `tb/<module>_tb.sv`, which prints
`TB_RESULT checks=… failures=…`. Example with plain Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/ijtag_pkg.sv rtl/trig_pkg.sv rtl/*.sv \
    tb/adc_cap_model.sv tb/bastion_top_tb.sv --top-module bastion_top_tb -j 8
./obj_dir/Vbastion_top_tb
```

`bastion_top_tb` runs the full default size with no parameter overrides. It:

1. initialises the 2187-monitor network;
2. localizes one random fault in a 27-bit scan;
3. runs one ADC BIST;
4. provokes and clears a slack warning through the flag network;
5. fires the trigger logic.

It builds in about 1.5 minutes and runs in about 1 minute. The subsystem testbenches use
smaller trees (for example K = 3, H = 2) and cover the rest:

- multi-fault rounds;
- all 42 ADC runs with an aged ADC;
- every slack window position;
- every trigger mode;
- calibration round trips.

Testbenches in `tb/` use `tb/scan_drv.svh` (direct scan control) and `tb/jtag_drv.svh` (TAP
driver).
