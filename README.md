# Traffic light controller and SRAM memory tester

Two small, unrelated FPGA designs from an introductory digital systems lab:

1. A **traffic light controller** for a crossing of a main street and a side
   street. It has a pedestrian walk lamp, a car sensor on the side street, and
   three interval times that can be reprogrammed while it runs.
2. A **memory tester**. It checks that 16 words of 4 bits in an external 6264
   static RAM, and the wires to it, can each hold a 0 and a 1. It runs slowly
   enough (one operation per second) for a person to follow it on a display.

The top level, `lab2_top`, places the two side by side. Each has its own
clock, reset and pins (`tl_*` and `mt_*`), and they share nothing.

## Part 1: the traffic light controller

### The cycle

With nothing unusual going on, the lights repeat this cycle:

| State       | Main  | Side  | Walk | Lasts                          |
|-------------|-------|-------|------|--------------------------------|
| `MAIN_GRN1` | green | red   | off  | t_BASE                         |
| `MAIN_GRN2` | green | red   | off  | t_BASE                         |
| `MAIN_YEL`  | yellow| red   | off  | t_YEL                          |
| `SIDE_GRN`  | red   | green | off  | t_BASE                         |
| `SIDE_YEL`  | red   | yellow| off  | t_YEL                          |

Two things can change the cycle:

* **Side street car.** The sensor is looked at in the clock cycle where the
  first t_BASE of main green runs out. If it is high, main green lasts only
  t_EXT more (`MAIN_EXT`) instead of a second t_BASE. The sensor is also looked
  at where side green runs out. If it is high then, side green gets t_EXT more
  (`SIDE_EXT`).
* **Walk request.** A press of any walk button sets the walk register. The
  FSM checks that register when main yellow ends. If it is set, all traffic
  lights go red and the walk lamp comes on for t_EXT (`WALK`). Side green
  follows. During `WALK` the FSM holds the register's clear input high. The
  clear wins over a press, so presses during the walk are lost.

Whenever one street shows green or yellow, the other shows red. An assertion
in `tl_fsm` checks this.

| Interval | Parameter number | Value after reset |
|----------|------------------|-------------------|
| t_BASE   | `00`             | 6 s               |
| t_EXT    | `01`             | 3 s               |
| t_YEL    | `10`             | 2 s               |

### Block structure

```
reset, sensor, walk_request, reprogram
      │
  synchronizer (2 flip-flops per input)
      │ reset_sync (to every block), sensor_sync, wr_sync, prog_sync
      ├── walk_register ── wr ──────────────┐
      │        ▲ wr_reset                   ▼
      │        └────────────────────────  tl_fsm ──► lights[6:0]
      │                                   │ interval  │ start_timer  ▲ expired
time_param_sel, time_value ──► time_parameters ──value──► timer ────┘
                                                          ▲ tick (1 Hz)
                                               divider ───┘
```

* `synchronizer`: the four inputs that come from buttons or the sensor pass
  through two flip-flops each. The parameter switches go straight to
  `time_parameters`, because they are only read while Reprogram is pressed.
  The reset is also synchronized. Every block then uses it as a synchronous
  reset.
* `time_parameters`: three 4-bit registers. The FSM supplies the read
  address (`interval`). While `prog_sync` is high, the register chosen by
  `time_param_sel` takes `time_value`. Address `11` reads as 0.
* `divider`: counts `CLK_HZ` clocks and gives a one-clock `tick` once per
  second. It runs freely; the FSM never restarts it.
* `timer`: `start_timer` loads the selected value. Each tick counts it down,
  and `expired` is high while the count is zero.
* `tl_fsm`: a Moore machine with eight states. The lamps are decoded from the
  state alone.

### How long a state really lasts

Each state gives a one-clock `start_timer` pulse in its first cycle, so the
timer loads the value for that state's interval. `expired` is held low during
that pulse, so the stale zero left by the previous interval cannot end the new
state at once.

The divider is never restarted, so a count of N ticks lasts between N−1 and N
seconds, depending on where in the second the state began. After reset the
divider and the FSM start together. From then on, every state ends a clock or
two after a tick and the next one starts just after it. So in steady running
each state lasts N seconds, within about three clocks. The testbenches check
that bound. The exception is a state that starts at an arbitrary moment, such
as after a reprogram. Its first interval can be up to one second short.

A time value of 0 expires on the clock after the load.

### Reprogramming

To change a time, set `time_param_sel` and `time_value` and press
`reprogram`. The value is written on every clock while the button is held.
The FSM also gets `prog_sync`, and while it is high the FSM returns to
`MAIN_GRN1` and restarts the timer. So the cycle starts over from main green
with the new values as soon as the button is released. A reset brings back
6, 3 and 2 s.

## Part 2: the memory tester

### The test

Only address bits A[3:0] and data bits D[3:0] of the 6264 are used. The upper
address pins are grounded, and the upper data pins are left to pull-ups.

1. Write 0x3, 0xC, 0x3, … to addresses 0 to 15 (0x3 at even addresses).
2. Read addresses 0 to 15 and compare each word.
3. Write 0xC, 0x3, … to addresses 0 to 15 (0xC at even addresses).
4. Read and compare again.

Every bit is therefore written and read back as both 0 and 1. All 16 writes
of a pass come before its reads. A wire that is not connected can keep the
value last driven on it for a while. If each write were followed at once by a
read of the same word, such a wire could pass the test.

One operation happens per second, paced by the same kind of `divider` as
Part 1. The whole test takes 64 seconds. `disp_addr` and `disp_data` carry
the address and the data (written, or read) for a hex display. The LEDs
show writing, reading, failure and success.

### Write timing

The address must not change while WE is low. Otherwise the RAM may also
write to the old or new address. `mem_tester_fsm` therefore uses three states
per write:

| State       | addr, dout, doe   | WE   |
|-------------|-------------------|------|
| `W_SETUP`   | new address, data | high |
| `W_STROBE`  | held              | low (until the next tick) |
| `W_RELEASE` | held              | high |

Only after `W_RELEASE` does the address move on. Assertions check that WE
low implies the FPGA drives the bus with OE high, and that the address is
stable while WE is low.

### Read and compare

A read holds OE low for the whole second. The data bus is asynchronous to the
clock, so it is registered every clock. The registered word is compared with
the expected pattern when the next tick arrives. A mismatch stops the tester
in `FAIL`:

* the failing address stays on `sram_addr` and `disp_addr`,
* OE stays low, so the wrong word stays on `disp_data`,
* `led_fail` is on.

After the fourth step without a mismatch, `led_pass` comes on. Reset restarts
the test.

For example, if D[3] is open and floats high, address 0 reads 0xB instead of
0x3, and the test stops there.

### What this test cannot see

Words at addresses that differ only in A1 (or in A2 or A3) hold the same
pattern. So an address line stuck at a level, or two shorted address lines,
go unnoticed. `tb_mem_tester_fsm` shows this with A1 tied low: the test
passes. Stuck data bits and open data bits are caught.

### Pins

The 6264 data pins are bidirectional. This RTL splits them into `sram_dout`,
`sram_doe` (drive enable) and `sram_din`, and the tri-state pad is left to
the board-level wrapper. The chip selects are assumed tied active on the
board.

## Parameters

| Parameter | Where | Default | Meaning |
|-----------|-------|---------|---------|
| `CLK_HZ`  | `lab2_top`, `traffic_light_ctrl`, `mem_tester`, `divider` | 1 843 200 | Clock frequency. The 1 Hz enable is one tick every `CLK_HZ` clocks. |
| `T_BASE_DEFAULT`, `T_EXT_DEFAULT`, `T_YEL_DEFAULT` | `time_parameters` | 6, 3, 2 | Reset values in seconds. |
| `WIDTH`, `STAGES` | `synchronizer` | 1, 2 | Bits and flip-flops per bit. |

The lab does not state the clock frequency. Set `CLK_HZ` to your board's
oscillator.

## Choices made in this design

The intersection rules, the timing table, the block partition and signal
names of the controller, and the memory test sequence all follow the lab
description. The following are this design's own choices:

* Two flip-flop stages in the synchronizer, and no reset on it.
* On reprogram, the FSM restarts the cycle at main green.
* The timer is a down counter, and `expired` is held low during the load
  cycle.
* Parameter number `11` reads as 0.
* Each write has a one-second strobe with a setup clock and a release clock.
  Each read lasts one second and is compared at its end.
* The reset of the memory tester also goes through a synchronizer.
* The divider has a synchronous reset, so simulation starts from a known
  count. The lab describes a divider whose only input is the clock.
* The state encodings, and the split of the SRAM data pins.

## Files

| File | Contents |
|------|----------|
| `rtl/tl_pkg.sv` | interval codes, reset times, lamp struct, FSM states |
| `rtl/mt_pkg.sv` | memory tester widths, patterns, states, expected-value function |
| `rtl/synchronizer.sv`, `walk_register.sv`, `time_parameters.sv`, `divider.sv`, `timer.sv`, `tl_fsm.sv` | controller blocks |
| `rtl/traffic_light_ctrl.sv` | controller top |
| `rtl/mem_tester_fsm.sv`, `rtl/mem_tester.sv` | memory tester and its top |
| `rtl/lab2_top.sv` | both designs side by side |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/tb_lab2_top.sv` | end-to-end test of both designs at `CLK_HZ = 20` |
| `tb/tb_lab2_top_full.sv` | both designs at full default size |
| `tb/sram_6264_model.sv` | behavioural model of the 16 × 4 bits of SRAM used, with fault inputs for open data pins and a stuck address line |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/tl_pkg.sv rtl/mt_pkg.sv tb/tb_lab2_top.sv --top-module tb_lab2_top
./obj_dir/Vtb_lab2_top
```

Use the same command for any other `tb/tb_*.sv`: the include paths let
verilator find each module in the file of the same name.

`tb_lab2_top` runs both designs at a scaled clock of 20 cycles per second.
It counts these events, and fails if any of them never happens:

* main green extended by the sensor,
* side green extended by the sensor,
* a walk served,
* a press ignored during a walk,
* a reprogram,
* a passing memory test,
* a failing memory test with D[3] open.

`tb_lab2_top_full` keeps every parameter at its default. It runs a full
traffic cycle with a walk, and the full 64-second memory test, which is
about 1.2 × 10⁸ clocks. This takes roughly a minute and a half.
