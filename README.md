# Built-in periodic surveillance testing for variable-setpoint bistables

A reactor protection channel compares each monitored process variable with a
trip setpoint in a *bistable*. Periodic surveillance tests must show that
every bistable still trips when it should. Done by hand, channel by channel,
they take time and take the channel out of service. This RTL puts the test
inside the channel's logic processor. A small state machine next to each
protection function periodically builds a stimulus that should trip the
bistable and sends it through the real comparator. It checks that the
bistable tripped and reports PASS or FAIL to the Maintenance and Test Panel
(MTP). The stimulus carries a tag, so the test trip never reaches the trip
output that feeds the downstream two-out-of-four coincidence logic.

Two kinds of bistable are covered. Their setpoints move, so a fixed test value
would not do:

* **Rate-limited variable setpoint, high trip.** This is the kind used for a
  variable overpower trip. The setpoint follows the process variable at a
  fixed margin above it, but it can rise only at a limited rate. A power
  excursion faster than that rate runs into the setpoint and trips.
* **Manual-reset variable setpoint, low trip.** This is the kind used for low
  pressurizer pressure and low steam-generator pressure. Each operator reset
  lowers the setpoint by one step, which allows a controlled cooldown. When
  the pressure rises, the setpoint rises with it and stays a fixed margin
  below.

The top module `pst_processor` holds one rate-limited bistable and its test
logic. It also holds a bank of `N_PV` manual-reset bistables (three by
default) and their test logic. The two test logics run independently.

## Tagged stimuli: how a test trip stays off the protection path

Each bistable has one comparator. Most cycles it compares the registered
process variable with the setpoint and updates `trip_o`. In a cycle where a
stimulus arrives on `test_in_i` with `valid` set and the bistable's own
identifier, three things differ:

* the comparator sees the stimulus value `X_test` instead of the process
  variable;
* its decision goes to `test_out_o` with the same identifier, and only the
  test logic reads that output;
* `trip_o` keeps its previous value for that one cycle, and the setpoint does
  not move.

The test therefore checks the comparator and setpoint register that protect
the plant, not a copy of them. The price is that a real trip can show up one
cycle later when it falls in a test cycle. There is one such cycle per tested
function per test period.

In the manual-reset bank, bistable *i* answers to identifier *i*. Their tagged
outputs are gathered into one register. Its `id` and `trip` fields hold the
latest answer until the next one arrives. After reset, `id` is all ones, which
names no process variable.

## The test sequences

Both test logics follow the same pattern. The manual-reset logic adds a
SELECT_PV state and a loop over the process variables.

```
            Time >= TEST_PERIOD
   WAIT ------------------------> LATCH_DATA --> [SELECT_PV] --> APPLY_TEST
    ^  ^                                              ^              |
    |  |                                              | next PV      | stimulus valid = 1
    |  +----------------------------------------------|--------------+
    |        response condition                       |
    |  WAIT -----------------> CAPTURE_OUT --> PASS/FAIL --> SEND ----+
    +------------------------------------------------------------ (hold done, last PV)
```

**WAIT has two roles.** Before a test it counts toward the test period. After
APPLY_TEST it waits for the response. A `pending` flag, set in APPLY_TEST and
cleared in CAPTURE_OUT, tells the two roles apart.

**The response condition differs between the two logics:**

* Rate-limited (`rl_pst_logic`): the logic waits a fixed `RESP_CAPTURE_CYCLES`
  cycles, then captures. A response counts only if it carries the test's
  identifier and arrived after this test's stimulus. If no such response
  came, the test fails.
* Manual-reset (`mr_pst_logic`): the logic leaves WAIT when the latest tagged
  output's identifier equals the selected PV index **and** differs from the
  identifier captured last time. That rule tells a new answer from an old one
  still sitting in the register. It has two consequences:
  * it cannot accept a response when `N_PV = 1`;
  * a healthy PV is not accepted if the tests of all other PVs have timed out
    since this PV's last capture.

  To keep a silent bistable from stopping all testing, this design adds
  `RESP_TIMEOUT`. After that many cycles in WAIT the logic goes to CAPTURE_OUT
  anyway and reports FAIL. Two further limits of the rule:
  * a faulty bistable that answers with another PV's identifier can make that
    PV's next test capture a stale answer;
  * identifiers that name no PV are simply ignored.

**The expected decision is always "trip".** Each stimulus is built to lie past
the setpoint in the trip direction:

* high trip, rate-limited: `X_test = X_PV + (SP - X_PV) * K_exc`
* low trip, manual-reset: `X_test = X_PV - (X_PV - SP) * K_exc`

The setpoint and process variable are the values latched in LATCH_DATA.
`K_exc` is the exceedance factor, above 1. It is an unsigned fixed-point
number with 8 fraction bits: the default 384 means 1.5. The product is
truncated. A negative margin, which means the channel is already tripped, is
taken as zero, so `X_test = X_PV`, which still trips. The result saturates at
the word range. With `K_exc >= 1` these rules always give a value that must
trip a healthy bistable.

**SEND** holds the result for `REQUIRED_HOLD` cycles (`result_hold_o` is high
and `result_o` shows it). It then sends one report strobe to the MTP on
`report_o = {valid, id, pass}`. The manual-reset logic then goes back to
SELECT_PV with the next index, or to WAIT after the last PV.

## Timing

Everything runs on one clock with an asynchronous active-low reset.

| Step | Cycles |
|---|---|
| Test start | when the cycle counter reaches `TEST_PERIOD`. The counter restarts at each start, so starts are exactly `TEST_PERIOD` cycles apart. The first start is `TEST_PERIOD` cycles after reset. |
| Rate-limited test, start to report | 1 (LATCH) + 1 (APPLY) + `RESP_CAPTURE_CYCLES`+1 (WAIT) + 1 (CAPTURE) + 1 (PASS/FAIL) + `REQUIRED_HOLD`+1 (SEND). That is 1014 at the defaults. The report strobe appears in the cycle after. |
| Bistable response | stimulus in cycle *n*, tagged output in *n*+1; for the manual-reset bank, in the gathered register in *n*+2 |
| Manual-reset test per PV, APPLY to report | `REQUIRED_HOLD` + 7 when answered; `RESP_TIMEOUT` + `REQUIRED_HOLD` + 5 when timed out |
| Bistable trip output | one register after the process-variable register |

Setpoints change only on the update strobes (`rl_tick_i`, `mr_tick_i`). The
rate limit `RATE` is a per-strobe amount, so the strobe period sets its time
scale.

In the first cycle after reset, before a process-variable sample has been
registered, the bistables ignore strobes and keep their trip outputs clear.
The rate-limited setpoint starts at full scale. It falls to PV + margin at the
first strobe, because falling is not rate-limited. The manual-reset setpoint
starts at 0 and rises to PV − margin at the first strobe.

## Parameters

None of these numbers comes from a specification. They are defaults to be set
for a real plant and clock.

| Parameter (top) | Default | Meaning |
|---|---|---|
| `N_PV` | 3 | manual-reset process variables: pressurizer pressure and two steam-generator pressures |
| `TEST_PERIOD` | 10,000,000 | cycles between test starts (0.1 s at 100 MHz; a real plant would use a much longer interval) |
| `REQUIRED_HOLD` | 1000 | cycles a result is held before it is sent |
| `RESP_CAPTURE_CYCLES` | 8 | rate-limited test: wait before capture (at least 1 is needed) |
| `RESP_TIMEOUT` | 1024 | manual-reset test: response time-out |
| `KEXC` | 384 | exceedance factor ×256 |
| `RL_MARGIN`, `RL_RATE` | 1000, 10 | rate-limited trip margin; setpoint rise per strobe |
| `MR_MARGIN`, `MR_STEP` | 2000, 1000 | manual-reset margin below a rising PV; step per reset |

Word widths are in `pst_pkg`: 16-bit unsigned process values, 4-bit test
identifiers, and a 12-bit exceedance factor.

## What follows the method and what is this design's own

The following come from the published method this RTL implements:
* the seven and eight states and their order;
* the transition conditions (period reached, all setpoints loaded, wait
  cycles, identifier match and freshness, output equals expected, hold time
  reached, PV index compared with the last index);
* the two stimulus formulas;
* the tagging of stimuli and outputs;
* the rule that tagged outputs stay inside the test logic.

This design adds or chooses:
* all widths and default values, and the saturation rules;
* the exact setpoint dynamics: a one-sided rate limit, and
  `max(SP, PV − margin)` tracking for the manual-reset setpoint;
* the sharing of one comparator between the plant and the test;
* the gathered output register of the manual-reset bank;
* the one-cycle parallel data latch;
* the response time-out;
* the freshness check on the rate-limited side;
* the MTP report format.

Outside this design, with their signals brought out as ports:
* the Maintenance and Test Panel, which receives `rl_report_o`, `mr_report_o`
  and the held results;
* the downstream processor with the coincidence (two-out-of-four) logic,
  which receives `rl_trip_o` and `mr_trip_o`.

Manual-reset pulses must come in already debounced, one cycle long.

The method was published as a state-machine model, not as hardware. This RTL
has been simulated and run through synthesis front ends, but not on an FPGA.

## Files

| File | Content |
|---|---|
| `rtl/pst_pkg.sv` | widths, tagged-bus structs, state enums, stimulus functions |
| `rtl/rl_vsp_bistable.sv` | rate-limited variable-setpoint high-trip bistable |
| `rtl/mr_vsp_bistable.sv` | manual-reset variable-setpoint low-trip bistable |
| `rtl/mr_protection_logic.sv` | bank of `N_PV` manual-reset bistables and the gathered tagged output |
| `rtl/rl_pst_logic.sv` | rate-limited test sequencer (7 states) |
| `rtl/mr_pst_logic.sv` | manual-reset test sequencer (8 states) |
| `rtl/pst_processor.sv` | top: both functions and both test logics |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_pst_processor_full` at default parameters and `tb_pst_coverage` for state and transition coverage |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build and run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/pst_pkg.sv tb/tb_pst_processor.sv \
          --top-module tb_pst_processor -o sim
./obj_dir/sim
```

Put `rtl/pst_pkg.sv` first. Verilator finds the other modules through `-Irtl`.

* The block testbenches use short test periods. Each compares its module
  cycle by cycle with a reference model written in the testbench, or with a
  model of the module's neighbour. They cover correct, stuck, silent and
  mis-tagged bistables.
* `tb_pst_processor` runs the whole channel: steady plant, forced
  stuck-output faults, a fast power ramp, operator resets, and a pressure
  drop and recovery. It counts each mechanism and fails if one never
  happens.
* `tb_pst_processor_full` runs one full 10-million-cycle test period at the
  default parameters; it takes a few seconds of wall-clock time.
* `tb_pst_coverage` lists every transition of both state diagrams, fails on
  any state change outside that list, and requires every state and every
  transition, the PASS, FAIL and time-out branches included, to be taken
  at least once. It forces stuck and silent bistables in one test period to
  get there.
