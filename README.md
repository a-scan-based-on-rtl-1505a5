# Scan-based on-line aging monitor

Transistor aging (mainly NBTI) slowly makes the paths of a chip slower.
Before a path misses its clock edge outright, its data arrives later and
later inside the timing margin, the *guard band*, that was reserved for
aging. This design watches for data that has moved into the guard band
while the chip keeps doing its normal work. When it sees that, it raises an
alarm.

The trick is to use no second clock. The core runs on its functional clock
and captures on the rising edge. The clock's duty cycle is adjusted so that
the **falling edge falls inside the guard band**, just before the next rising
edge. A second scan chain sits beside the core's normal scan chain. Its
*early capture* flip-flops take the same functional data on the falling
edge. If a flop's early value differs from the value the normal flop takes
on the next rising edge, then that data changed inside the guard band, and
the path has aged. Now and then a monitor freezes these comparison results
in the early capture chain and shifts them out. A single `1` raises
`aging_alarm`.

```
            rising                    falling   rising
              |<------ functional period (625 ps) ------>|
   clk   _____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______/‾‾‾
                                      |   guard band     |
                          500 ps -----+------------------+ 625 ps
                                             ^ 546 ps (duty 224/256)
   fresh path:  di settles here ->  x
   aged path:   di settles here ------------------>  x       (ECFF still has
                                                              the old value)
```

The numbers are the configuration simulated here: a 2 GHz test clock
(500 ps) with a 20 % frequency guard band gives a 1.6 GHz functional clock
(625 ps). So the guard band is the last 125 ps of the period.

## Early capture scan cell

Each core flip-flop is a normal mux-D scan cell (`scan_cell`). Next to it is
an early capture scan cell (`ecsc`). The ECSC has one flip-flop (ECFF) on
the falling edge, one XOR and two muxes. It shares the scan cell's
functional input `di` and sees the scan cell's output `DO`.

| ecse1 | ecse2 | ECFF loads at falling edge | ecso (to next cell) | use |
|---|---|---|---|---|
| 0 | 0 | `di` | `ECFF ^ DO` | normal operation: early capture every cycle |
| 1 | 0 | previous cell's `ecso` = its comparison | `ECFF ^ DO` | capture: comparisons frozen, one cell along |
| 1 | 1 | previous cell's `ecso` = its ECFF | `ECFF` | shift: chain moves one place per falling edge |

`modified_scan_chain` strings N of each together. Cell 0 is next to
`scan_in` and takes `di[N-1]`, the leftmost bit. Cell N-1 drives the output.
The shared `scan_out` pin carries the normal chain's SO when `se=1` (scan
test) and the early capture chain's ECSO when `se=0` (normal operation).
The first ECSC's `ecsi` is tied to 0 in the device.

The normal scan cells and the core's data path are never touched. `do_o`
is always the value `di` had at the last rising edge, with or without a
session running.

## One monitoring session, edge by edge

This is the part that needs care, because two clock edges are involved.
All controller state changes on rising edges. The ECFFs, and the monitor's
sampling of `scan_out`, act on falling edges. Here `r0` is the rising edge
that enters CAPTURE and `f0` is the falling edge after it:

| edge | state after it | what happens |
|---|---|---|
| f-1 | IDLE | ECFFs take `di` early (inside the guard band) |
| r0 | CAPTURE | scan cells take `di` normally; `ecse1` rises |
| f0 | CAPTURE | monitor samples `scan_out` = last cell's `ECFF^DO`; every other comparison is stored in the next cell's ECFF |
| r1 | SHIFT | `ecse2` rises; `scan_out` now shows ECFF of the last cell |
| f1 … f8 | SHIFT | sample `scan_out`, then shift by one. 8 shift cycles for N=8 |
| r9 | IDLE | no `1` seen: session over |

So for N=8 the monitor sees all 8 comparisons, plus the stored `ecsi`
value, which is 0. The `1` that marks an aged cell k leaves the chain at
sample N-1-k. Sampling on the falling edge is what lets the last cell's
comparison be seen at all: it exists only on `ecso` during the high phase
of the capture cycle, before the ECFFs overwrite it.

A sticky error flag records any `1` sampled in CAPTURE or SHIFT. At the
first rising edge in SHIFT where the flag is set, the controller goes to
ALARM. Shifting then stops early, which does no harm, because the answer is
known. `aging_alarm` stays high in ALARM until the alarm is reset.

Example (run by `tb_aged_path_experiment`): the core's output alternates
`11001110` / `01001110`, and the leftmost bit settles at 580 ps. The ECFFs
hold `11001110` while the scan cells take `01001110`. The comparison
`10000000` is stored one cell along as `01000000`. The samples from f0 on
are `0,0,0,0,0,0,0,1`, and the state goes to `11` (ALARM).

## Aging monitor

`aging_monitor` holds four blocks:

- `pit`, the programmable interval timer. It pulses `agmon_en` for one
  cycle every `interval` clk cycles. `interval = 0` switches monitoring off.
- `ecag`, the ECS controller and alarm generator. This is the state machine
  with `AgMon_State` codes `00` IDLE, `01` CAPTURE, `10` SHIFT and `11`
  ALARM:
  - IDLE → CAPTURE on `agmon_en`.
  - CAPTURE → SHIFT after one cycle.
  - SHIFT → IDLE on `shift_done` when no error was seen.
  - SHIFT → ALARM on an error.
  - Any state → IDLE on `agmon_rst`.
  - `ecse1` is high in CAPTURE and SHIFT; `ecse2` and `shift_en` are high
    in SHIFT.
- `ecs_shift_counter`. It counts SHIFT cycles and raises `shift_done` in
  the N-th one. Its count is the `shift_count` output.
- `reset_gen`. It brings the alarm-reset request bit from the TAP clock
  domain into clk with two flip-flops, then makes a one-cycle `agmon_rst`
  pulse on each 0→1 change.

A clean session takes N+2 cycles from the `agmon_en` pulse. `agmon_en`
pulses that arrive outside IDLE are ignored. This includes pulses during
ALARM, so no new session starts until the alarm is cleared.

## Programming: TAP and clock generator

`tap` is an IEEE 1149.1-style port: the 16-state controller, a 3-bit
instruction register (Capture-IR loads `001`), and data registers shifted
LSB first.

| instruction | code | data register | drives |
|---|---|---|---|
| `IR_DUTY` | `001` | 8 bits | `duty`, the clock duty code (reset 224) |
| `IR_AGMON` | `010` | 17 bits `{rst_req, interval[15:0]}` | PIT interval (reset 0 = off), alarm reset request |
| `IR_BYPASS` | `111`, and any other code | 1 bit | — |

- Outputs change on the rising `tck` edge that leaves Update-DR.
- `trst_n` restores the reset values.
- The Test-Logic-Reset state only reselects BYPASS, so the programmed
  settings survive it.
- To clear an alarm, write `{1, interval}` and then `{0, interval}`.
- `duty` and `interval` cross into the clk domain without a synchroniser.
  Change them only while monitoring is off, or accept one odd session.

`adccg` is a **behavioural model** of the adjustable duty cycle clock
generator, not synthesizable logic. It uses `#` delays. `clk` rises with
each `ref_clk` rising edge and falls `period*duty/256` ps later, where the
period is measured between the last two reference edges. A real device
would use a mixed-signal duty-cycle corrector here. To move the falling
edge, change `duty`. A lower code puts the falling edge earlier, so the
monitor flags paths that are less aged. If a code puts the falling edge
before the guard band (below 500 ps here), the monitor flags paths that
still meet the tested speed.

## Device top level

`aging_monitored_device` wires the TAP, the clock generator, the modified
scan chain and the aging monitor together. Its parameters are `N` = 8
(chain length), `DUTY_W` = 8 and `INTERVAL_W` = 16.

| port | dir | meaning |
|---|---|---|
| `ref_clk` | in | reference clock; sets the functional period |
| `rst_n` | in | asynchronous reset of the aging monitor |
| `tck trst_n tms tdi tdo` | | TAP |
| `clk` | out | duty-adjusted functional clock, for the core's own logic |
| `di[N-1:0]` | in | outputs of the core's combinational logic |
| `do_o[N-1:0]` | out | the same values captured on the rising edge |
| `scan_in`, `se`, `scan_out` | | core scan pins; `se=0` shows the early capture chain on `scan_out` |
| `aging_alarm` | out | aging detected; held until reset through the TAP |
| `agmon_state[1:0]`, `shift_count` | out | monitor state and shift count, for observation |

Because it contains the clock model, the top level is a simulation model.
Everything else (`scan_cell`, `ecsc`, `modified_scan_chain`, `pit`,
`ecs_shift_counter`, `reset_gen`, `ecag`, `aging_monitor`, `tap`) is
synthesizable. A synthesizable device would replace `adccg` with a real
clock cell that has the same three ports. Keep a scan test (`se=1`) and a
monitoring session apart: set `interval` to 0 first. Otherwise the monitor
reads the normal chain's data as comparison results.

## Files

`rtl/aging_mon_pkg.sv` holds the state and instruction enums. Every other
file is one module under its own name. `tb/jtag_bfm.sv` is an interface
with JTAG driving tasks, shared by the TAP-level tests.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/aging_mon_pkg.sv tb/tb_aging_monitored_device.sv \
    --top-module tb_aging_monitored_device -o sim
./obj_dir/sim
```

Swap in any other testbench name. `-Wno-fatal` is needed because Verilator
warns (ZERODLY) about the computed delays in the clock model and in the
testbenches' path-delay models; those delays are never zero.

| testbench | checks |
|---|---|
| `tb_scan_cell`, `tb_ecsc` | the cells against a reference, all enable combinations |
| `tb_modified_scan_chain` | 8-cell chain against a two-edge reference model, under random modes and late transitions inside the guard band; directed aged-bit case |
| `tb_pit`, `tb_ecs_shift_counter`, `tb_reset_gen` | pulse spacing, `shift_done` cycle, one pulse per request and its latency |
| `tb_ecag` | state codes and enables cycle by cycle; an error at each of the 9 sample positions; alarm hold and reset; abort |
| `tb_aging_monitor` | session spacing and length, `shift_count`, alarm for every single-cell mismatch and random vectors, reset, interval 0 |
| `tb_tap` | Capture-IR value, bypass, write/read-back of both registers, Test-Logic-Reset, unknown instruction |
| `tb_adccg` | period and high time for several duty codes |
| `tb_aging_monitored_device` | whole device at default parameters through JTAG: clean sessions on a fresh device, an aged path on each of the 8 bits caught and cleared, a 520 ps path missed at duty 224 and caught at duty 192, a normal scan shift; `do_o` checked every cycle; every one of these events must occur |
| `tb_aged_path_experiment` | the `11001110 → 01001110` aged-leftmost-bit case, sample by sample |

All testbenches use `timescale 1ps/1ps`. They run in well under a second.

## Design choices beyond the published scheme

The cell structure, the two chains, the scan-out mux, the monitor's block
structure, its four states and their codes, and the 8-bit, 1.6 GHz
configuration follow the published scheme. These points are this design's
own:

- **Sampling `scan_out` on the falling edge**, including once in CAPTURE,
  so that the last cell is covered too. The scheme only says that errors
  are observed on `scan_out` until the shift count is done.
- **`ecse1` stays high through SHIFT.** The cell needs it so that the ECFFs
  take the shift input.
- **N shift cycles per session**, one per cell of the chain.
- **Going to ALARM at the first error**, rather than at the end of the
  shift.
- **`agmon_rst` clears the monitor from any state**, not only from ALARM.
- **Mux polarities**: `se=1` selects scan data and SO; `se=0` routes the
  early capture chain to `scan_out`.
- **Widths, codes and reset values**: the interval width (16), interval 0
  meaning off, the duty code format and width (8 bits, high time =
  period·code/256) and its reset value 224, and the TAP's instruction codes
  and register layouts.
- **The reset generator's insides** (synchroniser plus edge detector) and
  the missing synchroniser on `duty` and `interval`.
- **Tying the first `ecsi` to 0.**
- **The clock generator**, which is only a behavioural model.
- **The core's combinational logic** is not part of the design. Its outputs
  are the `di` port.
