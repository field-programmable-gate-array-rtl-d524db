# Automatic power changeover controller for an FPGA

Where the public mains supply is unreliable, a building is often fed from
several sources: the three phases of the mains and a standby generator. A
changeover controller decides which one of them feeds the load. This design is
the decision logic of such a controller, small enough for any FPGA. It watches
one presence signal per source and does two things:

1. It closes the contactor of exactly one source: the live source with the
   highest rank. The ranks are mains phase R (phase 1), then Y (phase 2), then
   B (phase 3). The generator ranks last. When nothing is live, every
   contactor stays open.
2. It energizes the generator's start solenoid whenever no mains phase is
   live. As soon as any mains phase returns, the solenoid is de-energized,
   even while the generator is still running.

Together these make the changeover automatic. When the mains fails, the
solenoid starts the generator. When the generator's output appears, its
contactor closes. When a mains phase comes back, the load moves back to it
and the generator is told to stop.

## Priority rule

| R | Y | B | Gen | contactor closed | `active_source` | `gen_solenoid` |
|---|---|---|-----|------------------|-----------------|----------------|
| 1 | x | x | x   | `to_contactor[1]` (R)   | 1 | 0 |
| 0 | 1 | x | x   | `to_contactor[2]` (Y)   | 2 | 0 |
| 0 | 0 | 1 | x   | `to_contactor[3]` (B)   | 3 | 0 |
| 0 | 0 | 0 | 1   | `to_contactor[4]` (Gen) | 4 | 1 |
| 0 | 0 | 0 | 0   | none                    | 0 | 1 |

`to_contactor` is always one-hot or all zero, so two sources are never
connected together. The selector asserts this in simulation.

The ranking, the four source names and the pin names (`R_phase`, `Y_phase`,
`B_phase`, `Gen_phase`, `to_contactor[4:1]`) come from the original
controller. The original measured 13 input combinations. Every one of them is
reproduced by the RTL and checked in the top-level testbench. The three
combinations it did not measure follow the same rule.

## Structure

```
fpga_changeover                 top, combinational
 ├─ phase_priority_mux  (N=4)   4:1 priority selector -> one-hot contactor drive
 └─ gen_start_control   (NM=3)  NOR of the mains phases -> generator solenoid
changeover_pkg                  N_MAINS, N_SOURCES, source_e encoding
```

- `rtl/changeover_pkg.sv` holds the source count and the `source_e` enum:
  `SRC_NONE=0`, `SRC_R=1`, `SRC_Y=2`, `SRC_B=3` and `SRC_GEN=4`. Each code
  equals the contactor bit it closes.
- `rtl/phase_priority_mux.sv` is a priority chain over `N` sources, where
  index 0 ranks highest. It outputs the one-hot contactor vector
  `to_contactor[N:1]` and the rank `sel`. `N` is a parameter, but the
  controller uses it at 4.
- `rtl/gen_start_control.sv` outputs `gen_solenoid = ~|mains_live`.
- `rtl/fpga_changeover.sv` wires the four pins into the two blocks. Its
  outputs are `to_contactor[4:1]`, `gen_solenoid` and `active_source`.

## Timing

The design has no clock and no reset. The original pin list has no clock
pin, and the selection is a pure function of the present inputs. Outputs
follow the inputs after a few gate delays. The whole system must switch in
under one second, and that time is set by the contactors and the generator,
not by this logic.

## What this design adds or assumes

- **Bit order.** `to_contactor[1..4]` drives R, Y, B and the generator, in
  that order. Phase 1, 2 and 3 are R, Y and B. The original names these
  signals but does not say which bit is which.
- **Extra outputs.** `gen_solenoid` and `active_source` are outputs of this
  design. The original describes the solenoid signal but gives no pin for it.
- **Clean inputs.** The inputs are taken as clean logic levels. Nothing
  synchronizes, debounces or filters them. On real hardware a phase that
  flickers passes straight through to the contactors. If your sensing front
  end does not already filter the phases, add a synchronizer and a hold-off
  timer in front of `fpga_changeover`.
- **Generator state.** The solenoid rule ignores whether the generator is
  running. There is no start retry, warm-up or cool-down timing, because the
  original describes none.

## Outside the logic

The following parts of a complete system are not part of this RTL:

- turning 220 V on each phase into an isolated logic level;
- the contactors;
- the generator and its solenoid;
- programming the FPGA.

The top brings out their signals as ports.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends the run if it hangs.

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/changeover_pkg.sv rtl/phase_priority_mux.sv rtl/gen_start_control.sv \
  rtl/fpga_changeover.sv tb/tb_fpga_changeover.sv --top-module tb_fpga_changeover
./obj_dir/Vtb_fpga_changeover
```

The three testbenches:

- **`tb_phase_priority_mux`** tries every input combination for N=4 and for
  N=6. It compares the output against the lowest set bit of the input,
  computed as `x & -x`.
- **`tb_gen_start_control`** tries all eight mains combinations, in both
  directions.
- **`tb_fpga_changeover`** runs the top at its default size. It first replays
  the 13 measured combinations plus the 3 unmeasured ones. Then it walks
  through an outage: phases drop one by one, the solenoid is energized, the
  generator comes up and takes the load, and the phases return. It ends with
  200 random input sets. It counts each event, and a run fails unless all of
  them happen at least once:
  - each of the five outcomes of `active_source`, from none to generator;
  - the solenoid being energized;
  - the solenoid dropping while the generator is still running;
  - a changeover from mains to the generator;
  - a changeover from the generator back to mains.
