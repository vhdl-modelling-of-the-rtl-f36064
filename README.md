# Open/short tester controller

Every I/O pin of a CMOS IC sits behind an ESD clamp: one diode from the pin
up to V_DD and one from V_SS up to the pin. The first test a packaged part
gets is the *open/short test*. It checks that both diodes are there and are
not bypassed. With all supplies and pins grounded, a measurement unit forces
about +100 uA into one pin and reads the voltage across the upper diode. It
then forces -100 uA and reads the lower diode.

| measured \|V\| | meaning |
|---|---|
| 0.2 V .. 1.5 V | pass (a forward-biased diode drops about 0.4-0.7 V) |
| > 1.5 V | **open**: broken bond wire or missing diode; the source runs to its 5 V clamp |
| < 0.2 V | **short**: the pin touches a grounded neighbour |

This RTL is the digital half of a low-cost, FPGA-based version of such a
tester, sized for four pins. The current sources and limit comparators are
external analog hardware. The logic does the rest:

- it grounds every pin except the one under test;
- it steps through the pins;
- it runs the whole sweep twice, once per polarity, with a relay switch in
  between;
- it latches each pin's 2-bit comparator result;
- it reports the progress and results on a dual 7-segment display.

## Block structure

```
                 25.175 MHz
  clk ──► clk_step_down ──► test_clk (≈10 kHz, to the analog board)
               │ tick (one-cycle enable per test-clock period)
               ▼
          os_sequencer ──► neg_supply_on (relay)
          │    │    └──► disp_phase ──────────────┐
          │    └ en_result_upper / _lower         │
          ▼                 │                     ▼
     pin_test_fsm ──► pin_release[k]  ──►   seg_display ──► digit1, digit2
          │ state_out (one-hot pin)           ▲
          ▼                                   │ result of the pin shown
     result_store (upper) ─► upper_result ────┤
     result_store (lower) ─► lower_result ────┘
               ▲
  meas[k] ─────┘  (2-bit comparator result per pin)
```

Every module is in `rtl/` under its own name. The shared types are in
`rtl/ost_pkg.sv`.

| module | role |
|---|---|
| `clk_step_down` | Counter that toggles `test_clk` every N board clocks: f = 25.175 MHz / (2·1258) = 10.006 kHz. It also makes `tick`, a one-cycle enable, so everything else stays in the board-clock domain. |
| `pin_test_fsm` | Moore machine START → pin 1 → … → pin NPINS → END. `state_out` is 0000 in START, one-hot during a pin, and 1111 in END. `pin_release` is 1 only for the pin under test; all other pins are grounded. In START and END every pin is released. |
| `result_store` | NPINS×2-bit register. On `en_result`, the result of the one-hot selected pin goes into bits [2k+1:2k]. |
| `seg_display` | Registered lookup from (phase, pin, result) to two active-low segment bytes. |
| `os_sequencer` | Runs the upper pass, switches the relay and waits, then runs the lower pass. It also sets when results are stored and what the display shows. |
| `open_short_tester` | The top level: the wiring above. |

## The test sequence

This is the part that needs the most care. Everything moves on `tick`, i.e.
once per test-clock period T (99.94 us at the defaults). Counting ticks from
the `start` request:

| ticks | what happens | display |
|---|---|---|
| 1 | upper pass setup: the FSM leaves START | `8.8.` (START) |
| 2, 4, 6, 8 | pin n = tick/2 is released, the others grounded. At the end of the tick, `meas[n]` is loaded into the upper store. | `P1` … `P4` |
| 3, 5, 7, 9 | the same pin stays selected while its stored result is shown | result of pin n |
| 10 | FSM in END | blank |
| 11 … 10+R | `neg_supply_on` rises; wait R ticks for the relay | blank |
| 11+R … 20+R | lower pass, same pattern as ticks 1-10, into the lower store | `8.8.`, `P1`, result, … |
| 21+R … 20+2R | relay released, `done` already high; wait R ticks more before a new `start` is accepted | blank |

R = `RELAY_TICKS` = 31. That is the smallest whole number of periods that
covers the 3 ms a mechanical relay needs to switch in the negative supply.

`meas[k]` is therefore sampled one full test-clock period after pin k is
released, which gives the analog side 100 us to settle. `done` rises
51 periods (≈5.04 ms) after `start`. Both result registers are then valid
and stay so until the next start.

`start` is edge-triggered: holding it high runs one test only. A rising
edge while idle also clears both result registers.

## Result encoding and display codes

`meas[k]` and the stored results use `ost_pkg::result_t`:

| code | bit 1: \|V\| > 0.2 V | bit 0: \|V\| < 1.5 V | result | display |
|---|---|---|---|---|
| `11` | yes | yes | pass | `PS` (98 A4) |
| `10` | yes | no | fail open | `FO` (B8 81) |
| `01` | no | yes | fail short | `FS` (B8 A4) |
| `00` | no | no | undefined, i.e. a comparator fault | `FF` (B8 B8) |

The other display states are START `00 00` (all segments lit), `P1`-`P4`
(98 CF / 98 92 / 98 86 / 98 CC) and END `FF FF` (blank). The segment bytes
are active low, in bit order {dp,a,b,c,d,e,f,g}.

The display codes and the meaning of the four outcomes match the original
tester. The assignment of the two result bits is this design's own choice;
if your comparator board uses other polarities, change `result_t`.

## Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 25.175 MHz board clock |
| `rst` | in | 1 | synchronous, active high |
| `start` | in | 1 | rising edge starts a test |
| `meas` | in | NPINS × 2 | comparator result per pin |
| `test_clk` | out | 1 | ≈10 kHz clock for the analog board |
| `pin_release` | out | NPINS | 1 = pin floating (driven by the measurement unit), 0 = grounded |
| `neg_supply_on` | out | 1 | relay drive: negative forced current |
| `state_out` | out | NPINS | FSM state (0 = START, one-hot pin, all ones = END) |
| `upper_result`, `lower_result` | out | 2·NPINS | per-pin results, pin k in [2k+1:2k] |
| `digit1`, `digit2` | out | 8 | 7-segment bytes |
| `busy`, `done` | out | 1 | test running / results valid |

`pin_release` stands for a tri-state pin driver: 1 is high-Z, 0 is drive
low. Build it with an open-drain or tri-state buffer at the FPGA pin.

## Parameters

| parameter | default | where | notes |
|---|---|---|---|
| `NPINS` | 4 | top, FSM, store | Scales the FSM, stores and ports. The display can show pin numbers 1-9 only, so larger builds show a blank pin digit. |
| `DIV_N` | 1258 | top (`N` in `clk_step_down`) | half period of the test clock, in board clocks |
| `RELAY_TICKS` | 31 | top, sequencer | Relay settle wait in test-clock periods. Recompute it if you change `DIV_N`. |

## Departures and limits

- **Timing.** The original prototype reported 2.735 us setup and
  5.085 us per pin, about 3.05 ms in all including the 3 ms relay. Those
  figures do not fit its own 10 kHz control clock, where one period is
  already 100 us. This design keeps the 10 kHz clock and spends two periods
  per pin: one to measure and one to show the result. A full test takes
  ≈5.04 ms, still dominated by the relay.
- **Two result registers.** One 8-bit register holds a four-pin pass. This
  design keeps one register per polarity, so both passes can be read at the
  end.
- **Relay release wait** after the lower pass, so that the next upper pass
  never sees the negative supply. This is this design's own addition.
- **No PC interface.** Only the existence of a PC link is known. The results
  are available on `upper_result`, `lower_result` and `done` for whatever
  link you attach.
- **Analog side not modelled in RTL.** This covers the measurement unit,
  the relay and the diodes. The end-to-end testbench has a behavioural
  stand-in.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/ost_pkg.sv \
    tb/tb_open_short_tester.sv --top-module tb_open_short_tester -o sim
./obj_dir/sim
```

Replace the testbench name to run another one:

| testbench | checks |
|---|---|
| `tb_clk_step_down` | Period 2N, duty cycle, first edge and `tick` alignment, at N = 1258 and N = 3. |
| `tb_pin_test_fsm` | The START/pin/END sequence and the release pattern, waiting for `en`, random `adv` stalls, reset; for 4 and 6 pins. |
| `tb_result_store` | The reference load sequence 03 → 07 → 27 → E7 for pin results 11, 01, 10, 11. No load on START/END codes. A random run against a model. |
| `tb_seg_display` | Every display code, the register latency and reset. |
| `tb_os_sequencer` | The tick-by-tick schedule above, with a real FSM and a short relay wait. Held `start`, restart. |
| `tb_open_short_tester` | The whole tester at the default parameters, driven by an analog model (details below). Two complete tests. |

The analog model in `tb_open_short_tester`:

- Each diode can be good, open or short.
- A grounded pin reads as short.
- The relay contact follows 3 ms behind `neg_supply_on`, and any lower-pass
  measurement taken while it moves reads as undefined.

The testbench checks:

- both result registers;
- the complete sequence of displayed codes;
- that exactly one pin is released at every store;
- the test-clock period, the relay wait and the pass timing.

It also checks that every display state and every result kind occurs.

All six testbenches pass, and each one fails when a single deliberate bug is
put into its module. The design has been checked in simulation and for lint
and synthesis readability only; it has not been run on an FPGA.
