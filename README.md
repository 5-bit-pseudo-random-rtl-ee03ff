# 5-bit pseudo-random bit generator with two-phase clock generator

This design is a small NMOS test chip in SystemVerilog. It produces a repeating
31-bit pseudo-random bit pattern on one output pin. Five flip-flops form a shift register,
and an XNOR of two of its stages feeds the first one. The result is a maximal-length
linear feedback shift register (LFSR). The flip-flops are dynamic two-phase
master-slave cells, so the chip also carries a clock generator. It turns the single clock
input into two non-overlapping phases.

The RTL follows the chip's transistor schematic cell by cell. It keeps only what the
transistors do logically. Two parts are analog in silicon: the bootstrapped clock drivers
and the bootstrapped output stage. They are written as behavioural models with delays. These
two files are meant for simulation: a synthesis tool drops their delays, and what remains
is no longer the silicon.

## Pins

| pin      | dir | meaning |
|----------|-----|---------|
| `vp`     | in  | clock. The register shifts once per period. |
| `vrst`   | in  | reset, active high. Hold it for 5 clock periods. |
| `e_phi1` | in  | emergency phase-1 pad. Used only when `USE_EMERGENCY_CLOCKS = 1`. |
| `e_phi2` | in  | emergency phase-2 pad. Used only when `USE_EMERGENCY_CLOCKS = 1`. |
| `vout`   | out | the bit stream. This is Q4 after the output buffer. |

## The sequence

Name the flip-flop outputs Q0 to Q4. On every clock period:

    Q0 <- XNOR(Q1, Q4),   Q1 <- Q0,   Q2 <- Q1,   Q3 <- Q2,   Q4 <- Q3

Starting from 00000, the register passes through every 5-bit state except 11111. It
returns to 00000 after 2^5 - 1 = 31 periods. The bits on `vout`, starting with the state
after reset, are:

    0000011001011011110101000100111   (then repeats)

With XNOR feedback, 11111 maps to itself, so a register that powers up in 11111 stays
there. The all-zero state is part of the cycle, which is why the reset clears the register
to 00000.

An early description of this chip says the feedback combines "the first and last"
flip-flops. The schematic, the netlist and the tabulated state sequence all agree on Q1 and
Q4, and that is what is built. Taps on Q0 and Q4 would give a cycle of only 21 states from
00000.

## Reset works through the data path

There is no reset inside the flip-flops. A single pull-down transistor holds the input of
the first flip-flop at 0 while `vrst` is high. Each clock period then shifts one more 0
into the register, so `vrst` must stay high for 5 periods (`RESET_CYCLES` in `prbg_pkg`).
Only then is the register at 00000, the first state of the sequence. This is also the only
way out of 11111. `prbg_top` models this exactly: `d0 = vrst ? 0 : XNOR(Q1, Q4)`. The
reset is therefore synchronous and takes five periods.

Release `vrst` at any time while phase 1 is high, or while the clock is low. The next shift
then loads the feedback value. This is a 1, because XNOR(0, 0) = 1, so the state after
00000 is 00001.

## Two-phase clocking

`clock_gen` derives two phases from `vp`:

* `vp1` is high while `vp` is high.
* `vp2` is high while `vp` is low.
* The two phases are never high at the same time.

In silicon the generator is a pair of cross-coupled NOR gates, one fed by `vp` and the
other by its inverse. Each phase then goes through a bootstrapped driver, because it loads
all five flip-flops. The model writes the NOR pair as

    vp1 = NOR(NOT vp, vp2)      vp2 = NOR(vp, vp1)      each after T_GATE_NS (5 ns)

Each phase can rise only after the other has fallen. After an edge of `vp`, the phase that
was high falls 5 ns later and the other one rises 10 ns after the edge. That gives a 5 ns
gap in which both phases are low. `vp` must stay at each level for longer than
2 x `T_GATE_NS`.

The gap and the 5 ns delay are this model's choices. The transistor netlist takes the
phases from behind the drivers. With zero driver skew that would give a short overlap
instead of a gap. In a zero-delay latch model an overlap makes data race through the
register, so the model guarantees non-overlap.

Each `two_phase_ff` is a pass transistor on phase 1 into an inverter, then a pass
transistor on phase 2 into a second inverter. Each pass transistor, together with the
inverter gate it drives, is a transparent latch, and the RTL writes it with
`always_latch`:

* The master node follows `data_in` while `phi1` is high.
* The slave node takes the inverted master while `phi2` is high.
* The output is the inverted slave, so the cell does not invert.

The flip-flop captures `data_in` when `phi1` falls, which is the falling edge of `vp`. Its
output changes when `phi2` rises, 10 ns after that edge with the model's delays. The
register therefore shifts once per `vp` period, on the falling edge. The stored charge is
treated as perfect: leakage, which limits the slowest clock of a real dynamic register, is
not modelled.

Lint tools report two things about these cells. One is the latches in `two_phase_ff`. The
other is a combinational loop Q4 -> XNOR -> Q0 -> ... -> Q4 through them. Both are
intended. The loop is broken in time because no master and slave latch are open at once.

### Emergency clock pads

In case the on-chip generator failed, the chip has two extra pads that let the phases be
driven from outside. Setting the parameter `USE_EMERGENCY_CLOCKS = 1` routes `e_phi1` and
`e_phi2` to the flip-flops instead of the generator outputs. In silicon this is done by
cutting a metal link. The parameter is this design's way of expressing that. The external
phases must not overlap.

## Output buffer

`vout` is Q4 after two inverting stages, so it shows Q4 unchanged. The second stage is a
large pull-down and a bootstrapped pull-up, which drive the pad into a 10 pF load. The
sizing makes the rising edge slower than the falling edge. `output_buffer` models this as
an inertial delay:

* `T_RISE_NS = 30` delays a rising edge.
* `T_FALL_NS = 20` delays a falling edge.
* A pulse shorter than the delay of its edge never reaches `vout`.

These defaults are the 10-90 % edge times of the extracted circuit in simulation. The
fabricated chip was measured slower, at about 66 ns rise and 128 ns fall. Change the two
parameters to model that.

## Files

| file | contents |
|------|----------|
| `rtl/prbg_pkg.sv` | stage count, feedback taps, sequence length, reset length, `state_t` |
| `rtl/ratioed_inverter.sv` | NMOS inverter cell, 12:1 or 24:1 pull-down; logically NOT |
| `rtl/two_phase_ff.sv` | dynamic two-phase master-slave flip-flop (two latches, two inverters) |
| `rtl/xnor_gate.sv` | feedback XNOR as two compound NMOS stages: NAND, then NOT(n AND (a OR b)) |
| `rtl/clock_gen.sv` | behavioural two-phase, non-overlapping clock generator |
| `rtl/output_buffer.sv` | behavioural output driver with separate rise and fall delays |
| `rtl/prbg_top.sv` | the chip: generator, reset pull-down, XNOR, five flip-flops, buffer |
| `tb/prbg_ref_pkg.sv` | the 31 expected states, written out as a table |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_prbg_top_full` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. To build
and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/prbg_pkg.sv tb/prbg_ref_pkg.sv tb/tb_prbg_top.sv --top-module tb_prbg_top
    ./obj_dir/Vtb_prbg_top

Verilator finds the other modules from the `-I` paths. All files use
`` `timescale 1ns/1ps ``.

* `tb_prbg_top` runs two copies of the chip at 18 MHz (55 ns period). One copy uses the
  clock generator and the other is driven through the emergency pads. Both are reset from
  an unknown state. Their state and `vout` are checked against the table for 70 periods.
  The test then forces one copy into 11111 and checks that it stays there. Finally it
  resets that copy and checks that the sequence restarts. The test counts how often each of
  these happened (reset, wrap-around, emergency-pad operation, leaving 11111) and fails if
  any count is zero.
* `tb_prbg_top_full` is the chip with no parameters changed, clocked at 10 kHz as on the
  bench. After reset it checks 70 bits on `vout` and checks that they repeat with period 31.
* `tb_prbg_clock_rates` runs the unchanged chip at 10 kHz, 2, 4, 8, 18 and 20 MHz. These
  are the clock rates at which the transistor circuit was simulated. For each rate it resets
  the chip and checks 40 periods against the table. The logic model keeps up at every rate.
  The transistor circuit did not: in its simulation it gave extra states at 20 MHz.
* The per-cell testbenches check the inverter truth table and the XNOR truth table. They
  check the flip-flop's hold, capture and no-shoot-through behaviour with hand-made phases.
  They check the clock generator's phase timing at 2 MHz and 18 MHz, and the buffer's
  30 ns / 20 ns edge delays and glitch suppression.

## How far this matches the chip

What the RTL reproduces exactly:

* the cell structure: the flip-flop, the XNOR as two compound gates, and the five-stage
  chain;
* the feedback taps;
* the reset transistor's effect;
* the phase polarity;
* the non-inverting output;
* the 31-state sequence, checked bit for bit against the table.

What is modelled or left out:

* **Analog behaviour.** The model does not capture output levels (about 0.4 V low), the
  bootstrap overshoot, glitches on clock edges, or the need for substrate bias. It also
  does not capture the clock limits that were observed: correct in simulation up to
  18 MHz, extra states at 20 MHz, and a 4 MHz maximum in hardware with an unexplained
  failure at 2 MHz. The model runs correctly at any clock whose levels last longer than
  10 ns.
* **Input protection.** The well resistors and breakdown transistors on `vp` and `vrst`
  have no logic function and are left out.
* **Delays.** `T_GATE_NS`, and the rule that the phases never overlap, are this design's
  choices. The buffer delays come from the circuit simulation, not from silicon.
* **Power pins.** The supply, ground and substrate pins are not ports.
