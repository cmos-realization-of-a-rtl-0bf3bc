# Pulsed-latch shift registers

A shift register made of flip-flops pays for two latches per bit. A *pulsed
latch* (one latch opened by a short clock pulse) does the same job at roughly
half the area and clock load. The catch is that it cannot be dropped into a
shift register as is. This RTL describes a shift register that uses pulsed
latches anyway. The latches are grouped into 4-bit sub shift registers, each
with a fifth *temporary* latch. They are clocked by five short pulses per clock
cycle that never overlap, fired in a fixed order.

Two registers are provided, both built from the same pieces:

- `siso_shift_register`: 32-bit serial-in, serial-out. It has 8 sub shift
  registers, each with its temporary latch (32 + 8 latches).
- `piso_shift_register`: 8-bit parallel-in, serial-out. It has 2 sub shift
  registers, with a multiplexer in front of every data latch (8 + 1 latches).

The top level, `pulsed_latch_shift_registers`, places the two side by side.
Each has its own clock and its own pulse generator, and they share no signal.

## Why a single pulsed clock fails

Put N latches in a chain and open them all with one pulse. The first latch
takes the serial input, which is steady. The second latch is open while the
first one's output is still changing, so it may take the old bit, the new bit
or something in between. The more latches there are, the further a bit can
race during one pulse. You could add a delay element between latches, longer
than the pulse, but that costs more area and power than the latch saves.

## The fix: write the chain back to front

Within a group of four latches Q1..Q4, the latches are written in the order
Q4, Q3, Q2, Q1. Each latch copies its left neighbour while that neighbour is
closed and still holds last cycle's value. The neighbour is written only by a
later pulse. No latch is ever open at the same time as the latch it reads.
This needs one pulse per latch position, and the pulses must not overlap.

To keep the number of pulse signals down to five, whatever the length, the
same four pulses drive every group. That creates a new race at the group
boundary. Group 2's first latch Q5 is written last, by `CLK_pulse<1>`. By
then group 1's Q4 has already been written with its new value. The
*temporary latch* T sits between them and solves this:

| order in the cycle | pulse          | what it writes (in every group)           |
|--------------------|----------------|-------------------------------------------|
| 1st                | `CLK_pulse<T>` | T ← Q4 (old value, not yet overwritten)   |
| 2nd                | `CLK_pulse<4>` | Q4 ← Q3                                   |
| 3rd                | `CLK_pulse<3>` | Q3 ← Q2                                   |
| 4th                | `CLK_pulse<2>` | Q2 ← Q1                                   |
| 5th                | `CLK_pulse<1>` | Q1 ← serial input, or T of the group before |

T is written first and holds the outgoing bit for the rest of the cycle. The
next group's Q1 takes it at the last pulse. Seen one clock cycle at a time,
every group shifts by exactly one position, and the temporary latches do not
show up in the cycle-level behaviour:

    after rising edge n:  Qj = in(n - j + 1),   Tm = in(n - 4m)

An N-bit register therefore needs N + N/4 latches and five pulsed clocks.

## The pulsed latch (`ssaspl_latch`)

The latch is a static differential sense-amplifier pulsed latch. Its storage
is a pair of cross-coupled inverters (Q, Qb). Two nMOS pull-downs, gated by
the data pair D and Db, share a single foot transistor gated by the pulse.
During the pulse the high side of (D, Db) pulls its node low: D = 1 writes
Q = 1, and Db = 1 writes Q = 0. Outside the pulse, the pair keeps its value.

The RTL models this as a level-sensitive latch. It writes only when D and Db
differ. An assertion requires D ≠ Db at the falling edge of the pulse.
Because the cell takes a differential input, a latch inside a group takes its
D and Db straight from the previous latch's Q and Qb. Only the first latch of
a group has an inverter to make Db from a single-ended input. In the PISO
register every data latch has one, behind its multiplexer.

The latch has no reset. The transistor cell has none, so a register's
contents are undefined until N bits have been shifted in (or, for PISO, a
load has been done).

## The delayed pulsed clock generator

`delayed_pulsed_clock_gen` is a chain of five `clock_pulse_circuit` stages.
Each stage works like this:

    clk_in ──┬─────────────────────────────┐
             └─ delay ─ inv ──┬─ inv ──────┼──────────► clk_next (to next stage)
                              │            │
                              └──── AND ◄──┘ ─ clock buffer ─► clk_pulse

- **The pulse.** The AND of the clock and its inverted, delayed copy is high
  from the rising clock edge until the delayed copy arrives. The pulse width
  is the delay element plus one inverter.
- **The next stage's clock.** It comes from the second inverter, one inverter
  delay after this stage's pulse has ended. That delay is the gap that keeps
  consecutive pulses from overlapping.
- **Falling edges.** A falling clock edge gives no pulse, because the delayed
  copy is still low at that moment.

The first stage drives `CLK_pulse<T>`. The following stages drive `<4>`,
`<3>`, `<2>` and `<1>`.

The timing defaults are `DELAY_PS` = 100, `INV_PS` = 20 and `BUF_PS` = 20,
in picoseconds. With these values:

- **Pulses.** Each pulse is 120 ps wide, and pulse *i* of the train starts
  `BUF_PS + i·140` ps after the rising edge.
- **Train length.** The whole train lasts about 700 ps.
- **Clock.** The clock's high phase must be longer than the train.
- **Data inputs.** Serial, parallel and mode inputs must be steady from the
  rising edge until `CLK_pulse<1>` has ended. The testbenches change them in
  the clock's low phase.

These delay values are this implementation's own choice; the design fixes
only the structure.

`delay_element` is a behavioural model. It is an inertial delay that swallows
input pulses shorter than the delay. It carries the `blackbox` attribute, so
synthesis treats it as an external cell. Without that, synthesis would drop
the delay and fold every AND gate (clk AND NOT clk) to zero. In silicon the
delay line, the pulse gates and the latches are hand-built cells. The RTL is a
faithful simulation model and a netlist template, but it is not something to
push through a standard-cell flow unchanged. The inverter and buffer delays
are `#` annotations that synthesis ignores.

## Parallel load (`piso_sub_shift_register`, `piso_shift_register`)

The PISO register is the SISO arrangement with a 2:1 multiplexer in front of
every data latch. The temporary latches have no multiplexer.

- `shift_load = 1` shifts: Q1 takes `sin`, and every other latch takes its
  left neighbour.
- `shift_load = 0` loads: each latch Qk takes `pdata[k-1]`.

A latch samples the mode and its data bit during its own pulse. The pulse
order therefore keeps a shift correct right after a load. In the first shift
cycle, T of group 1 captures the freshly loaded Q4 before Q4 moves on.

The last group has no temporary latch, because nothing follows it
(`HAS_TEMP = 0`; its `t` output only repeats Q4). The serial output is QN.
After a load at edge k, `sout` shows `pdata[N-1]`, then `pdata[N-2]` after
edge k+1, and so on.

## Interfaces

`siso_shift_register #(N = 32)`

| port   | dir | width | meaning                                        |
|--------|-----|-------|------------------------------------------------|
| clk    | in  | 1     | each rising edge shifts by one                 |
| sin    | in  | 1     | serial input                                   |
| q      | out | N     | data latches, `q[0]` = Q1 (parallel view)      |
| t      | out | N/4   | temporary latches T1..TM                       |
| sout   | out | 1     | serial output = TM, N cycles after `sin`       |

`piso_shift_register #(N = 8)`

| port       | dir | width | meaning                                   |
|------------|-----|-------|-------------------------------------------|
| clk        | in  | 1     | each rising edge loads or shifts          |
| shift_load | in  | 1     | 1 = shift, 0 = parallel load              |
| pdata      | in  | N     | parallel input, `pdata[0]` → Q1           |
| sin        | in  | 1     | serial input into Q1 while shifting       |
| q          | out | N     | data latches                              |
| sout       | out | 1     | serial output = QN                        |

- **Common parameters.** Both registers also take `DELAY_PS`, `INV_PS` and
  `BUF_PS`.
- **Length.** N must be a multiple of 4. The group size is `SUB_BITS` in
  `pulsed_sr_pkg`.
- **Top level.** `pulsed_latch_shift_registers` prefixes these ports with
  `siso_` and `piso_` (`siso_in` and `siso_out`, `piso_out`). Its size
  parameters are `SISO_N` and `PISO_N`.

## Files

| file                                | contents                                              |
|-------------------------------------|-------------------------------------------------------|
| `rtl/pulsed_sr_pkg.sv`              | group size, pulse count, default delays               |
| `rtl/ssaspl_latch.sv`               | differential pulsed latch                             |
| `rtl/delay_element.sv`              | delay line (behavioural model)                        |
| `rtl/clock_pulse_circuit.sv`        | one pulse stage                                       |
| `rtl/delayed_pulsed_clock_gen.sv`   | five-stage generator                                  |
| `rtl/sub_shift_register.sv`         | 4 data latches + temporary latch                      |
| `rtl/piso_sub_shift_register.sv`    | the same with load multiplexers                       |
| `rtl/siso_shift_register.sv`        | 32-bit SISO register                                  |
| `rtl/piso_shift_register.sv`        | 8-bit PISO register                                   |
| `rtl/pulsed_latch_shift_registers.sv` | top level                                           |
| `tb/tb_<module>.sv`                 | one self-checking testbench per module                |

## Simulating

The models depend on real delays, so Verilator needs `--timing`. For example,
the end-to-end test of the top level at full size:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/pulsed_sr_pkg.sv tb/tb_pulsed_latch_shift_registers.sv \
        --top-module tb_pulsed_latch_shift_registers
    ./obj_dir/Vtb_pulsed_latch_shift_registers

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
through a watchdog. The testbenches and what they check:

- **Latch** (`tb_ssaspl_latch`):
  - it is transparent during the pulse and holds after it;
  - it does not write when D = Db;
  - Qb is always the complement of Q.
- **Delay element** (`tb_delay_element`): exact delay, and swallowing of a
  short pulse.
- **Pulse stage** (`tb_clock_pulse_circuit`):
  - pulse start, width and count;
  - no pulse on a falling edge;
  - the delayed clock on both edges.
- **Generator** (`tb_delayed_pulsed_clock_gen`): order T, 4, 3, 2, 1, each
  pulse once per cycle, exact start and end times, and no overlap at any
  time.
- **Sub shift registers** (`tb_sub_shift_register`,
  `tb_piso_sub_shift_register`): every latch against a model worked out from
  the input history, with random loads and shifts.
- **SISO** (`tb_siso_shift_register`): all 40 latches every cycle, and a
  latency of exactly 32 cycles, measured with a lone 1.
- **PISO** (`tb_piso_shift_register`): whole words serialised MSB first, then
  random loads and shifts against an 8-bit reference register.
- **Top level** (`tb_pulsed_latch_shift_registers`):
  - both registers at their default sizes, running at once on clocks of
    different period;
  - it counts complete pulse trains, SISO shifts, hand-offs through a
    temporary latch, PISO loads, PISO shifts and PISO words, and fails if any
    of them never happened.

All of these run at the default parameters and finish in well under a
second.

## Where this RTL makes its own choices

The group structure, the pulse order, the temporary latch, the latch cell and
the generator's gate structure come from the design. The following do not:

- **Delays.** `DELAY_PS`, `INV_PS` and `BUF_PS` are not specified. Any values
  work as long as the pulse train fits in the clock's high phase.
- **SISO serial output.** It is the last temporary latch, T8, which gives a
  latency of N cycles. QN, one cycle earlier, is available on `q[N-1]`.
- **PISO size.** It is 8 bits: two groups, the last without a temporary
  latch, following the PISO schematic of the design.
- **`shift_load` polarity.** The polarity (1 = shift) is a choice.
- **Serial input of the PISO register.** The first latch of the PISO register
  takes `sin` while shifting, so the PISO register can also be used
  serial-in. In the conventional flip-flop PISO that the design refers to,
  the first stage takes only its parallel bit.
- **Parallel outputs.** Both registers bring out all latch outputs.
- **D = Db.** The latch model keeps its value when D = Db during a pulse. The
  real cell would fight between the two pull-downs; the assertion flags this
  case.
- **No power or area model.** Power figures for the two modes, and the
  area/power advantage over flip-flops, come from transistor-level
  simulation. Nothing in this RTL reproduces them.
