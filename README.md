# Real-time electromagnetic-transient solver for FPGA

This is the solver core of a real-time simulator for power networks with
switches and multi-conductor transmission lines. It advances a network
model by one fixed time step every few microseconds, so that real
protection relays or converter controllers can be tested against it
(hardware in the loop).

The central idea is to keep the network matrix constant. The network is
written in modified nodal form, `A x = b`, discretised with backward Euler:

- Every inductor and capacitor becomes a conductance plus a history current
  source.
- Every switch becomes a conductance `Gs` that is the same whether the switch
  is open or closed, plus a current source whose rule depends on the state.
- Every line mode becomes a characteristic conductance at each end plus a
  source fed by waves that left the other end one travel time earlier.
- The phase-to-mode transformations of the lines are extra rows of `A`
  whose right-hand side is zero.

So `A` never changes during a run. A host processor inverts it once. The
columns of `A^-1` that meet the zero rows of `b` are never used, so the host
drops them and loads the remaining `n x (n-h)` matrix `H`. From then on every
time step is only:

1. form `b`: all source currents and history sources, in parallel;
2. solve `x = H b`: one computational unit (CU) per element of `x`, all
   working at the same time;
3. update the history sources and write the line delay memories. Then record
   the monitored variables and refresh the analog outputs.

Switching a breaker or applying a fault changes one bit. Nothing is
re-inverted.

## Block overview

| module | role |
|---|---|
| `rts_top` | whole solver; host bus, analog inputs and outputs |
| `step_sequencer` | step timer and the stage sequence of each step, overrun detection, step-time statistics |
| `mvm_solver` | `N_X` compute units in parallel; loading of `H` |
| `compute_unit` | one row of `H` in `MULTS` memory banks, `MULTS` multipliers, adder tree, accumulator |
| `injection_builder` | adds every current source into its rows of `b` |
| `source_injection` | Norton sources: `g * value`, value from an analog channel or from the host |
| `lumped_companion` | backward-Euler history of an inductor or capacitor |
| `famnm_switch` | fixed-conductance switch model |
| `tl_mode_delay` | delay memory and Bergeron history of one line mode, with interpolation |
| `adc_interface` | holds the newest converter codes and scales them at the start of a step |
| `monitor_memory` | ring buffer of chosen variables, read by the host |
| `output_interface` | chosen variables converted to 16-bit output codes, with saturation |
| `host_interface` | register bus: configuration, `H`, switch states, status, monitor read-back |
| `branch_voltage` | helper: `x(p) - x(q)` with ground handling |
| `rts_pkg` | number format, configuration structs, fixed-point multiply |

## Numbers

All network quantities (voltages, currents, conductances and the entries of
`H`) are signed 64-bit fixed point with 32 fraction bits (`rts_pkg::fx_t`).
This gives a range of about ±2.1e9 and a resolution of 2.3e-10. That is
enough for line voltages of several hundred kV, and for conductances of a
20 kΩ termination, to five significant digits. A product is truncated, by an
arithmetic shift, back to the same format (`fx_mul`). To change the format,
edit `DW` and `FW` in the package. Every module follows.

Indices into `x` and `b` are 8 bits wide. The index 255 (`IDX_NONE`) is the
ground node: it reads as zero and takes no injection.

## The time step

`step_sequencer` raises a tick every `dt_cycles` clock cycles while `run` is
set. A step then goes through these stages:

| cycle | stage |
|---|---|
| 0 | tick |
| 1 | `sample`: analog codes scaled, switch states latched |
| 2 | source currents computed |
| 3 | `b` registered |
| 4 … 4+P+1 | compute units, `P = ceil(M_B/MULTS)` passes plus 2 pipeline cycles |
| next | `upd`: history sources of lumped elements and switches updated; line waves written; monitor and outputs stored |
| +4 | line units have read their delayed samples; step done |

With the default sizes (`M_B = 12`, `MULTS = 4`) a step takes 15 clock cycles.
A step budget of 4 µs at a 40 MHz clock is 160 cycles, which is the reset
value of `dt_cycles`. Most of that budget is left for larger networks: the
solve time grows with `ceil(M_B/MULTS)`, not with `N_X`. A tick that arrives
while a step is still running is counted as an overrun and dropped. The host
can read the overrun count and the largest step time, and so find out whether
a chosen step is real-time capable.

Switch states written by the host take effect at the next `sample`. They
therefore always apply to whole steps.

## History sources

With `v = x(p) - x(q)` the voltage of step `n`:

**Inductor** (`g = dt/L`): `ih(n+1) = g v(n) + ih(n)`. **Capacitor**
(`g = C/dt`): `ih(n+1) = -g v(n)`. The branch current is `g v + ih`. The unit
injects `-ih` into row `p` and `+ih` into row `q`. Resistors have no history:
they exist only in `A`.

**Switch** (conductance `Gs` in both states): its current is
`i_s = Gs v - J`, and

    J(n+1) = -i_s(n)     switch on   (behaves as an inductor dt/Gs)
    J(n+1) =  Gs v(n)    switch off  (behaves as a capacitor Gs*dt)

`J` is injected into row `p`. `Gs` is an artificial parameter. It is a
compromise: a larger `Gs` makes the closed switch closer to a short circuit,
but the open switch then shows a larger capacitance.

**Line mode** (characteristic conductance `Gc`, travel time
`tau = dly + frac` steps). At each end the modal branch equation is
`i_k - Gc v_k = I_k`. The unit stores the outgoing waves

    s_k(n) = 2 Gc v_k(n) + I_k(n)        s_m(n) = 2 Gc v_m(n) + I_m(n)

and forms the next sources from the waves that left `tau` steps earlier:

    I_k(n+1) = -(k_far s_m(n+1-tau) + k_near s_k(n+1-tau))
    I_m(n+1) = -(k_far s_k(n+1-tau) + k_near s_m(n+1-tau))

`k_far = 1`, `k_near = 0` is the lossless Bergeron line. Other weights
approximate a constant-parameter line with lumped series resistance, for
example `k_far = (1+h)/2` and `k_near = (1-h)/2`. A non-integer delay is
interpolated linearly between samples `n+1-dly` and `n-dly`. The delay memory
holds `TL_DEPTH` steps. `dly` must be between 1 and `TL_DEPTH-2`. Samples from
before the start of a run read as zero.

## Preparing a network (host side)

The hardware needs no knowledge of the circuit beyond indices and
coefficients. The host must:

1. Number the unknowns and order the equations:
   - first the node equations, with node `i`'s equation in row `i` and its
     voltage in `x(i)`;
   - then the extra rows with a right-hand side, such as the modal branch
     equations of the lines;
   - last the `h` transformation rows `v_phase - T_v v_mode = 0`.

   `b` is then the first `M_B = n-h` rows.
2. Stamp `A`:
   - every resistor, every companion conductance (`g` of each L and C, `Gs`
     of each switch), every source conductance;
   - `T_i` in the node rows against the modal currents;
   - `1` and `-Gc` in the modal branch rows;
   - the transformation rows.
3. Invert `A` and keep its first `M_B` columns as `H` (`N_X x M_B`).
4. Write `H`, the element records, the analog scales, the monitor and output
   selections, the step period. Then write `ctrl = clear | run`.

`tb/tb_rts_top.sv` does all of this in floating point for a 30 km
three-conductor line. It is a worked example of the numbering.

## Host bus

One-cycle writes (`we`, `addr[19:0]`, `wdata[63:0]`). Reads return `rdata`
with `rvalid` one cycle after `re`. Bits `[19:16]` select the region. In the
element regions the offset is `{element[15:4], field[3:0]}`.

| region | contents |
|---|---|
| 0 | write: 0 `ctrl` (bit 0 run, bit 1 clear pulse), 1 step period in cycles, 2 switch states (bit e = switch e closed). Read: 0 {busy, run}, 1 period, 2 switch states, 3 steps, 4 cycles of last step, 5 most cycles of a step, 6 overruns, 7 monitored steps, 8 conversions, 9 clipped output codes |
| 1 | `H(row, col)`, offset `{row[15:8], col[7:0]}` |
| 2 | lumped element: 0 kind (0 L, 1 C), 1 p, 2 q, 3 g |
| 3 | switch: 0 p, 1 q, 2 Gs |
| 4 | line mode: 0 vk, 1 vm (x indices of the modal voltages), 2 bk, 3 bm (rows of the modal branch equations), 4 2Gc, 5 k_far, 6 k_near, 7 dly, 8 frac |
| 5 | source: 0 row, 1 from analog input, 2 channel, 3 g, 4 host value |
| 6 | per channel: 0 analog input scale (units per code), 1 monitor select, 2 output select, 3 output gain (codes per unit) |
| 7 | read monitor memory, offset `{channel[15:12], step[11:0]}` |

Configuration should be written while `run` is 0. Switch states may be
written at any time.

## Analog inputs and outputs

`adc_valid` is a one-cycle strobe with a new set of signed 16-bit codes (the
converter runs at 1 MS/s in the reference platform). The value used in a step
is the newest code before the step's `sample`, times the channel scale. The
output codes are `floor(x * gain)`, saturated to 16 bits, with a strobe once
per step. Saturated codes are counted.

## Parameters

Defaults of `rts_top` are sized for the three-conductor line test case: 18
unknowns, 12 right-hand-side rows, 6 terminal capacitors, 3 fault switches,
3 line modes and 3 sources.

| parameter | default | meaning |
|---|---|---|
| `N_X` | 18 | unknowns (`n`), one compute unit each |
| `M_B` | 12 | rows of `b` (`n-h`) |
| `MULTS` | 4 | multipliers per compute unit |
| `N_LUMP`, `N_SW`, `N_TL`, `N_SRC` | 6, 3, 3, 3 | lumped elements, switches, line modes, sources (each at least 1) |
| `N_ADC`, `N_DAC`, `N_MON` | 4, 4, 4 | analog inputs, outputs, monitor channels |
| `TL_DEPTH` | 256 | line delay memory in steps (power of two) |
| `MON_DEPTH` | 1024 | monitor memory in steps (power of two, at most 4096) |
| `DT_RESET` | 160 | reset value of the step period in cycles |

## Where this design makes its own choices

The overall method is taken from the published approach:

- modified nodal analysis with backward Euler;
- a constant matrix with fixed-conductance switches;
- lines in modal form with delay memories and interpolation for non-integer
  delays;
- one parallel unit per element of `x` with a chosen number of multipliers;
- 1 MS/s analog inputs and memory for monitoring.

The following are this design's own choices:

- the fixed-point format;
- the switch sign convention (`i_s = Gs v - J`);
- linear interpolation (the interpolation method behind the approach is not
  specified);
- the two loss weights of a line mode;
- the Norton form of sources and the choice between an analog or a host value;
- the bus and address map, the timer and overrun policy, the pipeline of the
  compute units, the monitor ring buffer and the output scaling;
- all default sizes beyond the test case.

The host's work (building and inverting `A`) and the analog converter module
are outside this RTL. The testbenches model both.

## Verification

Every block has a self-checking testbench in `tb/` that compares against
values computed independently in the bench, mostly with floating point. Each
testbench ends by printing `TB_RESULT checks=N failures=M`. The end-to-end
bench `tb_rts_top` runs `rts_top` with its default parameters:

- it builds the 18 x 18 matrix of the 30 km line case, inverts it and loads
  `H`;
- it drives three-phase sinusoidal analog inputs at 1 MS/s and runs 400
  steps of 4 µs;
- it closes the phase-a fault switch at step 120 and opens it at step 260.

A floating-point model of the same discrete equations runs alongside. Each
step, the bench compares:

- the monitored left-end phase voltages and the fault-node voltage (within
  0.5 V);
- the output codes (within one code).

As a physical sanity check, while the fault is applied the far-end phase-a
voltage must fall below a fifth of its pre-fault peak. In the run it falls
from about 70 kV to about 4.5 kV.

It also checks that:

- the fractional line delays and the wrap-around of the delay memory are
  exercised;
- output saturation is exercised;
- the step takes at most 160 cycles (it takes 15);
- a too-short step period is flagged as overruns;
- clear works.

This checks the hardware against its own discrete model, not against a
reference transient program. The accuracy of backward Euler and of the
switch model with a given `Gs` is a property of the method.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/rts_pkg.sv \
        tb/tb_rts_top.sv --top-module tb_rts_top -o sim
    ./obj_dir/sim

Replace `tb_rts_top` by any other `tb_<module>` to run one block's test. Each
test finishes in well under a second.
