# Component-based real-time simulator of AMPA and NMDA synaptic currents

This is synthesizable SystemVerilog for a small real-time simulator of a
patch of neuronal membrane with excitatory synapses. Applications such as
dynamic clamp need the model's ion-channel currents at every time step, and
the model parameters must be changeable while it runs.

Each step computes the AMPA current (alpha-function conductance), the NMDA
current (dual exponential with voltage-dependent magnesium block), and the
new membrane voltage. The exponentials and the divisions are not read from
precomputed look-up tables over time or voltage. Small arithmetic components
compute them instead, using only shifts, additions and a few constant tables
whose size grows linearly with the word length. Every model parameter is an
input port, so it can be changed between any two steps.

The channel models are:

```
AMPA:  I = g_const * t * exp(-t / t_peak) * (V - E)
NMDA:  I = g_n * (V - E) / (1 + eta*[Mg]*exp(-gamma*V)) * (exp(-t/tau_1) - exp(-t/tau_2))
V:     V <- V - k_leak*(V - V_rest) - k_cap * sum(I)      (k_leak = g_leak*dt/C_m, k_cap = dt/C_m)
```

`t` is the number of steps since the presynaptic event. `V` is in mV.

## One simulation step

`ionsim_top` ties the parts together:

```
 enable --> time_counter --t--+--> AMPA channel(s) --I--+
                              |                         +--> membrane_integrator --> V (register R)
                              +--> NMDA channel(s) --I--+              |
                                        ^                             |
                                        +------------ V --------------+
```

1. A rising edge on `enable` (the presynaptic event) sets `t = 0` and loads
   `V` with `memb_p.v_init`.
2. All channel blocks start in the same cycle with the same `t` and `V`. They
   run in parallel, each on its own components.
3. When the last channel is done, `membrane_integrator` sums the currents and
   computes the leak. It then updates `V`.
4. `sample_valid` pulses for one cycle. In that cycle `sample_t`, `v_m`, `i_ampa[]` and
   `i_nmda[]` hold the result of the step. Then `t` advances.
5. While `enable` stays high, the next step starts immediately. When `enable`
   falls, the run ends after the current step.

A step takes one start cycle, plus the NMDA block latency, plus the
integrator latency. With the defaults that is 1 + 48 + 3 = 52 cycles; with
`MIN_RES = 1` it is 1 + 92 + 5 = 98. The time stamp is 15 bits wide and holds at 32767.

## Number format

All values are signed Q15.16 words (`ionsim_pkg::fx_t`, 32 bits, 16 of them
fractional). The 16-bit fraction is the resolution the design targets. The
integer bits hold voltages in mV and exponentials up to about e^10. All
components round to nearest and saturate at the word limits.

One consequence matters when you choose parameter units. A small factor such
as `exp(-8) = 0.00034` has only about 22 LSBs of resolution. A large product
built on it therefore carries a relative error of a few percent. Scale the
currents so that they are not tiny in Q15.16. The test parameters use
`g_const = 0.01`, `g_n = 1`, and currents of the order of 1 to 300.

## The exponential unit (`exp_factoring`)

`e^x` is split as `e^I * e^f`, where `I = floor(x)` and `f = x - I` is in
[0, 1). For the negative arguments of the channel models this is the same as
writing `e^(-A-B) = e^(-A-1) * e^(1-B)`.

- **Fractional part (additive normalisation).** Start with residual `r = f`
  and `y = 1`. For `j = 0, 1, ..., ITER`: if `r >= ln(1 + 2^-j)`, then
  `r -= ln(1 + 2^-j)` and `y += y >> j`. When the loop ends, `y = e^f` within
  about 2^-ITER. Each step is one compare, one subtract and one shift-add.
  The `j = 0` step (a factor of 2) is needed because the factors with
  `j >= 1` only reach e^0.87.
- **Integer part.** `e^I` comes from a 23-entry table (I = -12 .. 10) with 32
  fractional bits, and is applied with one multiply. Below I = -12 the result
  is 0. Above I = 10 it saturates.
- Both tables are computed at elaboration with `$ln` and `$exp`. The ln table
  has ITER + 1 entries, so it grows linearly with the precision.
- Latency: `ITER + 3` cycles (19 at the default). It does not depend on the
  argument.
- The parameter `FRAC_X` (default 16) sets the fractional bits of `x` and
  `y`; the integer part keeps its 16 bits. The channel blocks use the
  default. A wider unit (for example `FRAC_X = 20`) is useful on its own for
  precision studies; `IMIN` follows as `floor(-(FRAC_X + 1) ln 2)`.

## The divider (`div_factoring`)

`num / den` with `den > 0` is computed by multiplicative normalisation:

- A leading-one detector scales `den` to `x` in [1, 2).
- Each step tries `a = x - (x >> i)`. If `a >= 1`, then `x = a` and
  `y -= y >> i`. `x` falls towards 1, and `y` (which starts at `|num|`)
  falls towards `|num| / x`.
- The textbook single pass over `i = 1..n` does not converge for
  `x > ~1.73`. Each factor `(1 - 2^-i)` removes slightly more than all later
  factors together, so a greedy pass stalls. The divider therefore tries the
  shifts `i = 2..ITER/2` twice each, then `i = ITER/2+1..ITER+1` once. That
  is 23 steps for ITER = 16, with a residual below about 2^-16.
- At the end the quotient is shifted back by the normalisation exponent. It
  is rounded, its sign is restored, and it saturates. With `den <= 0` the
  output saturates with the sign of `num`.
- Latency: `3*ITER/2 + 1` cycles (25 at the default).

## Two mappings of each channel: maximum speed and minimum resources

Each channel is written as a set of independent processes:

```
AMPA: P1 = exp(-t * 1/t_peak) || P2 = g_const * t || P3 = V - E ;  I = (P1*P2)*P3
NMDA: P4 = exp(-t/tau_1) || P5 = exp(-t/tau_2) || P6 = eta*[Mg] || P7 = exp(-gamma*V) || P8 = V - E
      P9 = P4 - P5 || P10 = P6*P7 + 1 || P11 = g_n*P8 ;  I = (P11 / P10) * P9
```

Each channel exists in two versions with the same ports:

| block            | multipliers | exp | div | adders | delay formula                  | cycles (ITER=16) |
|------------------|-------------|-----|-----|--------|--------------------------------|------------------|
| `ampa_maxspeed`  | 2 (+1 in exp) | 1 | -   | 1      | 3 T_mul + T_exp                | 22               |
| `ampa_minres`    | 1 (+1 in exp) | 1 | -   | 1      | 4 T_mul + T_exp                | 23               |
| `nmda_maxspeed`  | 4 (+3 in exp) | 3 | 1   | 2      | 3 T_mul + T_div + T_exp + T_add | 48              |
| `nmda_minres`    | 1 (+1 in exp) | 1 | 1   | 1      | 7 T_mul + T_div + 3 T_exp + 3 T_add | 92          |
| `membrane_integrator` max | 2  | -   | -   | 3      | T_mul + 2 T_add                | 3                |
| `membrane_integrator` min | 1  | -   | -   | 1      | 2 T_mul + 3 T_add              | 5                |

T_mul = T_add = 1, T_exp = ITER + 3 and T_div = 3*ITER/2 + 1. The formulas
are in `ionsim_pkg` (`ampa_max_latency()` and the others), and the
testbenches check them cycle by cycle.

- **Maximum speed.** The independent processes run on their own components.
  A component is reused only once its result has been consumed.
- **Minimum resources.** A single component of each kind runs the operations
  one after another. The operation order is fixed in a small state machine.

The maximum-speed blocks are the default (`MIN_RES = 0`). `MIN_RES = 1`
selects the minimum-resource blocks for all channels and for the membrane
integrator.

Intermediate values are read straight from the registered outputs of the
components. Each value stays there until its component is reused. Only the
values that must outlive a reuse get extra registers.

## Membrane integrator and sign convention

`membrane_integrator` is register R plus its update,
`V <- V - k_leak (V - V_rest) - k_cap * sum(I)`. In the maximum-speed form
the update has three stages:

1. `V - V_rest`, with the channel currents summed alongside.
2. The two products, on two multipliers.
3. The accumulator subtracts both products from `V`.

In the minimum-resource form (`MIN_RES = 1`) one multiplier and one adder
take the same work in five steps: `V - V_rest`, `k_leak * (V - V_rest)`,
`k_cap * sum(I)`, the sum of the two products, and the subtraction from `V`
in the accumulator. The channel currents are summed by a combinational adder
tree in both forms, and the accumulator register has its own subtractor.

The currents follow `I = g (V - E)`, so an inward (excitatory) current is
negative. The integrator subtracts the summed current, so EPSCs depolarise
the membrane. Setting `k_leak = k_cap = 0` holds `V` at `v_init`, which
gives a voltage clamp. `tb_ionsim_error_sweep` uses this.

## Interface of `ionsim_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `N_AMPA`, `N_NMDA` | 1, 1 | number of channel blocks of each kind (at least 1 each) |
| `ITER` | 16 | factoring steps: precision about 2^-ITER |
| `MIN_RES` | 0 | 0 = maximum-speed channel and membrane blocks, 1 = minimum-resource blocks |

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock and asynchronous active-low reset |
| `enable` | in | rising edge starts a run at t = 0; the run continues while it is high |
| `ampa_p[N_AMPA]` | in | `ampa_param_t`: `inv_tpeak` (1/t_peak per step), `g_const`, `e_rev` |
| `nmda_p[N_NMDA]` | in | `nmda_param_t`: `inv_tau1`, `inv_tau2`, `eta`, `mg`, `gamma`, `g_n`, `e_rev` |
| `memb_p` | in | `memb_param_t`: `k_leak`, `k_cap`, `v_rest`, `v_init` |
| `running` | out | a run is in progress |
| `sample_valid` | out | one-cycle pulse per completed step |
| `sample_t`, `v_m`, `i_ampa[]`, `i_nmda[]` | out | time stamp, membrane voltage and currents of that step |

Parameters are sampled when a step starts, and can be changed at any time.
`tau_1` is meant to be the slower NMDA time constant, so that
`exp(-t/tau_1) - exp(-t/tau_2) >= 0`.

## How far it has been checked

Every block has a self-checking testbench. Each one compares the block with
the same formula evaluated in double precision, with a tolerance derived from
the Q15.16 rounding. Each one also checks the latency in cycles.

- `tb_ionsim_top` runs the default design for 5000 time stamps
  (t_peak = tau_1 = 600, tau_2 = 50). It checks every current, every
  voltage update and the 52-cycle step period. It also changes parameters in
  the middle of the run, stops the run, and restarts it.
- `tb_ionsim_top_minres` runs the minimum-resource build with two channels of
  each kind and checks its 98-cycle step.
- `tb_membrane_integrator_minres` checks the five-cycle integrator.
- `tb_ionsim_top_iter` runs three copies of the simulator with `ITER` = 8,
  12 and 16 for 1000 stamps (helper `tb_top_at_iter`). They take 32, 42 and
  52 cycles per step. The mean AMPA error, normalised to the peak current,
  is 1.5e-3, 9.5e-5 and 1.5e-5; for NMDA it is 7.9e-4, 4.9e-5 and 7.8e-6.
  Fewer steps trade precision for speed even though the words stay Q15.16.
- `tb_exp_precision` measures the exponential unit on 2000 arguments in
  (0, 1.38], against e^x in double precision. The mean relative errors are:

  | fraction bits | ITER | mean error | std    |
  |---------------|------|------------|--------|
  | 16            | 14   | 3.3e-5     | 1.8e-5 |
  | 16            | 16   | 1.1e-5     | 5.0e-6 |
  | 20            | 18   | 2.1e-6     | 1.1e-6 |
  | 20            | 20   | 7.8e-7     | 3.4e-7 |

  With 16 fraction bits and 16 steps, most of the error is the rounding of
  the output word.
- `tb_ionsim_error_sweep` runs the default design under voltage clamp for
  5000 stamps at time constants of 100 to 1200 steps. The mean error,
  normalised to the peak current, was about 2e-5 to 7e-5 for AMPA and about
  5e-6 to 7e-6 for NMDA.

The channel blocks and the top also carry assertions for their start/busy
handshakes: no exponential unit, divider, channel block or integrator is
ever started while it is still busy. They run in every simulation with
assertions enabled (`--assert`).

Timing closure and FPGA resource use have not been measured. The design has
only been simulated and checked by the synthesis front end.

## Where this design makes its own choices

These points are not fixed by the method the design follows, and were chosen
here:

- Word format Q15.16, with rounding and saturation everywhere. Component
  latencies are one cycle for multiply and add.
- The integer part of the exponent uses a table of e^k and one multiply,
  instead of repeated multiplications by e^-1.
- The divider normalises by its leading one and repeats the first half of its
  shifts (see above).
- The time counter advances once per completed step, not once per clock.
  Start and step are coordinated by simple start/done pulses.
- The membrane equation is integrated with forward Euler, with the current
  sign as described above.
- The cycle counts differ from published figures for this kind of
  component-based design, which are 23 cycles for AMPA and 37 for NMDA at
  16 bits. This design takes 22 and 48. The difference comes mostly from the
  23-step divider.
- The system word has 16 fractional bits; 8- and 12-bit variants are not
  provided. `ITER` can be lowered (see `tb_ionsim_top_iter`), but the words
  keep 16 fractional bits. Only the exponential unit has its own
  fraction-width parameter, `FRAC_X`, for stand-alone use.
- The `MIN_RES` switch chooses one mapping for all channel blocks and the
  integrator together. Mixing mappings needs a small change in `ionsim_top`.
- Not provided: an ADC front end and a host link. All inputs and outputs are
  plain ports.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/ionsim_pkg.sv tb/tb_util_pkg.sv tb/tb_ionsim_top.sv --top-module tb_ionsim_top
./obj_dir/Vtb_ionsim_top
```

Use the same command for any other testbench: replace `tb_ionsim_top` with
the testbench's name. Each testbench ends by printing
`TB_RESULT checks=N failures=M`. `tb/tb_util_pkg.sv` holds the conversions
between real numbers and Q15.16, and the reference models.

## Files

- `rtl/ionsim_pkg.sv`: word format, parameter records, saturation, latency formulas
- `rtl/fx_mul.sv`, `rtl/fx_add.sv`: multiplier and adder components
- `rtl/exp_factoring.sv`, `rtl/div_factoring.sv`: shift-and-add exponential and divider
- `rtl/ampa_maxspeed.sv`, `rtl/ampa_minres.sv`, `rtl/nmda_maxspeed.sv`, `rtl/nmda_minres.sv`: channel blocks
- `rtl/membrane_integrator.sv`: register R, leak and accumulator
- `rtl/time_counter.sv`: ENABLE-edge time base
- `rtl/ionsim_top.sv`: the simulator
- `tb/`: one testbench per block, plus `tb_ionsim_top_minres`,
  `tb_membrane_integrator_minres`, `tb_ionsim_error_sweep`, `tb_exp_precision`
  and `tb_ionsim_top_iter` (with its helper `tb_top_at_iter`)
