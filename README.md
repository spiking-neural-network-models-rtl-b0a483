# Nine spiking-neuron models as shift-and-add fixed-point hardware

This repository holds synthesizable SystemVerilog for nine spiking-neuron
models that are common in neuromorphic work. Each model is written as a small
hardware unit that is cheap on an FPGA:

- leaky integrate-and-fire (LIF)
- non-linear integrate-and-fire (NLIF)
- integrate-and-fire with spike-frequency adaptation (IF-SFA)
- quadratic integrate-and-fire (QIF)
- adaptive exponential (AdEx)
- spike response model (SRM)
- theta neuron
- Hodgkin-Huxley (HH)
- Izhikevich (IZH)

Each model turns its differential equation into a one-step Euler update on
integers. Every time constant, resistance, conductance and capacitance is a
power of two, so multiplying or dividing by it is a shift. The only
multipliers left are the squares in NLIF, QIF and IZH and the gating products
in HH. All models share one small controller that runs idle, firing and
refractory states.

The top level, `snn_models_top`, puts all nine models side by side. They get
the same input current and the same time-step strobe, so one stimulus gives
nine spike trains that can be compared directly. Each model's parameter
defaults are the values published for that comparison.

## One time step of a neuron

Every neuron module has the same interface:

| port    | dir | width   | meaning |
|---------|-----|---------|---------|
| `clk`   | in  | 1       | clock |
| `rst_n` | in  | 1       | synchronous active-low reset; loads the initial potential `V0` and zeroes the other state variables (HH gates start at their steady state for `V0`) |
| `step`  | in  | 1       | advance the model by one time step at this clock edge |
| `i_in`  | in  | `WIDTH` | signed input current |
| `spike` | out | 1       | high for one time step after a threshold crossing |
| `v`     | out | `WIDTH` | registered membrane potential, signed integer (mV) |
| `state` | out | 2       | `ST_IDLE`, `ST_FIRING` or `ST_REFRACTORY` (`snn_pkg::neuron_state_e`) |

Some models have extra ports. IF-SFA and AdEx output `w`. SRM has the input
`spike_in` and outputs `eta` and `eps`. IZH outputs `u`. HH outputs the gates
`m`, `h` and `n`.

One step happens in a single clock cycle:

1. The new potential `V(t)` is computed from the registered state. This is
   plain combinational logic. It is evaluated in 64-bit signed arithmetic
   (`snn_pkg::acc_t`) and then clamped to `WIDTH` bits (`sat_to`). A runaway
   equation therefore saturates instead of wrapping.
2. The new potential is compared with the threshold (`>=`). This is the new
   value, not the old one.
3. On the clock edge with `step` high, `neuron_fsm` decides what is stored:
   - **IDLE, no crossing:** the new potential is stored.
   - **IDLE, crossing:** `fire` is high. The reset potential is stored instead,
     and any spike-triggered increment is applied (w += b, eta += eta_spike,
     U += d). The FSM moves to FIRING.
   - **FIRING:** `spike` is high for this one step and the potential is held.
     The FSM then goes to REFRACTORY for `T_REF-1` further steps, or straight
     back to IDLE if `T_REF = 1`.
   - **REFRACTORY:** the potential is held, so input is ignored.
4. The other state variables (w, eta, eps, U, m, h, n) are updated on every
   step, including FIRING and REFRACTORY. Each update uses the previous
   potential.

With `step` tied high, a neuron does one update per clock. With the default
`T_REF = 2`, the fastest a neuron can fire is every third step: the crossing
step, the FIRING step and one REFRACTORY step. `spike` goes high one clock
after the crossing edge. When `step` is low, nothing changes. This lets a
slow biological time base run from a fast clock.

## The update rules

All operators below are on signed integers. `>>>` is an arithmetic shift and
rounds towards minus infinity. `V`, `w` and the other variables on the right
are the values from the previous step. Each rule is applied as an increment,
`V <- V + dV`.

| model | per-step update | default parameters |
|-------|-----------------|--------------------|
| LIF   | `dV = (-(V - V_R) + ((I <<< RM_S) >>> GL_S)) >>> TAU_S` | tau = Rm = gl = 8, V_th = -64, V_reset = -70, V_r = 0, V0 = -64 |
| NLIF  | LIF plus `V*V` inside the bracket | as LIF |
| IF-SFA| `dV = (-(V - V_R) + ((I <<< RM_S) >>> GL_S) - w) >>> TAU_S`; `w += (-w >>> TAUW_S) + (fire ? 2^B_S : 0)` | as LIF, tau_w = b = 8 |
| QIF   | `dV = (V*V + V_R + (I <<< CM_S)) >>> TAU_S` | tau = Cm = 8, V_th = -64, V_reset = -70 |
| AdEx  | `up = (((V - V_TH) >>> DT_S) + 1) <<< DT_S`; `dV = (-(V - V_R) + I - w + up) >>> TAU_S`; `w += ((V <<< A_S) - w) >>> TAUW_S + (fire ? 2^B_S : 0)` | tau = tau_w = Delta_T = 8, a = 4, b = 8 |
| SRM   | `dV = (-V + I + eta + eps) >>> TAU_S`; `eta += -(eta >>> ETA_S) + (fire ? ETA_SPIKE : 0)`; `eps += -(eps >>> EPS_S) + (spike_in ? EPS_SPIKE : 0)` | tau shift 3, kernel time constants 8, eta_spike = 10, eps_spike = 5 |
| Theta | `dV = (-(V - V_R) + ((V_TH - V) <<< G_S) + I) >>> TAU_S` | tau = g = 8, theta = V_th = -64 |
| HH    | `dV = (I - I_Na - I_K - I_L) >>> CM_S` with `I_Na = (m^3 h (V - E_NA)) <<< GNA_S`, `I_K = (n^4 (V - E_K)) <<< GK_S`, `I_L = (V - E_L) <<< GL_S`; `x += (x_inf(V) - x) >>> TX_S` for x in m, h, n | Cm = 8, gNa = 128, gK = 32, gl = 4, E_Na = 50, E_K = -82, E_l = -84, V_th = 50, V_reset = 0 |
| IZH   | `dV = (2V + 4V + (V*V >>> 4) + 140 - U + I) >>> DT_S`; `U += ((V >>> B_S) - U) >>> A_S`; on a spike `V = C`, `U += D` | a = 2, b = 16, c = -65, d = 8, V_th = 30, V0 = 0 |

A parameter ending in `_S` is the exponent of a power of two. For example,
`TAU_S = 3` means tau = 8.

In HH the gates are unsigned Q8 fractions, so 256 means 1.0. Each gate's
steady state `x_inf(V)` is a straight line through 0.5 at `X_HALF`, clamped to
[0, 1]:

- m: rises at 1/16 per mV, `M_HALF = -74`
- h: falls at 1/16 per mV, `H_HALF = -60`
- n: rises at 1/8 per mV, `N_HALF = -55`

The gate time constants are 1 step for m and 8 steps for h and n. A gate
relaxing towards `x_inf` with time constant `tau_x` is the same as the usual
`alpha(1-x) - beta*x` form, with `x_inf = alpha/(alpha+beta)` and
`tau_x = 1/(alpha+beta)`. The line-shaped `x_inf` and the fixed time constants
replace the exponential rate functions, which are not specified.

## Where this design reads the model equations its own way

The published shift-based equations do not all give working neurons when
they are taken literally. This RTL makes the choices below. Each one is also
stated at the top of the module it affects.

- **Euler increments.** The equations are printed as `V(t) = (-V(t-1) + ...) >> tau_s`.
  The continuous models are `tau dV/dt = ...`, so the bracket shifted by
  `tau_s` is used as the increment added to `V(t-1)`.
- **IF-SFA adaptation sign.** The adaptation current is printed with a plus
  sign. That would make the neuron fire faster as it adapts. Here `w` is
  subtracted, so adaptation lowers the firing rate, which is the point of the
  model.
- **QIF square sign.** The square is printed with a minus sign. With a minus
  sign the potential runs to minus infinity and the neuron never fires, so
  here it is `+V*V`.
- **AdEx exponential.** It is replaced by its first-order expansion around
  threshold, `Delta_T * (1 + (V - V_th)/Delta_T)`. The division is a right
  shift. The printed form shifts left twice, which gives a large negative
  drive below threshold.
- **AdEx adaptation sign.** `w` is subtracted, as in the usual AdEx form. With
  the printed plus sign and `w ~ a*V`, the potential is unstable.
- **AdEx spike increment.** No value of b is given for AdEx, so b = 8 is
  borrowed from IF-SFA.
- **HH current signs.** The ionic currents are subtracted from the input
  current. This is the physical sign; with the printed plus signs every
  current pushes V away from its reversal potential.
- **HH constants.** Conductances and capacitance are rounded to the nearest
  power of two: 120 becomes 128, 36 becomes 32, 3 becomes 4, 10 becomes 8.
- **HH rest and threshold.** The gate ramps are tuned so that the neuron
  rests near `E_l` at inputs of 0 and 20 and fires repetitively at 40 and
  above.
- **Izhikevich recovery variable.** The printed form `((V << a_s) - U) << b_s`
  grows without bound. The published a = 2 and b = 16 are used as divisors
  instead: U relaxes towards V/16 at rate 1/2. This matches the small
  fractional a and b of the textbook model.
- **Izhikevich time step.** The V update has no time-step scaling, as
  printed. `DT_S` can add one.
- **SRM time constant.** The listed "tau = 3" is taken as the shift 3. The
  listed kernel values of 8 are taken as their time constants.
- **Refractory period.** Its length is not specified. `T_REF = 2` applies to
  every model, including those without an explicit refractory period.
- **Other choices of this design.** These are also not specified: the 16-bit
  width, integer mV units, saturation, the `step` strobe, synchronous reset,
  zero initial adaptation variables and kernels, `V_R = 0` wherever none is
  listed, and HH `V0 = -84`.

Some behaviour follows directly from the equations and the shifts:

- **SRM kernels stop decaying.** A kernel decays as `k - (k >>> 3)`, and the
  shift rounds down, so the kernel stops decaying once it is below 8. In
  practice eta settles between 7 and the last spike increment.
- **NLIF and QIF nearly always fire.** With the default parameters the
  square term is 4900 at -70 mV. The neuron fires at every step the
  refractory period allows unless the input is strongly negative: below
  about -600 for QIF, whose input is scaled by 8, and below about -4900 for
  NLIF.
- **The LIF-type models fire at the maximum rate.** For LIF, IF-SFA, AdEx,
  SRM and Theta, the threshold (-64) is only 6 mV above the reset potential
  (-70). Under I = 50 they also fire every third step. For LIF this is easy
  to check by hand: -64 + (64+50)/8 = -50 fires; after two held steps,
  -70 + (70+50)/8 = -55 fires again. To see adaptation or sub-threshold
  behaviour, give these models a smaller input or a larger threshold gap.
- **IF-SFA adaptation is weak with the published values.** The increment
  b = 8 decays by 1/8 per step, so w stays small next to the 6 mV gap. The
  effect shows only close to threshold. At a constant I = -46 from reset, the
  first inter-spike interval is 5 steps and the later ones are 6.
- **HH and IZH firing rates.** Under I = 50, HH fires about every three to
  four steps once it has started. IZH fires every fourth step.
- **HH keeps firing once started.** Its reset potential (0 mV) lies where the
  sodium gate is fully open. Once it has fired, it goes on firing even when
  the input is removed, until it is reset.

## Top level: `snn_models_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n`, `step` | in | 1 | shared by all nine models |
| `i_in` | in | `WIDTH` | common input current |
| `srm_spike_in` | in | 1 | presynaptic spike for the SRM synaptic kernel |
| `spikes` | out | 9 | one spike per model, indexed by `snn_pkg::model_e` (LIF = 0 ... IZH = 8) |
| `v_all` | out | 9 x `WIDTH` | membrane potentials |
| `states` | out | 9 x 2 | FSM states |
| `ifsfa_w`, `adex_w`, `srm_eta`, `srm_eps`, `izh_u` | out | `WIDTH` | second state variables |
| `hh_m`, `hh_h`, `hh_n` | out | 9 | HH gates, Q8 |

The models do not connect to each other, and this level adds no latency.
There is no board wrapper (clock divider, switches, display). A wrapper for a
particular FPGA board only needs to drive `i_in` and `step` and show `spikes`.

## Size

Generic synthesis of the default top level gives 544 word-level cells and
287 flip-flop bits. Per model:

| model | flip-flop bits |
|-------|----------------|
| LIF, NLIF, QIF, Theta | 20 |
| IF-SFA, AdEx, IZH | 36 |
| SRM | 52 |
| HH | 47 |

LIF, for example, has a 16-bit potential, a 2-bit state and a 1-bit refractory
counter. All nine models together are a tiny fraction of a small Artix-7
device.

These numbers are not LUT counts for a specific FPGA and should not be
compared one-to-one with vendor reports. Two things do differ in kind from
published FPGA results for these models:

- The NLIF and QIF squares are real multipliers here.
- HH uses eight multipliers: three for m^3 h, three for n^4 and two for the
  driving forces. A smaller HH would time-share one multiplier over several
  cycles. That would change the one-step-per-clock timing.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- **`tb_<model>_neuron`** runs the neuron for 4000 cycles (HH for 6000) with
  a random step strobe and an input current that jumps between random
  levels. Alongside the RTL it integrates its own integer model of the
  equations and a reference FSM from `tb_ref_pkg`. Every cycle it compares
  the potential, spike, state and the extra state variables. It also
  requires that spikes, refractory steps and gated cycles all occurred. The
  LIF testbench also checks the hand-worked rate: 7 spikes in the first 20
  steps at I = 50. The IF-SFA testbench also checks that the inter-spike
  interval grows from 5 to 6 steps at I = -46.
- **`tb_neuron_fsm`** checks controllers with T_REF = 1, 2 and 3. A directed
  sequence checks the one-clock spike delay, the one-step spike and the
  refractory length. A random sequence is compared with the reference FSM.
- **`tb_snn_models_top`** runs the whole array with default parameters in
  four phases:
  1. I = 50 on every step, the comparison stimulus.
  2. I = 50 with random step gating.
  3. Reset, then no input.
  4. No input with random SRM presynaptic spikes.

  Each cycle it checks rules derived from the model definitions, not from
  the RTL:
  - a spike lasts one step and shows the reset potential;
  - the potential is frozen outside IDLE;
  - nothing changes without `step`;
  - the spike-triggered increments of IF-SFA, AdEx and IZH are correct;
  - the SRM synaptic increment is correct;
  - HH stays silent without input;
  - LIF fires 10 times in the first 30 steps;
  - HH and IZH fire at the steps that an independent integer model of their
    equations predicts for the first 30 steps.

  It counts each of these events and fails if any of them never happened.

To simulate with Verilator (5.x), from the repository root:

```
verilator --binary --timing -Wno-fatal --top-module tb_snn_models_top \
    -y rtl -y tb rtl/snn_pkg.sv tb/tb_ref_pkg.sv tb/tb_snn_models_top.sv
./obj_dir/Vtb_snn_models_top
```

Use the same command with another testbench name to run it; the packages
must come first. `verilator --lint-only -Wall -y rtl rtl/snn_pkg.sv
rtl/snn_models_top.sv` lints the design. The remaining lint warnings are
about the unused upper bits of the 64-bit intermediate values, which are
cut to `WIDTH` bits on purpose.

## Changing the design

- **Model parameters.** Every constant is a module parameter. Shift
  parameters must be non-negative. Thresholds and potentials are plain
  signed integers.
- **Word width.** `WIDTH` changes the storage width of every state variable.
  Intermediate values are always 64 bits, which is enough for `WIDTH` up to
  about 30 bits (squares and gate products).
- **Refractory length.** `T_REF` sets it and must be at least 1. It counts
  the FIRING step.
- **Top-level parameters.** The top level passes only `WIDTH` down. To try
  another parameter set, override the parameters on the instances in
  `snn_models_top.sv`.
- **Gated time base.** To run at biological time rather than one step per
  clock, drive `step` from a counter.

## Files

- `rtl/snn_pkg.sv`: shared types (`acc_t`, `neuron_state_e`, `model_e`) and
  the saturation function.
- `rtl/neuron_fsm.sv`: the idle/firing/refractory controller.
- `rtl/lif_neuron.sv`, `nlif_neuron.sv`, `ifsfa_neuron.sv`, `qif_neuron.sv`,
  `adex_neuron.sv`, `srm_neuron.sv`, `theta_neuron.sv`, `hh_neuron.sv`,
  `izh_neuron.sv`: the nine models.
- `rtl/snn_models_top.sv`: the nine-model array.
- `tb/tb_ref_pkg.sv`: the reference FSM and saturation used by the
  testbenches.
- `tb/tb_*.sv`: one testbench per module.
