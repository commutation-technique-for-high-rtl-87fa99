# Dead-time-free commutation controller for a high-frequency-link inverter

## The idea

A high-frequency-link (HF-link) inverter turns a DC source into line-frequency AC in two steps:
1. A primary full bridge chops the DC into a square wave of a few kHz.
2. The square wave goes through a small high-frequency transformer.
3. On the secondary, an ac-ac bridge of eight thyristors (S1..S8) turns it into PWM'd, line-frequency output for the load or grid.

The thyristors are grouped into four pairs. Each pair passes one direction of load current and puts one polarity of the link on the output:

| pair | gated for link | and current | output voltage |
|------|----------------|-------------|----------------|
| S1S2 | positive | I > 0 | +v_link |
| S3S4 | negative | I > 0 | −v_link |
| S5S6 | positive | I < 0 | −v_link |
| S7S8 | negative | I < 0 | +v_link |

A thyristor turns on when it is gated, and turns off only when its current is pushed to zero. That happens naturally at a link reversal, when another gated pair takes the current over. Because of this, the bridge never needs dead time.

The difficulty is the load-current zero crossing. A pair of the new current polarity has to be gated before the current reverses. If the link also reverses during that window, a simple four-state controller can toggle between two pairs of the *old* polarity. That adds distortion, and the current can even grow in the wrong direction.

This design implements a **twelve-state** commutation state machine that removes the failure. Each pair has three states:

- **steady** `X`: used only while |I| > limit and the current has its expected sign. The pair is gated only while its PWM signal is 1.
- **prime** `X'`: a transition state entered near the zero crossing. The pair is gated **continuously**, whatever the PWM says, so the reversing current always has a path.
- **double prime** `X''`: a transition state entered when the PWM asks for a pair of the old current polarity before the current has actually reversed. The pair is gated only while its PWM is 1.

While |I| is below the limit, the machine can only move between transition states. It reaches a steady state only once the current is large and has the sign of the pair it came from. So it can never jump straight from a steady pair of one polarity to a steady pair of the other.

## State machine inputs and rules

The inputs are registered every clock:
- `v_pos`: link > 0
- `i_pos`: output current > 0
- `i_big`: |I| > limit
- the *incoming pair's PWM*: PWM1 for S1S2/S3S4, PWM2 for S5S6/S7S8

For each candidate transition, the incoming pair is the one that matches the present link polarity and current sign. Notation: `X` is the present pair, `pX` its current polarity, and `Vx` the link polarity at which `X` drives current up.

```
STEADY X or DOUBLE-PRIME X
  i_big, i_pos = pX, PWM(pair(V,I)) = 1   -> STEADY pair(V,I)      (ordinary PWM commutation)
  !i_big and V != Vx  (X now freewheels)   -> PRIME  pair(V, !pX)   (prepare the new polarity)
PRIME X'
  i_pos = pX  (current has reversed into X):
    i_big and PWM(pair(V,I)) = 1           -> STEADY pair(V,I)
    !i_big                                 -> PRIME  pair(V, pX)    (link reversed again while small)
  i_pos != pX (not reversed yet):
    PWM(pair(V,I)) = 1                     -> DOUBLE-PRIME pair(V,I)
otherwise hold
```

These rules reproduce the three operating cases of the method, in all four directions (positive to negative and back, with either link polarity). Take a positive-to-negative crossing while the link is negative:

- **Case 1**, where the current reverses within one link half-period:
  S3S4 → S1S2 → S7S8' → S5S6.
  S7S8' is gated continuously. Once the current is negative and large, the PWM moves the state to S5S6. It can never return to S1S2.
- **Case 2**, where the link reverses while the current is still inside ±limit:
  S7S8' → S5S6' on the link reversal, then S5S6' → S7S8' and so on, until |I| exceeds the limit.
  The machine stays on the negative-current pairs. The previous method would have toggled S1S2/S7S8 here.
- **Case 3**, where the PWM asks for a pair of the old polarity before the current has reversed:
  S7S8' → S3S4'' (current still positive, PWM1 = 1).
  At the next link reversal, S3S4'' → S5S6'. The machine then stays on the negative-current pairs (S5S6'/S7S8') until |I| exceeds the limit and S5S6 or S7S8 becomes steady.

Reset (synchronous, active low) goes to steady S1S2.

## Blocks

| module | what it does |
|---|---|
| `hfl_pkg` | types: `pair_e` (P12, P34, P56, P78), `kind_e` (steady = 1, prime = 2, double prime = 3), `comm_state_t`, `sense_t`; pair helper functions |
| `hf_link_gen` | square-wave timing of the primary bridge: `qa`/`qb`, link polarity, one-clock pulse at each reversal. Half-period in clocks is a run-time input. |
| `sine_reference` | line-frequency modulation function. A 32-bit phase accumulator addresses a 256-entry sine table, and the output is scaled by a Q1.15 modulation index. |
| `pwm_modulator` | sine-sawtooth PWM. A falling sawtooth carrier is shared by both PWMs: PWM1 compares +m and PWM2 compares −m (the modulation 180° shifted). |
| `sense_frontend` | registers the link comparator, the current sign, and the comparison of the current magnitude with the limit |
| `commutation_fsm` | the twelve-state machine above |
| `gate_logic` | state → eight thyristor gates. Prime states are gated always; steady and double-prime states are gated with their PWM. It also outputs a pair code: 1..4 = S1S2..S7S8 gated, 0 = none. |
| `hflink_commutation_top` | connects all of the above |

### Top-level interface (`hflink_commutation_top`)

Parameters:
- `CLK_HZ` = 20 000 000
- `F_LINE` = 60
- `IW` = 16 (width of the current sample)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `v_link_pos` | in | 1 | comparator on the secondary link voltage, 1 = positive |
| `i_sample` | in | IW signed | output current sample (1 count = 1 mA in the testbenches) |
| `i_limit` | in | IW | commutation current limit, same units |
| `m_index` | in | 16 | modulation index, Q1.15 |
| `link_half` | in | 16 | clocks per link half-period (≥ 2); 5000 = 2 kHz at 20 MHz |
| `prim_qa`, `prim_qb`, `link_cmd_pos` | out | 1 | primary bridge diagonals, commanded link polarity |
| `gate` | out | 8 | thyristor gates; bit 0 = S1 … bit 7 = S8 |
| `pwm1`, `pwm2`, `m_ref` | out | 1, 1, 16 | modulator signals |
| `state`, `pair_code`, `kind_code` | out | 4, 3, 2 | state-machine monitors |
| `link_edge`, `carrier_start`, `line_start` | out | 1 | one-clock event pulses |

### Timing

- A change of a sensed input reaches `gate` after **3 clocks**: the sense register, the state register, then the gate register. At 20 MHz that is 150 ns, negligible next to a 250 µs link half-period.
- The PWM carrier has one period per link half-period and is restarted at every commanded link reversal.
- Its falling slope places each PWM pulse at the end of the half-period. The gated pair therefore conducts from its gate edge until the link reverses, and the reversal is what commutates it off. The average output over a half-period is m·|V_link|.

Resources after generic synthesis of the top:
- about 130 cells
- 154 flip-flop bits
- one 256 × 16 table (4096 bits)

## Simulating

The testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
          --top-module tb_hflink_full rtl/hfl_pkg.sv tb/tb_hflink_full.sv
obj_dir/Vtb_hflink_full
```

Replace `tb_hflink_full` with any testbench below.

- **Block tests:**
  - `tb_commutation_fsm`: every directed commutation sequence of the three operating cases, plus 20 000 random steps with invariant checks (no direct polarity reversal between steady states, legal kinds)
  - `tb_gate_logic`: exhaustive
  - `tb_sense_frontend`
  - `tb_pwm_modulator`: duty cycle, carrier restart, complementary modulation
  - `tb_sine_reference`: against a real-valued sine
  - `tb_hf_link_gen`
- **Closed loop:** these use a behavioural bridge model in `tb/acac_bridge_model.sv`. It models the thyristors (latching, natural turn-off, freewheeling) and an R-L load, integrated each clock.
  - `tb_hflink_top` runs four operating points at a 2 MHz clock: 35 V and 17 V at 2 kHz, 17 V at 4 kHz, and 18 V / 0.78 Ω / 32 mH at 1 kHz. It checks legal gate patterns, one output polarity change per half line cycle, the current amplitude, and that each of operating cases 1, 2 and 3 and natural commutation actually occurs.
  - `tb_hflink_full` runs the top at its default parameters (20 MHz, 60 Hz) at 17 V, 10 Ω, 20 mH and 2 kHz, for two line periods.
  - `tb_thd_sweep` measures output-current THD over sweeps of link voltage, switching frequency and load inductance.

### Results (new method, index 0.8, 50 mA limit)

| sweep | conditions | THD |
|---|---|---|
| link voltage | 5 V / 10–30 V, 2 kHz, 10 Ω, 20 mH | 4.3 % / 3.1 % |
| switching frequency | 2 / 3.5 / 5 / 6.5 / 8.5 kHz, 17 V, 10 Ω, 20 mH | 3.1 / 2.4 / 2.0 / 2.2 / 2.7 % |
| load inductance | 20 / 100 / 180 / 250 / 290 mH, 120 V, 50 Ω, 1 kHz | 39.9 / 6.3 / 4.7 / 4.3 / 4.3 % |

The trends agree with those described for the method:
- THD falls with a larger link voltage.
- THD at 120 V and 20 mH is high. There the ripple at one switching period is larger than the current amplitude, and below the limit the state machine deliberately does not follow the PWM.

In every run the state machine never gated two pairs at once and never produced a wrong-polarity toggle.

## What follows the method and what is this design's own

From the method:
- the twelve states and what each one gates
- the four inputs
- PWM1 serving S1S2/S3S4 and PWM2 serving S5S6/S7S8
- two PWMs from one carrier with the modulation shifted 180°
- every commutation sequence listed above
- the pair-code numbering

This design's own choices:
- **The transition rules.** They are written as the smallest rule set that produces the described sequences. Input combinations the sequences never reach hold the state.
- **The operating values:** the 20 MHz clock, 60 Hz line frequency, 16-bit current sample and reset state.
- **The carrier.** It is locked to the link, one period per link half-period, with its pulse at the end of the half-period.
- **The current limit** is a run-time input.
- **The supporting blocks:** link timing generator, sine table and sensing registers.

Not built:
- the power stages, the transformer and the analog sensing, which are power hardware rather than logic
- the earlier four-state method, which is only a baseline for comparison
