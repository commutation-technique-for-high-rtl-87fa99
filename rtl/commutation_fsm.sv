// commutation_fsm: twelve-state commutation controller for the thyristor
// ac-ac converter of a high-frequency-link inverter.
//
// The state machine chooses which of the four thyristor pairs is gated so
// that the load current always has a conducting path, without dead time and
// without ever moving directly from a steady pair of one current polarity to
// a steady pair of the other polarity.
//
// Inputs (registered elsewhere, sampled on every clock):
//   sense.v_pos  link voltage > 0          sense.i_pos  output current > 0
//   sense.i_big  |output current| > limit  pwm1 / pwm2  the two modulator PWMs
// The fourth input of the method, "PWM of the incoming pair", is formed here
// for each candidate transition from pwm1 (S1S2, S3S4) or pwm2 (S5S6, S7S8).
//
// Transition rules (X is the present pair, pX its current polarity, Vx the
// link polarity at which X drives current up):
//   STEADY X or DPRIME X
//     |I| > lim, I sign = pX, PWM of pair(V,I) = 1   -> STEADY pair(V,I)
//     |I| < lim and V != Vx (X is freewheeling)     -> PRIME pair(V, not pX)
//   PRIME X'
//     I sign = pX (current has reversed into X):
//       |I| > lim and PWM of pair(V,I) = 1          -> STEADY pair(V,I)
//       |I| < lim                                   -> PRIME pair(V, pX)
//     I sign != pX (current has not yet reversed):
//       PWM of pair(V,I) = 1                        -> DPRIME pair(V,I)
//   otherwise the state holds.
// These rules reproduce every commutation sequence of the method's three
// operating cases (steady -> prime -> steady; prime -> prime on a link
// reversal while |I| < lim; prime -> double prime -> prime when the PWM asks
// for the old polarity before the current has reversed). They are written
// here as rules derived from those sequences; for input combinations that
// the sequences never reach (for example a large current in the opposite
// direction of a steady pair) the choice of this design is that the state
// holds.
//
// Timing: one registered state update per clock; state is valid one cycle
// after the inputs. Reset (synchronous, active low) goes to STEADY S1S2,
// a choice of this design.
module commutation_fsm
  import hfl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sense_t      sense,
  input  logic        pwm1,
  input  logic        pwm2,
  output comm_state_t state
);

  comm_state_t nxt;

  always_comb begin
    pair_e drive;     // pair that drives the present current at this link polarity
    logic  px;
    drive = pair_of(sense.v_pos, sense.i_pos);
    px    = pair_ipol(state.pair);
    nxt   = state;
    unique case (state.kind)
      K_PRIME: begin
        if (sense.i_pos == px) begin
          if (sense.i_big && pair_pwm(drive, pwm1, pwm2))
            nxt = '{kind: K_STEADY, pair: drive};
          else if (!sense.i_big)
            nxt = '{kind: K_PRIME, pair: drive};
        end else if (pair_pwm(drive, pwm1, pwm2)) begin
          nxt = '{kind: K_DPRIME, pair: drive};
        end
      end
      default: begin  // K_STEADY, K_DPRIME
        if (sense.i_big && sense.i_pos == px && pair_pwm(drive, pwm1, pwm2))
          nxt = '{kind: K_STEADY, pair: drive};
        else if (!sense.i_big && sense.v_pos != pair_vpol(state.pair))
          nxt = '{kind: K_PRIME, pair: pair_of(sense.v_pos, !px)};
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= '{kind: K_STEADY, pair: P12};
    else        state <= nxt;
  end

  // A steady state is only ever entered from a state of the same current
  // polarity: every change of current polarity passes a transition state.
  // The state is always one of the twelve legal states.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_no_direct_reversal: assert (nxt.kind != K_STEADY ||
                                    pair_ipol(nxt.pair) == pair_ipol(state.pair));
      a_legal_kind: assert (state.kind != 2'd0);
    end
  end

endmodule
