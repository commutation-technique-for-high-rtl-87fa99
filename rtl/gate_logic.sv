// gate_logic: thyristor gate drive from the commutation state.
//
// In a PRIME state the state's pair is gated continuously; in STEADY and
// DPRIME states it is gated only while its PWM is 1 (PWM1 for S1S2 and
// S3S4, PWM2 for S5S6 and S7S8). All other thyristors are off. Thyristors
// latch once they conduct, so a gate pulse only has to be present while a
// pair is meant to take over the current.
//
// Outputs:
//   gate[0..7]  gate of S1..S8 (gate[0] = S1). Pairs: S1S2, S3S4, S5S6, S7S8.
//   pair_code   0 when no pair is gated, 1..4 for S1S2, S3S4, S5S6, S7S8
//               (the "which pair is on" monitor signal)
//   kind_code   1 steady, 2 prime, 3 double prime (state-class monitor)
// The gate outputs are registered (one clock after state/PWM) so they are
// glitch-free; this register is a choice of this design.
module gate_logic
  import hfl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  comm_state_t state,
  input  logic        pwm1,
  input  logic        pwm2,
  output logic [7:0]  gate,
  output logic [2:0]  pair_code,
  output logic [1:0]  kind_code
);

  logic       on;
  logic [7:0] gate_c;

  always_comb begin
    on     = (state.kind == K_PRIME) || pair_pwm(state.pair, pwm1, pwm2);
    gate_c = '0;
    if (on) gate_c[2*state.pair +: 2] = 2'b11;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gate      <= '0;
      pair_code <= '0;
      kind_code <= '0;
    end else begin
      gate      <= gate_c;
      pair_code <= on ? 3'(state.pair) + 3'd1 : 3'd0;
      kind_code <= state.kind;
    end
  end

  // At most one pair is gated at a time, so no two pairs can short the link.
  always_ff @(posedge clk) begin
    if (rst_n) a_one_pair: assert ($countones(gate) == 0 || $countones(gate) == 2);
  end

endmodule
