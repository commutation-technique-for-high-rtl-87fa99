// comm_monitor: observes the commutation controller and counts its
// mechanisms, for the end-to-end testbenches.
//
//   n_case1    steady -> one transition state -> steady of the other current
//              polarity (operating case 1)
//   n_case2    transition state -> transition state of another pair
//              (link reversal while |I| < limit, operating case 2)
//   n_case3    transition state -> double-prime state (operating case 3)
//   n_pol      changes of the current polarity of the steady state
//   n_natural  steady -> steady of the same polarity (PWM-driven natural
//              commutation between S1S2/S3S4 or S5S6/S7S8)
//   n_gate_err clocks where more than one pair, or an incomplete pair, is gated
//   n_zero_gap clocks where the bridge conducts no current although the
//              load current was above the limit one clock earlier
module comm_monitor
  import hfl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  comm_state_t state,
  input  logic [7:0]  gate,
  output int          n_case1,
  output int          n_case2,
  output int          n_case3,
  output int          n_pol,
  output int          n_natural,
  output int          n_gate_err
);

  comm_state_t prev;
  int          n_trans;      // transition states visited since the last steady state
  logic        have_steady;
  logic        steady_pol;

  initial begin
    n_case1 = 0; n_case2 = 0; n_case3 = 0; n_pol = 0; n_natural = 0; n_gate_err = 0;
    n_trans = 0; have_steady = 0; steady_pol = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      prev <= state;
    end else begin
      prev <= state;
      if (!(gate inside {8'h00, 8'h03, 8'h0c, 8'h30, 8'hc0})) n_gate_err <= n_gate_err + 1;
      if (state != prev) begin
        if (prev.kind == K_PRIME && state.kind == K_PRIME) n_case2 <= n_case2 + 1;
        if (prev.kind == K_PRIME && state.kind == K_DPRIME) n_case3 <= n_case3 + 1;
        if (state.kind == K_STEADY) begin
          if (prev.kind == K_STEADY) n_natural <= n_natural + 1;
          if (have_steady && pair_ipol(state.pair) != steady_pol) begin
            n_pol <= n_pol + 1;
            if (n_trans == 1) n_case1 <= n_case1 + 1;
          end
          have_steady <= 1'b1;
          steady_pol  <= pair_ipol(state.pair);
          n_trans     <= 0;
        end else begin
          n_trans <= n_trans + 1;
        end
      end
    end
  end

endmodule
