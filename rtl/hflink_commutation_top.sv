// hflink_commutation_top: digital controller of a PWM high-frequency-link
// inverter with dead-time-free thyristor commutation.
//
// Power path (outside this module): DC -> primary full bridge (qa/qb) ->
// HF transformer -> eight-thyristor ac-ac bridge (gate[7:0]) -> load/grid.
// Inside:
//   hf_link_gen     square-wave timing of the primary bridge
//   sine_reference  line-frequency modulation function m
//   pwm_modulator   shared sawtooth carrier, PWM1 = m > c, PWM2 = -m > c,
//                   one carrier period per link half-period
//   sense_frontend  link polarity, current sign, |I| > limit (registered)
//   commutation_fsm twelve-state commutation state machine
//   gate_logic      state -> thyristor gates and monitor codes
// The state machine uses the sensed link polarity (v_link_pos, from a
// comparator on the link) rather than the commanded one, as the method
// defines its input as the sign of the link voltage.
//
// Latency from a sensed input change to the gate outputs: sense register,
// state register, gate register = 3 clocks. All resets are synchronous,
// active low. The link frequency is set at run time by link_half
// (CLK_HZ / (2 * link_half); 5000 gives the 2 kHz switching frequency of the
// method's simulations at the default 20 MHz clock); the PWM carrier period
// is the same half-period. The 20 MHz clock and the 60 Hz line frequency are
// choices of this design.
module hflink_commutation_top
  import hfl_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 20_000_000,
  parameter int unsigned F_LINE    = 60,
  parameter int unsigned IW        = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // sensing
  input  logic                 v_link_pos,   // link voltage comparator, 1 = positive
  input  logic signed [IW-1:0] i_sample,     // output current sample
  input  logic        [IW-1:0] i_limit,      // commutation current limit (same units)
  input  logic        [15:0]   m_index,      // modulation index, Q1.15
  input  logic        [15:0]   link_half,    // clocks per link half-period (>= 2)
  // primary full bridge
  output logic                 prim_qa,
  output logic                 prim_qb,
  output logic                 link_cmd_pos,
  // secondary thyristors S1..S8
  output logic [7:0]           gate,
  // monitors
  output logic                 pwm1,
  output logic                 pwm2,
  output comm_state_t          state,
  output logic [2:0]           pair_code,
  output logic [1:0]           kind_code,
  output logic signed [15:0]   m_ref,
  output logic                 link_edge,      // 1-clock pulse at each commanded link reversal
  output logic                 carrier_start,  // 1-clock pulse at each carrier period start
  output logic                 line_start      // 1-clock pulse at each line period start
);

  sense_t sense;

  hf_link_gen #(.HW(16)) u_link (
    .clk, .rst_n, .half_period(link_half), .qa(prim_qa), .qb(prim_qb), .link_pos(link_cmd_pos), .edge_p(link_edge));

  sine_reference #(.CLK_HZ(CLK_HZ), .F_LINE(F_LINE)) u_sine (
    .clk, .rst_n, .m_index, .m(m_ref), .cycle_start(line_start));

  // One carrier period per link half-period, restarted at each reversal.
  pwm_modulator #(.MW(16), .CW(16)) u_pwm (
    .clk, .rst_n, .period(link_half), .sync(link_edge), .m(m_ref), .pwm1, .pwm2, .carrier_start);

  sense_frontend #(.IW(IW)) u_sense (
    .clk, .rst_n, .v_link_pos, .i_sample, .i_limit, .sense);

  commutation_fsm u_fsm (
    .clk, .rst_n, .sense, .pwm1, .pwm2, .state);

  gate_logic u_gate (
    .clk, .rst_n, .state, .pwm1, .pwm2, .gate, .pair_code, .kind_code);

endmodule
