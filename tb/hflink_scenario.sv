// hflink_scenario: one closed-loop run of the controller on the power-stage
// model (testbench harness, not a testbench on its own).
//
// Instantiates hflink_commutation_top with the given clock, link and carrier
// frequencies, the power-stage model with the given link amplitude and
// R-L load, and a monitor. Runs PERIODS line periods after reset and then
// raises done. Also records the peak load current, the number of sign
// changes of the load current, and the total harmonic distortion of the
// load current over the last line period:
//   THD = sqrt(Irms^2 - Idc^2 - I1^2) / I1
// with I1 the rms of the 60 Hz component found by correlation with sine and
// cosine (all other frequencies, including the switching ripple, count as
// distortion).
module hflink_scenario
  import hfl_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 2_000_000,
  parameter int unsigned F_LINK  = 2_000,
  parameter real         VLINK   = 17.0,
  parameter real         R       = 10.0,
  parameter real         L       = 20.0e-3,
  parameter int          LIMIT   = 50,      // mA
  parameter int          M_INDEX = 26214,   // 0.8 in Q1.15
  parameter int          PERIODS = 3
) (
  input  logic clk,
  output logic done,
  output int   n_case1, n_case2, n_case3, n_pol, n_natural, n_gate_err,
  output int   n_isign,
  output real  i_peak,
  output real  thd,
  output int   n_pol_last   // steady polarity changes in the last line period
);

  logic rst_n = 0;
  logic v_link_pos, prim_qa, prim_qb, link_cmd_pos, pwm1, pwm2, link_edge, carrier_start, line_start;
  logic signed [15:0] i_sample, m_ref;
  logic [7:0] gate;
  comm_state_t state;
  logic [2:0] pair_code;
  logic [1:0] kind_code;
  real i_load, v_out;
  int cond;

  hflink_commutation_top #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .rst_n, .v_link_pos, .i_sample, .i_limit(16'(LIMIT)), .m_index(16'(M_INDEX)),
    .link_half(16'(CLK_HZ / (2 * F_LINK))),
    .prim_qa, .prim_qb, .link_cmd_pos, .gate, .pwm1, .pwm2, .state, .pair_code, .kind_code,
    .m_ref, .link_edge, .carrier_start, .line_start);

  acac_bridge_model #(.VLINK(VLINK), .R(R), .L(L), .DT(1.0 / CLK_HZ)) plant (
    .clk, .link_pos(link_cmd_pos), .gate, .v_link_pos, .i_sample, .i_load, .v_out, .cond);

  comm_monitor mon (.clk, .rst_n, .state, .gate, .n_case1, .n_case2, .n_case3, .n_pol,
                    .n_natural, .n_gate_err);

  int lines = 0;
  logic last_sign = 0;
  real s0, s2, sa, sb, ph, i1sq, dsq;
  int  nclk, pol0;
  initial begin
    done = 0; n_isign = 0; i_peak = 0.0; thd = 0.0; n_pol_last = 0;
    s0 = 0.0; s2 = 0.0; sa = 0.0; sb = 0.0; nclk = 0; pol0 = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    while (lines < PERIODS) begin
      @(posedge clk);
      if (line_start) begin
        lines++;
        if (lines == PERIODS - 1) pol0 = n_pol;
      end
      if (lines == PERIODS - 1) begin
        ph = 2.0 * 3.14159265358979 * 60.0 * real'(nclk) / real'(CLK_HZ);
        s0 += i_load; s2 += i_load * i_load;
        sa += i_load * $sin(ph); sb += i_load * $cos(ph);
        nclk++;
      end
      if (i_load > i_peak) i_peak = i_load;
      if (i_sample > 16'sd20 && !last_sign) begin last_sign = 1; n_isign++; end
      if (i_sample < -16'sd20 && last_sign) begin last_sign = 0; n_isign++; end
    end
    // rms values over the measured period
    s0 = s0 / nclk; s2 = s2 / nclk;
    i1sq = 2.0 * ((sa / nclk) ** 2 + (sb / nclk) ** 2);
    dsq = s2 - s0 * s0 - i1sq;
    if (dsq < 0.0) dsq = 0.0;
    thd = (i1sq > 0.0) ? $sqrt(dsq / i1sq) : 1.0e9;
    n_pol_last = n_pol - pol0;
    done = 1;
  end

endmodule
