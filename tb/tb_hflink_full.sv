// tb_hflink_full: the controller at its default parameters (20 MHz clock,
// 2 kHz link, 4 kHz carrier, 60 Hz line) on the power-stage model with a
// 17 V link and a 10 ohm / 20 mH load, modulation index 0.8 and a 50 mA
// commutation limit, for two complete line periods (about 670 000 clocks).
// Checks: legal gate patterns only; exactly two changes of the steady
// current polarity and of the load-current sign per line period; peak
// current near 0.8 * 17 V / |Z|; at least one commutation through a
// transition state and at least one PWM-driven natural commutation.
module tb_hflink_full;
  import hfl_pkg::*;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;   // 20 MHz with 1 ns time unit

  logic v_link_pos, prim_qa, prim_qb, link_cmd_pos, pwm1, pwm2, link_edge, carrier_start, line_start;
  logic signed [15:0] i_sample, m_ref;
  logic [7:0] gate;
  comm_state_t state;
  logic [2:0] pair_code;
  logic [1:0] kind_code;
  real i_load, v_out;
  int cond;
  int n_case1, n_case2, n_case3, n_pol, n_natural, n_gate_err;
  int checks = 0, failures = 0;

  hflink_commutation_top dut (
    .clk, .rst_n, .v_link_pos, .i_sample, .i_limit(16'd50), .m_index(16'd26214), .link_half(16'd5000),
    .prim_qa, .prim_qb, .link_cmd_pos, .gate, .pwm1, .pwm2, .state, .pair_code, .kind_code,
    .m_ref, .link_edge, .carrier_start, .line_start);

  acac_bridge_model #(.VLINK(17.0), .R(10.0), .L(20.0e-3), .DT(50.0e-9)) plant (
    .clk, .link_pos(link_cmd_pos), .gate, .v_link_pos, .i_sample, .i_load, .v_out, .cond);

  comm_monitor mon (.clk, .rst_n, .state, .gate, .n_case1, .n_case2, .n_case3, .n_pol,
                    .n_natural, .n_gate_err);

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lines, nsign, clocks;
    logic last_sign;
    real ipk, iexp;
    lines = 0; nsign = 0; clocks = 0; last_sign = 0; ipk = 0.0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    while (lines < 2) begin
      @(posedge clk);
      clocks++;
      if (line_start) lines++;
      if (i_load > ipk) ipk = i_load;
      if (i_sample > 16'sd20 && !last_sign) begin last_sign = 1; nsign++; end
      if (i_sample < -16'sd20 && last_sign) begin last_sign = 0; nsign++; end
    end
    iexp = 0.8 * 17.0 / $sqrt(100.0 + (2.0 * 3.14159265 * 60.0 * 0.020) ** 2);
    $display("clocks=%0d case1=%0d case2=%0d case3=%0d polarity changes=%0d natural=%0d gate errors=%0d sign changes=%0d peak=%f A (expected about %f A)",
             clocks, n_case1, n_case2, n_case3, n_pol, n_natural, n_gate_err, nsign, ipk, iexp);
    checks++; if (n_gate_err != 0) begin failures++; $display("FAIL illegal gate pattern"); end
    checks++; if (n_pol < 3 || n_pol > 5) begin failures++; $display("FAIL %0d steady polarity changes", n_pol); end
    checks++; if (nsign < 3 || nsign > 5) begin failures++; $display("FAIL %0d current sign changes", nsign); end
    checks++; if (ipk < 0.8 * iexp || ipk > 1.3 * iexp) begin failures++; $display("FAIL peak current"); end
    checks++; if (n_case1 + n_case2 + n_case3 == 0) begin failures++; $display("FAIL no transition-state commutation"); end
    checks++; if (n_natural == 0) begin failures++; $display("FAIL no natural commutation"); end
    // line period in clocks: 20 MHz / 60 Hz
    checks++; if (clocks < 2 * 333_333 - 10 || clocks > 2 * 333_334 + 10) begin
      failures++; $display("FAIL two line periods took %0d clocks", clocks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
