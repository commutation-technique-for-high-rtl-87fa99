// tb_thd_sweep: closed-loop runs of the controller over the operating points
// of the method's THD studies, all in parallel (2 MHz clock, 60 Hz line,
// modulation index 0.8, 50 mA commutation limit, power-stage model):
//   link amplitude sweep  5..30 V at 2 kHz, 10 ohm, 20 mH
//   switching frequency   2..8.5 kHz at 17 V, 10 ohm, 20 mH
//   load inductance       20..290 mH at 120 V, 1 kHz, 50 ohm
// Each point runs four line periods; the THD of the load current is measured
// over the last one and printed. Checks per point: only legal gate patterns,
// exactly two changes of the steady current polarity in the last line period
// (a commutation failure would add toggles), exactly 8 load-current sign
// changes in all, and THD below 40 %. The crossing checks are skipped where
// the current ripple of one link half-period, Vlink / (2 * f * L), is larger
// than the expected current amplitude 0.8 * Vlink / |Z|: there the current
// crosses zero within link periods by itself (120 V, 20 mH, 1 kHz: 3 A of
// ripple against 1.9 A), and the THD bound is 50 %.
module tb_thd_sweep;
  logic clk = 0;
  always #250 clk = ~clk;   // 2 MHz with 1 ns time unit

  localparam int NP = 16, PER = 4;
  localparam real VL [NP] = '{5.0, 10.0, 15.0, 20.0, 25.0, 30.0,
                              17.0, 17.0, 17.0, 17.0, 17.0,
                              120.0, 120.0, 120.0, 120.0, 120.0};
  localparam int  FS [NP] = '{2000, 2000, 2000, 2000, 2000, 2000,
                              2000, 3500, 5000, 6500, 8500,
                              1000, 1000, 1000, 1000, 1000};
  localparam real RR [NP] = '{10.0, 10.0, 10.0, 10.0, 10.0, 10.0,
                              10.0, 10.0, 10.0, 10.0, 10.0,
                              50.0, 50.0, 50.0, 50.0, 50.0};
  localparam real LL [NP] = '{20.0e-3, 20.0e-3, 20.0e-3, 20.0e-3, 20.0e-3, 20.0e-3,
                              20.0e-3, 20.0e-3, 20.0e-3, 20.0e-3, 20.0e-3,
                              20.0e-3, 100.0e-3, 180.0e-3, 250.0e-3, 290.0e-3};

  logic done [NP];
  int c1 [NP], c2 [NP], c3 [NP], pol [NP], nat [NP], gerr [NP], isg [NP], pl [NP];
  real ipk [NP], thd [NP];
  int checks = 0, failures = 0;

  function automatic logic ripple_dominates(int k);
    real ripple, amp;
    ripple = VL[k] / (2.0 * FS[k] * LL[k]);
    amp    = 0.8 * VL[k] / $sqrt(RR[k] ** 2 + (2.0 * 3.14159265 * 60.0 * LL[k]) ** 2);
    return ripple > amp;
  endfunction

  for (genvar g = 0; g < NP; g++) begin : g_pt
    hflink_scenario #(.CLK_HZ(2_000_000), .F_LINK(FS[g]), .VLINK(VL[g]), .R(RR[g]), .L(LL[g]),
                      .LIMIT(50), .PERIODS(PER)) sc (
      .clk, .done(done[g]), .n_case1(c1[g]), .n_case2(c2[g]), .n_case3(c3[g]), .n_pol(pol[g]),
      .n_natural(nat[g]), .n_gate_err(gerr[g]), .n_isign(isg[g]), .i_peak(ipk[g]),
      .thd(thd[g]), .n_pol_last(pl[g]));
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic all_done();
    for (int k = 0; k < NP; k++) if (done[k] !== 1'b1) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    @(posedge clk);
    while (!all_done()) @(posedge clk);
    for (int k = 0; k < NP; k++) begin
      $display("Vlink=%5.1f V f=%4d Hz R=%4.1f ohm L=%5.1f mH: THD=%6.2f%% peak=%6.3f A case1=%0d case2=%0d case3=%0d",
               VL[k], FS[k], RR[k], 1000.0 * LL[k], 100.0 * thd[k], ipk[k], c1[k], c2[k], c3[k]);
      checks++;
      if (gerr[k] != 0) begin failures++; $display("FAIL point %0d: illegal gate pattern", k); end
      if (!ripple_dominates(k)) begin
        checks++;
        if (pl[k] != 2) begin failures++; $display("FAIL point %0d: %0d polarity changes in the last line period", k, pl[k]); end
        checks++;
        if (isg[k] != 2 * PER) begin failures++; $display("FAIL point %0d: %0d current sign changes", k, isg[k]); end
      end
      checks++;
      if (thd[k] > (ripple_dominates(k) ? 0.50 : 0.40)) begin failures++; $display("FAIL point %0d: THD %f", k, thd[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
