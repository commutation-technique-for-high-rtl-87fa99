// tb_hflink_top: end-to-end test of the commutation controller driving the
// power-stage model, in four operating points (2 MHz clock to keep the run
// short, 60 Hz line, modulation index 0.8, 10 ohm / 20 mH load):
//   A: 35 V link, 2 kHz   (current changes fast: operating case 1)
//   B: 17 V link, 2 kHz   (link reverses near the zero crossing: case 2)
//   C: 17 V link, 4 kHz   (case 3 as well)
//   D: 18 V link, 1 kHz, 0.78 ohm / 32 mH (the hardware operating point)
// Checks per scenario: no illegal gate pattern, the steady current polarity
// changes exactly twice per line period (no toggling between the pairs of
// the two polarities near a zero crossing), the load current changes sign
// twice per line period, and the peak current is within a window around
// 0.8 * Vlink / |Z| (the fundamental the sine-sawtooth PWM should give). Across
// the scenarios each operating case and the PWM-driven natural commutation
// must occur at least once.
module tb_hflink_top;
  logic clk = 0;
  always #250 clk = ~clk;   // 2 MHz

  localparam int NS = 4, PER = 3;
  logic done [NS];
  int c1 [NS], c2 [NS], c3 [NS], pol [NS], nat [NS], gerr [NS], isg [NS];
  real ipk [NS], thd [NS];
  int pl [NS];
  int checks = 0, failures = 0;

  hflink_scenario #(.F_LINK(2000), .VLINK(35.0), .PERIODS(PER)) sA (
    .clk, .done(done[0]), .n_case1(c1[0]), .n_case2(c2[0]), .n_case3(c3[0]), .n_pol(pol[0]),
    .n_natural(nat[0]), .n_gate_err(gerr[0]), .n_isign(isg[0]), .i_peak(ipk[0]), .thd(thd[0]), .n_pol_last(pl[0]));
  hflink_scenario #(.F_LINK(2000), .VLINK(17.0), .PERIODS(PER)) sB (
    .clk, .done(done[1]), .n_case1(c1[1]), .n_case2(c2[1]), .n_case3(c3[1]), .n_pol(pol[1]),
    .n_natural(nat[1]), .n_gate_err(gerr[1]), .n_isign(isg[1]), .i_peak(ipk[1]), .thd(thd[1]), .n_pol_last(pl[1]));
  hflink_scenario #(.F_LINK(4000), .VLINK(17.0), .PERIODS(PER)) sC (
    .clk, .done(done[2]), .n_case1(c1[2]), .n_case2(c2[2]), .n_case3(c3[2]), .n_pol(pol[2]),
    .n_natural(nat[2]), .n_gate_err(gerr[2]), .n_isign(isg[2]), .i_peak(ipk[2]), .thd(thd[2]), .n_pol_last(pl[2]));
  hflink_scenario #(.F_LINK(1000), .VLINK(18.0), .R(0.78), .L(32.0e-3),
                    .PERIODS(PER)) sD (
    .clk, .done(done[3]), .n_case1(c1[3]), .n_case2(c2[3]), .n_case3(c3[3]), .n_pol(pol[3]),
    .n_natural(nat[3]), .n_gate_err(gerr[3]), .n_isign(isg[3]), .i_peak(ipk[3]), .thd(thd[3]), .n_pol_last(pl[3]));

  initial begin
    repeat (2_000_000) @(posedge clk);  // 1 s at 2 MHz
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t1, t2, t3, tn;
    // expected steady-state peak: 0.8 * Vlink / |R + j*2*pi*60*L|; scenario D
    // (L/R = 41 ms) still carries its start-up offset, hence a wider window.
    real ipk_exp [NS], hi [NS];
    ipk_exp[0] = 0.8 * 35.0 / $sqrt(100.0 + (2.0 * 3.14159265 * 60.0 * 0.020) ** 2);
    ipk_exp[1] = 0.8 * 17.0 / $sqrt(100.0 + (2.0 * 3.14159265 * 60.0 * 0.020) ** 2);
    ipk_exp[2] = ipk_exp[1];
    ipk_exp[3] = 0.8 * 18.0 / $sqrt(0.78 * 0.78 + (2.0 * 3.14159265 * 60.0 * 0.032) ** 2);
    hi[0] = 1.3; hi[1] = 1.3; hi[2] = 1.3; hi[3] = 2.2;
    @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    t1 = 0; t2 = 0; t3 = 0; tn = 0;
    for (int s = 0; s < NS; s++) begin
      $display("scenario %0d: case1=%0d case2=%0d case3=%0d polarity changes=%0d natural=%0d gate errors=%0d current sign changes=%0d peak=%f A THD=%.2f%%",
               s, c1[s], c2[s], c3[s], pol[s], nat[s], gerr[s], isg[s], ipk[s], 100.0 * thd[s]);
      t1 += c1[s]; t2 += c2[s]; t3 += c3[s]; tn += nat[s];
      checks++;
      if (gerr[s] != 0) begin failures++; $display("FAIL scenario %0d: illegal gate pattern", s); end
      checks++;
      if (pol[s] < 2 * PER - 1 || pol[s] > 2 * PER + 1) begin
        failures++; $display("FAIL scenario %0d: %0d steady polarity changes in %0d line periods", s, pol[s], PER);
      end
      checks++;
      if (isg[s] < 2 * PER - 1 || isg[s] > 2 * PER + 1) begin
        failures++; $display("FAIL scenario %0d: %0d current sign changes", s, isg[s]);
      end
      checks++;
      if (ipk[s] < 0.8 * ipk_exp[s] || ipk[s] > hi[s] * ipk_exp[s]) begin
        failures++; $display("FAIL scenario %0d: peak current %f A, expected about %f A", s, ipk[s], ipk_exp[s]);
      end
    end
    checks++; if (t1 == 0) begin failures++; $display("FAIL operating case 1 never occurred"); end
    checks++; if (t2 == 0) begin failures++; $display("FAIL operating case 2 never occurred"); end
    checks++; if (t3 == 0) begin failures++; $display("FAIL operating case 3 never occurred"); end
    checks++; if (tn == 0) begin failures++; $display("FAIL natural commutation never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
