// tb_pwm_modulator: checks the two-output link-synchronised sawtooth PWM.
//
// Per carrier period the testbench records the PWM1 and PWM2 waveforms and
// compares them with the expected pulse: 1 during the last th clocks of the
// period, th1 = floor((1 + m)/2 * P) and th2 = floor((1 - m)/2 * P),
// computed in floating point from the modulation value applied at the start
// of the period (so the pulses end at the link reversal). m changes inside
// periods, which must not affect the running period. Three phases:
//   1. period input P = 100, free running: periods of exactly 100 clocks
//   2. P = 60, free running: periods of 60 clocks, pulses scaled to 60
//   3. P = 100 with sync every 70 clocks: each period is cut short at 70
//      clocks, so only the part of each pulse inside the first 70 remains.
module tb_pwm_modulator;
  logic clk = 0, rst_n = 0;
  logic sync = 0;
  logic [15:0] period = 16'd100;
  logic signed [15:0] m;
  logic pwm1, pwm2, carrier_start;
  int checks = 0, failures = 0;

  pwm_modulator #(.MW(16), .CW(16)) dut (
    .clk, .rst_n, .period, .sync, .m, .pwm1, .pwm2, .carrier_start);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int syncper = 0;  // 0: free running, else sync every syncper clocks
  int sc = 0;
  always @(posedge clk) begin
    if (syncper != 0) begin
      sc <= (sc == syncper - 1) ? 0 : sc + 1;
      sync <= (sc == syncper - 2);
    end else sync <= 1'b0;
  end

  // Expected waveform of one period: 1 during the last e of plen clocks.
  function automatic logic [0:127] pulse(int plen, int e);
    logic [0:127] w = '0;
    for (int k = 0; k < plen; k++) w[k] = (k >= plen - e);
    return w;
  endfunction

  initial begin
    int len, e1, e2, plen, pin, phase;
    logic signed [15:0] m_per, m_next;
    logic [0:127] w1, w2;
    m = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do @(posedge clk); while (!carrier_start);
    m_per = m;
    for (int p = 0; p < 900; p++) begin
      // phase changes take two periods to settle; those periods are not checked
      if (p == 300) period = 16'd60;
      if (p == 600) begin period = 16'd100; syncper = 70; end
      phase = (p < 300) ? 1 : (p < 600) ? 2 : 3;
      len = 0; w1 = '0; w2 = '0;
      if (p < 4) m_next = (p == 0) ? 16'sh7fff : (p == 1) ? -16'sh8000 : (p == 2) ? 16'sh0000 : 16'sh4000;
      else       m_next = 16'($urandom);
      do begin
        w1[len] = pwm1; w2[len] = pwm2; len++;
        if (len == 20) m = m_next;  // change inside the period
        @(posedge clk);
      end while (!carrier_start && len < 128);
      pin  = (phase == 2) ? 60 : 100;
      plen = (phase == 3) ? 70 : pin;
      e1 = int'($floor((real'(m_per) + 32768.0) * pin / 65536.0));
      e2 = int'($floor((32768.0 - real'(m_per)) * pin / 65536.0));
      if (e2 > pin) e2 = pin;
      e1 = (e1 > pin - plen) ? e1 - (pin - plen) : 0;
      e2 = (e2 > pin - plen) ? e2 - (pin - plen) : 0;
      if (!(p inside {300, 301, 600, 601})) begin
        checks++;
        if (len != plen || w1 != pulse(plen, e1) || w2 != pulse(plen, e2)) begin
          failures++;
          $display("FAIL period %0d m=%0d: len=%0d, expected %0d, pulses %0d %0d", p, m_per, len, plen, e1, e2);
        end
      end
      m_per = m;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
