// pwm_modulator: two-output sine-sawtooth PWM with one shared carrier,
// synchronised to the HF link.
//
// A falling sawtooth carrier spans the full signed range of the modulation
// input m (Q1.(MW-1), -1..+1) over one carrier period of `period` clocks.
// PWM1 is 1 while m is above the carrier; PWM2 compares the same carrier
// with -m, i.e. its modulation function is shifted by 180 degrees. PWM1
// drives pairs S1S2/S3S4 and PWM2 drives S5S6/S7S8.
//
// Why falling and synchronised: a thyristor pair can only be turned on by
// its gate; it is turned off (the output goes from the driving to the
// freewheeling polarity) by the next link reversal. The carrier period is
// therefore one link half-period, restarted by sync at each link reversal,
// and each PWM pulse occupies the end of the half-period, so the driving
// interval runs from the pulse's rising edge to the link reversal. For
// positive current the output is then +|v| for a fraction (1+m)/2 of each
// half-period and -|v| for the rest, an average of m*|v|; PWM2 gives the
// same average for negative current.
//
// Implementation: a counter runs 0..period-1 and is restarted by sync or at
// the end of the period; at each start the offset reference (m + 1)/2 is
// scaled by `period` to a pulse length th (m is sampled once per period)
// and the output is 1 for the last th clocks. Outputs are registered;
// carrier_start pulses for one clock when a period begins. Sampling m once
// per period, the falling carrier and the link synchronisation are choices
// of this design.
module pwm_modulator #(
  parameter int unsigned MW = 16,  // modulation width
  parameter int unsigned CW = 16   // carrier counter width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CW-1:0]        period,  // clocks per carrier period (>= 2)
  input  logic                 sync,    // restart the carrier (link reversal)
  input  logic signed [MW-1:0] m,
  output logic                 pwm1,
  output logic                 pwm2,
  output logic                 carrier_start
);

  logic [CW-1:0]    cnt, cnt_c;
  logic [CW-1:0]    th1, th2;   // pulse lengths held for the period
  logic [CW-1:0]    tc1, tc2;   // pulse lengths of the present m
  logic [CW-1:0]    t1, t2;     // pulse lengths in force this clock
  logic [CW-1:0]    pl;         // period length in force this clock
  logic [MW:0]      u1, u2;     // offset references 0..2^MW
  logic             start;

  // u = m + 2^(MW-1) for m and for -m (the negation saturates at full scale).
  assign u1 = (MW+1)'($signed({m[MW-1], m}) + (MW+1)'(2**(MW-1)));
  assign u2 = (MW+1)'((MW+1)'(2**MW) - u1);

  assign tc1   = CW'(((MW+CW+1)'(u1) * (MW+CW+1)'(period)) >> MW);
  assign tc2   = CW'(((MW+CW+1)'(u2) * (MW+CW+1)'(period)) >> MW);
  assign start = sync || (cnt >= pl - 1'b1);
  assign cnt_c = start ? '0 : cnt + 1'b1;   // counter value of the next clock
  assign t1    = start ? tc1 : th1;
  assign t2    = start ? tc2 : th2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0; pl <= '0; th1 <= '0; th2 <= '0;
      pwm1 <= 1'b0; pwm2 <= 1'b0; carrier_start <= 1'b0;
    end else begin
      cnt           <= cnt_c;
      carrier_start <= start;
      if (start) begin
        th1 <= tc1; th2 <= tc2; pl <= period;
      end
      // 1 during the last t clocks of the period: cnt_c >= period - t
      pwm1 <= ((CW+1)'(cnt_c) + (CW+1)'(t1)) >= (CW+1)'(start ? period : pl);
      pwm2 <= ((CW+1)'(cnt_c) + (CW+1)'(t2)) >= (CW+1)'(start ? period : pl);
    end
  end

endmodule
