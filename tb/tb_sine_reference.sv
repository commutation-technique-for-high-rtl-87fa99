// tb_sine_reference: checks the line-frequency modulation function.
//
// At CLK_HZ = 600 kHz and F_LINE = 60 Hz one line period is 10000 clocks.
// Every clock the output is compared with m_index * sin(2*pi*60*t) computed
// in floating point from the elapsed time (allowing for the table step and
// the two-clock latency); the spacing of cycle_start pulses is checked to be
// the line period within one clock; the modulation index is changed between
// periods.
module tb_sine_reference;
  localparam int unsigned CLK_HZ = 600_000, FL = 60, PER = CLK_HZ / FL;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic [15:0] m_index;
  logic signed [15:0] m;
  logic cycle_start;
  int checks = 0, failures = 0;

  sine_reference #(.CLK_HZ(CLK_HZ), .F_LINE(FL)) dut (.clk, .rst_n, .m_index, .m, .cycle_start);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real idx, ideal, err, maxerr;
    int t, last_start, nstart, peak;
    m_index = 16'd26214;  // 0.8
    repeat (2) @(posedge clk);
    rst_n = 1;
    t = 0; last_start = -1; nstart = 0; maxerr = 0; peak = 0;
    for (int per = 0; per < 4; per++) begin
      idx = real'(m_index) / 32768.0;
      for (int k = 0; k < int'(PER); k++) begin
        @(posedge clk); #1;
        t++;
        // output at t reflects the phase of two clocks earlier, table step 1/256 period
        ideal = 32767.0 * idx * $sin(2.0 * PI * FL * real'(t - 2) / CLK_HZ);
        err = real'(m) - ideal;
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        if (int'(m) > peak) peak = int'(m);
        checks++;
        if (err > 32767.0 * idx * 2.0 * PI / 256.0 + 16.0) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d m=%0d ideal=%f", t, m, ideal);
        end
        if (cycle_start) begin
          if (last_start >= 0) begin
            checks++;
            if ((t - last_start) < int'(PER) - 1 || (t - last_start) > int'(PER) + 1) begin
              failures++; $display("FAIL line period %0d clocks", t - last_start);
            end
          end
          last_start = t; nstart++;
        end
      end
      // the amplitude reaches the modulation index within one table step
      checks++;
      if (real'(peak) < 32767.0 * idx * 0.99) begin
        failures++; $display("FAIL peak %0d for index %f", peak, idx);
      end
      peak = 0;
      m_index = (per == 0) ? 16'd32767 : (per == 1) ? 16'd8192 : 16'd16384;
    end
    checks++;
    if (nstart < 3) begin failures++; $display("FAIL only %0d line periods seen", nstart); end
    $display("max error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
