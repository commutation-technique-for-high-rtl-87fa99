// tb_gate_logic: exhaustive check of the thyristor gate logic.
//
// For every one of the twelve states and every PWM1/PWM2 combination the
// expected gates are worked out directly: the state's pair (S1S2 -> bits
// 0,1, S3S4 -> 2,3, S5S6 -> 4,5, S7S8 -> 6,7) is gated when the state is a
// prime state, or when the pair's own PWM (PWM1 for S1S2/S3S4, PWM2 for
// S5S6/S7S8) is 1; the pair code is 1..4 when gated, else 0; the kind code
// is 1/2/3. Outputs are checked one clock after the inputs.
module tb_gate_logic;
  import hfl_pkg::*;

  logic clk = 0, rst_n = 0;
  comm_state_t state;
  logic pwm1, pwm2;
  logic [7:0] gate;
  logic [2:0] pair_code;
  logic [1:0] kind_code;
  int checks = 0, failures = 0;

  gate_logic dut (.clk, .rst_n, .state, .pwm1, .pwm2, .gate, .pair_code, .kind_code);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] eg; logic [2:0] ec; logic g;
  // Expected gate masks, written out per pair.
  localparam logic [7:0] MASK [4] = '{8'b0000_0011, 8'b0000_1100, 8'b0011_0000, 8'b1100_0000};
  localparam logic       USES_PWM1 [4] = '{1'b1, 1'b1, 1'b0, 1'b0};

  initial begin
    state = '{kind: K_STEADY, pair: P12}; pwm1 = 1; pwm2 = 1;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (gate !== 8'h00 || pair_code !== 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int k = 1; k <= 3; k++)
      for (int p = 0; p < 4; p++)
        for (int w = 0; w < 4; w++) begin
          state = '{kind: kind_e'(k), pair: pair_e'(p)};
          pwm1 = w[0]; pwm2 = w[1];
          @(posedge clk); #1;
          g  = (k == 2) || (USES_PWM1[p] ? w[0] : w[1]);
          eg = g ? MASK[p] : 8'h00;
          ec = g ? 3'(p + 1) : 3'd0;
          checks++;
          if (gate !== eg || pair_code !== ec || kind_code !== 2'(k)) begin
            failures++;
            $display("FAIL kind=%0d pair=%0d pwm=%02b: gate=%08b code=%0d kind=%0d, expected %08b %0d %0d",
                     k, p, w, gate, pair_code, kind_code, eg, ec, k);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
