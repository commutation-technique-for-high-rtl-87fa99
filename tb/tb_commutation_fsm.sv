// tb_commutation_fsm: self-checking test of the twelve-state commutation
// state machine.
//
// Directed part: the commutation sequences of the method, interval by
// interval (link polarity, current sign, |I| > limit, PWM1, PWM2 applied,
// expected state one clock later), for operating case 1 (both directions
// and both link polarities), case 2 (link reversal while |I| < limit, early
// and late) and case 3 (PWM asks for the old polarity before the current has
// reversed, using the double-prime states).
// Random part: 20000 random input vectors, checking that a steady state is
// only entered with |I| > limit, with the matching current sign, and never
// from a state of the opposite current polarity.
module tb_commutation_fsm;
  import hfl_pkg::*;

  logic clk = 0, rst_n = 0;
  sense_t sense;
  logic pwm1, pwm2;
  comm_state_t state;
  int checks = 0, failures = 0;

  commutation_fsm dut (.clk, .rst_n, .sense, .pwm1, .pwm2, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one interval's inputs and check the state one clock later.
  task automatic step(input logic v, i, m, p1, p2, input pair_e ep, input kind_e ek,
                      input string tag);
    sense = '{v_pos: v, i_pos: i, i_big: m};
    pwm1 = p1; pwm2 = p2;
    @(posedge clk); #1;
    checks++;
    if (state.pair !== ep || state.kind !== ek) begin
      failures++;
      $display("FAIL %s: inputs v=%0b i=%0b m=%0b p1=%0b p2=%0b -> %s/%s, expected %s/%s",
               tag, v, i, m, p1, p2, state.pair.name(), state.kind.name(), ep.name(), ek.name());
    end
  endtask

  task automatic do_reset();
    rst_n = 0; sense = '0; pwm1 = 0; pwm2 = 0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (state.pair !== P12 || state.kind !== K_STEADY) begin
      failures++; $display("FAIL reset state");
    end
    rst_n = 1;
  endtask

  // Reach steady S5S6 / S7S8 from reset through a legal commutation.
  task automatic goto_p56();
    do_reset();
    step(0,1,0,0,0, P78, K_PRIME,  "to56 a");
    step(0,0,0,0,0, P78, K_PRIME,  "to56 b");
    step(1,0,1,0,1, P56, K_STEADY, "to56 c");
  endtask

  pair_e pp; kind_e pk; logic pm;

  initial begin
    // ---- Operating case 1, S1S2 -> S7S8 (positive to negative, link negative)
    do_reset();
    step(0,1,1,1,0, P34, K_STEADY, "c1a S3S4");
    step(1,1,1,0,0, P34, K_STEADY, "c1a freewheel S3S4");
    step(1,1,1,1,0, P12, K_STEADY, "c1a t0 S1S2 on");
    step(0,1,1,0,0, P12, K_STEADY, "c1a t1 freewheel S1S2");
    step(0,1,0,0,0, P78, K_PRIME,  "c1a t2 S7S8'");
    step(0,0,0,0,0, P78, K_PRIME,  "c1a t3");
    step(1,0,1,0,0, P78, K_PRIME,  "c1a t4");
    step(1,0,1,0,1, P56, K_STEADY, "c1a t5 S5S6");
    // ---- Operating case 1, S3S4 -> S5S6 (positive to negative, link positive)
    do_reset();
    step(1,1,1,1,0, P12, K_STEADY, "c1b S1S2");
    step(0,1,1,1,0, P34, K_STEADY, "c1b t0 S3S4 on");
    step(1,1,1,0,0, P34, K_STEADY, "c1b t1");
    step(1,1,0,0,0, P56, K_PRIME,  "c1b t2 S5S6'");
    step(1,0,0,0,0, P56, K_PRIME,  "c1b t3");
    step(0,0,1,0,0, P56, K_PRIME,  "c1b t4");
    step(0,0,1,0,1, P78, K_STEADY, "c1b t5 S7S8");
    // ---- Operating case 1, S5S6 -> S3S4 (negative to positive, link negative)
    goto_p56();
    step(0,0,1,0,1, P78, K_STEADY, "c1c S7S8");
    step(1,0,1,0,1, P56, K_STEADY, "c1c t0 S5S6 on");
    step(0,0,1,0,0, P56, K_STEADY, "c1c t1");
    step(0,0,0,0,0, P34, K_PRIME,  "c1c t2 S3S4'");
    step(0,1,0,0,0, P34, K_PRIME,  "c1c t3");
    step(1,1,1,0,0, P34, K_PRIME,  "c1c t4");
    step(1,1,1,1,0, P12, K_STEADY, "c1c t5 S1S2");
    // ---- Operating case 1, S7S8 -> S1S2 (negative to positive, link positive)
    goto_p56();
    step(0,0,1,0,1, P78, K_STEADY, "c1d t0 S7S8 on");
    step(1,0,1,0,0, P78, K_STEADY, "c1d t1");
    step(1,0,0,0,0, P12, K_PRIME,  "c1d t2 S1S2'");
    step(1,1,0,0,0, P12, K_PRIME,  "c1d t3");
    step(0,1,1,0,0, P12, K_PRIME,  "c1d t4");
    step(0,1,1,1,0, P34, K_STEADY, "c1d t5 S3S4");
    // ---- Operating case 2, link reverses while |I| < limit (early)
    do_reset();
    step(0,1,1,1,0, P34, K_STEADY, "c2a S3S4");
    step(1,1,1,1,0, P12, K_STEADY, "c2a t0");
    step(0,1,1,0,0, P12, K_STEADY, "c2a t1");
    step(0,1,0,0,0, P78, K_PRIME,  "c2a t2");
    step(0,0,0,0,0, P78, K_PRIME,  "c2a t3");
    step(1,0,0,0,0, P56, K_PRIME,  "c2a t4 S5S6'");
    step(1,0,0,0,1, P56, K_PRIME,  "c2a S5S6' ignores PWM");
    step(0,0,0,0,1, P78, K_PRIME,  "c2a back to S7S8'");
    step(0,0,1,0,0, P78, K_PRIME,  "c2a big, PWM 0");
    step(0,0,1,0,1, P78, K_STEADY, "c2a S7S8 steady");
    // ---- Operating case 2, current falls back below the limit (late)
    do_reset();
    step(0,1,0,0,0, P78, K_PRIME,  "c2b t2");
    step(0,0,0,0,0, P78, K_PRIME,  "c2b t3");
    step(0,0,1,0,0, P78, K_PRIME,  "c2b below -lim");
    step(1,0,1,0,0, P78, K_PRIME,  "c2b t4 link +");
    step(1,0,0,0,0, P56, K_PRIME,  "c2b t5 S5S6'");
    step(1,0,1,0,1, P56, K_STEADY, "c2b S5S6");
    // ---- Operating case 3 from S1S2 (Table of the S7S8/S1S2 case)
    do_reset();
    step(0,1,1,1,0, P34, K_STEADY, "c3a S3S4");
    step(1,1,1,1,0, P12, K_STEADY, "c3a t0");
    step(0,1,1,0,0, P12, K_STEADY, "c3a t1");
    step(0,1,0,0,0, P78, K_PRIME,  "c3a t2 S7S8'");
    step(0,1,0,1,0, P34, K_DPRIME, "c3a t3 S3S4''");
    step(0,1,0,0,0, P34, K_DPRIME, "c3a hold S3S4''");
    step(1,1,0,0,0, P56, K_PRIME,  "c3a t4 S5S6'");
    step(1,0,0,0,0, P56, K_PRIME,  "c3a t5");
    step(0,0,0,0,0, P78, K_PRIME,  "c3a t6 S7S8'");
    step(1,0,1,0,0, P78, K_PRIME,  "c3a t7");
    step(1,0,1,0,1, P56, K_STEADY, "c3a t8 S5S6");
    // ---- Operating case 3 from S3S4 (through S1S2'')
    do_reset();
    step(0,1,1,1,0, P34, K_STEADY, "c3b S3S4");
    step(1,1,0,0,0, P56, K_PRIME,  "c3b t2 S5S6'");
    step(1,1,0,1,0, P12, K_DPRIME, "c3b t3 S1S2''");
    step(0,1,0,0,0, P78, K_PRIME,  "c3b t4 S7S8'");
    step(0,0,0,0,0, P78, K_PRIME,  "c3b t5");
    step(1,0,0,0,0, P56, K_PRIME,  "c3b t6 S5S6'");
    step(0,0,1,0,1, P78, K_STEADY, "c3b t8 S7S8");
    // ---- Operating case 3 from S5S6 (through S7S8'')
    goto_p56();
    step(0,0,0,0,0, P34, K_PRIME,  "c3c t2 S3S4'");
    step(0,0,0,0,1, P78, K_DPRIME, "c3c t3 S7S8''");
    step(1,0,0,0,0, P12, K_PRIME,  "c3c t4 S1S2'");
    step(1,1,0,0,0, P12, K_PRIME,  "c3c t5");
    step(0,1,0,0,0, P34, K_PRIME,  "c3c t6 S3S4'");
    step(1,1,1,1,0, P12, K_STEADY, "c3c t8 S1S2");
    // ---- Operating case 3 from S7S8 (through S5S6'')
    goto_p56();
    step(0,0,1,0,1, P78, K_STEADY, "c3d S7S8");
    step(1,0,0,0,0, P12, K_PRIME,  "c3d t2 S1S2'");
    step(1,0,0,0,1, P56, K_DPRIME, "c3d t3 S5S6''");
    step(0,0,0,0,0, P34, K_PRIME,  "c3d t4 S3S4'");
    step(0,1,0,0,0, P34, K_PRIME,  "c3d t5");
    step(1,1,0,0,0, P12, K_PRIME,  "c3d t6 S1S2'");
    step(0,1,1,1,0, P34, K_STEADY, "c3d t8 S3S4");
    // ---- A driving steady pair holds while the current is small.
    do_reset();
    step(1,1,0,1,1, P12, K_STEADY, "hold S1S2 driving");

    // ---- Random inputs: invariants of the transition rules.
    for (int n = 0; n < 20000; n++) begin
      pp = state.pair; pk = state.kind;
      sense = sense_t'($urandom_range(0, 7));
      pwm1 = 1'($urandom); pwm2 = 1'($urandom);
      pm = sense.i_big;
      @(posedge clk); #1;
      if (state.kind == K_STEADY && !(pk == K_STEADY && state.pair == pp)) begin
        checks++;
        if (!pm || pair_ipol(state.pair) != pair_ipol(pp) ||
            state.pair != pair_of(sense.v_pos, sense.i_pos)) begin
          failures++;
          $display("FAIL random: %s/%s -> steady %s", pp.name(), pk.name(), state.pair.name());
        end
      end
      if (pk == K_STEADY && state.kind == K_PRIME) begin
        checks++;
        // entry into a transition state: opposite polarity, link polarity of the new pair
        if (pm || pair_ipol(state.pair) == pair_ipol(pp) ||
            pair_vpol(state.pair) == pair_vpol(pp)) begin
          failures++;
          $display("FAIL random: %s steady -> %s'", pp.name(), state.pair.name());
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
