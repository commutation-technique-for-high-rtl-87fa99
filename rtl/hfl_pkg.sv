// hfl_pkg: types and helper functions shared by the HF-link commutation
// controller.
//
// The secondary ac-ac converter has eight thyristors grouped into four
// switch pairs. Each pair is identified by the link polarity and the load
// current polarity it drives:
//   S1S2 : link > 0, current > 0      S3S4 : link < 0, current > 0
//   S5S6 : link > 0, current < 0      S7S8 : link < 0, current < 0
// (S1S2/S3S4 carry positive current, S5S6/S7S8 carry negative current.)
// With link voltage v the output voltage of a pair is +v for S1S2 and S7S8
// and -v for S3S4 and S5S6.
//
// A commutation state is a pair plus a kind:
//   STEADY  - current is above the limit, the pair is gated while its PWM is 1
//   PRIME   - current sign transition, the pair is gated continuously
//   DPRIME  - current sign transition, the pair is gated while its PWM is 1
// Four pairs times three kinds give the twelve states of the state machine.
package hfl_pkg;

  typedef enum logic [1:0] {
    P12 = 2'd0,  // S1,S2
    P34 = 2'd1,  // S3,S4
    P56 = 2'd2,  // S5,S6
    P78 = 2'd3   // S7,S8
  } pair_e;

  typedef enum logic [1:0] {
    K_STEADY = 2'd1,
    K_PRIME  = 2'd2,
    K_DPRIME = 2'd3
  } kind_e;

  typedef struct packed {
    kind_e kind;
    pair_e pair;
  } comm_state_t;

  // Inputs of the state machine (link polarity, current sign, magnitude flag).
  typedef struct packed {
    logic v_pos;   // 1: link voltage > 0
    logic i_pos;   // 1: output current > 0
    logic i_big;   // 1: |output current| > limit
  } sense_t;

  // Current polarity carried by a pair (1 = positive current).
  function automatic logic pair_ipol(pair_e p);
    return (p == P12) || (p == P34);
  endfunction

  // Link polarity at which a pair drives its current up (1 = positive link).
  function automatic logic pair_vpol(pair_e p);
    return (p == P12) || (p == P56);
  endfunction

  // The pair that drives current of polarity i_pos at link polarity v_pos.
  function automatic pair_e pair_of(logic v_pos, logic i_pos);
    unique case ({v_pos, i_pos})
      2'b11:   return P12;
      2'b01:   return P34;
      2'b10:   return P56;
      default: return P78;
    endcase
  endfunction

  // PWM signal that belongs to a pair: PWM1 for S1S2/S3S4, PWM2 for S5S6/S7S8.
  function automatic logic pair_pwm(pair_e p, logic pwm1, logic pwm2);
    return pair_ipol(p) ? pwm1 : pwm2;
  endfunction

endpackage
