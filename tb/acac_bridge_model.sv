// acac_bridge_model: behavioural (non-synthesizable) model of the power
// stage, for testbenches only: square-wave link source, eight-thyristor
// ac-ac bridge and series R-L load, with ideal sensing.
//
// Link voltage: +VLINK when link_pos = 1, else -VLINK. Pair output voltage
// (load + minus load -): S1S2 and S7S8 give +v, S3S4 and S5S6 give -v.
// A pair is gated when both its gate bits are 1. Thyristor behaviour:
//  - a conducting pair stays on (latched) without gate drive until the
//    load current reaches zero;
//  - a gated pair of the same current polarity takes the current over when
//    it is forward biased, i.e. gives a higher output voltage for positive
//    current (S1S2/S3S4) or a lower one for negative current (S5S6/S7S8);
//  - with zero current, a gated pair starts conducting if its output voltage
//    drives current in its own direction;
//  - holding and latching currents, device drops and turn-off times are
//    neglected.
// The load current follows L di/dt = v_out - R i, integrated with a forward
// Euler step of DT seconds per clock. Sensed outputs: v_link_pos (sign of the
// link voltage) and i_sample = round(i / ILSB), saturated to 16 bits.
module acac_bridge_model #(
  parameter real VLINK = 17.0,
  parameter real R     = 10.0,
  parameter real L     = 20.0e-3,
  parameter real DT    = 50.0e-9,
  parameter real ILSB  = 1.0e-3
) (
  input  logic               clk,
  input  logic               link_pos,
  input  logic [7:0]         gate,
  output logic               v_link_pos,
  output logic signed [15:0] i_sample,
  output real                i_load,
  output real                v_out,
  output int                 cond       // conducting pair 0..3, -1 none
);

  function automatic real pair_v(int k, real v);
    return (k == 0 || k == 3) ? v : -v;
  endfunction

  function automatic logic pair_pos(int k);
    return k < 2;
  endfunction

  real v, inew, q;
  logic [3:0] g;

  initial begin
    i_load = 0.0; v_out = 0.0; cond = -1; v_link_pos = 1'b1; i_sample = '0;
  end

  always @(posedge clk) begin
    v = link_pos ? VLINK : -VLINK;
    for (int k = 0; k < 4; k++) g[k] = gate[2*k] & gate[2*k+1];
    if (cond >= 0) begin
      for (int k = 0; k < 4; k++)
        if (g[k] && k != cond && pair_pos(k) == pair_pos(cond) &&
            (pair_pos(k) ? pair_v(k, v) > pair_v(cond, v) : pair_v(k, v) < pair_v(cond, v)))
          cond <= k;
    end else begin
      for (int k = 0; k < 4; k++)
        if (g[k] && (pair_pos(k) ? pair_v(k, v) > 0.0 : pair_v(k, v) < 0.0))
          cond <= k;
    end
    if (cond >= 0) begin
      inew = i_load + (pair_v(cond, v) - R * i_load) / L * DT;
      if (pair_pos(cond) ? inew <= 0.0 : inew >= 0.0) begin
        i_load <= 0.0;
        cond   <= -1;
      end else begin
        i_load <= inew;
      end
      v_out <= pair_v(cond, v);
    end else begin
      v_out <= 0.0;
    end
    v_link_pos <= link_pos;
    q = i_load / ILSB;
    if (q > 32767.0) q = 32767.0;
    if (q < -32768.0) q = -32768.0;
    i_sample <= 16'($rtoi(q < 0.0 ? q - 0.5 : q + 0.5));
  end

endmodule
