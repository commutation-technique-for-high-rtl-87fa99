// sense_frontend: forms the first three state-machine inputs.
//
//   v_pos  = link-voltage comparator output (1 when the link voltage > 0)
//   i_pos  = 1 when the current sample is > 0
//   i_big  = 1 when |current sample| > i_limit
// The current arrives as a signed two's-complement sample (for example from
// an ADC) and the limit as an unsigned magnitude in the same units. A zero
// sample counts as "not positive". All three outputs are registered, one
// clock of latency, so the state machine sees a consistent set. The sample
// format, width and the register are choices of this design; the method
// only defines the three conditions.
module sense_frontend
  import hfl_pkg::*;
#(
  parameter int unsigned IW = 16  // current sample width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 v_link_pos,
  input  logic signed [IW-1:0] i_sample,
  input  logic        [IW-1:0] i_limit,
  output sense_t               sense
);

  logic [IW:0] mag;  // one extra bit so the most negative sample fits
  assign mag = i_sample[IW-1] ? (IW+1)'(-$signed({i_sample[IW-1], i_sample}))
                              : {1'b0, i_sample};

  always_ff @(posedge clk) begin
    if (!rst_n) sense <= '0;
    else begin
      sense.v_pos <= v_link_pos;
      sense.i_pos <= (i_sample > 0);
      sense.i_big <= (mag > {1'b0, i_limit});
    end
  end

endmodule
