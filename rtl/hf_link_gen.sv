// hf_link_gen: timing of the primary-side full bridge that turns the DC
// input into the high-frequency square-wave link voltage.
//
// A counter counts clocks up to half_period; at each wrap the link polarity
// reverses. While link_pos = 1 the diagonal A (qa, the switches that put
// +Vdc on the transformer) is on; otherwise diagonal B (qb, -Vdc). edge_p
// pulses for one clock, on the first clock of each new polarity. The link
// frequency is CLK_HZ / (2 * half_period); half_period is a run-time input
// (at least 2), sampled every clock, so a smaller value takes effect at
// once. The method only requires a square-wave link; the 50 % duty, the
// absence of a primary dead time and the registered outputs are choices of
// this design.
module hf_link_gen #(
  parameter int unsigned HW = 16   // width of half_period
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [HW-1:0] half_period,  // clocks per link half-period
  output logic          qa,
  output logic          qb,
  output logic          link_pos,
  output logic          edge_p
);

  logic [HW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0; link_pos <= 1'b1; edge_p <= 1'b0;
    end else if (cnt >= half_period - 1'b1) begin
      cnt <= '0; link_pos <= !link_pos; edge_p <= 1'b1;
    end else begin
      cnt <= cnt + 1'b1; edge_p <= 1'b0;
    end
  end

  assign qa = link_pos;
  assign qb = !link_pos;

endmodule
