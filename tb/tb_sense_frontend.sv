// tb_sense_frontend: checks the three state-machine input conditions.
//
// Random and corner current samples (0, +-1, +-limit, +-(limit+1), the most
// negative value) and random limits; the expected sign and magnitude flags
// are computed with integer arithmetic in the testbench and compared one
// clock after the inputs are applied.
module tb_sense_frontend;
  import hfl_pkg::*;

  localparam int IW = 16;
  logic clk = 0, rst_n = 0;
  logic v_link_pos;
  logic signed [IW-1:0] i_sample;
  logic [IW-1:0] i_limit;
  sense_t sense;
  int checks = 0, failures = 0;

  sense_frontend #(.IW(IW)) dut (.clk, .rst_n, .v_link_pos, .i_sample, .i_limit, .sense);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic v, input int i, input int lim);
    int mag;
    v_link_pos = v; i_sample = IW'(i); i_limit = IW'(lim);
    @(posedge clk); #1;
    mag = (i < 0) ? -i : i;
    checks++;
    if (sense.v_pos !== v || sense.i_pos !== (i > 0) || sense.i_big !== (mag > lim)) begin
      failures++;
      $display("FAIL v=%0b i=%0d lim=%0d -> %0b%0b%0b", v, i, lim, sense.v_pos, sense.i_pos, sense.i_big);
    end
  endtask

  initial begin
    int lim;
    v_link_pos = 0; i_sample = 0; i_limit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      lim = $urandom_range(0, 2000);
      apply(n[0], 0, lim);
      apply(n[1], 1, lim);
      apply(n[0], -1, lim);
      apply(n[1], lim, lim);
      apply(n[0], -lim, lim);
      apply(n[1], lim + 1, lim);
      apply(n[0], -lim - 1, lim);
      apply(n[1], -32768, lim);
      apply(n[0], $urandom_range(0, 65535) - 32768, lim);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
