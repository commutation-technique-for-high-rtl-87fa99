// tb_hf_link_gen: checks the primary square-wave timing.
//
// With half_period = 50 each half period must last exactly 50 clocks; after
// 20 half periods the input changes to 37 and the half periods must follow.
// qa and qb must be complementary and follow link_pos, and edge_p must
// pulse once per polarity change, on the first clock of the new polarity.
module tb_hf_link_gen;
  logic clk = 0, rst_n = 0;
  logic [15:0] half_period = 16'd50;
  logic qa, qb, link_pos, edge_p, prev;
  int checks = 0, failures = 0;

  hf_link_gen #(.HW(16)) dut (.clk, .rst_n, .half_period, .qa, .qb, .link_pos, .edge_p);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run, halves;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // skip to the first reversal
    do begin @(posedge clk); #1; end while (!edge_p);
    prev = link_pos; run = 1; halves = 0;
    while (halves < 40) begin
      @(posedge clk); #1;
      checks++;
      if (qa !== link_pos || qb !== !link_pos) begin failures++; $display("FAIL qa/qb"); end
      if (link_pos != prev) begin
        checks++;
        if (run != int'(half_period) || !edge_p) begin
          failures++; $display("FAIL half period %0d clocks, edge=%0b", run, edge_p);
        end
        run = 1; halves++; prev = link_pos;
        if (halves == 20) half_period = 16'd37;  // applies from this half period on
      end else begin
        run++;
        checks++;
        if (edge_p) begin failures++; $display("FAIL edge without reversal"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
