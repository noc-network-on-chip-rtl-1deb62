// tb_polarity_gen: checks the polarity sequence of the router clock.
//
// While reset is held the polarity must be even (0); at the first rising edge
// after reset is released it becomes odd (1) and then alternates on every
// edge. A reset asserted in the middle of the run brings it back to 0 at the
// next edge. The expected value is tracked by a counter of edges since reset.
module tb_polarity_gen;

  logic clk = 1'b0;
  logic reset;
  logic polarity;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  polarity_gen dut (.clk(clk), .reset(reset), .polarity(polarity));

  task automatic expect_pol(logic e, string what);
    checks++;
    if (polarity !== e) begin
      failures++;
      $display("FAIL: %s: polarity %0b expected %0b", what, polarity, e);
    end
  endtask

  initial begin
    for (int run = 0; run < 3; run++) begin
      int edges;
      reset = 1'b1;
      repeat (2 + run) begin
        @(posedge clk); #1;
        expect_pol(1'b0, "in reset");
      end
      @(negedge clk);
      reset = 1'b0;
      edges = 0;
      repeat (20 + 3 * run) begin
        @(posedge clk); #1;
        edges++;
        expect_pol(edges % 2 == 1, "after reset");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
