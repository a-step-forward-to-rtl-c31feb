// lfsr6_tb: self-checking test of the 6-bit Fibonacci random weight generator.
//
// Checks the first values after reset against a hand-worked sequence for seed 1,
// that the register holds while `step` is low, that the sequence has period 63 and
// visits every non-zero value exactly once, and that a zero seed does not lock up.
module lfsr6_tb;
  import reservoir_pkg::*;

  logic  clk = 1'b0;
  logic  rst;
  logic  step;
  lfsr_t value, value_z;
  int    checks = 0;
  int    failures = 0;

  lfsr6 #(.SEED(6'h01)) dut   (.clk(clk), .rst(rst), .step(step), .value(value));
  lfsr6 #(.SEED(6'h00)) dut_z (.clk(clk), .rst(rst), .step(step), .value(value_z));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // x^6 + x^5 + 1 starting from 000001, worked by hand
  lfsr_t expected [7] = '{6'h01, 6'h02, 6'h04, 6'h08, 6'h10, 6'h21, 6'h03};
  bit    seen [64];

  initial begin
    rst = 1'b1; step = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(value == 6'h01, "seed loaded on reset");
    check(value_z != 6'h00, "zero seed replaced");
    // hold when not stepping
    repeat (3) @(posedge clk);
    #1 check(value == 6'h01, "holds while step is low");
    step = 1'b1;
    for (int i = 1; i < 7; i++) begin
      @(posedge clk); #1;
      check(value == expected[i], $sformatf("value %0d: got %h expected %h", i, value, expected[i]));
    end
    // period and coverage
    #1 rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    foreach (seen[i]) seen[i] = 1'b0;
    for (int i = 0; i < 63; i++) begin
      check(value != 6'h00, "never zero");
      check(!seen[value], $sformatf("value %h repeats before 63 steps", value));
      seen[value] = 1'b1;
      @(posedge clk); #1;
    end
    check(value == 6'h01, "period is 63");
    check(value_z != 6'h00, "zero-seeded register never zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
