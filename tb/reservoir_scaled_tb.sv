// reservoir_scaled_tb: runs the reservoir at the two larger sizes that were studied
// for the reservoir's separation property, 15 and 27 cells (30 and 54 synapses),
// each checked step by step against the reference model for 4000 steps. Both
// sizes must fire and carry recurrent spikes.
module reservoir_scaled_tb;

  logic clk = 1'b0;
  logic done15, done27;
  int   c15, f15, fire15, rec15;
  int   c27, f27, fire27, rec27;
  int   checks, failures;

  always #5 clk = ~clk;

  reservoir_scaled_check #(.N(15)) u15 (.clk(clk), .done(done15), .checks(c15), .failures(f15), .n_fire(fire15), .n_rec(rec15));
  reservoir_scaled_check #(.N(27)) u27 (.clk(clk), .done(done27), .checks(c27), .failures(f27), .n_fire(fire27), .n_rec(rec27));

  initial begin
    wait (done15 && done27);
    checks   = c15 + c27 + 4;
    failures = f15 + f27;
    if (fire15 == 0) failures++;
    if (fire27 == 0) failures++;
    if (rec15 == 0) failures++;
    if (rec27 == 0) failures++;
    $display("N=15: fires=%0d recurrent pulses=%0d; N=27: fires=%0d recurrent pulses=%0d", fire15, rec15, fire27, rec27);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c15 + c27, f15 + f27 + 1);
    $finish;
  end
endmodule
