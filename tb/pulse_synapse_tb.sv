// pulse_synapse_tb: self-checking test of the multiplier-less synapse.
//
// Drives random spikes, weights, LFSR values, count targets and step enables, and
// compares pulse, weight_match and count_hit every cycle with a reference model:
// the weight matches when weight/8 equals rand/64 as real numbers, and the counter
// passes on every count_target-th spike (a target of 0 acting as 1).
module pulse_synapse_tb;
  import reservoir_pkg::*;

  logic    clk = 1'b0;
  logic    rst;
  logic    step;
  logic    spike_in;
  weight_t weight;
  lfsr_t   rand_value;
  count_t  count_target;
  logic    pulse, weight_match, count_hit;
  int      checks = 0;
  int      failures = 0;
  int      ref_count;
  int      n_pulse = 0, n_match = 0, n_hit = 0;

  pulse_synapse dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int  tgt;
    bit  exp_match, exp_hit;
    real w_real, r_real;
    rst = 1'b1; step = 1'b0; spike_in = 1'b0; weight = '0; rand_value = 6'h01; count_target = 5'd1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    ref_count = 0;
    for (int i = 0; i < 6000; i++) begin
      if (i % 500 == 0) count_target = 5'($urandom_range(0, 4));
      step       = ($urandom_range(0, 7) != 0);
      spike_in   = $urandom_range(0, 1);
      weight     = 4'($urandom);
      // bias the random value towards matching now and then
      rand_value = ($urandom_range(0, 3) == 0) ? lfsr_t'({weight[2:0], 3'b000}) : 6'($urandom);
      #1;
      tgt       = (count_target == 0) ? 1 : int'(count_target);
      w_real    = real'($signed(weight)) / 8.0;
      r_real    = real'($signed(rand_value)) / 64.0;
      exp_match = (w_real == r_real);
      exp_hit   = spike_in && (ref_count == tgt - 1);
      check(weight_match == exp_match, $sformatf("match w=%0d r=%0d", $signed(weight), $signed(rand_value)));
      check(count_hit == exp_hit, $sformatf("hit count=%0d target=%0d", ref_count, tgt));
      check(pulse == (exp_match && exp_hit), "pulse");
      n_pulse += int'(pulse); n_match += int'(weight_match); n_hit += int'(count_hit);
      @(posedge clk);
      if (step && spike_in) ref_count = (ref_count + 1 >= tgt) ? 0 : ref_count + 1;
      #1;
    end
    check(n_pulse > 0 && n_match > 0 && n_hit > 0, "every case seen");
    $display("pulses=%0d matches=%0d hits=%0d", n_pulse, n_match, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
