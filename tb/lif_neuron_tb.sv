// lif_neuron_tb: self-checking test of one neuron cell (synapses, random weight
// generators, accumulation and membrane together).
//
// The cell has two synapses, the published configuration of a single neuron.
// Random Poisson-like spike trains drive the cell's synapses; every step the
// membrane potential, the output spike and the synaptic pulses are compared with
// the reference model. The weights are set to values the LFSRs can hit, and the
// count target and the threshold are changed part-way so that multi-spike counting
// and firing both occur.
module lif_neuron_tb;
  import reservoir_pkg::*;
  import reservoir_ref_pkg::*;

  localparam int NS = 2;
  localparam lfsr_t SEEDS [NS] = '{6'h05, 6'h2a};

  logic          clk = 1'b0;
  logic          rst;
  logic          step;
  logic [NS-1:0] spikes_in;
  weight_t       weights [NS];
  count_t        count_target;
  vmem_t         vth, vreset;
  decay_t        decay;
  vmem_t         vm;
  logic          spike;
  logic [NS-1:0] syn_pulse;
  int            checks = 0;
  int            failures = 0;
  int            n_fire = 0, n_pulse = 0;

  lif_neuron #(.NS(NS), .SHIFT(3), .SEEDS(SEEDS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    neuron_model m;
    int  seeds [] = '{5, 42};
    bit  sp [] = new[NS];
    int  wv [] = new[NS];
    rst = 1'b1; step = 1'b0; spikes_in = '0; count_target = 5'd1;
    vth = VTH_DEFAULT; vreset = VRESET_DEFAULT; decay = DECAY_DEFAULT;
    weights = '{4'sd2, -4'sd3};
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    m = new(NS, 3, seeds, longint'(VRESET_DEFAULT));
    for (int t = 0; t < 8000; t++) begin
      if (t == 3000) count_target = 5'd2;
      if (t == 5000) begin count_target = 5'd1; vth = 18'sd300; end
      step = ($urandom_range(0, 9) != 0);
      for (int i = 0; i < NS; i++) begin
        spikes_in[i] = ($urandom_range(0, 99) < 70);
        sp[i] = spikes_in[i];
        wv[i] = int'(weights[i]) & 15;
      end
      #1;
      check(longint'(vm) == m.vm, $sformatf("t=%0d vm=%0d model=%0d", t, vm, m.vm));
      check(spike == m.fires(longint'(vth)), $sformatf("t=%0d spike", t));
      for (int i = 0; i < NS; i++)
        check(syn_pulse[i] == m.pulse(i, sp[i], wv[i], int'(count_target)), $sformatf("t=%0d pulse %0d", t, i));
      if (step) begin
        n_fire += int'(spike);
        n_pulse += $countones(syn_pulse);
      end
      @(posedge clk);
      if (step) m.advance(sp, wv, int'(count_target), longint'(vth), longint'(vreset), longint'(decay));
      #1;
    end
    check(n_fire > 0, "cell fired");
    check(n_pulse > 0, "synapses delivered pulses");
    $display("fires=%0d pulses=%0d", n_fire, n_pulse);
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
