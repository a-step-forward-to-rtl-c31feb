// lif_membrane_tb: self-checking test of the leaky integrate-and-fire membrane.
//
// A reference model computes, once per step, V_m <= V_reset when V_m > V_th, else
// V_m + V_s + floor(decay * (V_m - V_reset) / 256), saturated to 18 signed bits.
// Phases: integration of random synaptic input with the published constants
// (threshold 0.15, reset 1 mV, decay -0.11), pure decay with no input, a single-step
// fire-and-reset latency check, a programmable threshold, and saturation.
module lif_membrane_tb;
  import reservoir_pkg::*;

  logic   clk = 1'b0;
  logic   rst;
  logic   step;
  vmem_t  vs, vth, vreset;
  decay_t decay;
  vmem_t  vm;
  logic   spike;
  int     checks = 0;
  int     failures = 0;
  longint ref_vm;
  int     n_fire = 0, n_decay = 0, n_sat = 0;

  lif_membrane dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic longint model_next(longint v, longint s);
    longint leak, n;
    if (v > longint'(vth)) return longint'(vreset);
    leak = longint'($floor(real'(longint'(decay) * (v - longint'(vreset))) / 256.0));
    n = v + s + leak;
    if (n > 131071) n = 131071;
    if (n < -131072) n = -131072;
    return n;
  endfunction

  // one time step with synaptic input s; compares before and after the edge
  task automatic do_step(input int s);
    vs = vmem_t'(s); step = 1'b1;
    #1;
    check(longint'(vm) == ref_vm, $sformatf("vm=%0d model=%0d", vm, ref_vm));
    check(spike == (ref_vm > longint'(vth)), "spike flag");
    if (spike) n_fire++;
    @(posedge clk);
    ref_vm = model_next(ref_vm, longint'(s));
    #1;
  endtask

  initial begin
    longint prev;
    rst = 1'b1; step = 1'b0; vs = '0;
    vth = VTH_DEFAULT; vreset = VRESET_DEFAULT; decay = DECAY_DEFAULT;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    ref_vm = longint'(VRESET_DEFAULT);
    check(vm == VRESET_DEFAULT, "starts at reset level");
    // integration of random pulses of 0.125
    for (int i = 0; i < 2000; i++)
      do_step(($urandom_range(0, 2) == 0) ? 512 * $urandom_range(1, 2) : 0);
    // step low: nothing changes
    step = 1'b0; vs = 18'sd512;
    prev = longint'(vm);
    repeat (3) @(posedge clk);
    #1 check(longint'(vm) == prev, "holds while step is low");
    // pure decay from 0.1 towards the reset level
    force_value(18'sd409);
    for (int i = 0; i < 60; i++) begin
      prev = ref_vm;
      do_step(0);
      check(ref_vm <= prev && ref_vm >= longint'(vreset), "decays towards reset level");
      if (ref_vm < prev) n_decay++;
    end
    check(ref_vm < 40, "decayed close to reset level");
    // fire latency: 0.1 + 0.125 crosses 0.15 in one step, spike in the next, reset after
    force_value(18'sd409);
    do_step(512);
    check(spike == 1'b1 && vm > vth, "above threshold after one input");
    do_step(0);
    check(vm == vreset && !spike, "reset one step after the spike");
    // programmable threshold and reset value
    vth = 18'sd2048; vreset = -18'sd100; decay = -12'sd64;
    ref_vm = longint'(vm);
    for (int i = 0; i < 500; i++) do_step(($urandom_range(0, 1) == 0) ? 1024 : 0);
    // saturation
    vth = VMEM_MAX; decay = 12'sd0; vreset = 18'sd0;
    for (int i = 0; i < 40; i++) begin
      do_step(30000);
      if (vm == VMEM_MAX) n_sat++;
    end
    check(n_sat > 0, "saturation reached");
    check(n_fire > 10, "neuron fired");
    check(n_decay > 10, "decay seen");
    $display("fires=%0d decays=%0d saturated=%0d", n_fire, n_decay, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bring the membrane to value v by a reset-free load through its own input
  task automatic force_value(input vmem_t v);
    decay = 12'sd0;
    // go to reset level first: fire by a large input
    while (vm != vreset) do_step(32767);
    do_step(int'(v) - int'(vreset));
    decay = DECAY_DEFAULT;
    check(vm == v, "preload");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
