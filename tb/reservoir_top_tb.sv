// reservoir_top_tb: end-to-end test of the 8-cell, 16-synapse reservoir at its
// default parameters.
//
// Each "utterance" is a set of 8 Poisson spike trains (exponentially distributed
// inter-spike intervals, a different rate per channel and utterance) presented for
// STEPS time steps after a reset, as the off-chip stimulus would be. Five reservoir
// states (all 8 membrane potentials) are sampled at evenly spaced steps from start
// to end, as the off-chip readout does. Every step, every membrane potential, output
// spike and synaptic pulse is compared with a reference model built from the
// reservoir's published behaviour and this design's documented wiring:
//   synapse 0 of cell n <- input n;  synapse 1 of cells 0..7 <- cells 5,6,7,0,1,2,3,4
//   LFSR seed of synapse k = ((23*k) mod 63) + 1.
// Utterances exercise weight programming, a lowered threshold and a count target
// of 2; the test counts how often each mechanism happened and fails if one never
// did: input-driven pulse, recurrent pulse, fire and reset, leak decay, pulse
// withheld by the counter, weight write, disconnected synapse.
module reservoir_top_tb;
  import reservoir_pkg::*;
  import reservoir_ref_pkg::*;

  localparam int N     = 8;
  localparam int NS    = 2;
  localparam int NW    = 16;
  localparam int STEPS = 6000;
  localparam int UTTER = 5;
  localparam int FROM1 [N] = '{5, 6, 7, 0, 1, 2, 3, 4};
  localparam int WRESET [NW] = '{1, 2, 3, -1, -2, -3, -4, 2, 3, 1, -1, 2, -2, 1, 3, -3};

  logic          clk = 1'b0;
  logic          rst;
  logic          step;
  logic [N-1:0]  spike_in;
  vmem_t         vth, vreset;
  decay_t        decay;
  count_t        count_target;
  logic          w_we;
  logic [3:0]    w_addr;
  weight_t       w_data;
  vmem_t         vm [N];
  logic [N-1:0]  spike_out;
  logic [NW-1:0] syn_pulse;

  int checks = 0;
  int failures = 0;
  int n_in_pulse = 0, n_rec_pulse = 0, n_fire = 0, n_decay = 0;
  int n_withheld = 0, n_wwrite = 0, n_disconnected = 0;

  reservoir_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  neuron_model cells [N];
  int          wv [NW];
  real         next_t [N];
  real         lambda [N];
  vmem_t       states [5][N];

  // exponential inter-spike interval in steps, rate lam spikes per step
  function automatic real isi(real lam);
    real u;
    u = (real'($urandom_range(1, 1000000))) / 1000001.0;
    return -$ln(u) / lam;
  endfunction

  task automatic new_models();
    for (int n = 0; n < N; n++) begin
      int seeds [] = new[NS];
      for (int s = 0; s < NS; s++) seeds[s] = ((23 * (n * NS + s)) % 63) + 1;
      cells[n] = new(NS, 3, seeds, longint'(VRESET_DEFAULT));
    end
  endtask

  // LFSR value of a synapse with the given seed t steps after reset
  function automatic int seq_at(int seed, int t);
    int v = seed;
    for (int i = 0; i < t; i++) v = ((v << 1) & 63) | (((v >> 5) ^ (v >> 4)) & 1);
    return v;
  endfunction

  // Every random generator walks the same 63-step sequence at a fixed offset, so a
  // recurrent synapse only passes a spike if its weight equals its random value at
  // the step its source cell fires. For each cell pair m -> n this finds weights
  // for synapse (m,0) and (n,1) such that a pulse on (m,0) at step t (which fires
  // m at t+1 when one pulse crosses the threshold) meets a match on (n,1) at t+1.
  task automatic align_recurrent_weights();
    for (int n = 0; n < N; n++) begin
      int m, a, b;
      m = FROM1[n];
      for (int t = 0; t < 63; t++) begin
        a = seq_at(((23 * (m * NS)) % 63) + 1, t);
        b = seq_at(((23 * (n * NS + 1)) % 63) + 1, t + 1);
        if (a % 8 == 0 && b % 8 == 0) begin
          write_weight(m * NS, neuron_model::to_signed(a, 6) / 8);
          write_weight(n * NS + 1, neuron_model::to_signed(b, 6) / 8);
          break;
        end
      end
    end
  endtask

  task automatic write_weight(int k, int w);
    w_we = 1'b1; w_addr = 4'(k); w_data = 4'(w);
    @(posedge clk);
    #1 w_we = 1'b0;
    wv[k] = w & 15;
    n_wwrite++;
  endtask

  task automatic run_utterance(int u);
    bit     src [N + N];
    bit     sp  [] = new[NS];
    int     wn  [] = new[NS];
    longint prev [N];
    int     sample;
    for (int n = 0; n < N; n++) begin
      lambda[n] = 0.05 + 0.6 * real'($urandom_range(0, 1000)) / 1000.0;
      next_t[n] = isi(lambda[n]);
    end
    sample = 0;
    for (int t = 0; t < STEPS; t++) begin
      step = 1'b1;
      for (int n = 0; n < N; n++) begin
        spike_in[n] = (real'(t) >= next_t[n]);
        if (spike_in[n]) next_t[n] = real'(t) + 1.0 + isi(lambda[n]);
      end
      #1;
      for (int n = 0; n < N; n++) begin
        src[n]     = spike_in[n];
        src[N + n] = cells[n].fires(longint'(vth));
      end
      for (int n = 0; n < N; n++) begin
        check(longint'(vm[n]) == cells[n].vm, $sformatf("u%0d t=%0d cell %0d vm=%0d model=%0d", u, t, n, vm[n], cells[n].vm));
        check(spike_out[n] == src[N + n], $sformatf("u%0d t=%0d cell %0d spike", u, t, n));
        sp[0] = src[n];
        sp[1] = src[N + FROM1[n]];
        for (int s = 0; s < NS; s++) begin
          bit p;
          int sw;
          wn[s] = wv[n * NS + s];
          p = cells[n].pulse(s, sp[s], wn[s], int'(count_target));
          check(syn_pulse[n * NS + s] == p, $sformatf("u%0d t=%0d pulse %0d.%0d", u, t, n, s));
          if (p && s == 0) n_in_pulse++;
          if (p && s == 1) n_rec_pulse++;
          sw = neuron_model::to_signed(wn[s], 4);
          if (sp[s] && (sw == 0 || sw > 3 || sw < -4)) n_disconnected++;
          // spike arrived, weight matched, but the counter withheld it
          if (sp[s] && !p && cells[n].pulse(s, sp[s], wn[s], 1) && count_target > 1) n_withheld++;
        end
        if (src[N + n]) n_fire++;
        prev[n] = cells[n].vm;
      end
      if (sample < 5 && t == sample * (STEPS - 1) / 4) begin
        for (int n = 0; n < N; n++) states[sample][n] = vm[n];
        sample++;
      end
      @(posedge clk);
      for (int n = 0; n < N; n++) begin
        sp[0] = src[n];
        sp[1] = src[N + FROM1[n]];
        for (int s = 0; s < NS; s++) wn[s] = wv[n * NS + s];
        cells[n].advance(sp, wn, int'(count_target), longint'(vth), longint'(vreset), longint'(decay));
        if (cells[n].vm < prev[n] && !src[N + n]) n_decay++;
      end
      #1;
    end
    step = 1'b0; spike_in = '0;
    check(sample == 5, "five states sampled");
    $display("utterance %0d state 4: %0d %0d %0d %0d %0d %0d %0d %0d", u,
             states[4][0], states[4][1], states[4][2], states[4][3],
             states[4][4], states[4][5], states[4][6], states[4][7]);
  endtask

  initial begin
    rst = 1'b1; step = 1'b0; spike_in = '0;
    vth = VTH_DEFAULT; vreset = VRESET_DEFAULT; decay = DECAY_DEFAULT;
    count_target = 5'd1; w_we = 1'b0; w_addr = '0; w_data = '0;
    for (int k = 0; k < NW; k++) wv[k] = WRESET[k] & 15;
    for (int u = 0; u < UTTER; u++) begin
      rst = 1'b1;
      repeat (2) @(posedge clk);
      #1 rst = 1'b0;
      if (u > 0) for (int k = 0; k < NW; k++) wv[k] = WRESET[k] & 15;
      new_models();
      // weights are programmed with `step` low, so nothing else advances
      case (u)
        1: begin write_weight(3, 3); write_weight(5, -4); write_weight(9, 0); end
        3: write_weight(1, 5);                        // outside the random range
        4: align_recurrent_weights();
        default: ;
      endcase
      case (u)
        0: ;                                          // published constants, reset weights
        1: begin                                      // lower threshold: one pulse fires
             vth = 18'sd409;
           end
        2: begin vth = 18'sd409; count_target = 5'd2; end
        3: begin vth = 18'sd300; decay = -12'sd10; count_target = 5'd1; end
        4: vth = 18'sd409;
      endcase
      run_utterance(u);
      vth = VTH_DEFAULT; decay = DECAY_DEFAULT; count_target = 5'd1;
    end
    $display("input pulses=%0d recurrent pulses=%0d fires=%0d decay steps=%0d withheld=%0d weight writes=%0d disconnected=%0d",
             n_in_pulse, n_rec_pulse, n_fire, n_decay, n_withheld, n_wwrite, n_disconnected);
    check(n_in_pulse > 0, "input-driven synaptic pulse happened");
    check(n_rec_pulse > 0, "recurrent synaptic pulse happened");
    check(n_fire > 0, "a cell fired and reset");
    check(n_decay > 0, "leak decay happened");
    check(n_withheld > 0, "pulse counter withheld a pulse");
    check(n_wwrite > 0, "weight write happened");
    check(n_disconnected > 0, "spike on a disconnected synapse happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (UTTER * (STEPS + 20) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
