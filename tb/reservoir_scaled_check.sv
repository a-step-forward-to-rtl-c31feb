// reservoir_scaled_check: drives one reservoir_top of N cells with Poisson spike
// trains and compares it, step by step, with the reference model.
//
// Used by reservoir_scaled_tb to run the larger reservoir sizes. The wiring
// generalises the default one: synapse 0 of cell n reads input n, synapse 1 reads
// cell (n - 3) mod N. Weights start at a repeating pattern and are then re-aligned
// pairwise (see reservoir_top_tb) so that recurrent spikes are carried. The
// threshold is lowered to 0.1 so that one synaptic pulse fires a cell.
module reservoir_scaled_check
  import reservoir_pkg::*;
  import reservoir_ref_pkg::*;
#(
  parameter int N     = 15,
  parameter int STEPS = 4000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_fire,
  output int   n_rec
);

  localparam int NS = 2;
  localparam int NW = N * NS;
  localparam int AW = $clog2(NW);

  typedef int      src_t [NW];
  typedef weight_t win_t [NW];

  function automatic int from1(int n);
    return (n + N - 3) % N;
  endfunction

  function automatic src_t make_src();
    src_t r;
    for (int n = 0; n < N; n++) begin
      r[n * NS]     = n;
      r[n * NS + 1] = N + from1(n);
    end
    return r;
  endfunction

  function automatic win_t make_winit();
    win_t r;
    for (int k = 0; k < NW; k++) r[k] = weight_t'((k % 7) - 4 + ((k % 7) >= 4 ? 1 : 0));
    return r;
  endfunction

  localparam src_t SRC   = make_src();
  localparam win_t WINIT = make_winit();

  logic          rst, step;
  logic [N-1:0]  spike_in;
  vmem_t         vth, vreset;
  decay_t        decay;
  count_t        count_target;
  logic          w_we;
  logic [AW-1:0] w_addr;
  weight_t       w_data;
  vmem_t         vm [N];
  logic [N-1:0]  spike_out;
  logic [NW-1:0] syn_pulse;

  reservoir_top #(
    .N_NEURONS (N),
    .NS        (NS),
    .N_IN      (N),
    .SRC       (SRC),
    .WINIT     (WINIT)
  ) dut (.*);

  neuron_model cells [N];
  int          wv [NW];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (N=%0d): %s", N, what);
    end
  endtask

  function automatic int seq_at(int seed, int t);
    int v = seed;
    for (int i = 0; i < t; i++) v = ((v << 1) & 63) | (((v >> 5) ^ (v >> 4)) & 1);
    return v;
  endfunction

  task automatic write_weight(int k, int w);
    w_we = 1'b1; w_addr = AW'(k); w_data = 4'(w);
    @(posedge clk);
    #1 w_we = 1'b0;
    wv[k] = w & 15;
  endtask

  initial begin
    bit src [2 * N];
    automatic bit sp [] = new[NS];
    automatic int wn [] = new[NS];
    checks = 0; failures = 0; n_fire = 0; n_rec = 0; done = 1'b0;
    rst = 1'b1; step = 1'b0; spike_in = '0; count_target = 5'd1;
    vth = 18'sd409; vreset = VRESET_DEFAULT; decay = DECAY_DEFAULT;
    w_we = 1'b0; w_addr = '0; w_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < NW; k++) wv[k] = int'(WINIT[k]) & 15;
    for (int n = 0; n < N; n++) begin
      automatic int seeds [] = new[NS];
      for (int s = 0; s < NS; s++) seeds[s] = ((23 * (n * NS + s)) % 63) + 1;
      cells[n] = new(NS, 3, seeds, longint'(VRESET_DEFAULT));
    end
    // align weight pairs m -> n so recurrent spikes meet an open gate
    for (int n = 0; n < N; n++) begin
      automatic int m, a, b;
      m = from1(n);
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
    for (int t = 0; t < STEPS; t++) begin
      step = 1'b1;
      for (int n = 0; n < N; n++) spike_in[n] = ($urandom_range(0, 99) < 40);
      #1;
      for (int n = 0; n < N; n++) begin
        src[n]     = spike_in[n];
        src[N + n] = cells[n].fires(longint'(vth));
      end
      for (int n = 0; n < N; n++) begin
        check(longint'(vm[n]) == cells[n].vm, $sformatf("t=%0d cell %0d vm=%0d model=%0d", t, n, vm[n], cells[n].vm));
        check(spike_out[n] == src[N + n], $sformatf("t=%0d cell %0d spike", t, n));
        sp[0] = src[n];
        sp[1] = src[N + from1(n)];
        for (int s = 0; s < NS; s++) begin
          automatic bit p;
          wn[s] = wv[n * NS + s];
          p = cells[n].pulse(s, sp[s], wn[s], 1);
          check(syn_pulse[n * NS + s] == p, $sformatf("t=%0d pulse %0d.%0d", t, n, s));
          if (p && s == 1) n_rec++;
        end
        if (src[N + n]) n_fire++;
      end
      @(posedge clk);
      for (int n = 0; n < N; n++) begin
        sp[0] = src[n];
        sp[1] = src[N + from1(n)];
        for (int s = 0; s < NS; s++) wn[s] = wv[n * NS + s];
        cells[n].advance(sp, wn, 1, longint'(vth), longint'(vreset), longint'(decay));
      end
      #1;
    end
    step = 1'b0;
    done = 1'b1;
  end
endmodule
