// reservoir_top: fully parallel recurrent reservoir of leaky integrate-and-fire
// neurons ("cortical column") with multiplier-less synapses.
//
// N_NEURONS neuron cells (lif_neuron) of NS synapses each all update in the same
// clock cycle, one time step per cycle with `step` high. The default is the published
// 3x2x3 reservoir: 8 cells in three layers (A = 0..2, B = 3..4, C = 5..7) with 16
// synapses, 2 per cell, and 16 fixed weights in a register bank (weight_regs).
// External spike trains (generated off-chip as Poisson trains from speech features)
// enter on `spike_in`; the membrane potentials of all cells, one reservoir state per
// step, leave on `vm` for off-chip recording and classification.
//
// Connectivity: every synapse k = n*NS + s (cell n, synapse s) takes its spike from
// source SRC[k]; a source below N_IN is external input SRC[k], otherwise it is the
// output spike of cell SRC[k]-N_IN. The published facts are that input vectors reach
// the cells directly and that the reservoir is recurrent in three layers; the wiring
// itself is this design's: synapse 0 of cell n reads input n, synapse 1 reads a cell
// of another layer so that A feeds B and C, B feeds C and C feeds back into A:
//   cell : 0  1  2  3  4  5  6  7
//   from : 5  6  7  0  1  2  3  4
// Each synapse k has its own LFSR seeded with ((23*k) mod 63) + 1, so all 16 start
// at different points of the 63-step sequence.
//
// Interface: all inputs are sampled on the rising clock edge; the shared threshold,
// reset level, decay constant and pulse-count target are programmable ports. A
// recurrent spike produced in step t (cell spike is combinational from its registered
// potential) reaches its target synapses in the same step t.
module reservoir_top
  import reservoir_pkg::*;
#(
  parameter int      N_NEURONS = 8,
  parameter int      NS        = 2,
  parameter int      N_IN      = 8,
  parameter int      SHIFT     = 3,
  parameter int      NW        = N_NEURONS * NS,
  parameter int      AW        = (NW > 1) ? $clog2(NW) : 1,
  parameter int      SRC   [NW] = '{0, 13, 1, 14, 2, 15, 3, 8, 4, 9, 5, 10, 6, 11, 7, 12},
  parameter weight_t WINIT [NW] = '{4'sd1, 4'sd2, 4'sd3, -4'sd1, -4'sd2, -4'sd3, -4'sd4, 4'sd2,
                                    4'sd3, 4'sd1, -4'sd1, 4'sd2, -4'sd2, 4'sd1, 4'sd3, -4'sd3}
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 step,
  input  logic [N_IN-1:0]      spike_in,
  input  vmem_t                vth,
  input  vmem_t                vreset,
  input  decay_t               decay,
  input  count_t               count_target,
  input  logic                 w_we,
  input  logic [AW-1:0]        w_addr,
  input  weight_t              w_data,
  output vmem_t                vm        [N_NEURONS],
  output logic [N_NEURONS-1:0] spike_out,
  output logic [NW-1:0]        syn_pulse
);

  weight_t weights [NW];
  logic [N_IN+N_NEURONS-1:0] sources;

  assign sources = {spike_out, spike_in};

  weight_regs #(.NW(NW), .AW(AW), .WINIT(WINIT)) u_weights (
    .clk     (clk),
    .rst     (rst),
    .we      (w_we),
    .waddr   (w_addr),
    .wdata   (w_data),
    .weights (weights)
  );

  for (genvar n = 0; n < N_NEURONS; n++) begin : g_cell
    localparam lfsr_t SEEDS_N [NS] = seeds_of(n);

    logic [NS-1:0] cell_spikes;
    weight_t       cell_weights [NS];

    for (genvar s = 0; s < NS; s++) begin : g_in
      assign cell_spikes[s]  = sources[SRC[n*NS+s]];
      assign cell_weights[s] = weights[n*NS+s];
    end

    lif_neuron #(
      .NS    (NS),
      .SHIFT (SHIFT),
      .SEEDS (SEEDS_N)
    ) u_cell (
      .clk          (clk),
      .rst          (rst),
      .step         (step),
      .spikes_in    (cell_spikes),
      .weights      (cell_weights),
      .count_target (count_target),
      .vth          (vth),
      .vreset       (vreset),
      .decay        (decay),
      .vm           (vm[n]),
      .spike        (spike_out[n]),
      .syn_pulse    (syn_pulse[n*NS +: NS])
    );
  end

  typedef lfsr_t seed_arr_t [NS];

  function automatic seed_arr_t seeds_of(int n);
    seed_arr_t r;
    for (int s = 0; s < NS; s++)
      r[s] = lfsr_t'(((23 * (n * NS + s)) % 63) + 1);
    return r;
  endfunction

  initial begin
    for (int k = 0; k < NW; k++)
      assert (SRC[k] >= 0 && SRC[k] < N_IN + N_NEURONS)
        else $error("SRC[%0d] = %0d names no source", k, SRC[k]);
  end

endmodule
