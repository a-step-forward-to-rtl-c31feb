// lif_neuron: one neuron cell of the reservoir, a self-contained computing unit.
//
// The cell joins the two halves of the architecture:
//   synapse half  - NS multiplier-less synapses (pulse_synapse), each with its own
//                   random weight generator (lfsr6) stepping once per time step,
//                   and the synapse accumulation unit (synapse_accum);
//   membrane half - the leaky integrate-and-fire membrane (lif_membrane), which
//                   holds the only multiplier of the cell.
// Two synapses per cell are the published default. One LFSR per synapse, with the
// seeds given by the SEEDS parameter, is this design's choice: the text only says
// that all inputs and their random weights are accessed at the same time.
//
// Interface: `spikes_in[i]` is the spike arriving at synapse i during the current
// time step, `weights[i]` its fixed weight. All state advances on a rising clock
// edge with `step` high; `spike` and `vm` come from the membrane (see lif_membrane).
// `syn_pulse` shows which synapses delivered a pulse in the current step.
module lif_neuron
  import reservoir_pkg::*;
#(
  parameter int    NS          = 2,
  parameter int    SHIFT       = 3,
  parameter lfsr_t SEEDS [NS]  = '{6'h01, 6'h18},
  parameter vmem_t VINIT       = VRESET_DEFAULT
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          step,
  input  logic [NS-1:0] spikes_in,
  input  weight_t       weights [NS],
  input  count_t        count_target,
  input  vmem_t         vth,
  input  vmem_t         vreset,
  input  decay_t        decay,
  output vmem_t         vm,
  output logic          spike,
  output logic [NS-1:0] syn_pulse
);

  lfsr_t rand_value [NS];
  vmem_t vs;

  for (genvar i = 0; i < NS; i++) begin : g_syn
    lfsr6 #(.SEED(SEEDS[i])) u_lfsr (
      .clk   (clk),
      .rst   (rst),
      .step  (step),
      .value (rand_value[i])
    );

    pulse_synapse u_syn (
      .clk          (clk),
      .rst          (rst),
      .step         (step),
      .spike_in     (spikes_in[i]),
      .weight       (weights[i]),
      .rand_value   (rand_value[i]),
      .count_target (count_target),
      .pulse        (syn_pulse[i]),
      .weight_match (),
      .count_hit    ()
    );
  end

  synapse_accum #(.NS(NS), .SHIFT(SHIFT)) u_accum (
    .pulses (syn_pulse),
    .vs     (vs)
  );

  lif_membrane #(.VINIT(VINIT)) u_mem (
    .clk    (clk),
    .rst    (rst),
    .step   (step),
    .vs     (vs),
    .vth    (vth),
    .vreset (vreset),
    .decay  (decay),
    .vm     (vm),
    .spike  (spike)
  );

endmodule
