// synapse_accum: synapse accumulation unit of one neuron.
//
// Every synapse delivers a one-bit pulse meaning a synaptic value of 1.0. Each such
// '1' is scaled down by a right shift of SHIFT bits (1.0 >> SHIFT in Fix_18_12) and
// the scaled values of all NS synapses are summed by an adder chain into V_s, the
// synaptic potential that the membrane adds in this time step (eq. 6 with the
// weighting done stochastically by the synapses). The right-shift scaling and the
// adder chain are the published method; the shift amount, 3 (one pulse = 0.125,
// so two close pulses cross the 0.15 threshold), is this design's choice.
//
// Purely combinational; V_s is valid in the same cycle as the pulses.
module synapse_accum
  import reservoir_pkg::*;
#(
  parameter int NS    = 2,
  parameter int SHIFT = 3
) (
  input  logic [NS-1:0] pulses,
  output vmem_t         vs
);

  localparam vmem_t ONE    = vmem_t'(1) <<< VM_FRAC;
  localparam vmem_t SCALED = ONE >>> SHIFT;

  always_comb begin
    vs = '0;
    for (int i = 0; i < NS; i++)
      if (pulses[i])
        vs = vs + SCALED;
  end

endmodule
