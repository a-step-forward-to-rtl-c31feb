// weight_regs: register bank holding the fixed synaptic weights of the reservoir.
//
// NW signed Fix_4_3 weights, one per synapse, all readable in parallel so that every
// neuron sees its weights at the same time. Weights stored in registers are published;
// the write port used to program them and the reset values (WINIT) are this
// design's choice.
//
// Interface: a write of `wdata` to entry `waddr` happens on a rising clock edge with
// `we` high and is visible on `weights` the next cycle. Synchronous active-high
// reset loads WINIT. A write to an address of NW or above is ignored.
module weight_regs
  import reservoir_pkg::*;
#(
  parameter int      NW          = 16,
  parameter int      AW          = (NW > 1) ? $clog2(NW) : 1,
  parameter weight_t WINIT [NW]  = '{default: weight_t'(1)}
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  weight_t       wdata,
  output weight_t       weights [NW]
);

  always_ff @(posedge clk) begin
    if (rst)
      weights <= WINIT;
    else if (we && int'(waddr) < NW)
      weights[waddr] <= wdata;
  end

endmodule
