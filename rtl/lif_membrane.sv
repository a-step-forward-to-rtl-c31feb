// lif_membrane: leaky integrate-and-fire membrane of one neuron (eq. 7).
//
// An 18-bit Fix_18_12 accumulator holds the membrane potential V_m. Once per time
// step (`step` high at a rising clock edge):
//   if V_m > V_th   : an output spike is fired and V_m is loaded with V_reset
//   otherwise       : V_m <= V_m + V_s + decay * (V_m - V_reset)
// The leak term uses the neuron's single multiplier: the signed Fix_12_8 decay
// constant (default -0.11) times the distance to the reset level, so without input
// the potential decays exponentially towards V_reset. The threshold comparator, the
// reset register, the Fix_18_12 accumulator, the programmable threshold (0.15), reset
// (1 mV) and decay constant (-0.11) and the one multiplier per neuron are published.
// Where the text gives both "reset to 1 mV" and "resets to the voltage level 0",
// this design follows 1 mV, the programmable reset register. Saturating the sum at
// the Fix_18_12 limits, rounding the product towards minus infinity and starting
// at V_INIT after reset are this design's choices.
//
// Interface: `spike` is combinational from the registered V_m and is high during the
// step in which V_m exceeds V_th; V_m is reset at the end of that step.
module lif_membrane
  import reservoir_pkg::*;
#(
  parameter vmem_t VINIT = VRESET_DEFAULT
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   step,
  input  vmem_t  vs,
  input  vmem_t  vth,
  input  vmem_t  vreset,
  input  decay_t decay,
  output vmem_t  vm,
  output logic   spike
);

  localparam int DIFF_W = VM_W + 1;
  localparam int PROD_W = DIFF_W + DEC_W;
  localparam int SUM_W  = PROD_W + 2;

  logic signed [DIFF_W-1:0] diff;
  logic signed [PROD_W-1:0] prod;
  logic signed [PROD_W-1:0] leak;
  logic signed [SUM_W-1:0]  sum;
  vmem_t                    vnext;

  always_comb begin
    diff  = DIFF_W'(vm) - DIFF_W'(vreset);
    prod  = PROD_W'(diff) * PROD_W'(decay);
    leak  = prod >>> DEC_FRAC;
    sum   = SUM_W'(vm) + SUM_W'(vs) + SUM_W'(leak);
    if (sum > SUM_W'(VMEM_MAX))
      vnext = VMEM_MAX;
    else if (sum < SUM_W'(VMEM_MIN))
      vnext = VMEM_MIN;
    else
      vnext = vmem_t'(sum);
  end

  assign spike = (vm > vth);

  always_ff @(posedge clk) begin
    if (rst)
      vm <= VINIT;
    else if (step)
      vm <= spike ? vreset : vnext;
  end

endmodule
