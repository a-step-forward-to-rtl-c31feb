// lfsr6: Fibonacci linear-feedback shift register used as the random weight generator
// of a synapse.
//
// One XOR gate at the head of the register chain combines two taps and feeds the
// first stage, so the state walks through a repeatable sequence fixed by the
// polynomial and the seed. The polynomial x^6 + x^5 + 1 is maximal: every non-zero
// 6-bit value appears once in 63 steps; zero never appears. The state, read as a
// signed Fix_6_6 number, is a random value in -0.5 .. +0.484, one per time step.
// A 6-bit Fibonacci LFSR with a seed and a new value per time step is the published
// structure; the tap choice is this design's.
//
// Interface: `step` advances one time step on the rising clock edge. `value` is the
// registered state. Synchronous active-high reset loads the SEED parameter (a seed
// of zero is replaced by 1 so the register cannot lock up).
module lfsr6
  import reservoir_pkg::*;
#(
  parameter lfsr_t SEED = 6'h01
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  step,
  output lfsr_t value
);

  localparam lfsr_t SAFE_SEED = (SEED == '0) ? lfsr_t'(1) : SEED;

  lfsr_t state;
  logic  feedback;

  assign feedback = state[5] ^ state[4];
  assign value    = state;

  always_ff @(posedge clk) begin
    if (rst)
      state <= SAFE_SEED;
    else if (step)
      state <= {state[4:0], feedback};
  end

endmodule
