// pulse_synapse: multiplier-less synapse built from a pulse counter, a weight
// comparator and an AND gate.
//
// A synaptic multiplication w*x is replaced by a stochastic logic function of the
// fixed weight and the incoming spike train:
//   * the pulse counter counts incoming spikes; it reports a hit on the spike that
//     brings the count to `count_target` and then starts again from zero;
//   * the weight comparator reports a match when the random value of the synapse's
//     LFSR (Fix_6_6) equals the fixed weight (Fix_4_3), both read as real numbers;
//   * the output pulse is the AND of the two.
// The counter, the equality comparison with an LFSR value and the AND gate are the
// published structure. What the counter is compared with is not given: here it is
// the programmable `count_target` (1 passes every spike on to the AND gate). A weight
// outside the LFSR's -0.5 .. +0.484 range, and a weight of zero (the LFSR never holds
// zero), never match, so such a synapse is disconnected.
//
// Timing: `pulse` is combinational from `spike_in`, the registered counter and the
// LFSR value, and is meant for the current time step (`step` high). The counter
// advances on the clock edge that ends the step. Synchronous active-high reset.
module pulse_synapse
  import reservoir_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    step,
  input  logic    spike_in,
  input  weight_t weight,
  input  lfsr_t   rand_value,
  input  count_t  count_target,
  output logic    pulse,
  output logic    weight_match,
  output logic    count_hit
);

  count_t count;
  count_t target_eff;

  // a target of 0 behaves as 1
  assign target_eff = (count_target == '0) ? count_t'(1) : count_target;

  // weight Fix_4_3 scaled by 8 to Fix_x_6, compared with the LFSR in Fix_6_6
  logic signed [W_W+3-1:0] weight_scaled;
  logic signed [W_W+3-1:0] rand_ext;
  assign weight_scaled = {weight, 3'b000};
  assign rand_ext      = (W_W+3)'($signed(rand_value));

  assign weight_match = (weight_scaled == rand_ext);
  assign count_hit    = spike_in && (count == target_eff - count_t'(1));
  assign pulse        = count_hit && weight_match;

  always_ff @(posedge clk) begin
    if (rst)
      count <= '0;
    else if (step && spike_in) begin
      if (count_hit || count >= target_eff - count_t'(1))
        count <= '0;
      else
        count <= count + count_t'(1);
    end
  end

endmodule
