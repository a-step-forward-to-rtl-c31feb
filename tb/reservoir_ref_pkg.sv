// reservoir_ref_pkg: cycle-level reference model of a reservoir neuron cell, used by
// the neuron and reservoir testbenches.
//
// The model is written from the behaviour, not from the RTL structure: random
// values come from the recurrence x^6 + x^5 + 1 on an integer, weights and random
// values are compared as real numbers, the pulse counter is an integer modulo the
// count target, and the membrane update uses real-valued floor for the leak term.
package reservoir_ref_pkg;

  class neuron_model;
    int     ns;
    int     shift;
    int     lfsr  [];
    int     count [];
    longint vm;

    function new(int ns_i, int shift_i, int seeds [], longint vinit);
      ns = ns_i;
      shift = shift_i;
      lfsr  = new[ns];
      count = new[ns];
      foreach (lfsr[i]) begin
        lfsr[i]  = (seeds[i] % 64 == 0) ? 1 : seeds[i] % 64;
        count[i] = 0;
      end
      vm = vinit;
    endfunction

    static function int to_signed(int v, int bits);
      return (v >= (1 << (bits - 1))) ? v - (1 << bits) : v;
    endfunction

    function bit fires(longint vth);
      return vm > vth;
    endfunction

    // synaptic pulses for the current step
    function bit pulse(int i, bit spike, int weight4, int target);
      int  tgt;
      real w, r;
      tgt = (target == 0) ? 1 : target;
      w = real'(to_signed(weight4 & 15, 4)) / 8.0;
      r = real'(to_signed(lfsr[i], 6)) / 64.0;
      return spike && (count[i] == tgt - 1) && (w == r);
    endfunction

    // end of step: update counters, random generators and membrane
    function void advance(bit spikes [], int weights [], int target,
                          longint vth, longint vreset, longint decay);
      longint vs, leak, n;
      int     tgt;
      vs = 0;
      for (int i = 0; i < ns; i++)
        if (pulse(i, spikes[i], weights[i], target)) vs += 4096 / (1 << shift);
      tgt = (target == 0) ? 1 : target;
      for (int i = 0; i < ns; i++) begin
        if (spikes[i]) count[i] = (count[i] + 1) % tgt;
        lfsr[i] = ((lfsr[i] << 1) & 63) | (((lfsr[i] >> 5) ^ (lfsr[i] >> 4)) & 1);
      end
      if (vm > vth) vm = vreset;
      else begin
        leak = longint'($floor(real'(decay * (vm - vreset)) / 256.0));
        n = vm + vs + leak;
        if (n > 131071) n = 131071;
        if (n < -131072) n = -131072;
        vm = n;
      end
    endfunction
  endclass

endpackage
