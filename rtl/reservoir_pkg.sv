// reservoir_pkg: fixed-point types and constants shared by the spiking reservoir.
//
// Number formats follow the Xilinx "Fix_W_F" convention: a signed two's-complement
// word of W bits of which F are fractional.
//   membrane / synaptic sum   Fix_18_12  (vmem_t)   1.0 = 4096
//   fixed synaptic weight      Fix_4_3    (weight_t) 1.0 = 8, range -1.0 .. 0.875
//   LFSR random value          Fix_6_6    (lfsr_t)   range -0.5 .. +0.484
//   decay constant             Fix_12_8   (decay_t)  1.0 = 256
// The membrane, weight and LFSR formats and the threshold (0.15), reset (1 mV) and
// decay (-0.11) values are the published ones. Giving the decay constant the Fix_12_8
// format and the pulse counter 5 bits are this design's reading of the bit-resolution
// table, whose block names are not given next to its formats.
package reservoir_pkg;

  localparam int VM_W    = 18;
  localparam int VM_FRAC = 12;
  localparam int W_W     = 4;
  localparam int W_FRAC  = 3;
  localparam int LFSR_W  = 6;
  localparam int DEC_W   = 12;
  localparam int DEC_FRAC = 8;
  localparam int CNT_W   = 5;

  typedef logic signed [VM_W-1:0]  vmem_t;
  typedef logic signed [W_W-1:0]   weight_t;
  typedef logic        [LFSR_W-1:0] lfsr_t;
  typedef logic signed [DEC_W-1:0] decay_t;
  typedef logic        [CNT_W-1:0] count_t;

  // 0.15 * 4096 = 614.4 -> 614
  localparam vmem_t  VTH_DEFAULT    = 18'sd614;
  // 0.001 * 4096 = 4.1 -> 4
  localparam vmem_t  VRESET_DEFAULT = 18'sd4;
  // -0.11 * 256 = -28.16 -> -28
  localparam decay_t DECAY_DEFAULT  = -12'sd28;

  localparam vmem_t  VMEM_MAX = vmem_t'({1'b0, {(VM_W-1){1'b1}}});
  localparam vmem_t  VMEM_MIN = vmem_t'({1'b1, {(VM_W-1){1'b0}}});

endpackage
