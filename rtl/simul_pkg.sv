// simul_pkg: default sizes shared by the shift-and-add multiplier, the
// neuron array and the four-tap FIR filter.
//
// The 8-bit operands and the four neurons / four taps are the sizes the
// design is evaluated at; products are 2 * DATA_W bits wide. The 16-bit
// neuron accumulator and the 3-bit coefficient address follow the widths
// seen in the design's reference simulations. Every module takes these as
// parameter defaults, so each can be resized on instantiation.
package simul_pkg;

  localparam int unsigned DATA_W  = 8;    // multiplicand / coefficient
  localparam int unsigned ADDR_W  = 3;    // coefficient memory address
  localparam int unsigned ACC_W   = 16;   // neuron accumulator
  localparam int unsigned N_UNITS = 4;    // neurons / FIR taps

endpackage
