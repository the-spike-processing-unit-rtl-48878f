// sat_add: overflow-aware summing node of the SPU.
//
// Adds two 6-bit two's complement samples and clamps the result to
// [-32, +31] instead of letting it wrap. Every adder of the neuron (the
// synaptic summation tree and the four adders of the IIR filter) is one of
// these, as the model requires of all its adders. Purely combinational.
module sat_add
  import spu_pkg::*;
(
  input  sample_t a,
  input  sample_t b,
  output sample_t sum
);

  always_comb sum = sat_add_f(a, b);

endmodule
