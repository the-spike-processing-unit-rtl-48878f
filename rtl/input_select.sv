// input_select: selection unit in front of the SPU soma.
//
// A two-way multiplexer controlled by one configuration bit. With sel = 0 the
// soma is driven by this neuron's own synaptic sum x[n]; with sel = 1 it is
// driven by the membrane potential V'mem of another SPU, so that two SPUs in
// series form a fourth-order filter. The multiplexer and its purpose are the
// model's; the polarity of sel follows the 0/1 labels of the block diagram.
// Purely combinational, so a chained pair adds no cycle of delay.
module input_select
  import spu_pkg::*;
(
  input  logic    sel,
  input  sample_t x_local,
  input  sample_t vmem_chain,
  output sample_t x_soma
);

  always_comb x_soma = sel ? vmem_chain : x_local;

endmodule
