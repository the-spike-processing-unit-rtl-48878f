// soma: body of the SPU, membrane filter plus spike comparator.
//
// The selected input sample drives the second-order IIR filter (iir_df2),
// whose output y[n] is the membrane potential Vmem. A signed comparator
// raises spike_out whenever y[n] >= Vth (Eq. 3). There is no reset of the
// membrane after a spike: what follows a spike is left to the filter
// dynamics, as in the model. The rst input only forces the filter state to
// zero; the model provides it for initialisation and for global inhibition
// such as winner-takes-all.
//
// Timing: vmem and spike_out are combinational from the sample input and the
// filter's two state registers, which advance on each rising clock edge.
// Whether the comparator output is registered is not given by the model;
// here it is not, so the spike appears in the same cycle as the membrane
// value that crosses the threshold.
module soma
  import spu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  sample_t    x,
  input  iir_coefs_t coefs,
  input  sample_t    vth,
  output sample_t    vmem,
  output logic       spike_out
);

  iir_df2 u_iir (
    .clk  (clk),
    .rst  (rst),
    .x    (x),
    .coefs(coefs),
    .y    (vmem)
  );

  always_comb spike_out = (vmem >= vth);

endmodule
