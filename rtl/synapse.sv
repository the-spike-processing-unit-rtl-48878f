// synapse: one synaptic input of the SPU.
//
// An event-controlled gate. On each rising clock edge it samples its spike
// input; for the following cycle it presents its stored weight w_m when a
// spike was seen and zero otherwise. The weighted input spike therefore
// reaches the summation tree one cycle after it arrives, which keeps the
// asynchronous spike lines out of the neuron's combinational path. The gate
// itself follows the model (Eq. 1 evaluated as conditional additions); the
// input register and its one-cycle delay are this design's choice. The weight
// is held in spu_cfg_regs. rst is synchronous and active high.
module synapse
  import spu_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    spike_in,
  input  sample_t weight,
  output sample_t contrib
);

  logic spike_q;

  always_ff @(posedge clk) begin
    if (rst) spike_q <= 1'b0;
    else     spike_q <= spike_in;
  end

  always_comb contrib = spike_q ? weight : '0;

endmodule
