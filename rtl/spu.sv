// spu: Spike Processing Unit, a spiking neuron built as a digital IIR filter.
//
// N_SYN spike inputs each gate a stored 6-bit weight (synapse); the gated
// weights are added in a saturating tree (syn_sum) to form x[n]. A select
// multiplexer (input_select) feeds either x[n] or the membrane potential of
// another SPU (vmem_chain_in) to the soma, whose second-order power-of-two
// IIR filter produces the membrane potential y[n] = Vmem and whose
// comparator emits spike_out while Vmem >= Vth. All parameters live in
// spu_cfg_regs and are loaded through a small register write port. This
// structure, the 6-bit saturating arithmetic and four synapses as the main
// configuration are the model's; the configuration port, the reset polarity
// and the one-cycle input register in each synapse are this design's.
//
// Timing: a spike on syn_in[m] sampled at rising edge n enters x in the
// cycle after that edge and is visible on vmem_out and spike_out in that
// same cycle (one cycle of latency from a spike to its first effect). The
// filter state advances on every rising edge. vmem_chain_in reaches the soma
// without a register, so in a chain of two SPUs the second filter sees the
// first one's output in the same cycle and the pair is one fourth-order
// filter. rst (synchronous, active high) clears the synapse registers and the
// filter state; cfg_rst restores the quiet default parameters.
module spu
  import spu_pkg::*;
#(
  parameter int unsigned N_SYN = 4,
  localparam int unsigned ADDR_W = $clog2(N_SYN + 7)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N_SYN-1:0]  syn_in,
  input  sample_t           vmem_chain_in,
  input  logic              cfg_rst,
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  logic [DATA_W-1:0] cfg_wdata,
  output logic [DATA_W-1:0] cfg_rdata,
  output sample_t           vmem_out,
  output logic              spike_out
);

  sample_t    weights [N_SYN];
  sample_t    contrib [N_SYN];
  sample_t    vth;
  iir_coefs_t coefs;
  logic       sel;
  sample_t    x_local, x_soma;

  spu_cfg_regs #(.N_SYN(N_SYN)) u_cfg (
    .clk      (clk),
    .cfg_rst  (cfg_rst),
    .cfg_we   (cfg_we),
    .cfg_addr (cfg_addr),
    .cfg_wdata(cfg_wdata),
    .cfg_rdata(cfg_rdata),
    .weights  (weights),
    .vth      (vth),
    .coefs    (coefs),
    .sel      (sel)
  );

  for (genvar m = 0; m < N_SYN; m++) begin : g_syn
    synapse u_syn (
      .clk     (clk),
      .rst     (rst),
      .spike_in(syn_in[m]),
      .weight  (weights[m]),
      .contrib (contrib[m])
    );
  end

  syn_sum #(.N_IN(N_SYN)) u_sum (
    .contrib(contrib),
    .x      (x_local)
  );

  input_select u_sel (
    .sel       (sel),
    .x_local   (x_local),
    .vmem_chain(vmem_chain_in),
    .x_soma    (x_soma)
  );

  soma u_soma (
    .clk      (clk),
    .rst      (rst),
    .x        (x_soma),
    .coefs    (coefs),
    .vth      (vth),
    .vmem     (vmem_out),
    .spike_out(spike_out)
  );

endmodule
