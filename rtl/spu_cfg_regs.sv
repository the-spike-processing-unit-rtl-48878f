// spu_cfg_regs: parameter registers of one SPU.
//
// Holds the ten trainable parameters of the neuron in 6-bit registers, in the
// order of its training vector: the N_SYN synaptic weights, the threshold Vth,
// then the coefficient codes of b0, b1, b2, a1 and a2. An eleventh register
// holds the select bit that switches the soma input to a chained SPU. The
// registers and what they hold are the model's; the write port and the
// address map below are this design's.
//
//   address            register       width used
//   0 .. N_SYN-1       weight w_m     6 (two's complement)
//   N_SYN              Vth            6 (two's complement)
//   N_SYN+1 .. +5      b0 b1 b2 a1 a2 4 (bit 3 sign, bits 2:0 magnitude, see spu_pkg)
//   N_SYN+6            select         1 (bit 0)
//
// A write (cfg_we high with cfg_addr and cfg_wdata) takes effect on the next
// rising clock edge; writes to other addresses are ignored. cfg_rdata returns
// the addressed register, zero-extended, in the same cycle. cfg_rst
// (synchronous, active high) loads a quiet neuron: zero weights and
// coefficients, Vth = +31, select = 0. It is separate from the soma reset so
// that inhibiting a neuron does not erase its trained parameters.
module spu_cfg_regs
  import spu_pkg::*;
#(
  parameter int unsigned N_SYN = 4,
  localparam int unsigned N_REGS = N_SYN + 7,
  localparam int unsigned ADDR_W = $clog2(N_REGS)
) (
  input  logic              clk,
  input  logic              cfg_rst,
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  logic [DATA_W-1:0] cfg_wdata,
  output logic [DATA_W-1:0] cfg_rdata,
  output sample_t           weights [N_SYN],
  output sample_t           vth,
  output iir_coefs_t        coefs,
  output logic              sel
);

  localparam int unsigned A_VTH = N_SYN;
  localparam int unsigned A_B0  = N_SYN + 1;
  localparam int unsigned A_B1  = N_SYN + 2;
  localparam int unsigned A_B2  = N_SYN + 3;
  localparam int unsigned A_A1  = N_SYN + 4;
  localparam int unsigned A_A2  = N_SYN + 5;
  localparam int unsigned A_SEL = N_SYN + 6;

  always_ff @(posedge clk) begin
    if (cfg_rst) begin
      for (int m = 0; m < N_SYN; m++) weights[m] <= '0;
      vth   <= SAMPLE_MAX;
      coefs <= '0;
      sel   <= 1'b0;
    end else if (cfg_we) begin
      for (int m = 0; m < N_SYN; m++)
        if (int'(cfg_addr) == m) weights[m] <= sample_t'(cfg_wdata);
      unique case (int'(cfg_addr))
        A_VTH:   vth      <= sample_t'(cfg_wdata);
        A_B0:    coefs.b0 <= coef_t'(cfg_wdata[$bits(coef_t)-1:0]);
        A_B1:    coefs.b1 <= coef_t'(cfg_wdata[$bits(coef_t)-1:0]);
        A_B2:    coefs.b2 <= coef_t'(cfg_wdata[$bits(coef_t)-1:0]);
        A_A1:    coefs.a1 <= coef_t'(cfg_wdata[$bits(coef_t)-1:0]);
        A_A2:    coefs.a2 <= coef_t'(cfg_wdata[$bits(coef_t)-1:0]);
        A_SEL:   sel      <= cfg_wdata[0];
        default: ;
      endcase
    end
  end

  always_comb begin
    cfg_rdata = '0;
    for (int m = 0; m < N_SYN; m++)
      if (int'(cfg_addr) == m) cfg_rdata = weights[m];
    unique case (int'(cfg_addr))
      A_VTH:   cfg_rdata = vth;
      A_B0:    cfg_rdata = DATA_W'(coefs.b0);
      A_B1:    cfg_rdata = DATA_W'(coefs.b1);
      A_B2:    cfg_rdata = DATA_W'(coefs.b2);
      A_A1:    cfg_rdata = DATA_W'(coefs.a1);
      A_A2:    cfg_rdata = DATA_W'(coefs.a2);
      A_SEL:   cfg_rdata = DATA_W'(sel);
      default: ;
    endcase
  end

endmodule
