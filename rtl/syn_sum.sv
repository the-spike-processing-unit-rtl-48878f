// syn_sum: synaptic summation tree of the SPU.
//
// Forms the total synaptic drive x[n] = sum of the gated weights of all
// synapses (Eq. 1). The inputs are added pairwise in a balanced tree of
// saturating adders, the shape the SPU block diagram draws for four synapses:
// (w0 + w1) + (w2 + w3). Each node clamps to [-32, +31], so the order of the
// tree is part of the arithmetic. For N_IN that is not a power of two the
// tree is padded with zero inputs, which change no sum. Purely combinational.
module syn_sum
  import spu_pkg::*;
#(
  parameter int unsigned N_IN = 4
) (
  input  sample_t contrib [N_IN],
  output sample_t x
);

  localparam int unsigned LEAVES = (N_IN <= 1) ? 1 : (1 << $clog2(N_IN));

  // Heap-ordered tree: node i has children 2i+1 and 2i+2; the leaves are
  // nodes LEAVES-1 .. 2*LEAVES-2.
  sample_t node [2*LEAVES-1];

  for (genvar l = 0; l < LEAVES; l++) begin : g_leaf
    if (l < N_IN) begin : g_used
      assign node[LEAVES-1+l] = contrib[l];
    end else begin : g_pad
      assign node[LEAVES-1+l] = '0;
    end
  end

  for (genvar i = 0; i < LEAVES - 1; i++) begin : g_node
    sat_add u_add (
      .a  (node[2*i+1]),
      .b  (node[2*i+2]),
      .sum(node[i])
    );
  end

  assign x = node[0];

endmodule
