// interleaver: the fixed routing between variable-node edges and check-node
// edges, i.e. the Tanner graph of the parity-check matrix H. It has no logic;
// each direction is a permutation of 3N = 6M one-bit wires, which in a
// stochastic decoder is one wire per edge and direction.
//
// Variable-side edge index is 3*v + j (edge j of variable node v); check-side
// edge index is 6*k + s (slot s of check node k). The quasi-cyclic code that
// defines the permutation is this design's own (see stoch_ldpc_pkg); Z sets
// the circulant size, N = 8Z variable nodes and M = 4Z check nodes.
module interleaver
  import stoch_ldpc_pkg::*;
#(
  parameter int Z = Z_DEFAULT,
  parameter int N = NB_COL * Z,
  parameter int M = NB_ROW * Z
) (
  input  logic [DV*N-1:0]  vn_to_cn_in,   // from variable nodes, index 3v+j
  output logic [DCN*M-1:0] vn_to_cn_out,  // to check nodes, index 6k+s
  input  logic [DCN*M-1:0] cn_to_vn_in,   // from check nodes, index 6k+s
  output logic [DV*N-1:0]  cn_to_vn_out   // to variable nodes, index 3v+j
);
  for (genvar k = 0; k < M; k++) begin : g_cn
    for (genvar s = 0; s < DCN; s++) begin : g_slot
      localparam int VE = cn_edge_to_vn_edge(k, s, Z);
      assign vn_to_cn_out[DCN*k + s] = vn_to_cn_in[VE];
      assign cn_to_vn_out[VE]        = cn_to_vn_in[DCN*k + s];
    end
  end
endmodule
