// syndrome_check: tests whether the current hard decisions form a codeword.
//
// For every check node k it XORs the decisions of the six variable nodes
// connected to it (the same H as the interleaver) and reports all_satisfied
// when every parity is zero. The decoder uses it to stop as soon as all
// parity checks are satisfied. Purely combinational.
module syndrome_check
  import stoch_ldpc_pkg::*;
#(
  parameter int Z = Z_DEFAULT,
  parameter int N = NB_COL * Z,
  parameter int M = NB_ROW * Z
) (
  input  logic [N-1:0] decisions,
  output logic [M-1:0] syndrome,
  output logic         all_satisfied
);
  for (genvar k = 0; k < M; k++) begin : g_cn
    logic [DCN-1:0] bits;
    for (genvar s = 0; s < DCN; s++) begin : g_slot
      assign bits[s] = decisions[cn_var(k, s, Z)];
    end
    assign syndrome[k] = ^bits;
  end

  assign all_satisfied = ~|syndrome;
endmodule
