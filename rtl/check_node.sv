// check_node: stochastic parity-check node of degree D (6 in the decoder).
//
// In the stochastic domain the parity-check update of Pc = Pa(1-Pb)+Pb(1-Pa)
// is an XOR gate, so the outgoing bit on each edge is the XOR of the bits on
// all other edges. It is computed as the XOR of all inputs followed by an XOR
// with the edge's own input. Purely combinational: the loop through the
// variable nodes is closed by their output registers.
module check_node #(
  parameter int D = 6
) (
  input  logic [D-1:0] in_bits,   // bits from the variable nodes
  output logic [D-1:0] out_bits   // extrinsic bits back to them
);
  logic parity;
  assign parity = ^in_bits;

  always_comb begin
    for (int i = 0; i < D; i++)
      out_bits[i] = parity ^ in_bits[i];
  end
endmodule
