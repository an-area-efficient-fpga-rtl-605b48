// stoch_comparator: converts a channel probability into a stochastic bit
// stream. Each decoding cycle it compares the probability P, held constant
// for the whole block, with a fresh uniform random number R and emits
// 1 when P > R, else 0, so the stream is 1 with probability P/2^W.
// Purely combinational; the random number changes once per DC.
module stoch_comparator #(
  parameter int W = 8
) (
  input  logic [W-1:0] p,    // channel probability
  input  logic [W-1:0] r,    // uniform random number
  output logic         bit_o // stochastic bit
);
  assign bit_o = (p > r);
endmodule
