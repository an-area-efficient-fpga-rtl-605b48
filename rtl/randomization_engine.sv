// randomization_engine: source of all random numbers in the decoder.
//
// Ten 16-bit Galois LFSRs, each with its own primitive feedback polynomial,
// advance once per decoding cycle (when en = 1). Bit i of random number k is
// the XOR of three bits taken from three different LFSRs, giving 32 8-bit
// numbers per DC. These numbers drive the channel comparators and, shared
// again, the edge-memory read addresses (see stoch_ldpc_pkg).
//
// The LFSR count and width and the 32 x 8-bit output follow the published
// architecture; the polynomials, seeds and XOR tap pattern are this design's
// own. Reset loads the seeds. Outputs come straight from the LFSR registers
// through XOR gates, so a new set appears the clock after each enabled edge.
module randomization_engine
  import stoch_ldpc_pkg::*;
#(
  parameter int NR = N_RAND,     // random numbers per DC
  parameter int RW = PROB_W      // width of each random number
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [RW-1:0] rnd [NR]
);
  lfsr_t state [N_LFSR];

  for (genvar l = 0; l < N_LFSR; l++) begin : g_lfsr
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) state[l] <= LFSR_SEED[l];
      else if (en) state[l] <= (state[l] >> 1) ^ (state[l][0] ? LFSR_POLY[l] : '0);
    end
  end

  for (genvar k = 0; k < NR; k++) begin : g_num
    for (genvar i = 0; i < RW; i++) begin : g_bit
      localparam int B = k * RW + i;
      assign rnd[k][i] = state[re_tap_lfsr(B, 0)][re_tap_bit(B, 0)]
                       ^ state[re_tap_lfsr(B, 1)][re_tap_bit(B, 1)]
                       ^ state[re_tap_lfsr(B, 2)][re_tap_bit(B, 2)];
    end
  end
endmodule
