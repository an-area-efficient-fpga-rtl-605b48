// nds_prob: noise-dependent scaling (NDS) of one received BPSK sample and its
// conversion to the 8-bit channel probability that drives the comparator.
//
// NDS scales the channel LLR by alpha*N0/Y, which for BPSK on AWGN gives
// L' = (4*alpha/Y) * y, independent of the noise level. With alpha = 3 and
// Y = 6 (the published choice) the scale is 2, i.e. a one-bit left shift of y.
// The output is P = round(256 * Pr(c = 1 | y)) = round(256 / (1 + exp(L'))),
// clipped to 0..255, so that a comparator "P > R" with R uniform on 0..255
// emits 1 with probability P/256.
//
// Design choices (not published): the sample y is signed Q4.4 (8 bits);
// BPSK maps code bit 0 to +1 and 1 to -1; the logistic function is a
// 256-entry table computed at elaboration, so the block is purely
// combinational with no latency.
module nds_prob
  import stoch_ldpc_pkg::*;
#(
  parameter int ALPHA = 3,   // NDS factor alpha
  parameter int Y_MAX = 6    // fixed maximum received value Y
) (
  input  rx_t   y,           // received sample, signed Q4.4
  output prob_t p            // Pr(code bit = 1) scaled to 0..255
);

  typedef prob_t lut_t [2**RX_W];

  function automatic lut_t build_lut();
    lut_t l;
    for (int i = 0; i < 2**RX_W; i++) begin
      real yv, lp, pr;
      logic [RX_W-1:0] code;
      code = RX_W'(i);
      yv = real'($signed(code)) / real'(2**RX_FRAC);
      lp = (4.0 * real'(ALPHA) / real'(Y_MAX)) * yv;
      pr = 256.0 / (1.0 + $exp(lp)) + 0.5;
      if (pr > 255.0) pr = 255.0;
      if (pr < 0.0)   pr = 0.0;
      l[i] = prob_t'($rtoi(pr));
    end
    return l;
  endfunction

  localparam lut_t LUT = build_lut();

  assign p = LUT[y];

endmodule
