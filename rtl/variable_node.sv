// variable_node: degree-3 stochastic variable node with one edge memory (EM)
// per outgoing edge.
//
// For each outgoing edge j the node looks at the channel stochastic bit and
// the bits arriving on the two other edges. If they are all equal (U = 1) the
// node is regenerative: the outgoing bit is that common value, which is also
// shifted into the edge's EM. Otherwise the node is in the hold state (U = 0):
// the EM is left unchanged and the outgoing bit is the EM bit selected by the
// random address of this decoding cycle (DC). Outgoing bits are registered,
// so one DC is one clock with en = 1; clear empties the EMs and zeroes the
// output registers at the start of a block.
//
// Two points are this design's choice. (1) In the first DC of a block
// (first = 1) there are no meaningful check-node bits yet, so every edge
// sends the channel bit and every EM is filled with it in all positions.
// The architecture initializes the EMs to zeros; in this design that makes
// hold-state nodes replay zeros and the decoder converge to the all-zero
// codeword from most other codewords, so the zeros (set by clear) are
// overwritten in the first DC. (2) The
// bit passed to the up/down counter each DC (dec_bit) is the equality of all
// four inputs (channel bit and three edges) when they agree, otherwise the
// previous dec_bit (a hold state without an EM); in the first DC it is the
// channel bit.
//
// Timing: dec_bit is combinational from the current inputs and must be
// sampled by the counter in the same enabled cycle.
module variable_node
  import stoch_ldpc_pkg::*;
#(
  parameter int M  = EM_LEN,
  parameter int AW = $clog2(M)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,              // start of a new block
  input  logic              en,                 // advance one DC
  input  logic              first,              // first DC of the block
  input  logic              ch_bit,             // stochastic channel bit
  input  logic [DV-1:0]     in_bits,            // bits from the check nodes
  input  logic [AW-1:0]     em_addr [DV],       // random EM read addresses
  output logic [DV-1:0]     out_bits,           // registered bits to the check nodes
  output logic              dec_bit             // bit for the up/down counter
);
  logic [DV-1:0] regen;     // U per edge
  logic [DV-1:0] em_out;
  logic [DV-1:0] next_out;
  logic          dec_hold;
  logic          all_eq;

  for (genvar j = 0; j < DV; j++) begin : g_edge
    localparam int J1 = (j + 1) % DV;
    localparam int J2 = (j + 2) % DV;

    assign regen[j]    = (in_bits[J1] == ch_bit) && (in_bits[J2] == ch_bit);
    assign next_out[j] = (first || regen[j]) ? ch_bit : em_out[j];

    edge_memory #(.M(M), .AW(AW)) u_em (
      .clk      (clk),
      .clear    (clear),
      .fill     (en && first),
      .shift_en (en && !first && regen[j]),
      .din      (ch_bit),
      .addr     (em_addr[j]),
      .dout     (em_out[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_bits <= '0;
      dec_hold <= 1'b0;
    end else if (clear) begin
      out_bits <= '0;
      dec_hold <= 1'b0;
    end else if (en) begin
      out_bits <= next_out;
      dec_hold <= dec_bit;
    end
  end

  assign all_eq  = (in_bits == {DV{ch_bit}});
  assign dec_bit = (first || all_eq) ? ch_bit : dec_hold;

endmodule
