// edge_memory: the per-edge memory (EM) of a stochastic variable node.
//
// An M-bit shift register that is written only with regenerative bits (bits a
// variable node produced outside the hold state): when shift_en is 1, din
// enters at position 0 and the oldest bit at M-1 is dropped (first in, first
// out). Any single bit can be read through addr, which the randomization
// engine changes every decoding cycle, so a node in the hold state emits a
// randomly chosen recent regenerative bit. The read is combinational.
//
// clear empties the memory to all zeros, the initial content the architecture
// specifies. fill, this design's addition, writes din into every position at
// once; the variable node uses it in the first decoding cycle of a block so
// that the memory starts from the channel's estimate instead of zeros
// (starting from zeros pulls every edge towards the all-zero codeword).
// Priority: clear, then fill, then shift_en. Without fill the structure maps
// onto cascaded addressable shift-register LUTs.
module edge_memory #(
  parameter int M  = 64,
  parameter int AW = $clog2(M)
) (
  input  logic          clk,
  input  logic          clear,    // synchronous clear to all zeros
  input  logic          fill,     // load din into all positions
  input  logic          shift_en, // store din (regenerative bit)
  input  logic          din,
  input  logic [AW-1:0] addr,     // random read address
  output logic          dout
);
  logic [M-1:0] sr;

  always_ff @(posedge clk) begin
    if (clear)         sr <= '0;
    else if (fill)     sr <= {M{din}};
    else if (shift_en) sr <= {sr[M-2:0], din};
  end

  assign dout = sr[addr];
endmodule
