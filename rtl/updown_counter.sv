// updown_counter: signed saturating up/down counter that integrates the
// output stream of a variable node into a hard decision.
//
// When en is 1 the count is incremented for an input 1 and decremented for an
// input 0, staying within -(2^(W-1)-1) .. 2^(W-1)-1 (-31..31 for W = 6). clear
// sets the count to 0 for a new block. decision is the hard-decided code bit:
// 1 when the count is not negative, i.e. the inverted two's-complement sign.
// One update per clock; count and decision are registered/derived from the
// register.
module updown_counter
  import stoch_ldpc_pkg::*;
#(
  parameter int W = CNT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                en,
  input  logic                up,       // 1: count up, 0: count down
  output logic signed [W-1:0] count,
  output logic                decision
);
  localparam logic signed [W-1:0] MAXV = W'((2**(W-1)) - 1);
  localparam logic signed [W-1:0] MINV = -MAXV;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (en) begin
      if (up && count != MAXV)       count <= count + W'(1);
      else if (!up && count != MINV) count <= count - W'(1);
    end
  end

  assign decision = ~count[W-1];
endmodule
