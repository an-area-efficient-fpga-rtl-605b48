// decode_controller: sequences the decoding of one block.
//
// In ST_IDLE (ready = 1) a start pulse loads the block: load captures the
// channel probabilities and clear empties the edge memories, node registers
// and counters in the same cycle. In ST_DECODE every clock is one decoding
// cycle (DC, dc_en = 1) until either all parity checks of the hard decisions
// are satisfied (after at least one DC) or MAX_DC DCs have run. The stop test
// is made on the counters as they stand after the last DC, so the clock in
// which it succeeds runs no DC. first_dc marks the first DC of a block.
// done pulses for one clock after the stop,
// together with converged (all checks satisfied) and dc_count (DCs run).
//
// Latency per block: 1 load clock + DCs + 1 stop clock. The stop rules
// (satisfied checks or a DC limit, 6K in the published decoder) follow the
// architecture; the handshake and the at-least-one-DC rule are this design's.
module decode_controller
  import stoch_ldpc_pkg::*;
#(
  parameter int MAX_DC = 6000,
  parameter int DCW    = $clog2(MAX_DC + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,          // begin a block (taken when ready)
  input  logic           all_satisfied,  // syndrome of current decisions is 0
  output logic           ready,
  output logic           load,           // capture channel data
  output logic           clear,          // reset EMs, nodes, counters
  output logic           dc_en,          // run one DC this clock
  output logic           first_dc,       // this DC is the block's first
  output logic           done,           // one-clock pulse, results valid
  output logic           converged,
  output logic [DCW-1:0] dc_count
);
  dec_state_t state;
  logic       stop;

  assign ready = (state == ST_IDLE);
  assign load  = ready && start;
  assign clear = load;
  assign stop  = (state == ST_DECODE) &&
                 (((dc_count != '0) && all_satisfied) || (dc_count == DCW'(MAX_DC)));
  assign dc_en = (state == ST_DECODE) && !stop;
  assign first_dc = dc_en && (dc_count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      dc_count  <= '0;
      done      <= 1'b0;
      converged <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          state    <= ST_DECODE;
          dc_count <= '0;
        end
        ST_DECODE: begin
          if (stop) begin
            state     <= ST_IDLE;
            done      <= 1'b1;
            converged <= all_satisfied && (dc_count != '0);
          end else begin
            dc_count <= dc_count + DCW'(1);
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // A DC never runs outside ST_DECODE, and the DC count never passes the limit.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_dc_only_decoding: assert (!dc_en || state == ST_DECODE)
        else $error("DC enabled outside ST_DECODE");
      a_dc_limit: assert (dc_count <= DCW'(MAX_DC))
        else $error("DC count above MAX_DC");
    end
  end
endmodule
