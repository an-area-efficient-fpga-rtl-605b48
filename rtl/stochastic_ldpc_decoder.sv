// stochastic_ldpc_decoder: fully-parallel stochastic decoder for a regular
// (3,6) LDPC code, 1024 bits / 512 checks at the default Z = 128.
//
// Every variable node (VN), check node (CN) and edge of the Tanner graph has
// its own hardware, and each edge carries one bit per direction. Every clock
// of ST_DECODE is one decoding cycle (DC):
//   1. the randomization engine supplies 32 fresh 8-bit random numbers;
//   2. each VN's comparator turns its channel probability into a stochastic
//      bit (P > R);
//   3. each VN combines that bit with the bits from its CNs; a regenerative
//      result is sent out and stored in the edge memory, a hold state sends
//      a random edge-memory bit instead; the results are registered;
//   4. each CN XORs the VN bits it receives (combinational, through the
//      interleaver), closing the loop for the next DC;
//   5. each VN's counter integrates the VN's bit; the counter signs are the
//      hard decisions.
// A block is loaded in one clock from N received samples (signed Q4.4),
// each passed through noise-dependent scaling into an 8-bit probability.
// Decoding stops once the decisions satisfy every parity check or after
// MAX_DC DCs; done then pulses and dec_bits holds the codeword estimate
// until the next start.
//
// Interface: start is taken when ready is 1; rx_y is sampled in that clock.
// Timing: 1 load clock + (number of DCs) + 1 stop clock per block, with the
// result valid from the clock in which done is 1.
//
// Published: the node structures, edge memories of 64 bits, 6-bit counters,
// the randomization engine's 10 x 16-bit LFSRs and 32 x 8-bit outputs,
// NDS with 4*alpha/Y = 2, and stopping on satisfied checks or 6K DCs.
// This design's own: the parity-check matrix (quasi-cyclic, see
// stoch_ldpc_pkg), random-number sharing pattern, sample format, counter
// input, the first DC sending channel bits on every edge and filling the
// edge memories with them (the published design starts the edge memories
// at zero), reset/clear behaviour and the load/done handshake.
module stochastic_ldpc_decoder
  import stoch_ldpc_pkg::*;
#(
  parameter int Z      = Z_DEFAULT,        // circulant size of H
  parameter int N      = NB_COL * Z,       // code length (1024)
  parameter int M      = NB_ROW * Z,       // parity checks (512)
  parameter int MAX_DC = 6000,             // DC limit per block ("6K")
  parameter int DCW    = $clog2(MAX_DC + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  rx_t            rx_y [N],         // received samples, signed Q4.4
  output logic           ready,
  output logic           done,
  output logic           converged,        // all parity checks satisfied
  output logic [DCW-1:0] dc_count,         // DCs used for the block
  output logic [N-1:0]   dec_bits          // hard decisions (code bits)
);
  logic load, clear, dc_en, first_dc, all_satisfied;

  prob_t          rnd [N_RAND];
  logic [N-1:0]   ch_bit;
  logic [N-1:0]   vn_dec_bit;
  logic [DV*N-1:0]  vn_out, vn_in;
  logic [DCN*M-1:0] cn_in, cn_out;

  decode_controller #(.MAX_DC(MAX_DC), .DCW(DCW)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .all_satisfied (all_satisfied),
    .ready         (ready),
    .load          (load),
    .clear         (clear),
    .dc_en         (dc_en),
    .first_dc      (first_dc),
    .done          (done),
    .converged     (converged),
    .dc_count      (dc_count)
  );

  randomization_engine #(.NR(N_RAND), .RW(PROB_W)) u_re (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (dc_en),
    .rnd   (rnd)
  );

  for (genvar v = 0; v < N; v++) begin : g_vn
    prob_t    p_nds;
    prob_t    ch_prob;
    em_addr_t em_addr [DV];

    nds_prob u_nds (
      .y (rx_y[v]),
      .p (p_nds)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    ch_prob <= '0;
      else if (load) ch_prob <= p_nds;
    end

    stoch_comparator #(.W(PROB_W)) u_cmp (
      .p     (ch_prob),
      .r     (rnd[cmp_rand_idx(v)]),
      .bit_o (ch_bit[v])
    );

    for (genvar j = 0; j < DV; j++) begin : g_addr
      assign em_addr[j] = rnd[em_rand_idx(v, j)][PROB_W-1 -: EM_AW];
    end

    variable_node #(.M(EM_LEN)) u_vn (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear),
      .en       (dc_en),
      .first    (first_dc),
      .ch_bit   (ch_bit[v]),
      .in_bits  (vn_in[DV*v +: DV]),
      .em_addr  (em_addr),
      .out_bits (vn_out[DV*v +: DV]),
      .dec_bit  (vn_dec_bit[v])
    );

    updown_counter #(.W(CNT_W)) u_cnt (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear),
      .en       (dc_en),
      .up       (vn_dec_bit[v]),
      .count    (),
      .decision (dec_bits[v])
    );
  end

  interleaver #(.Z(Z), .N(N), .M(M)) u_il (
    .vn_to_cn_in  (vn_out),
    .vn_to_cn_out (cn_in),
    .cn_to_vn_in  (cn_out),
    .cn_to_vn_out (vn_in)
  );

  for (genvar k = 0; k < M; k++) begin : g_cn
    check_node #(.D(DCN)) u_cn (
      .in_bits  (cn_in[DCN*k +: DCN]),
      .out_bits (cn_out[DCN*k +: DCN])
    );
  end

  syndrome_check #(.Z(Z), .N(N), .M(M)) u_syn (
    .decisions     (dec_bits),
    .syndrome      (),
    .all_satisfied (all_satisfied)
  );
endmodule
