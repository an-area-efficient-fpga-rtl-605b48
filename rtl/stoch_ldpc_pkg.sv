// stoch_ldpc_pkg: types, constants and code-construction functions shared by
// the fully-parallel stochastic LDPC decoder.
//
// What follows the published architecture: 8-bit channel probabilities,
// 64-bit edge memories, 6-bit saturating counters (-31..31), degree-3
// variable nodes, degree-6 check nodes, ten 16-bit LFSRs that produce 32
// 8-bit random numbers per decoding cycle (DC), and NDS with alpha = 3, Y = 6.
//
// This design's own choices, because the parity-check matrix, the LFSR
// polynomials and the random-number sharing pattern are not published:
//  * The (1024,512) regular (3,6) code is quasi-cyclic. H is a 4 x 8 array of
//    Z x Z blocks (Z = 128). Column block c has circulant permutation blocks
//    in every row block r except r = c/2, so each column has weight 3 and each
//    row weight 6. Block (r,c) holds the identity shifted by QC_SHIFT[r][c]:
//    row i of the block is connected to column (i + shift) mod Z. The shifts
//    were chosen so that the Tanner graph has no 4- or 6-cycles at Z = 128
//    and no 4-cycles at Z = 16.
//  * Edge j (0..2) of variable node v goes to the j-th row block other than
//    c/2 in increasing order. Slot s (0..5) of a check node in row block r is
//    the s-th column block c with c/2 != r in increasing order.
//  * Random number k (0..31), bit i, is the XOR of three bits taken from three
//    different LFSRs (see re_tap_*). Comparator v uses number v mod 32; edge
//    memory (v,j) uses bits [7:2] of number (v + 11*(j+1)) mod 32.
package stoch_ldpc_pkg;

  // ---------------------------------------------------------------- widths
  localparam int PROB_W   = 8;    // channel probability / random number width
  localparam int EM_LEN   = 64;   // edge memory length M
  localparam int EM_AW    = $clog2(EM_LEN);
  localparam int CNT_W    = 6;    // saturating up/down counter width
  localparam int DV       = 3;    // variable node degree
  localparam int DCN      = 6;    // check node degree
  localparam int LFSR_W   = 16;
  localparam int N_LFSR   = 10;
  localparam int N_RAND   = 32;   // random numbers per DC
  localparam int RX_W     = 8;    // received sample width, signed Q4.4
  localparam int RX_FRAC  = 4;

  // ------------------------------------------------------------ code shape
  localparam int NB_ROW    = 4;   // row blocks of H
  localparam int NB_COL    = 8;   // column blocks of H
  localparam int Z_DEFAULT = 128; // circulant size: N = 8Z = 1024, M = 4Z = 512

  typedef logic [PROB_W-1:0]        prob_t;
  typedef logic signed [RX_W-1:0]   rx_t;
  typedef logic signed [CNT_W-1:0]  cnt_t;
  typedef logic [EM_AW-1:0]         em_addr_t;
  typedef logic [LFSR_W-1:0]        lfsr_t;

  typedef enum logic {
    ST_IDLE   = 1'b0,   // waiting for a block
    ST_DECODE = 1'b1    // one decoding cycle per clock
  } dec_state_t;

  localparam int QC_SHIFT [NB_ROW][NB_COL] = '{
    '{ 37,  78,  35,  36, 105,   9, 119, 126},
    '{ 11,  99,  27,  75, 105, 118,  27, 109},
    '{105,   6,  67,  15,  74,  66,  83,   7},
    '{ 35,  14,  55,  80,  24,  41,  77, 105}
  };

  // Feedback masks of the right-shifting Galois LFSRs: each step shifts the
  // state right by one and, if the bit shifted out was 1, XORs the mask into
  // the state. Each mask corresponds to a primitive degree-16 polynomial, so
  // every LFSR has period 2^16 - 1 from any non-zero seed.
  localparam lfsr_t LFSR_POLY [N_LFSR] = '{
    16'h801F, 16'h80CB, 16'h81A5, 16'h822B, 16'h82A3,
    16'h8325, 16'h83B5, 16'h8471, 16'h84E1, 16'h8589
  };
  localparam lfsr_t LFSR_SEED [N_LFSR] = '{
    16'hACE1, 16'h1D2B, 16'h7F31, 16'h0C5A, 16'hB00B,
    16'h5EED, 16'h9A17, 16'h3C96, 16'hE4D2, 16'h6B3F
  };

  // ---------------------------------------------------- code construction
  // Row block served by edge j of a variable node in column block c.
  function automatic int vn_row_block(input int c, input int j);
    int skip;
    skip = c / 2;
    return (j < skip) ? j : j + 1;
  endfunction

  // Slot (0..5) that column block c occupies in the check nodes of row block r.
  function automatic int cn_slot_of(input int r, input int c);
    int s;
    s = 0;
    for (int cc = 0; cc < c; cc++)
      if (cc / 2 != r) s++;
    return s;
  endfunction

  // Column block in slot s of a check node of row block r.
  function automatic int cn_col_block(input int r, input int s);
    int n, res;
    n = 0;
    res = 0;
    for (int cc = 0; cc < NB_COL; cc++)
      if (cc / 2 != r) begin
        if (n == s) res = cc;
        n++;
      end
    return res;
  endfunction

  // Check node reached by edge j of variable node v.
  function automatic int vn_check(input int v, input int j, input int z);
    int c, t, r;
    c = v / z;
    t = v % z;
    r = vn_row_block(c, j);
    return r * z + ((t - (QC_SHIFT[r][c] % z) + z) % z);
  endfunction

  // Global edge index (check side) of edge j of variable node v: 6*k + slot.
  function automatic int vn_edge_to_cn_edge(input int v, input int j, input int z);
    int c, r;
    c = v / z;
    r = vn_row_block(c, j);
    return DCN * vn_check(v, j, z) + cn_slot_of(r, c);
  endfunction

  // Variable node in slot s of check node k.
  function automatic int cn_var(input int k, input int s, input int z);
    int r, i, c;
    r = k / z;
    i = k % z;
    c = cn_col_block(r, s);
    return c * z + ((i + QC_SHIFT[r][c]) % z);
  endfunction

  // Global edge index (variable side) of slot s of check node k: 3*v + j.
  function automatic int cn_edge_to_vn_edge(input int k, input int s, input int z);
    int r, c, j;
    r = k / z;
    c = cn_col_block(r, s);
    j = (r < c / 2) ? r : r - 1;
    return DV * cn_var(k, s, z) + j;
  endfunction

  // ----------------------------------------------------- random sharing
  // The three LFSR bits XORed into bit b = 8k+i of the random-number bus.
  function automatic int re_tap_lfsr(input int b, input int t);
    case (t)
      0:       return b % N_LFSR;
      1:       return (b % N_LFSR + 3) % N_LFSR;
      default: return (b % N_LFSR + 6) % N_LFSR;
    endcase
  endfunction

  function automatic int re_tap_bit(input int b, input int t);
    int q;
    q = b / N_LFSR;
    case (t)
      0:       return q % LFSR_W;
      1:       return (3 * q + 1) % LFSR_W;
      default: return (5 * q + 7 * (q / LFSR_W) + 2) % LFSR_W;
    endcase
  endfunction

  // Random number feeding the comparator of variable node v.
  function automatic int cmp_rand_idx(input int v);
    return v % N_RAND;
  endfunction

  // Random number whose upper bits address edge memory j of variable node v.
  function automatic int em_rand_idx(input int v, input int j);
    return (v + 11 * (j + 1)) % N_RAND;
  endfunction

endpackage
