// tb_stochastic_ldpc_decoder: end-to-end test of the decoder at reduced size
// (Z = 16: 128 bits, 64 checks; DC limit 1000). Blocks are random codewords,
// made by reducing H to row-echelon form over GF(2), drawing the free bits
// at random and solving the pivot bits; the all-zero and all-one codewords
// are used too. They are sent over BPSK/AWGN and decoded:
//  * at 6 dB at least 7 of 8 blocks must converge to the sent codeword
//    (a 128-bit code has a frame error rate that is not negligible);
//  * at 3 dB the bit errors and DCs are reported;
//  * at -4 dB blocks are expected to hit the DC limit;
//  * one block has samples beyond the NDS saturation point.
// Every block checks done timing (DCs + 2 clocks from start) and dc_count.
// Counted mechanisms, each of which must occur: regenerative and hold-state
// edge updates (hold = edge-memory read), counter saturation at both limits,
// early termination, stop at the DC limit, and NDS saturation.
module tb_stochastic_ldpc_decoder;
  import stoch_ldpc_pkg::*;
  import tb_channel_pkg::*;
  localparam int Z = 16;
  localparam int N = NB_COL * Z;
  localparam int M = NB_ROW * Z;
  localparam int MAX_DC = 1000;
  localparam int DCW = $clog2(MAX_DC + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  rx_t  rx_y [N];
  logic ready, done, converged;
  logic [DCW-1:0] dc_count;
  logic [N-1:0] dec_bits;

  int checks = 0, failures = 0;
  longint n_regen = 0, n_hold = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_early = 0, n_limit = 0, n_nds_sat = 0;
  longint total_dcs = 0;
  int blocks = 0;

  stochastic_ldpc_decoder #(.Z(Z), .MAX_DC(MAX_DC)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .rx_y(rx_y), .ready(ready),
    .done(done), .converged(converged), .dc_count(dc_count), .dec_bits(dec_bits));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors on every variable node.
  for (genvar v = 0; v < N; v++) begin : g_mon
    always @(posedge clk) begin
      if (dut.u_ctrl.dc_en && !dut.u_ctrl.first_dc) begin
        n_regen += $countones(dut.g_vn[v].u_vn.regen);
        n_hold  += DV - $countones(dut.g_vn[v].u_vn.regen);
        if (dut.g_vn[v].u_cnt.count == 6'sd31 && dut.g_vn[v].u_cnt.up) n_sat_hi++;
        if (dut.g_vn[v].u_cnt.count == -6'sd31 && !dut.g_vn[v].u_cnt.up) n_sat_lo++;
      end
      if (dut.u_ctrl.load && (dut.g_vn[v].p_nds == 8'd0 || dut.g_vn[v].p_nds == 8'd255))
        n_nds_sat++;
    end
  end

  logic [N-1:0] hrow [M];
  int pivcol [M];
  int rank;

  function automatic logic [N-1:0] h_of_row(int r);
    logic [N-1:0] row;
    row = '0;
    for (int cb = 0; cb < NB_COL; cb++)
      if (cb / 2 != r / Z) row[cb * Z + (r % Z + QC_SHIFT[r / Z][cb]) % Z] = 1'b1;
    return row;
  endfunction

  task automatic build_echelon();
    rank = 0;
    for (int r = 0; r < M; r++) hrow[r] = h_of_row(r);
    for (int c = 0; c < N && rank < M; c++) begin
      int p;
      p = -1;
      for (int r = rank; r < M; r++) if (p < 0 && hrow[r][c]) p = r;
      if (p >= 0) begin
        logic [N-1:0] t;
        t = hrow[p]; hrow[p] = hrow[rank]; hrow[rank] = t;
        for (int r = 0; r < M; r++)
          if (r != rank && hrow[r][c]) hrow[r] ^= hrow[rank];
        pivcol[rank] = c;
        rank++;
      end
    end
  endtask

  function automatic logic [N-1:0] random_codeword(int kind);
    logic [N-1:0] x, pivmask;
    if (kind == 1) return '0;
    if (kind == 2) return '1;
    pivmask = '0;
    for (int i = 0; i < rank; i++) pivmask[pivcol[i]] = 1'b1;
    for (int c = 0; c < N; c++) x[c] = pivmask[c] ? 1'b0 : 1'($urandom);
    for (int i = 0; i < rank; i++) x[pivcol[i]] = ^(hrow[i] & x);
    return x;
  endfunction

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Decode one block; returns bit errors against the sent word.
  task automatic run_block(int kind, real ebn0, int force_mag, output int errs, output bit conv);
    int cycles;
    real sigma;
    logic [N-1:0] word;
    word = random_codeword(kind);
    for (int r = 0; r < M; r++) check(^(h_of_row(r) & word) == 1'b0, "codeword satisfies H");
    sigma = noise_sigma(ebn0, 0.5);
    for (int i = 0; i < N; i++)
      rx_y[i] = (force_mag != 0) ? rx_t'(word[i] ? -force_mag : force_mag)
                                 : channel_sample(word[i], sigma);
    @(negedge clk);
    check(ready, "ready before start");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < MAX_DC + 20) begin
      @(negedge clk);
      cycles++;
    end
    check(done, "done seen");
    check(cycles == int'(dc_count) + 2,
          $sformatf("latency %0d clocks for %0d DCs", cycles, dc_count));
    errs = 0;
    for (int i = 0; i < N; i++) if (dec_bits[i] != word[i]) errs++;
    conv = converged;
    if (converged) begin
      n_early++;
      check(int'(dc_count) < MAX_DC || dc_count == DCW'(MAX_DC), "dc_count range");
    end else begin
      n_limit++;
      check(dc_count == DCW'(MAX_DC), "non-converged block ran to the DC limit");
    end
    total_dcs += longint'(dc_count);
    blocks++;
    $display("block %0d: weight=%0d Eb/N0=%0.1f dB DCs=%0d converged=%0b bit errors=%0d",
             blocks, $countones(word), ebn0, dc_count, converged, errs);
  endtask

  initial begin
    int errs;
    bit conv;
    int low_limit;
    int good;
    foreach (rx_y[i]) rx_y[i] = '0;
    build_echelon();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    good = 0;
    for (int b = 0; b < 8; b++) begin
      run_block(b < 2 ? b + 1 : 0, 6.0, 0, errs, conv);
      if (conv && errs == 0) good++;
    end
    check(good >= 7, $sformatf("%0d of 8 blocks at 6 dB decoded", good));
    for (int b = 0; b < 4; b++) run_block(0, 3.0, 0, errs, conv);
    // saturated NDS inputs: every sample at +/-7.5
    run_block(0, 0.0, 120, errs, conv);
    check(conv && errs == 0, "saturated block decoded");
    run_block(0, 0.0, 120, errs, conv);
    check(conv && errs == 0, "saturated block decoded");
    low_limit = 0;
    for (int b = 0; b < 3; b++) begin
      run_block(0, -4.0, 0, errs, conv);
      if (!conv) low_limit++;
    end

    $display("mechanisms: regenerative=%0d hold=%0d sat_hi=%0d sat_lo=%0d early=%0d limit=%0d nds_sat=%0d",
             n_regen, n_hold, n_sat_hi, n_sat_lo, n_early, n_limit, n_nds_sat);
    $display("average DCs per block %0d", total_dcs / longint'(blocks));
    check(n_regen > 0, "regenerative updates seen");
    check(n_hold > 0, "hold states (edge-memory reads) seen");
    check(n_sat_hi > 0, "counter saturated at +31");
    check(n_sat_lo > 0, "counter saturated at -31");
    check(n_early > 0, "early termination seen");
    check(n_limit > 0, "stop at DC limit seen");
    check(n_nds_sat > 0, "NDS saturation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
