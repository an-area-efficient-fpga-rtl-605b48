// tb_workload_ber: the evaluated workload, (1024,512) decoding of random
// codewords over BPSK/AWGN at Eb/N0 = 3 dB, on two decoders fed the same
// samples: one with the default DC limit of 6000 and one with a limit of
// 1000 (the shorter-latency variant). Random codewords are made here: H is
// reduced to row-echelon form over GF(2), the free bits are drawn at random
// and the pivot bits solved from the rows. Each codeword is first checked
// against H. For each block the DCs, convergence and bit errors of both
// decoders are printed, with the average DCs and the implied throughput at
// 212 MHz. A block decoded by the 6000-DC decoder must converge to the sent
// codeword; the 1000-DC decoder must stop at its limit or converge too.
module tb_workload_ber;
  import stoch_ldpc_pkg::*;
  import tb_channel_pkg::*;
  localparam int Z = Z_DEFAULT;
  localparam int N = NB_COL * Z;
  localparam int M = NB_ROW * Z;
  localparam int BLOCKS = 6;
  localparam real EBN0 = 3.0;
  localparam int DCW6 = $clog2(6000 + 1);
  localparam int DCW1 = $clog2(1000 + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  rx_t  rx_y [N];
  logic ready6, done6, conv6, ready1, done1, conv1;
  logic [DCW6-1:0] dcs6;
  logic [DCW1-1:0] dcs1;
  logic [N-1:0] dec6, dec1;

  logic [N-1:0] hrow [M];     // H, then its echelon form
  int   pivcol [M];
  int   rank;
  int checks = 0, failures = 0;

  stochastic_ldpc_decoder dut6 (
    .clk(clk), .rst_n(rst_n), .start(start), .rx_y(rx_y), .ready(ready6),
    .done(done6), .converged(conv6), .dc_count(dcs6), .dec_bits(dec6));

  stochastic_ldpc_decoder #(.MAX_DC(1000)) dut1 (
    .clk(clk), .rst_n(rst_n), .start(start), .rx_y(rx_y), .ready(ready1),
    .done(done1), .converged(conv1), .dc_count(dcs1), .dec_bits(dec1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (BLOCKS * 6010 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [N-1:0] h_of_row(int r);
    logic [N-1:0] row;
    int rb, i;
    row = '0;
    rb = r / Z;
    i = r % Z;
    for (int cb = 0; cb < NB_COL; cb++)
      if (cb / 2 != rb) row[cb * Z + (i + QC_SHIFT[rb][cb]) % Z] = 1'b1;
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

  function automatic logic [N-1:0] random_codeword();
    logic [N-1:0] x;
    logic [N-1:0] pivmask;
    pivmask = '0;
    for (int i = 0; i < rank; i++) pivmask[pivcol[i]] = 1'b1;
    for (int c = 0; c < N; c++) x[c] = pivmask[c] ? 1'b0 : 1'($urandom);
    for (int i = 0; i < rank; i++) x[pivcol[i]] = ^(hrow[i] & x);
    return x;
  endfunction

  initial begin
    longint sum6 = 0, sum1 = 0;
    int errs6_total = 0, errs1_total = 0;
    foreach (rx_y[i]) rx_y[i] = '0;
    build_echelon();
    $display("rank of H = %0d, code dimension = %0d", rank, N - rank);
    check(rank <= M && N - rank >= 512, "code dimension at least 512");
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int b = 0; b < BLOCKS; b++) begin
      logic [N-1:0] cw;
      int e6, e1, cycles;
      bit seen6, seen1;
      real sigma;
      cw = random_codeword();
      for (int r = 0; r < M; r++) check(^(h_of_row(r) & cw) == 1'b0, "codeword satisfies H");
      sigma = noise_sigma(EBN0, 0.5);
      for (int i = 0; i < N; i++) rx_y[i] = channel_sample(cw[i], sigma);
      @(negedge clk);
      check(ready6 && ready1, "decoders ready");
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      seen6 = 1'b0; seen1 = 1'b0;
      cycles = 1;
      while (!seen6 || !seen1) begin
        if (done1 && !seen1) begin
          seen1 = 1'b1;
          check(cycles == int'(dcs1) + 2, "1K decoder latency");
          e1 = 0;
          for (int i = 0; i < N; i++) if (dec1[i] != cw[i]) e1++;
          check(conv1 ? (e1 == 0) : (dcs1 == DCW1'(1000)), "1K decoder result");
        end
        if (done6 && !seen6) begin
          seen6 = 1'b1;
          check(cycles == int'(dcs6) + 2, "6K decoder latency");
          e6 = 0;
          for (int i = 0; i < N; i++) if (dec6[i] != cw[i]) e6++;
        end
        @(negedge clk);
        cycles++;
      end
      check(conv6 && e6 == 0, $sformatf("block %0d decoded (6K limit)", b));
      sum6 += longint'(dcs6);
      sum1 += longint'(dcs1);
      errs6_total += e6;
      errs1_total += e1;
      $display("block %0d: weight %0d; 6K: DCs=%0d conv=%0b errors=%0d; 1K: DCs=%0d conv=%0b errors=%0d",
               b, $countones(cw), dcs6, conv6, e6, dcs1, conv1, e1);
    end
    $display("average DCs: 6K limit %0d, 1K limit %0d; bit errors %0d / %0d",
             sum6 / BLOCKS, sum1 / BLOCKS, errs6_total, errs1_total);
    $display("throughput at 212 MHz with the 6K limit: %0.0f Mbps",
             1024.0 * 212.0 / (real'(sum6) / real'(BLOCKS) + 2.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
