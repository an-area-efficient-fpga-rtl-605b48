// tb_decoder_full: the decoder at its full size and default parameters
// (1024 bits, 512 checks, DC limit 6000). Two blocks, the all-zero and the
// all-one codeword, are sent over BPSK/AWGN at Eb/N0 = 3 dB and decoded. Each
// must converge to the sent codeword within the DC limit, and done must come
// DCs + 2 clocks after start. The DCs used and the resulting throughput at a
// 212 MHz clock (1024 bits per DCs + 2 clocks) are printed.
module tb_decoder_full;
  import stoch_ldpc_pkg::*;
  import tb_channel_pkg::*;
  localparam int N = NB_COL * Z_DEFAULT;
  localparam int DCW = $clog2(6000 + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  rx_t  rx_y [N];
  logic ready, done, converged;
  logic [DCW-1:0] dc_count;
  logic [N-1:0] dec_bits;
  int checks = 0, failures = 0;

  stochastic_ldpc_decoder dut (
    .clk(clk), .rst_n(rst_n), .start(start), .rx_y(rx_y), .ready(ready),
    .done(done), .converged(converged), .dc_count(dc_count), .dec_bits(dec_bits));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (13000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_block(bit word, real ebn0);
    int cycles, errs;
    real sigma;
    sigma = noise_sigma(ebn0, 0.5);
    for (int i = 0; i < N; i++) rx_y[i] = channel_sample(word, sigma);
    @(negedge clk);
    check(ready, "ready before start");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 6100) begin
      @(negedge clk);
      cycles++;
    end
    check(done, "done seen");
    check(cycles == int'(dc_count) + 2, $sformatf("latency %0d for %0d DCs", cycles, dc_count));
    errs = 0;
    for (int i = 0; i < N; i++) if (dec_bits[i] != word) errs++;
    check(converged, "block converged");
    check(errs == 0, $sformatf("%0d bit errors", errs));
    $display("word=%0d Eb/N0=%0.1f dB: DCs=%0d converged=%0b bit errors=%0d, %0.0f Mbps at 212 MHz",
             word, ebn0, dc_count, converged, errs, 1024.0 * 212.0 / real'(cycles));
  endtask

  initial begin
    foreach (rx_y[i]) rx_y[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run_block(1'b0, 3.0);
    run_block(1'b1, 3.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
