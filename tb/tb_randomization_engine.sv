// tb_randomization_engine: reference model of the ten Galois LFSRs and of the
// XOR tap pattern, written here with explicit polynomial arithmetic, checked
// against all 32 random numbers every clock. It also checks that a disabled
// engine holds its outputs, that every LFSR has the full period 2^16 - 1 and
// that the mean of the generated numbers is close to 127.5.
module tb_randomization_engine;
  import stoch_ldpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] rnd [N_RAND];
  logic [15:0] st [N_LFSR];
  int checks = 0, failures = 0;
  longint sum = 0, cnt = 0;

  randomization_engine #(.NR(N_RAND), .RW(8)) dut (.clk(clk), .rst_n(rst_n), .en(en), .rnd(rnd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] step(logic [15:0] s, logic [15:0] poly);
    logic lsb;
    lsb = s[0];
    s = {1'b0, s[15:1]};
    if (lsb) s = s ^ poly;
    return s;
  endfunction

  // bit b of the output bus: three LFSR bits, from LFSRs r, r+3 and r+6
  // (mod 10) where r = b mod 10, at bit positions q, 3q+1 and
  // 5q + 7*(q/16) + 2 (mod 16) where q = b / 10
  function automatic logic ref_bit(int b);
    int r, q;
    r = b % 10;
    q = b / 10;
    return st[r][q % 16] ^ st[(r + 3) % 10][(3 * q + 1) % 16]
         ^ st[(r + 6) % 10][(5 * q + 7 * (q / 16) + 2) % 16];
  endfunction

  task automatic compare(int cyc);
    for (int k = 0; k < N_RAND; k++) begin
      logic [7:0] e;
      for (int i = 0; i < 8; i++) e[i] = ref_bit(8 * k + i);
      checks++;
      if (rnd[k] !== e) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d num %0d: %h want %h", cyc, k, rnd[k], e);
      end
    end
  endtask

  initial begin
    for (int l = 0; l < N_LFSR; l++) st[l] = LFSR_SEED[l];
    // full period of every polynomial
    for (int l = 0; l < N_LFSR; l++) begin
      logic [15:0] s;
      int n;
      s = 16'h0001;
      n = 0;
      do begin s = step(s, LFSR_POLY[l]); n++; end while (s != 16'h0001 && n < 70000);
      checks++;
      if (n != 65535) begin
        failures++;
        $display("FAIL LFSR %0d period %0d", l, n);
      end
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      en = ($urandom % 5) != 0;
      #1 compare(cyc);
      for (int k = 0; k < N_RAND; k++) begin sum += longint'(rnd[k]); cnt++; end
      @(posedge clk); #1;
      if (en) for (int l = 0; l < N_LFSR; l++) st[l] = step(st[l], LFSR_POLY[l]);
    end
    checks++;
    if (sum * 10 < cnt * 1265 || sum * 10 > cnt * 1285) begin
      failures++;
      $display("FAIL mean %f", real'(sum) / real'(cnt));
    end
    $display("mean random number %f", real'(sum) / real'(cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
