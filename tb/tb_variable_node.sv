// tb_variable_node: random stimulus against a bit-level reference model of
// the degree-3 variable node. The model keeps its own copy of the three edge
// memories; each decoding cycle it decides per edge whether the channel bit
// and the two other incoming bits agree (regenerative: emit and store the
// bit) or not (hold: emit the stored bit at the random address), and checks
// the registered outputs after the clock and the counter bit before it.
// A random "first DC" must send the channel bit on every edge and fill
// every edge memory with it. The node is cleared before the first check. Regenerative, hold and first-DC cycles are
// counted and must all occur.
module tb_variable_node;
  import stoch_ldpc_pkg::*;
  localparam int M = 64;
  localparam int AW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, en = 1'b0, first = 1'b0, ch_bit = 1'b0;
  logic [DV-1:0] in_bits = '0;
  logic [AW-1:0] em_addr [DV];
  logic [DV-1:0] out_bits;
  logic dec_bit;
  int em [DV][M];
  int exp_out [DV];
  int dec_hold;
  int checks = 0, failures = 0, n_regen = 0, n_hold = 0, n_clear = 0, n_first = 0;

  variable_node #(.M(M), .AW(AW)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .en(en), .first(first), .ch_bit(ch_bit),
    .in_bits(in_bits), .em_addr(em_addr), .out_bits(out_bits), .dec_bit(dec_bit));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_clear();
    foreach (em[j, i]) em[j][i] = 0;
    foreach (exp_out[j]) exp_out[j] = 0;
    dec_hold = 0;
  endtask

  initial begin
    foreach (em_addr[j]) em_addr[j] = '0;
    model_clear();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int nxt [DV];
      int dec_exp;
      en      = ($urandom % 6) != 0;
      clear   = ($urandom % 2000) == 0;
      first   = ($urandom % 50) == 0;
      ch_bit  = ($urandom % 4) != 0;          // biased like a real channel
      in_bits = DV'($urandom);
      foreach (em_addr[j]) em_addr[j] = AW'($urandom);
      #1;
      // counter bit: all four inputs equal -> that value, else previous
      if (first || in_bits == {DV{ch_bit}}) dec_exp = int'(ch_bit);
      else dec_exp = dec_hold;
      checks++;
      if (int'(dec_bit) != dec_exp) begin
        failures++;
        $display("FAIL cycle %0d dec_bit %0b want %0d", cyc, dec_bit, dec_exp);
      end
      for (int j = 0; j < DV; j++) begin
        int a, b;
        a = int'(in_bits[(j + 1) % DV]);
        b = int'(in_bits[(j + 2) % DV]);
        if (first || (a == int'(ch_bit) && b == int'(ch_bit))) nxt[j] = int'(ch_bit);
        else nxt[j] = em[j][em_addr[j]];
      end
      @(posedge clk); #1;
      if (clear) begin
        n_clear++;
        model_clear();
      end else if (en && first) begin
        n_first++;
        for (int j = 0; j < DV; j++) begin
          exp_out[j] = nxt[j];
          for (int i = 0; i < M; i++) em[j][i] = int'(ch_bit);
        end
        dec_hold = dec_exp;
      end else if (en) begin
        for (int j = 0; j < DV; j++) begin
          int a, b;
          a = int'(in_bits[(j + 1) % DV]);
          b = int'(in_bits[(j + 2) % DV]);
          if (a == int'(ch_bit) && b == int'(ch_bit)) begin
            n_regen++;
            for (int i = M - 1; i > 0; i--) em[j][i] = em[j][i-1];
            em[j][0] = int'(ch_bit);
          end else n_hold++;
          exp_out[j] = nxt[j];
        end
        dec_hold = dec_exp;
      end
      for (int j = 0; j < DV; j++) begin
        checks++;
        if (int'(out_bits[j]) != exp_out[j]) begin
          failures++;
          $display("FAIL cycle %0d edge %0d out %0b want %0d", cyc, j, out_bits[j], exp_out[j]);
        end
      end
    end
    $display("regenerative=%0d hold=%0d clears=%0d first=%0d", n_regen, n_hold, n_clear, n_first);
    if (n_regen == 0 || n_hold == 0 || n_clear == 0 || n_first == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
