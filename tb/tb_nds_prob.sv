// tb_nds_prob: checks the noise-dependent scaling table for all 256 sample
// codes. The reference is computed here directly from the NDS formula:
// L' = (4*alpha/Y)*y = 2y and P = 256 / (1 + e^L'), rounded and clipped to
// 0..255. The table must match within one LSB, be non-increasing in y, be
// 128 at y = 0 and saturate at both ends.
module tb_nds_prob;
  import stoch_ldpc_pkg::*;
  rx_t   y;
  prob_t p;
  int checks = 0, failures = 0;
  int prev;

  nds_prob #(.ALPHA(3), .Y_MAX(6)) dut (.y(y), .p(p));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = 256;
    for (int code = -128; code < 128; code++) begin
      real yr, ref_p;
      int  ref_i;
      y = rx_t'(code);
      #1;
      yr    = real'(code) / 16.0;
      ref_p = 256.0 / (1.0 + $exp(2.0 * yr));
      ref_i = $rtoi(ref_p + 0.5);
      if (ref_i > 255) ref_i = 255;
      checks++;
      if (int'(p) - ref_i > 1 || ref_i - int'(p) > 1) begin
        failures++;
        $display("FAIL y=%0d/16: p=%0d want %0d", code, p, ref_i);
      end
      checks++;
      if (int'(p) > prev) begin
        failures++;
        $display("FAIL not monotonic at y=%0d/16", code);
      end
      prev = int'(p);
      if (code == 0) begin
        checks++;
        if (p != 8'd128) begin failures++; $display("FAIL p(0)=%0d", p); end
      end
    end
    y = rx_t'(-128); #1; checks++; if (p != 8'd255) failures++;
    y = rx_t'(127);  #1; checks++; if (p != 8'd0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
