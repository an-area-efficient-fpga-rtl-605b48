// tb_stoch_comparator: exhaustive check of the probability comparator. For
// every (P, R) pair of 8-bit values the output must be 1 exactly when P > R,
// and for each P the number of ones over all R must be P (so the stream is 1
// with probability P/256).
module tb_stoch_comparator;
  logic [7:0] p, r;
  logic       b;
  int checks = 0, failures = 0;

  stoch_comparator #(.W(8)) dut (.p(p), .r(r), .bit_o(b));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pi = 0; pi < 256; pi++) begin
      int ones;
      ones = 0;
      for (int ri = 0; ri < 256; ri++) begin
        p = 8'(pi);
        r = 8'(ri);
        #1;
        checks++;
        if (b !== (pi > ri)) begin
          failures++;
          $display("FAIL p=%0d r=%0d out=%0b", pi, ri, b);
        end
        ones += int'(b);
      end
      checks++;
      if (ones != pi) begin
        failures++;
        $display("FAIL p=%0d: %0d ones over all R", pi, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
