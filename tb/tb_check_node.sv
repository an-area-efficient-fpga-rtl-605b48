// tb_check_node: exhaustive check of the degree-6 stochastic parity-check
// node. For all 64 input patterns each output must equal the XOR of the five
// other inputs (computed here by an explicit loop).
module tb_check_node;
  localparam int D = 6;
  logic [D-1:0] in_bits, out_bits;
  int checks = 0, failures = 0;

  check_node #(.D(D)) dut (.in_bits(in_bits), .out_bits(out_bits));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**D; v++) begin
      in_bits = D'(v);
      #1;
      for (int i = 0; i < D; i++) begin
        logic exp_bit;
        exp_bit = 1'b0;
        for (int k = 0; k < D; k++)
          if (k != i) exp_bit = exp_bit ^ in_bits[k];
        checks++;
        if (out_bits[i] !== exp_bit) begin
          failures++;
          $display("FAIL in=%b edge %0d out=%b", in_bits, i, out_bits[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
