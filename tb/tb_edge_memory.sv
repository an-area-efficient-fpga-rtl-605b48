// tb_edge_memory: random stimulus against a reference model of the 64-bit
// edge memory. The model keeps the stored bits in an int array, newest at
// index 0; each clock the bit at a random address is compared, a random
// fraction of clocks shift in a random bit, an occasional clear must
// empty the memory and an occasional fill must set every bit to din.
module tb_edge_memory;
  localparam int M = 64;
  localparam int AW = 6;
  logic clk = 1'b0;
  logic clear, fill, shift_en, din;
  logic [AW-1:0] addr;
  logic dout;
  int model [M];
  int checks = 0, failures = 0, shifts = 0, clears = 0, fills = 0;

  edge_memory #(.M(M), .AW(AW)) dut (
    .clk(clk), .clear(clear), .fill(fill), .shift_en(shift_en), .din(din), .addr(addr), .dout(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1; fill = 1'b0; shift_en = 1'b0; din = 1'b0; addr = '0;
    @(posedge clk); #1;
    clear = 1'b0;
    foreach (model[i]) model[i] = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      // read check at every address now and then, a random one otherwise
      addr = AW'($urandom);
      #1;
      checks++;
      if (int'(dout) != model[addr]) begin
        failures++;
        $display("FAIL cycle %0d addr %0d: got %0b want %0d", cyc, addr, dout, model[addr]);
      end
      clear    = ($urandom % 500) == 0;
      fill     = ($urandom % 400) == 0;
      shift_en = ($urandom % 3) != 0;
      din      = 1'($urandom);
      @(posedge clk); #1;
      if (clear) begin
        clears++;
        foreach (model[i]) model[i] = 0;
      end else if (fill) begin
        fills++;
        foreach (model[i]) model[i] = int'(din);
      end else if (shift_en) begin
        shifts++;
        for (int i = M - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = int'(din);
      end
      clear = 1'b0;
      fill = 1'b0;
      shift_en = 1'b0;
    end
    // a full sweep of all addresses at the end
    for (int a = 0; a < M; a++) begin
      addr = AW'(a);
      #1;
      checks++;
      if (int'(dout) != model[a]) failures++;
    end
    if (clears == 0 || fills == 0) failures++;
    $display("shifts=%0d clears=%0d fills=%0d", shifts, clears, fills);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
