// tb_updown_counter: random up/down stimulus, with long runs in one direction
// to reach both limits, against an integer model that saturates at -31 and
// +31. Checks the count and the hard decision (1 when the count >= 0) every
// clock and that clear returns the count to 0.
module tb_updown_counter;
  localparam int W = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, en = 1'b0, up = 1'b0;
  logic signed [W-1:0] count;
  logic decision;
  int model = 0;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  updown_counter #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .en(en), .up(up),
    .count(count), .decision(decision));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int phase;
      phase = (cyc / 200) % 4;
      en    = ($urandom % 8) != 0;
      // phases 0 and 2: biased up / down to saturate; 1 and 3: random
      case (phase)
        0: up = ($urandom % 10) != 0;
        2: up = ($urandom % 10) == 0;
        default: up = 1'($urandom);
      endcase
      clear = ($urandom % 700) == 0;
      @(posedge clk); #1;
      if (clear) model = 0;
      else if (en) begin
        if (up) model = (model < 31) ? model + 1 : 31;
        else    model = (model > -31) ? model - 1 : -31;
      end
      if (en && !clear && up && model == 31) sat_hi++;
      if (en && !clear && !up && model == -31) sat_lo++;
      checks += 2;
      if (int'(count) != model) begin
        failures++;
        $display("FAIL cycle %0d: count %0d want %0d", cyc, count, model);
      end
      if (decision != (model >= 0)) begin
        failures++;
        $display("FAIL cycle %0d: decision %0b for count %0d", cyc, decision, model);
      end
    end
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("FAIL saturation not reached (hi %0d lo %0d)", sat_hi, sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
