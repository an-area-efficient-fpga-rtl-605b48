// tb_decode_controller: drives the block controller with a small DC limit
// (MAX_DC = 20) and checks, clock by clock, against an expected schedule:
// load/clear only in the start clock while ready, dc_en in each decoding
// clock, stop on all_satisfied only after at least one DC, stop at the DC
// limit otherwise, first_dc on the first DC only, a one-clock done with the right converged flag and DC
// count, and a block latency of DCs + 2 clocks from start to done.
module tb_decode_controller;
  import stoch_ldpc_pkg::*;
  localparam int MAX_DC = 20;
  localparam int DCW = $clog2(MAX_DC + 1);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, sat = 1'b0;
  logic ready, load, clear, dc_en, first_dc, done, converged;
  logic [DCW-1:0] dc_count;
  int checks = 0, failures = 0, n_conv = 0, n_limit = 0;

  decode_controller #(.MAX_DC(MAX_DC), .DCW(DCW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .all_satisfied(sat),
    .ready(ready), .load(load), .clear(clear), .dc_en(dc_en), .first_dc(first_dc), .done(done),
    .converged(converged), .dc_count(dc_count));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Run one block. sat_after: all_satisfied goes high once this many DCs ran
  // (satisfied already at DC 0 too when sat_at_zero), -1 for never.
  task automatic run_block(int sat_after, bit sat_at_zero);
    int dcs, cycles, exp_dcs;
    bit exp_conv;
    exp_dcs  = (sat_after < 0 || sat_after > MAX_DC) ? MAX_DC : (sat_after == 0 ? 1 : sat_after);
    exp_conv = !(sat_after < 0 || sat_after > MAX_DC);
    @(negedge clk);
    expect_true(ready == 1'b1, "ready before start");
    start = 1'b1;
    sat = sat_at_zero;
    #1 expect_true(load && clear && !dc_en, "load/clear in start clock");
    @(negedge clk);
    start = 1'b0;
    dcs = 0;
    cycles = 1;
    while (!done) begin
      sat = (sat_after >= 0 && int'(dc_count) >= sat_after) || (sat_at_zero && dc_count == 0);
      #1;
      expect_true(!load && !clear, "no load while decoding");
      expect_true(first_dc == (dc_en && dcs == 0), "first_dc only on the first DC");
      if (dc_en) dcs++;
      @(negedge clk);
      cycles++;
      if (cycles > MAX_DC + 10) break;
    end
    expect_true(done == 1'b1, "done reached");
    expect_true(dcs == exp_dcs, $sformatf("DCs %0d want %0d", dcs, exp_dcs));
    expect_true(int'(dc_count) == exp_dcs, "dc_count");
    expect_true(converged == exp_conv, "converged flag");
    expect_true(cycles == exp_dcs + 2, $sformatf("latency %0d want %0d", cycles, exp_dcs + 2));
    expect_true(ready == 1'b1, "ready with done");
    if (exp_conv) n_conv++; else n_limit++;
    sat = 1'b0;
    @(negedge clk);
    expect_true(done == 1'b0, "done is one clock");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // start ignored while not ready is checked by never starting mid-block
    run_block(5, 1'b0);
    run_block(-1, 1'b0);
    run_block(0, 1'b1);     // satisfied at DC 0: at least one DC still runs
    run_block(1, 1'b0);
    run_block(MAX_DC, 1'b0);
    for (int t = 0; t < 20; t++) run_block(int'($urandom % 30) - 3, 1'b0);
    expect_true(n_conv > 0 && n_limit > 0, "both stop reasons seen");
    $display("converged=%0d limit=%0d", n_conv, n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
