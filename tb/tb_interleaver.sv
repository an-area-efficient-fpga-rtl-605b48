// tb_interleaver: builds the parity-check matrix H explicitly (Z = 16, so
// 128 columns and 64 rows) from the circulant shifts and derives the
// expected wiring by scanning it: slot s of check k is its s-th connected
// column in increasing order, and edge j of variable v is its j-th connected
// row. Random bit patterns are pushed through both directions and compared
// with that wiring. H must be regular (column weight 3, row weight 6) and free
// of 4-cycles.
module tb_interleaver;
  import stoch_ldpc_pkg::*;
  localparam int Z = 16;
  localparam int N = NB_COL * Z;
  localparam int M = NB_ROW * Z;
  logic [DV*N-1:0]  v2c_in, c2v_out;
  logic [DCN*M-1:0] v2c_out, c2v_in;
  bit   h [M][N];
  int   slot_var [M][DCN];   // variable node in slot s of check k
  int   slot_edge [M][DCN];  // its edge number j
  int checks = 0, failures = 0;

  interleaver #(.Z(Z), .N(N), .M(M)) dut (
    .vn_to_cn_in(v2c_in), .vn_to_cn_out(v2c_out),
    .cn_to_vn_in(c2v_in), .cn_to_vn_out(c2v_out));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (h[r, c]) h[r][c] = 1'b0;
    for (int rb = 0; rb < NB_ROW; rb++)
      for (int cb = 0; cb < NB_COL; cb++)
        if (cb / 2 != rb)
          for (int i = 0; i < Z; i++)
            h[rb * Z + i][cb * Z + (i + QC_SHIFT[rb][cb]) % Z] = 1'b1;
    // regularity
    for (int c = 0; c < N; c++) begin
      int w; w = 0;
      for (int r = 0; r < M; r++) w += int'(h[r][c]);
      checks++; if (w != DV) begin failures++; $display("FAIL column %0d weight %0d", c, w); end
    end
    for (int r = 0; r < M; r++) begin
      int w, s; w = 0; s = 0;
      for (int c = 0; c < N; c++) if (h[r][c]) begin
        int j; j = 0;
        for (int rr = 0; rr < r; rr++) j += int'(h[rr][c]);
        if (s < DCN) begin slot_var[r][s] = c; slot_edge[r][s] = j; end
        s++;
        w++;
      end
      checks++; if (w != DCN) begin failures++; $display("FAIL row %0d weight %0d", r, w); end
    end
    // no two columns share two rows (no 4-cycles)
    for (int c1 = 0; c1 < N; c1++)
      for (int c2 = c1 + 1; c2 < N; c2++) begin
        int sh; sh = 0;
        for (int r = 0; r < M; r++) sh += int'(h[r][c1] & h[r][c2]);
        if (sh > 1) begin failures++; $display("FAIL 4-cycle columns %0d %0d", c1, c2); end
      end
    checks++;
    // wiring
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < DV * N; i++)  v2c_in[i] = 1'($urandom);
      for (int i = 0; i < DCN * M; i++) c2v_in[i] = 1'($urandom);
      #1;
      for (int k = 0; k < M; k++)
        for (int s = 0; s < DCN; s++) begin
          int ve;
          ve = DV * slot_var[k][s] + slot_edge[k][s];
          checks += 2;
          if (v2c_out[DCN * k + s] !== v2c_in[ve]) begin
            failures++;
            if (failures < 10) $display("FAIL v->c check %0d slot %0d", k, s);
          end
          if (c2v_out[ve] !== c2v_in[DCN * k + s]) begin
            failures++;
            if (failures < 10) $display("FAIL c->v check %0d slot %0d", k, s);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
