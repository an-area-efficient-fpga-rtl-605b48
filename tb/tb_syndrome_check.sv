// tb_syndrome_check: builds H explicitly (Z = 16) and compares the syndrome
// and the all-satisfied flag with a row-by-row parity computed here, for
// random words, for words with a few flipped bits from the all-zero and
// all-one codewords (both are codewords of a code with even row weight), and
// for those two codewords themselves.
module tb_syndrome_check;
  import stoch_ldpc_pkg::*;
  localparam int Z = 16;
  localparam int N = NB_COL * Z;
  localparam int M = NB_ROW * Z;
  logic [N-1:0] dec;
  logic [M-1:0] syn;
  logic ok;
  bit h [M][N];
  int checks = 0, failures = 0, n_ok = 0;

  syndrome_check #(.Z(Z), .N(N), .M(M)) dut (.decisions(dec), .syndrome(syn), .all_satisfied(ok));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word();
    logic [M-1:0] e;
    #1;
    for (int r = 0; r < M; r++) begin
      e[r] = 1'b0;
      for (int c = 0; c < N; c++) if (h[r][c]) e[r] ^= dec[c];
    end
    checks += 2;
    if (syn !== e) begin failures++; $display("FAIL syndrome %h want %h", syn, e); end
    if (ok !== (e == '0)) begin failures++; $display("FAIL all_satisfied %b", ok); end
    if (ok) n_ok++;
  endtask

  initial begin
    foreach (h[r, c]) h[r][c] = 1'b0;
    for (int rb = 0; rb < NB_ROW; rb++)
      for (int cb = 0; cb < NB_COL; cb++)
        if (cb / 2 != rb)
          for (int i = 0; i < Z; i++)
            h[rb * Z + i][cb * Z + (i + QC_SHIFT[rb][cb]) % Z] = 1'b1;
    dec = '0; check_word();
    dec = '1; check_word();
    for (int t = 0; t < 200; t++) begin
      dec = (t % 2) ? '1 : '0;
      for (int f = 0; f < 1 + t % 4; f++) dec[$urandom % N] ^= 1'b1;
      check_word();
      for (int i = 0; i < N; i++) dec[i] = 1'($urandom);
      check_word();
    end
    checks++;
    if (n_ok < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
