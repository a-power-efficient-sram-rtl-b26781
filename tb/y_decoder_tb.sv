// y_decoder_tb: checks the column-side decoder for every x and both horizontal forms.
// A reference places each rectangle pixel independently (segment x mod 8, k = x / 8,
// half (k / 2) mod 2, slot k mod 2, port 0 at stride 1 and port (2c)/8 at stride 2) and
// the test compares gwl_base, all 16 LWLSLs, port valids and port selects. It also checks
// the property the design relies on: every needed pixel lies on GWL gwl_base or the next.
module y_decoder_tb;
  import swb_pkg::*;
  localparam int unsigned N = 8, W = 320;
  logic [8:0] x;
  logic       hsub;
  logic [4:0] gwl_base;
  logic [1:0] lwlsl [N];
  logic [1:0] pval  [N];
  logic [1:0] psel  [N][2];
  int checks = 0, failures = 0;

  y_decoder #(.N(N), .IMG_W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] e_lwlsl [N];
    logic [1:0] e_pval  [N];
    logic [1:0] e_psel  [N][2];
    int xp, k, w, j, p;
    bit bad;
    for (int hs = 0; hs < 2; hs++) begin
      for (int xx = 0; xx + ((hs != 0) ? 2 : 1) * (N - 1) < W; xx++) begin
        x = 9'(xx);
        hsub = 1'(hs);
        #1;
        for (int s = 0; s < N; s++) begin
          e_lwlsl[s] = '0; e_pval[s] = '0; e_psel[s][0] = '0; e_psel[s][1] = '0;
        end
        bad = 0;
        for (int c = 0; c < N; c++) begin
          xp = xx + ((hs != 0) ? 2 : 1) * c;
          j  = xp % N;
          k  = xp / N;
          w  = k / 2;
          p  = (hs != 0) ? (2 * c) / N : 0;
          if (w != (xx / N) / 2 && w != (xx / N) / 2 + 1) bad = 1;
          e_lwlsl[j][w % 2] = 1'b1;
          e_pval[j][p] = 1'b1;
          e_psel[j][p] = 2'(((w % 2) << 1) | (k % 2));
        end
        checks++;
        if (gwl_base != 5'((xx / N) / 2)) bad = 1;
        for (int s = 0; s < N; s++) begin
          if (lwlsl[s] != e_lwlsl[s] || pval[s] != e_pval[s]) bad = 1;
          for (int q = 0; q < 2; q++)
            if (e_pval[s][q] && psel[s][q] != e_psel[s][q]) bad = 1;
        end
        if (bad) begin
          failures++;
          if (failures < 5) $display("mismatch at x=%0d hsub=%0d", xx, hs);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
