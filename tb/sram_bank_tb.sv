// sram_bank_tb: one bank, left and right block behind the merged X-decoder.
// Accesses pick a line, a GWL base inside the line and the two block control signals at
// random (none, left, right or both), and random read-circuit port settings shared by both
// blocks. A reference of both blocks is kept per GWL; a write must change only the enabled
// blocks, and reads of the enabled blocks are checked on the next cycle.
module sram_bank_tb;
  import swb_pkg::*;
  localparam int unsigned N = 8, M = 8, W = 320, H = 160;
  localparam int unsigned LPB = H / (2 * M), GPL = W / (2 * N), NGWL = LPB * GPL;

  logic       clk = 1'b0;
  logic [3:0] line;
  logic [4:0] gwl_base;
  logic [1:0] blk_en;
  logic       we;
  logic [1:0] lwlsl [N];
  logic [1:0] pval  [N];
  logic [1:0] psel  [N][2];
  pixel_t     wdata [2][N][2];
  pixel_t     rdata [2][N][2];

  sram_bank #(.N(N), .M(M), .IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  pixel_t cells [2][NGWL][N][2];   // [side][gwl][segment][slot]
  int checks = 0, failures = 0;
  int cov_en [4];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(bit w, int ln, int wb, logic [1:0] en, int nports [N], logic [1:0] pos [N][2]);
    pixel_t exp_r [2][N][2];
    int g0, g;
    g0 = ln * GPL + wb;
    line = 4'(ln); gwl_base = 5'(wb); blk_en = en; we = w;
    for (int j = 0; j < N; j++) begin
      lwlsl[j] = '0;
      pval[j]  = '0;
      for (int p = 0; p < 2; p++) begin
        psel[j][p] = pos[j][p];
        for (int s = 0; s < 2; s++) wdata[s][j][p] = pixel_t'($urandom);
        if (p < nports[j]) begin
          pval[j][p] = 1'b1;
          lwlsl[j][pos[j][p][1]] = 1'b1;
        end
      end
    end
    @(posedge clk);
    for (int s = 0; s < 2; s++)
      for (int j = 0; j < N; j++)
        for (int p = 0; p < nports[j]; p++) begin
          g = (g0 % 2 == int'(pos[j][p][1])) ? g0 : g0 + 1;
          if (w && en[s]) cells[s][g][j][pos[j][p][0]] = wdata[s][j][p];
          exp_r[s][j][p] = cells[s][g][j][pos[j][p][0]];
        end
    #1;
    if (!w)
      for (int s = 0; s < 2; s++)
        if (en[s])
          for (int j = 0; j < N; j++)
            for (int p = 0; p < nports[j]; p++) begin
              checks++;
              if (rdata[s][j][p] !== exp_r[s][j][p]) begin
                failures++;
                if (failures < 5) $display("side %0d seg %0d port %0d: got %h exp %h",
                                           s, j, p, rdata[s][j][p], exp_r[s][j][p]);
              end
            end
    @(negedge clk);
  endtask

  initial begin
    int nports [N];
    logic [1:0] pos [N][2];
    int ln, wb;
    logic [1:0] en;
    blk_en = '0; we = 1'b0; line = '0; gwl_base = '0;
    for (int j = 0; j < N; j++) begin
      lwlsl[j] = '0; pval[j] = '0; psel[j][0] = '0; psel[j][1] = '0;
      for (int s = 0; s < 2; s++) begin wdata[s][j][0] = '0; wdata[s][j][1] = '0; end
    end
    @(negedge clk);
    for (int l = 0; l < LPB; l++)
      for (int w = 0; w < GPL; w += 2)
        for (int half = 0; half < 2; half++) begin
          for (int j = 0; j < N; j++) begin
            nports[j] = 2;
            pos[j][0] = {1'(half), 1'b0};
            pos[j][1] = {1'(half), 1'b1};
          end
          access(1'b1, l, w, 2'b11, nports, pos);
        end
    for (int n = 0; n < 4000; n++) begin
      ln = $urandom_range(0, LPB - 1);
      wb = $urandom_range(0, GPL - 2);
      en = 2'($urandom_range(0, 3));
      cov_en[en]++;
      for (int j = 0; j < N; j++) begin
        nports[j] = $urandom_range(0, 2);
        pos[j][0] = 2'($urandom_range(0, 3));
        pos[j][1] = pos[j][0] ^ 2'($urandom_range(1, 3));
      end
      access($urandom_range(0, 3) == 0, ln, wb, en, nports, pos);
    end
    for (int e = 0; e < 4; e++) if (cov_en[e] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
