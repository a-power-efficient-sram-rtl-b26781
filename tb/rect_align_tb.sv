// rect_align_tb: checks both directions of the alignment network with random data.
// Row routing is generated as line_mapper would (block = line mod 16) for random top lines
// and vertical forms; column placement is recomputed here (segment (x + c*sx) mod 8, port
// (c*sx) / 8). Reads must pick exactly the addressed port; writes must land every
// rectangle pixel on its port and leave all other ports at zero.
module rect_align_tb;
  import swb_pkg::*;
  localparam int unsigned N = 8, M = 8;

  logic [2:0] rd_x_lo, wr_x_lo;
  logic       rd_hsub, wr_hsub;
  logic [2:0] rd_row_bank [M], wr_row_bank [M];
  logic       rd_row_side [M], wr_row_side [M];
  pixel_t     bank_rdata [M][2][N][2];
  pixel_t     rdata      [M][N];
  pixel_t     wdata      [M][N];
  pixel_t     bank_wdata [M][2][N][2];
  int checks = 0, failures = 0;

  rect_align #(.N(N), .M(M)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int y, sy, sx, blk, seg, prt;
    bit hit [M][2][N][2];
    bit bad;
    for (int n = 0; n < 2000; n++) begin
      rd_x_lo = 3'($urandom); wr_x_lo = 3'($urandom);
      rd_hsub = 1'($urandom); wr_hsub = 1'($urandom);
      y = $urandom_range(0, 100); sy = $urandom_range(1, 2);
      for (int i = 0; i < M; i++) begin
        blk = (y + sy * i) % 16;
        rd_row_bank[i] = 3'(blk / 2); rd_row_side[i] = 1'(blk % 2);
      end
      y = $urandom_range(0, 100); sy = $urandom_range(1, 2);
      for (int i = 0; i < M; i++) begin
        blk = (y + sy * i) % 16;
        wr_row_bank[i] = 3'(blk / 2); wr_row_side[i] = 1'(blk % 2);
      end
      for (int b = 0; b < M; b++) for (int s = 0; s < 2; s++)
        for (int j = 0; j < N; j++) for (int p = 0; p < 2; p++) begin
          bank_rdata[b][s][j][p] = pixel_t'($urandom);
          hit[b][s][j][p] = 0;
        end
      for (int i = 0; i < M; i++) for (int c = 0; c < N; c++) wdata[i][c] = pixel_t'($urandom_range(1, 255));
      #1;
      bad = 0;
      sx = rd_hsub ? 2 : 1;
      for (int i = 0; i < M; i++)
        for (int c = 0; c < N; c++) begin
          seg = (int'(rd_x_lo) + sx * c) % N;
          prt = (sx * c) / N;
          if (rdata[i][c] != bank_rdata[rd_row_bank[i]][rd_row_side[i]][seg][prt]) bad = 1;
        end
      checks++;
      if (bad) begin failures++; if (failures < 5) $display("read mismatch %0d", n); end
      bad = 0;
      sx = wr_hsub ? 2 : 1;
      for (int i = 0; i < M; i++)
        for (int c = 0; c < N; c++) begin
          seg = (int'(wr_x_lo) + sx * c) % N;
          prt = (sx * c) / N;
          hit[wr_row_bank[i]][wr_row_side[i]][seg][prt] = 1;
          if (bank_wdata[wr_row_bank[i]][wr_row_side[i]][seg][prt] != wdata[i][c]) bad = 1;
        end
      for (int b = 0; b < M; b++) for (int s = 0; s < 2; s++)
        for (int j = 0; j < N; j++) for (int p = 0; p < 2; p++)
          if (!hit[b][s][j][p] && bank_wdata[b][s][j][p] != 0) bad = 1;
      checks++;
      if (bad) begin failures++; if (failures < 5) $display("write mismatch %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
