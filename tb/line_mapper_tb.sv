// line_mapper_tb: checks the vertical mapping for every top line and both vertical forms.
// For each rectangle row the reference computes the block (line mod 16), its bank and side
// and the line number inside the block, and checks row routing, block controls (exactly
// the blocks used), per-bank line numbers, that no block is used twice and that both blocks
// of a bank always need the same line.
module line_mapper_tb;
  import swb_pkg::*;
  localparam int unsigned M = 8, H = 160;
  logic [7:0] y;
  logic       vsub;
  logic [3:0] line     [M];
  logic [1:0] blk_en   [M];
  logic [2:0] row_bank [M];
  logic       row_side [M];
  int checks = 0, failures = 0;

  line_mapper #(.M(M), .IMG_H(H)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int yl, blk, used [2*M], lineof [M];
    bit bad;
    for (int vs = 0; vs < 2; vs++) begin
      for (int yy = 0; yy + ((vs != 0) ? 2 : 1) * (M - 1) < H; yy++) begin
        y = 8'(yy);
        vsub = 1'(vs);
        #1;
        bad = 0;
        for (int b = 0; b < 2 * M; b++) used[b] = 0;
        for (int b = 0; b < M; b++) lineof[b] = -1;
        for (int i = 0; i < M; i++) begin
          yl  = yy + ((vs != 0) ? 2 : 1) * i;
          blk = yl % 16;
          used[blk]++;
          if (lineof[blk / 2] >= 0 && lineof[blk / 2] != yl / 16) bad = 1;
          lineof[blk / 2] = yl / 16;
          if (row_bank[i] != 3'(blk / 2) || row_side[i] != 1'(blk % 2)) bad = 1;
        end
        for (int b = 0; b < 2 * M; b++) begin
          if (used[b] > 1) bad = 1;
          if (blk_en[b / 2][b % 2] != (used[b] == 1)) bad = 1;
        end
        for (int b = 0; b < M; b++)
          if (lineof[b] >= 0 && line[b] != 4'(lineof[b])) bad = 1;
        checks++;
        if (bad) begin
          failures++;
          if (failures < 5) $display("mismatch at y=%0d vsub=%0d", yy, vs);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
