// line_mapper: vertical side of the rectangular access.
//
// Image line y is stored in block (y mod 2M) of the SRAM: bank (y mod 2M)/2, left block for
// even y and right block for odd y, as line y / (2M) of that block. Any M consecutive
// lines, and any M lines at stride 2, then fall into distinct blocks, and when both blocks
// of a bank are used they hold the same line number, so one X-decoder per bank (shared by
// both blocks) can serve them. For rectangle row i (line y + i or y + 2i) this module
// gives the bank and block that hold it, and per bank the line number and the two block
// control signals. The document fixes that lines are spread over m banks of two blocks
// and that any 8 consecutive or sub-sampled lines are read at once; the exact modulo
// mapping is this design's choice. Combinational.
module line_mapper
  import swb_pkg::*;
#(
  parameter int unsigned M     = M_DEF,
  parameter int unsigned IMG_H = IMG_H_DEF,
  localparam int unsigned YW   = $clog2(IMG_H),
  localparam int unsigned LPB  = IMG_H / (2 * M),
  localparam int unsigned LW   = (LPB > 1) ? $clog2(LPB) : 1,
  localparam int unsigned BW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic [YW-1:0] y,
  input  logic          vsub,
  output logic [LW-1:0] line     [M],
  output logic [1:0]    blk_en   [M],
  output logic [BW-1:0] row_bank [M],
  output logic          row_side [M]
);

  always_comb begin
    int unsigned yi;
    int unsigned blk;
    for (int b = 0; b < M; b++) begin
      line[b]   = '0;
      blk_en[b] = '0;
    end
    for (int i = 0; i < M; i++) begin
      yi  = 32'(y) + (vsub ? 2 * i : i);
      blk = yi % (2 * M);
      row_bank[i]             = BW'(blk / 2);
      row_side[i]             = blk[0];
      line[blk / 2]           = LW'(yi / (2 * M));
      blk_en[blk / 2][blk[0]] = 1'b1;
    end
  end

endmodule
