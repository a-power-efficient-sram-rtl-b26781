// lwl_column: the cells of one segment half of a block, one local word line per row.
//
// Each row holds the two pixels that one LWL of this segment half connects to its bit
// lines. When the LWL of the addressed row is active (en), a read copies both pixels of the
// row into the output register on the rising clock edge (the read circuit after it picks
// the ones it needs), and a write stores wdata[t] into pixel t of the row for each t whose
// wen[t] is set. The output register holds its value between reads. The cell array is a
// plain register array; it is not reset, like SRAM cells.
module lwl_column
  import swb_pkg::*;
#(
  parameter int unsigned ROWS = 100,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [RW-1:0] row,
  input  logic [1:0]    wen,
  input  pixel_t        wdata [2],
  output pixel_t        rdata [2]
);

  logic [2*PIX_W-1:0] cells [ROWS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        if (wen[0]) cells[row][PIX_W-1:0]       <= wdata[0];
        if (wen[1]) cells[row][2*PIX_W-1:PIX_W] <= wdata[1];
      end else begin
        rdata[0] <= cells[row][PIX_W-1:0];
        rdata[1] <= cells[row][2*PIX_W-1:PIX_W];
      end
    end
  end

endmodule
