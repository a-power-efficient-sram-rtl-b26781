// sram_bank: one of the m banks, a left and a right block sharing one X-decoder.
//
// The merged modified X-decoder turns the row address line * GPL + gwl_base (GPL = GWLs per
// image line inside a block) into a pair of adjacent global word lines. The GWLs are shared
// by both blocks; a block control signal per block is ANDed onto them, so the left and the
// right block can be accessed independently with a single decoder, as the document
// describes. The Y-decoder outputs (lwlsl, pval, psel) are shared by both blocks.
//
// Timing: all inputs are sampled at the rising clock edge; rdata[side][seg][port] is
// registered. The row address formula follows from this design's pixel mapping.
module sram_bank
  import swb_pkg::*;
#(
  parameter int unsigned N     = N_DEF,
  parameter int unsigned M     = M_DEF,
  parameter int unsigned IMG_W = IMG_W_DEF,
  parameter int unsigned IMG_H = IMG_H_DEF,
  localparam int unsigned LPB  = IMG_H / (2 * M),   // image lines per block
  localparam int unsigned GPL  = IMG_W / (2 * N),   // GWLs per image line
  localparam int unsigned NGWL = LPB * GPL,
  localparam int unsigned LW   = (LPB > 1) ? $clog2(LPB) : 1,
  localparam int unsigned GBW  = (GPL > 1) ? $clog2(GPL) : 1
) (
  input  logic           clk,
  input  logic [LW-1:0]  line,
  input  logic [GBW-1:0] gwl_base,
  input  logic [1:0]     blk_en,
  input  logic           we,
  input  logic [1:0]     lwlsl [N],
  input  logic [1:0]     pval  [N],
  input  logic [1:0]     psel  [N][2],
  input  pixel_t         wdata [2][N][2],
  output pixel_t         rdata [2][N][2]
);

  localparam int unsigned AW = $clog2(NGWL);

  logic [AW-1:0]   row_addr;
  logic [NGWL-1:0] gwl;

  assign row_addr = AW'(32'(line) * GPL + 32'(gwl_base));

  modified_x_decoder #(.NGWL(NGWL)) u_xdec (
    .en   (|blk_en),
    .addr (row_addr),
    .gwl  (gwl)
  );

  for (genvar s = 0; s < 2; s++) begin : g_blk
    logic [NGWL-1:0] gwl_g;
    assign gwl_g = gwl & {NGWL{blk_en[s]}};   // block control AND circuits
    sram_block #(.N(N), .NGWL(NGWL)) u_blk (
      .clk   (clk),
      .gwl   (gwl_g),
      .lwlsl (lwlsl),
      .pval  (pval),
      .psel  (psel),
      .we    (we),
      .wdata (wdata[s]),
      .rdata (rdata[s])
    );
  end

endmodule
