// rect_sram: search window SRAM with single-cycle rectangular access.
//
// Holds an IMG_W x IMG_H image of 8-bit pixels and, every cycle, reads or writes one
// N x M rectangle at any pixel position in one of four forms: integer-pel, horizontally
// sub-sampled (column stride 2), vertically sub-sampled (row stride 2), or both. There is
// no segmentation penalty: a rectangle that crosses any internal word boundary still takes
// one cycle.
//
// Structure (as in the document): M banks, each with a left and a right block sharing one
// merged X-decoder; the decoder raises two adjacent global word lines, and local word lines
// are the AND of a GWL with a Y-decoder select line, so each block returns any N
// consecutive or N stride-2 pixels of one line. Lines are spread over the 2M blocks by
// line_mapper, columns over the N segments of a block by y_decoder, and rect_align puts
// the pixels in raster order. Data path widths, the write port, the output ordering and
// the out-of-range handling are this design's own choices.
//
// Interface and timing:
//   req_valid/req_we/req_x/req_y/req_form/wdata are sampled at the rising clock edge.
//   A write stores wdata[i][c] at pixel (req_x + c*sx, req_y + i*sy).
//   A read returns that rectangle on rdata with rd_valid high in the next cycle; one
//   request can be issued every cycle. A request whose rectangle leaves the image is
//   dropped and req_err is high in the next cycle. rdata holds its value until the next
//   read returns.
module rect_sram
  import swb_pkg::*;
#(
  parameter int unsigned N     = N_DEF,
  parameter int unsigned M     = M_DEF,
  parameter int unsigned IMG_W = IMG_W_DEF,
  parameter int unsigned IMG_H = IMG_H_DEF,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  input  logic         req_we,
  input  logic [XW-1:0] req_x,
  input  logic [YW-1:0] req_y,
  input  access_form_e req_form,
  input  pixel_t       wdata [M][N],
  output logic         rd_valid,
  output pixel_t       rdata [M][N],
  output logic         req_err
);

  localparam int unsigned LPB = IMG_H / (2 * M);
  localparam int unsigned GPL = IMG_W / (2 * N);
  localparam int unsigned LW  = (LPB > 1) ? $clog2(LPB) : 1;
  localparam int unsigned GBW = (GPL > 1) ? $clog2(GPL) : 1;
  localparam int unsigned BW  = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned LN  = $clog2(N);

  logic hsub, vsub, in_range, acc;

  assign hsub = req_form[0];
  assign vsub = req_form[1];
  assign in_range = (32'(req_x) + (hsub ? 2 : 1) * (N - 1) < IMG_W) &&
                    (32'(req_y) + (vsub ? 2 : 1) * (M - 1) < IMG_H);
  assign acc = req_valid && in_range;

  // ---- horizontal decode (shared by all blocks) ----
  logic [GBW-1:0] gwl_base;
  logic [1:0]     lwlsl [N];
  logic [1:0]     pval  [N];
  logic [1:0]     psel  [N][2];

  y_decoder #(.N(N), .IMG_W(IMG_W)) u_ydec (
    .x        (req_x),
    .hsub     (hsub),
    .gwl_base (gwl_base),
    .lwlsl    (lwlsl),
    .pval     (pval),
    .psel     (psel)
  );

  // ---- vertical decode ----
  logic [LW-1:0] line     [M];
  logic [1:0]    blk_en   [M];
  logic [BW-1:0] row_bank [M];
  logic          row_side [M];

  line_mapper #(.M(M), .IMG_H(IMG_H)) u_lmap (
    .y        (req_y),
    .vsub     (vsub),
    .line     (line),
    .blk_en   (blk_en),
    .row_bank (row_bank),
    .row_side (row_side)
  );

  // ---- request of the previous cycle, for the read alignment ----
  logic [LN-1:0] x_lo_q;
  logic           hsub_q;
  logic [BW-1:0]  row_bank_q [M];
  logic           row_side_q [M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      req_err  <= 1'b0;
      x_lo_q   <= '0;
      hsub_q   <= 1'b0;
      for (int i = 0; i < M; i++) begin
        row_bank_q[i] <= '0;
        row_side_q[i] <= 1'b0;
      end
    end else begin
      rd_valid <= acc && !req_we;
      req_err  <= req_valid && !in_range;
      if (acc && !req_we) begin
        x_lo_q     <= req_x[LN-1:0];
        hsub_q     <= hsub;
        row_bank_q <= row_bank;
        row_side_q <= row_side;
      end
    end
  end

  // ---- banks and alignment ----
  pixel_t bank_rdata [M][2][N][2];
  pixel_t bank_wdata [M][2][N][2];

  rect_align #(.N(N), .M(M)) u_align (
    .rd_x_lo     (x_lo_q),
    .rd_hsub     (hsub_q),
    .rd_row_bank (row_bank_q),
    .rd_row_side (row_side_q),
    .bank_rdata  (bank_rdata),
    .rdata       (rdata),
    .wr_x_lo     (req_x[LN-1:0]),
    .wr_hsub     (hsub),
    .wr_row_bank (row_bank),
    .wr_row_side (row_side),
    .wdata       (wdata),
    .bank_wdata  (bank_wdata)
  );

  for (genvar b = 0; b < M; b++) begin : g_bank
    sram_bank #(.N(N), .M(M), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_bank (
      .clk      (clk),
      .line     (line[b]),
      .gwl_base (gwl_base),
      .blk_en   (blk_en[b] & {2{acc}}),
      .we       (req_we),
      .lwlsl    (lwlsl),
      .pval     (pval),
      .psel     (psel),
      .wdata    (bank_wdata[b]),
      .rdata    (bank_rdata[b])
    );
  end

  // Both blocks of a bank must need the same line: the bank has one X-decoder.
  always_ff @(posedge clk) begin
    if (acc) begin
      for (int i = 0; i < M; i++)
        for (int k = 0; k < M; k++)
          if (row_bank[i] == row_bank[k])
            assert (((32'(req_y) + (vsub ? 2 : 1) * i) / (2 * M)) ==
                    ((32'(req_y) + (vsub ? 2 : 1) * k) / (2 * M)))
              else $error("two lines of one bank need different rows");
    end
  end

endmodule
