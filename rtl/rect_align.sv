// rect_align: alignment network between the banks and the n x m rectangle.
//
// Rectangle element [i][c] is pixel (x + c*sx, y + i*sy). Row i lives in block
// (row_bank[i], row_side[i]) as given by line_mapper. Column c lives in segment
// (x + c*sx) mod N and travels on read-circuit port (c*sx) / N of that segment: port 0 at
// stride 1, ports 0 and 1 at stride 2. Both depend only on x mod N and the horizontal form.
// Read direction: picks rdata[i][c] out of the port outputs of all blocks.
// Write direction: steers wdata[i][c] to the block port that stores it; ports that carry
// nothing get zero (they are not enabled, so the value is not used).
// The two directions have their own selects: the write side is driven by the current
// request, the read side by the request of the previous cycle, whose data the banks
// return. The document does not describe this network; it is a plain multiplexer network
// chosen by this design so that pixels appear in raster order. Combinational.
module rect_align
  import swb_pkg::*;
#(
  parameter int unsigned N   = N_DEF,
  parameter int unsigned M   = M_DEF,
  localparam int unsigned LN = $clog2(N),
  localparam int unsigned BW = (M > 1) ? $clog2(M) : 1
) (
  // read side
  input  logic [LN-1:0] rd_x_lo,
  input  logic          rd_hsub,
  input  logic [BW-1:0] rd_row_bank [M],
  input  logic          rd_row_side [M],
  input  pixel_t        bank_rdata  [M][2][N][2],
  output pixel_t        rdata       [M][N],
  // write side
  input  logic [LN-1:0] wr_x_lo,
  input  logic          wr_hsub,
  input  logic [BW-1:0] wr_row_bank [M],
  input  logic          wr_row_side [M],
  input  pixel_t        wdata       [M][N],
  output pixel_t        bank_wdata  [M][2][N][2]
);

  // segment and port of rectangle column c, for each direction
  logic [LN-1:0] rd_seg  [N], wr_seg  [N];
  logic          rd_port [N], wr_port [N];

  always_comb begin
    for (int c = 0; c < N; c++) begin
      rd_seg[c]  = rd_x_lo + LN'(rd_hsub ? 2 * c : c);
      wr_seg[c]  = wr_x_lo + LN'(wr_hsub ? 2 * c : c);
      rd_port[c] = rd_hsub && (2 * c >= N);
      wr_port[c] = wr_hsub && (2 * c >= N);
    end
  end

  always_comb begin
    for (int i = 0; i < M; i++)
      for (int c = 0; c < N; c++)
        rdata[i][c] = bank_rdata[rd_row_bank[i]][rd_row_side[i]][rd_seg[c]][rd_port[c]];
  end

  always_comb begin
    for (int b = 0; b < M; b++)
      for (int s = 0; s < 2; s++)
        for (int j = 0; j < N; j++)
          for (int p = 0; p < 2; p++)
            bank_wdata[b][s][j][p] = '0;
    for (int i = 0; i < M; i++)
      for (int c = 0; c < N; c++)
        bank_wdata[wr_row_bank[i]][wr_row_side[i]][wr_seg[c]][wr_port[c]] = wdata[i][c];
  end

endmodule
