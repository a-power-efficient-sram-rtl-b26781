// rect_sram_wide_tb: the same end-to-end test as rect_sram_tb, on a wide configuration:
// 32x32 rectangles (1024 pixels per access) out of a 128x128 picture, the smallest picture
// whose width and height are multiples of 2n and 2m. It shows the parameterised RTL
// scaling towards the much higher parallelism of ultra-high-definition motion estimation;
// with N = M = 64 and a 256x256 picture (4096 pixels per access) the same test also
// passes, but takes several minutes to compile.
//
// A reference copy of the image lives in the testbench. The buffer is first filled with
// 8x8 integer-pel writes on an 8-pixel grid, then hit with a stream of back-to-back
// random requests: reads in all four forms at random positions (checked one cycle later
// against the reference, including the one-cycle latency of rd_valid), unaligned writes
// in all four forms (which update the reference), and requests that leave the image
// (which must raise req_err and change nothing). Coverage counters record every form, reads
// that straddle two GWLs, banks whose two blocks are both used, rectangles that wrap
// around the 2M-line block group, and dropped requests; a mechanism never seen counts as a
// failure.
module rect_sram_wide_tb;
  import swb_pkg::*;

  localparam int unsigned N = 32, M = 32, W = 128, H = 128;
  localparam int unsigned NREQ = 2000;
  localparam int unsigned XW = $clog2(W), YW = $clog2(H);

  logic         clk = 1'b0;
  logic         rst_n;
  logic         req_valid, req_we;
  logic [XW-1:0] req_x;
  logic [YW-1:0] req_y;
  access_form_e req_form;
  pixel_t       wdata [M][N];
  logic         rd_valid, req_err;
  pixel_t       rdata [M][N];

  rect_sram #(.N(N), .M(M), .IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  pixel_t img [W][H];
  int checks = 0, failures = 0;

  // coverage
  int cov_form_rd [4];
  int cov_form_wr [4];
  int cov_gwl_straddle, cov_both_blocks, cov_group_wrap, cov_err, cov_b2b;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outcome of the request issued in the previous cycle
  logic   exp_rd, exp_err;
  pixel_t exp_rect [M][N];

  task automatic check_prev();
    checks++;
    if (rd_valid !== exp_rd || req_err !== exp_err) begin
      failures++;
      $display("latency/flag mismatch: rd_valid=%0b exp=%0b req_err=%0b exp=%0b",
               rd_valid, exp_rd, req_err, exp_err);
    end
    if (exp_rd) begin
      checks++;
      if (rdata != exp_rect) begin
        failures++;
        if (failures < 10) $display("read data mismatch");
      end
    end
  endtask

  function automatic bit fits(int x, int y, int f);
    int sx = f[0] ? 2 : 1, sy = f[1] ? 2 : 1;
    return (x + sx * (N - 1) < W) && (y + sy * (M - 1) < H);
  endfunction

  // drive one request (at negedge), then check it after the next posedge
  task automatic issue(bit we, int x, int y, int f, bit valid = 1'b1);
    int sx = f[0] ? 2 : 1, sy = f[1] ? 2 : 1;
    bit ok = fits(x, y, f);
    req_valid = valid;
    req_we    = we;
    req_x     = XW'(x);
    req_y     = YW'(y);
    req_form  = access_form_e'(f);
    for (int i = 0; i < M; i++)
      for (int c = 0; c < N; c++)
        wdata[i][c] = pixel_t'($urandom);
    @(posedge clk);
    // compute expectations from the reference as it was before this request
    exp_rd  = valid && ok && !we;
    exp_err = valid && !ok;
    if (exp_rd)
      for (int i = 0; i < M; i++)
        for (int c = 0; c < N; c++)
          exp_rect[i][c] = img[x + sx * c][y + sy * i];
    if (valid && ok && we)
      for (int i = 0; i < M; i++)
        for (int c = 0; c < N; c++)
          img[x + sx * c][y + sy * i] = wdata[i][c];
    if (valid && ok) begin
      if (we) cov_form_wr[f]++;
      else    cov_form_rd[f]++;
      if (!we && (((x / N) / 2) != (((x + sx * (N - 1)) / N) / 2))) cov_gwl_straddle++;
      if (sy == 1 && (y % 2 == 0 || (y % (2 * M)) != 2 * M - 1)) cov_both_blocks++;
      if ((y / (2 * M)) != ((y + sy * (M - 1)) / (2 * M))) cov_group_wrap++;
    end
    if (valid && !ok) cov_err++;
    #1;
    check_prev();
    @(negedge clk);
  endtask

  initial begin
    int x, y, f, kind;
    bit prev_rd;
    rst_n     = 1'b0;
    req_valid = 1'b0;
    req_we    = 1'b0;
    req_x     = '0;
    req_y     = '0;
    req_form  = FORM_INT;
    for (int i = 0; i < M; i++)
      for (int c = 0; c < N; c++) wdata[i][c] = '0;
    for (int a = 0; a < W; a++)
      for (int b = 0; b < H; b++) img[a][b] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // fill the buffer on the 8x8 grid
    for (int yy = 0; yy < H; yy += M)
      for (int xx = 0; xx < W; xx += N)
        issue(1'b1, xx, yy, 0);

    // random traffic
    prev_rd = 1'b0;
    for (int r = 0; r < NREQ; r++) begin
      kind = $urandom_range(0, 99);
      f    = $urandom_range(0, 3);
      x    = $urandom_range(0, W - 1 - (f[0] ? 2 : 1) * (N - 1));
      y    = $urandom_range(0, H - 1 - (f[1] ? 2 : 1) * (M - 1));
      if (kind < 70) begin
        if (prev_rd) cov_b2b++;
        issue(1'b0, x, y, f);
        prev_rd = 1'b1;
      end else if (kind < 92) begin
        issue(1'b1, x, y, f);
        prev_rd = 1'b0;
      end else if (kind < 97) begin
        // out of range: push the rectangle past the right or bottom edge
        if (kind[0]) x = $urandom_range(W - (f[0] ? 2 : 1) * (N - 1), W - 1);
        else         y = $urandom_range(H - (f[1] ? 2 : 1) * (M - 1), H - 1);
        issue($urandom_range(0, 1) == 1, x, y, f);
        prev_rd = 1'b0;
      end else begin
        issue(1'b0, x, y, f, 1'b0);   // idle cycle
        prev_rd = 1'b0;
      end
    end

    // read the whole image back on the grid
    for (int yy = 0; yy < H; yy += M)
      for (int xx = 0; xx < W; xx += N)
        issue(1'b0, xx, yy, 0);
    issue(1'b0, 0, 0, 0, 1'b0);

    for (int k = 0; k < 4; k++) begin
      $display("form %0d: reads=%0d writes=%0d", k, cov_form_rd[k], cov_form_wr[k]);
      if (cov_form_rd[k] == 0 || cov_form_wr[k] == 0) failures++;
    end
    $display("gwl straddle=%0d both blocks=%0d group wrap=%0d out-of-range=%0d back-to-back=%0d",
             cov_gwl_straddle, cov_both_blocks, cov_group_wrap, cov_err, cov_b2b);
    if (cov_gwl_straddle == 0 || cov_both_blocks == 0 || cov_group_wrap == 0 ||
        cov_err == 0 || cov_b2b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
