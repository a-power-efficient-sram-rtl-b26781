// ime_search_tb: integer-pel motion estimation over the search window buffer.
//
// The buffer (default size, 320x160) is loaded with a random picture. A current block is
// cut out of that picture at a known position, and a full search over +-8 pixels around it
// is run for four block shapes: a 16x16 frame block (integer-pel form), a 16x16 field block
// (vertically sub-sampled form, every other line), a 16x16 block on the 2:1 decimated
// picture (horizontally and vertically sub-sampled form), a 16x16 block on the horizontally
// decimated picture, and a 16x32 frame block. Each candidate is fetched as 8x8 tiles,
// one request per clock with no gaps. The testbench checks every returned tile against its
// copy of the picture, that data come back on every cycle of the stream (one rectangle per
// cycle, one cycle latency), and that the sum of absolute differences is lowest, and zero,
// at the true displacement.
module ime_search_tb;
  import swb_pkg::*;

  localparam int unsigned N = 8, M = 8, W = 320, H = 160;
  localparam int R = 8;                   // search range +-R

  logic         clk = 1'b0;
  logic         rst_n;
  logic         req_valid, req_we;
  logic [8:0]   req_x;
  logic [7:0]   req_y;
  access_form_e req_form;
  pixel_t       wdata [M][N];
  logic         rd_valid, req_err;
  pixel_t       rdata [M][N];

  rect_sram dut (.*);

  always #5 clk = ~clk;

  pixel_t img [W][H];
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // requests in flight: x, y, form, candidate index, tile row/col offsets in block pixels
  typedef struct {
    int x, y, f, cand, br, bc;
  } inflight_t;
  inflight_t q [$];

  int     sad [(2*R+1)*(2*R+1)];
  pixel_t cur [32][16];
  int     reads_done;
  bit     stream_on;
  int     gaps;

  // monitor: compares each returned rectangle and accumulates the SAD of its candidate
  always @(posedge clk) begin
    #1;
    if (rd_valid) begin
      inflight_t e;
      int sx, sy;
      bit bad;
      e = q.pop_front();
      sx = e.f[0] ? 2 : 1;
      sy = e.f[1] ? 2 : 1;
      bad = 0;
      for (int i = 0; i < M; i++)
        for (int c = 0; c < N; c++) begin
          if (rdata[i][c] != img[e.x + sx * c][e.y + sy * i]) bad = 1;
          sad[e.cand] += (int'(rdata[i][c]) > int'(cur[e.br + i][e.bc + c])) ?
                         int'(rdata[i][c]) - int'(cur[e.br + i][e.bc + c]) :
                         int'(cur[e.br + i][e.bc + c]) - int'(rdata[i][c]);
        end
      checks++;
      if (bad) begin
        failures++;
        if (failures < 5) $display("tile mismatch at (%0d,%0d) form %0d", e.x, e.y, e.f);
      end
      reads_done++;
    end else if (stream_on) begin
      gaps++;
    end
  end

  task automatic write_tile(int x, int y);
    req_valid = 1'b1; req_we = 1'b1; req_x = 9'(x); req_y = 8'(y); req_form = FORM_INT;
    for (int i = 0; i < M; i++)
      for (int c = 0; c < N; c++) wdata[i][c] = img[x + c][y + i];
    @(negedge clk);
  endtask

  // full search for a block of bw x bh sampled pixels in form f, true position (cx, cy)
  task automatic search(int f, int bw, int bh, int cx, int cy, string name);
    int sx = f[0] ? 2 : 1, sy = f[1] ? 2 : 1;
    int best, best_sad, nreq;
    longint t0, t1;
    for (int r = 0; r < bh; r++)
      for (int c = 0; c < bw; c++) cur[r][c] = img[cx + sx * c][cy + sy * r];
    for (int k = 0; k < (2*R+1)*(2*R+1); k++) sad[k] = 0;
    nreq = 0;
    reads_done = 0;
    gaps = 0;
    t0 = $time;
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++)
        for (int br = 0; br < bh; br += M)
          for (int bc = 0; bc < bw; bc += N) begin
            inflight_t e;
            e.x = cx + dx + sx * bc; e.y = cy + dy + sy * br; e.f = f;
            e.cand = (dy + R) * (2*R+1) + (dx + R); e.br = br; e.bc = bc;
            q.push_back(e);
            req_valid = 1'b1; req_we = 1'b0; req_form = access_form_e'(f);
            req_x = 9'(e.x); req_y = 8'(e.y);
            nreq++;
            @(negedge clk);
            stream_on = 1'b1;
          end
    t1 = $time;
    req_valid = 1'b0;
    stream_on = 1'b0;
    @(negedge clk);
    checks++;
    if (reads_done != nreq || gaps != 0 || q.size() != 0) begin
      failures++;
      $display("%s: %0d requests, %0d returned, %0d gaps", name, nreq, reads_done, gaps);
    end
    best = 0; best_sad = sad[0];
    for (int k = 1; k < (2*R+1)*(2*R+1); k++)
      if (sad[k] < best_sad) begin best = k; best_sad = sad[k]; end
    checks++;
    if (best != R * (2*R+1) + R || best_sad != 0) begin
      failures++;
      $display("%s: best candidate %0d (sad %0d), expected the centre", name, best, best_sad);
    end
    $display("%s: %0d candidates, %0d tile reads in %0d cycles, best mv (%0d,%0d)",
             name, (2*R+1)*(2*R+1), nreq, int'((t1 - t0) / 10),
             best % (2*R+1) - R, best / (2*R+1) - R);
  endtask

  initial begin
    rst_n = 1'b0; req_valid = 1'b0; req_we = 1'b0; req_x = '0; req_y = '0;
    req_form = FORM_INT; stream_on = 1'b0;
    for (int i = 0; i < M; i++) for (int c = 0; c < N; c++) wdata[i][c] = '0;
    for (int a = 0; a < W; a++) for (int b = 0; b < H; b++) img[a][b] = pixel_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int yy = 0; yy < H; yy += M)
      for (int xx = 0; xx < W; xx += N) write_tile(xx, yy);
    req_valid = 1'b0;
    @(negedge clk);

    search(int'(FORM_INT),  16, 16, 150, 60, "16x16 frame");
    search(int'(FORM_VSUB), 16, 16, 101, 41, "16x16 field");
    search(int'(FORM_HV),   16, 16, 37,  30, "16x16 decimated");
    search(int'(FORM_HSUB), 16, 16, 203, 77, "16x16 h-decimated");
    search(int'(FORM_INT),  16, 32, 250, 90, "16x32 frame");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
