// sram_block_tb: one block driven directly at its word-line level.
// The testbench raises GWL pairs (g, g+1) itself, sets the LWLSLs and the two read-circuit
// ports of every segment at random (0, 1 or 2 ports, each on a distinct one of the four
// exposed pixels), and keeps a reference of every cell. Reads are checked on the cycle
// after the request. Accesses with all GWLs low (block control off) must change nothing.
module sram_block_tb;
  import swb_pkg::*;
  localparam int unsigned N = 8, NGWL = 200;

  logic            clk = 1'b0;
  logic [NGWL-1:0] gwl;
  logic [1:0]      lwlsl [N];
  logic [1:0]      pval  [N];
  logic [1:0]      psel  [N][2];
  logic            we;
  pixel_t          wdata [N][2];
  pixel_t          rdata [N][2];

  sram_block #(.N(N), .NGWL(NGWL)) dut (.*);

  always #5 clk = ~clk;

  pixel_t cells [NGWL][N][2];    // [gwl][segment][slot]
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one access: GWL pair at g0 (or none if off); per segment, ports on positions pos[j][p]
  task automatic access(bit w, int g0, bit off, int nports [N], logic [1:0] pos [N][2]);
    pixel_t exp_r [N][2];
    int g;
    gwl = '0;
    if (!off) begin
      gwl[g0] = 1'b1;
      if (g0 + 1 < NGWL) gwl[g0+1] = 1'b1;
    end
    we = w;
    for (int j = 0; j < N; j++) begin
      lwlsl[j] = '0;
      pval[j]  = '0;
      for (int p = 0; p < 2; p++) begin
        psel[j][p]  = pos[j][p];
        wdata[j][p] = pixel_t'($urandom);
        if (p < nports[j]) begin
          pval[j][p] = 1'b1;
          lwlsl[j][pos[j][p][1]] = 1'b1;
        end
      end
    end
    @(posedge clk);
    for (int j = 0; j < N; j++)
      for (int p = 0; p < nports[j]; p++) begin
        g = (g0 % 2 == int'(pos[j][p][1])) ? g0 : g0 + 1;
        if (w && !off) cells[g][j][pos[j][p][0]] = wdata[j][p];
        exp_r[j][p] = cells[g][j][pos[j][p][0]];
      end
    #1;
    if (!w && !off)
      for (int j = 0; j < N; j++)
        for (int p = 0; p < nports[j]; p++) begin
          checks++;
          if (rdata[j][p] !== exp_r[j][p]) begin
            failures++;
            if (failures < 5) $display("seg %0d port %0d: got %h exp %h", j, p, rdata[j][p], exp_r[j][p]);
          end
        end
    @(negedge clk);
  endtask

  initial begin
    int nports [N];
    logic [1:0] pos [N][2];
    int g0;
    gwl = '0;
    we  = 1'b0;
    for (int j = 0; j < N; j++) begin
      lwlsl[j] = '0; pval[j] = '0; psel[j][0] = '0; psel[j][1] = '0;
      wdata[j][0] = '0; wdata[j][1] = '0;
    end
    @(negedge clk);
    // fill: every GWL pair (2r, 2r+1), all four pixels of every segment
    for (int r = 0; r < NGWL / 2; r++)
      for (int half = 0; half < 2; half++) begin
        for (int j = 0; j < N; j++) begin
          nports[j] = 2;
          pos[j][0] = {1'(half), 1'b0};
          pos[j][1] = {1'(half), 1'b1};
        end
        access(1'b1, 2 * r, 1'b0, nports, pos);
      end
    // random traffic
    for (int n = 0; n < 4000; n++) begin
      g0 = $urandom_range(0, NGWL - 2);
      for (int j = 0; j < N; j++) begin
        nports[j] = $urandom_range(0, 2);
        pos[j][0] = 2'($urandom_range(0, 3));
        pos[j][1] = pos[j][0] ^ 2'($urandom_range(1, 3));
      end
      access($urandom_range(0, 3) == 0, g0, $urandom_range(0, 9) == 0, nports, pos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
