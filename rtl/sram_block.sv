// sram_block: one left or right block of a bank.
//
// The block is cut into N segments; segment j holds the pixels x with x mod N = j. Every
// global word line (GWL) runs across all segments, and in each segment a local word line
// (LWL) is the AND of the GWL with that segment's local word-line select line (LWLSL).
// Even and odd GWLs connect to separate bit-line halves of a segment, two pixels each, so
// when the modified X-decoder raises a GWL pair (w, w+1) a segment exposes four pixels and
// its read circuit passes two of them to its two ports. This gives any N consecutive or N
// stride-2 pixels of a line in one access with a single X-decoder, as the document
// describes. Writes use the same path in reverse: port p's pixel goes to the cell psel
// names.
//
// Interface: gwl is the bank's GWL vector already ANDed with this block's block control
// signal; lwlsl, pval and psel come from the Y-decoder. Each segment half is an
// lwl_column whose row is the active GWL of that parity; the row is recovered from the
// GWL vector with an encoder (at most one GWL per parity is active).
// Timing: controls are sampled at the rising edge; the cells' output registers load then,
// and rdata[j][p] is the read circuit's pick from them using the registered psel. rdata
// holds until the next read of that segment.
module sram_block
  import swb_pkg::*;
#(
  parameter int unsigned N    = N_DEF,
  parameter int unsigned NGWL = 200,
  localparam int unsigned RH  = NGWL / 2,
  localparam int unsigned RW  = (RH > 1) ? $clog2(RH) : 1
) (
  input  logic            clk,
  input  logic [NGWL-1:0] gwl,
  input  logic [1:0]      lwlsl [N],
  input  logic [1:0]      pval  [N],
  input  logic [1:0]      psel  [N][2],
  input  logic            we,
  input  pixel_t          wdata [N][2],
  output pixel_t          rdata [N][2]
);

  logic [RW-1:0] row [2];
  logic [1:0]    act;

  // Active row per bit-line half: GWL 2r+h belongs to row r of half h.
  always_comb begin
    for (int h = 0; h < 2; h++) begin
      row[h] = '0;
      act[h] = 1'b0;
      for (int r = 0; r < RH; r++) begin
        if (gwl[2*r+h]) begin
          row[h] = RW'(r);
          act[h] = 1'b1;
        end
      end
    end
  end

  // The X-decoder raises at most two adjacent GWLs, so each bit-line half sees at most
  // one active row; two rows on one bit line would be a read conflict.
  always_ff @(posedge clk) begin
    for (int h = 0; h < 2; h++) begin
      int unsigned n_on;
      n_on = 0;
      for (int r = 0; r < RH; r++) n_on += 32'(gwl[2*r+h]);
      assert (n_on <= 1) else $error("%0d GWLs active on bit-line half %0d", n_on, h);
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_seg
    logic [1:0] lwl_on;
    pixel_t     cell_q [2][2];   // [half][slot], registered
    logic [1:0] psel_q [2];

    for (genvar h = 0; h < 2; h++) begin : g_half
      logic [1:0] wen;
      pixel_t     wd [2];
      always_comb begin
        for (int t = 0; t < 2; t++) begin
          wen[t] = 1'b0;
          wd[t]  = '0;
          for (int p = 0; p < 2; p++) begin
            if (pval[j][p] && psel[j][p] == {1'(h), 1'(t)}) begin
              wen[t] = 1'b1;
              wd[t]  = wdata[j][p];
            end
          end
        end
      end
      assign lwl_on[h] = act[h] & lwlsl[j][h];   // LWL = GWL AND LWLSL
      lwl_column #(.ROWS(RH)) u_col (
        .clk   (clk),
        .en    (lwl_on[h]),
        .we    (we),
        .row   (row[h]),
        .wen   (wen),
        .wdata (wd),
        .rdata (cell_q[h])
      );
    end

    // read circuit: two of the four exposed pixels
    always_ff @(posedge clk) begin
      if (|lwl_on && !we) psel_q <= psel[j];
    end
    for (genvar p = 0; p < 2; p++) begin : g_port
      assign rdata[j][p] = cell_q[psel_q[p][1]][psel_q[p][0]];
    end
  end

endmodule
