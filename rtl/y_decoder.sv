// y_decoder: column-side decoder for segmentation-free horizontal access.
//
// Pixels of a line are spread over the N segments of a block at intervals of N pixels:
// pixel x sits in segment x mod N as its k-th pixel, k = x / N. Each GWL holds two of those
// pixels per segment (GWL w = k / 2, slot t = k mod 2), and even and odd GWLs use separate
// bit-line halves of the segment (half h = w mod 2). An N-pixel run (stride 1) or an
// N-pixel stride-2 run spans at most two neighbouring GWLs, w0 = (x / N) / 2 and w0 + 1,
// which the modified X-decoder raises together, so each segment sees four pixels. This
// decoder produces:
//   gwl_base    - w0, the GWL index inside the line handed to the X-decoder,
//   lwlsl[j][h] - the 2N local word-line select lines: segment j needs its half h,
//   pval[j][p]  - read-circuit port p of segment j carries a pixel of the rectangle,
//   psel[j][p]  - which of the four exposed pixels, as {h, t}, port p carries.
// Each segment carries at most two pixels of a rectangle: one (port 0) at stride 1, two at
// stride 2, where rectangle column c uses port (2c) / N. The LWLSL count (2N), the GWL pair
// and the two-of-four read circuit follow the document; the exact placement of pixels in
// slots and halves is this design's reading of it. Combinational.
module y_decoder
  import swb_pkg::*;
#(
  parameter int unsigned N     = N_DEF,
  parameter int unsigned IMG_W = IMG_W_DEF,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned GPL  = IMG_W / (2 * N),
  localparam int unsigned GBW  = (GPL > 1) ? $clog2(GPL) : 1
) (
  input  logic [XW-1:0]  x,
  input  logic           hsub,
  output logic [GBW-1:0] gwl_base,
  output logic [1:0]     lwlsl [N],
  output logic [1:0]     pval  [N],
  output logic [1:0]     psel  [N][2]
);

  localparam int unsigned LN = $clog2(N);

  always_comb begin
    logic [LN+1:0] xi;   // x mod 4N is all the placement needs
    logic [1:0]    k;    // k mod 4: bit 1 = half h, bit 0 = slot t
    logic [LN-1:0] j;
    logic          p;    // read-circuit port
    gwl_base = GBW'((32'(x) >> LN) >> 1);
    for (int s = 0; s < N; s++) begin
      lwlsl[s]   = '0;
      pval[s]    = '0;
      psel[s][0] = '0;
      psel[s][1] = '0;
    end
    for (int c = 0; c < N; c++) begin
      xi = (LN+2)'(x) + (LN+2)'(hsub ? 2 * c : c);
      j  = xi[LN-1:0];
      k  = xi[LN+1:LN];
      p  = hsub && (2 * c >= N);
      lwlsl[j][k[1]] = 1'b1;
      pval[j][p]     = 1'b1;
      psel[j][p]     = k;
    end
  end

endmodule
