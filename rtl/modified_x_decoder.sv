// modified_x_decoder: row decoder that drives two adjacent global word lines (GWLs).
//
// A plain one-hot decoder output dec[] is followed by one OR gate per line, so that
// gwl[i] = dec[i] | dec[i-1]: addressing row a raises GWL a and GWL a+1. This is what lets
// a block expose two neighbouring rows at once and read an 8-pixel run that straddles a row
// boundary in one cycle. The OR insertion follows the document; the treatment of the last
// row (it has no successor, so only it is raised) is this design's choice.
//
// Purely combinational. One instance per bank is shared by its left and right blocks.
module modified_x_decoder #(
  parameter int unsigned NGWL = 200,
  localparam int unsigned AW  = $clog2(NGWL)
) (
  input  logic            en,
  input  logic [AW-1:0]   addr,
  output logic [NGWL-1:0] gwl
);

  logic [NGWL-1:0] dec;

  always_comb begin
    dec = '0;
    if (en && (32'(addr) < NGWL)) dec[addr] = 1'b1;
  end

  // OR circuits: each GWL is also raised by the decoder output of the row before it.
  assign gwl = dec | {dec[NGWL-2:0], 1'b0};

endmodule
