// swb_pkg: shared constants and types of the rectangular-access search window SRAM.
//
// The default geometry is an 8x8 rectangle (n = m = 8) out of a 320x160 image of 8-bit
// pixels, stored in m banks of two blocks each. The access form encodes the four ways a
// rectangle can be fetched: integer-pel, horizontally sub-sampled, vertically sub-sampled,
// and both. Sub-sampling means a stride of two pixels (or lines) instead of one.
package swb_pkg;

  localparam int unsigned N_DEF     = 8;    // pixels per rectangle row (n), segments per block
  localparam int unsigned M_DEF     = 8;    // rows per rectangle (m), number of banks
  localparam int unsigned IMG_W_DEF = 320;  // image width held by the buffer
  localparam int unsigned IMG_H_DEF = 160;  // image height held by the buffer
  localparam int unsigned PIX_W     = 8;    // bits per pixel

  typedef logic [PIX_W-1:0] pixel_t;

  // bit 0: horizontal stride 2, bit 1: vertical stride 2
  typedef enum logic [1:0] {
    FORM_INT  = 2'b00,
    FORM_HSUB = 2'b01,
    FORM_VSUB = 2'b10,
    FORM_HV   = 2'b11
  } access_form_e;

endpackage
