// Shared types and constants of the contrast stretching core.
//
// pixel_ctrl_t is the per-pixel control bundle that travels beside every
// pixel in raster-scan order: hStart/hEnd mark the first/last pixel of a
// line, vStart/vEnd the first/last pixel of a frame, and valid marks a cycle
// that carries a real pixel. The limit, LUT and fixed-point widths are the
// ones the design is built around: 8-bit luminance and limits, and a
// reciprocal table of 16-bit words with 15 fraction bits.
package cs_pkg;

  typedef struct packed {
    logic hStart;
    logic hEnd;
    logic vStart;
    logic vEnd;
    logic valid;
  } pixel_ctrl_t;

  localparam int unsigned PIX_W      = 8;   // luminance / limit width
  localparam int unsigned RECIP_W    = 16;  // reciprocal table word
  localparam int unsigned RECIP_FRAC = 15;  // fraction bits of that word
  localparam int unsigned PIX_MAX    = (1 << PIX_W) - 1;  // 255

  localparam pixel_ctrl_t CTRL_IDLE = '{default: 1'b0};

endpackage
