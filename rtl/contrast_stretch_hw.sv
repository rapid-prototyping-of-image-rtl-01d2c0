// Contrast stretching core on a raster-scan pixel stream.
//
// An RGB pixel enters with its pixel_ctrl_t every cycle. rgb2intensity turns
// it into 8-bit luminance; the luminance then feeds, in parallel,
// adaptive_limits, which measures this frame to set the limits of the next
// one, and stretch_eq1, which stretches the pixel with the limits measured
// on the previous frame. No pixel is stored: each is seen exactly once.
//
// Interface: r/g/b_i plus ctrl_i in; 8-bit stretched luminance y_o plus
// ctrl_o out; h_low_o/h_high_o show the limits in force. ce low freezes
// every register (used for back-pressure by the stream wrapper).
// Timing: one pixel per cycle, latency 6 ce-qualified cycles
// (2 for the colour conversion, 4 for the stretch).
//
// The structure (colour conversion, limit tracker with two limit registers
// and two counters, stretch with a reciprocal table) follows the original design;
// the pipeline depths are this implementation's choices.
module contrast_stretch_hw
  import cs_pkg::*;
#(
  parameter int unsigned FRAME_W = 640,
  parameter int unsigned FRAME_H = 480,
  parameter int unsigned P1_PCT  = 1,
  parameter int unsigned P2_PCT  = 1,
  parameter int unsigned CNT_W   = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic [PIX_W-1:0]  r_i,
  input  logic [PIX_W-1:0]  g_i,
  input  logic [PIX_W-1:0]  b_i,
  input  pixel_ctrl_t       ctrl_i,
  output logic [PIX_W-1:0]  y_o,
  output pixel_ctrl_t       ctrl_o,
  output logic [PIX_W-1:0]  h_low_o,
  output logic [PIX_W-1:0]  h_high_o
);

  logic [PIX_W-1:0] luma;
  pixel_ctrl_t      luma_ctrl;

  rgb2intensity u_csc (
    .clk    (clk),
    .rst_n  (rst_n),
    .ce     (ce),
    .r_i    (r_i),
    .g_i    (g_i),
    .b_i    (b_i),
    .ctrl_i (ctrl_i),
    .y_o    (luma),
    .ctrl_o (luma_ctrl)
  );

  adaptive_limits #(
    .FRAME_W (FRAME_W),
    .FRAME_H (FRAME_H),
    .P1_PCT  (P1_PCT),
    .P2_PCT  (P2_PCT),
    .CNT_W   (CNT_W)
  ) u_limits (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (ce),
    .y_i      (luma),
    .ctrl_i   (luma_ctrl),
    .h_low_o  (h_low_o),
    .h_high_o (h_high_o)
  );

  stretch_eq1 u_stretch (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (ce),
    .p_i      (luma),
    .ctrl_i   (luma_ctrl),
    .h_low_i  (h_low_o),
    .h_high_i (h_high_o),
    .p_o      (y_o),
    .ctrl_o   (ctrl_o)
  );

endmodule
