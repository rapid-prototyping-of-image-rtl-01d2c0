// Online adaptive limits h_low / h_high for contrast stretching.
//
// No histogram is stored. While a frame streams past, two counters count
// the pixels darker than h_low and brighter than h_high. At the first pixel
// of the next frame (vStart with valid) each count is compared with the
// fixed target THRESH = p * pixels-per-frame (1 % of 640 x 480 = 3072):
//   h_low : count below it  < THRESH -> h_low  + STEP
//                           > THRESH -> h_low  - STEP,  = THRESH -> kept
//   h_high: count above it  < THRESH -> h_high - STEP
//                           > THRESH -> h_high + STEP,  = THRESH -> kept
// so each limit walks, one step per frame, towards the value that leaves
// p of the pixels outside it. Limits saturate at 0 and 255. After reset
// h_low is 0 and h_high 255, and the first vStart only starts counting.
// Frame n is stretched with the limits measured on frame n-1.
//
// Interface: luminance y_i with its pixel_ctrl_t, qualified by ce. h_low_o
// and h_high_o are the limits in force for the pixel on y_i in the same
// cycle: on the vStart pixel they already show the updated values
// (a combinational path from the counters), otherwise the registers.
// Timing: no latency; updates happen once per frame.
//
// The counters, the 8-bit limits, the 20-bit counts, the 0/255 start values,
// the step of one and the use of vStart and valid follow the original design. The
// exact moment of the update (the vStart pixel), the saturation of limits
// and counters, and the bypass are this implementation's choices.
module adaptive_limits
  import cs_pkg::*;
#(
  parameter int unsigned FRAME_W   = 640,
  parameter int unsigned FRAME_H   = 480,
  parameter int unsigned P1_PCT    = 1,   // outliers allowed below h_low, percent
  parameter int unsigned P2_PCT    = 1,   // outliers allowed above h_high, percent
  parameter int unsigned CNT_W     = 20,
  parameter int unsigned STEP      = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic [PIX_W-1:0]  y_i,
  input  pixel_ctrl_t       ctrl_i,
  output logic [PIX_W-1:0]  h_low_o,
  output logic [PIX_W-1:0]  h_high_o
);

  localparam longint unsigned PIXELS = longint'(FRAME_W) * longint'(FRAME_H);
  localparam logic [CNT_W-1:0] THRESH_LO = CNT_W'(PIXELS * P1_PCT / 100);
  localparam logic [CNT_W-1:0] THRESH_HI = CNT_W'(PIXELS * P2_PCT / 100);
  localparam logic [CNT_W-1:0] CNT_MAX   = '1;
  localparam logic [PIX_W:0]   LIM_MAX   = (PIX_W+1)'(PIX_MAX);

  logic [PIX_W-1:0] h_low_q, h_high_q;
  logic [CNT_W-1:0] cnt_lo_q, cnt_hi_q;
  logic             seen_frame_q;

  logic             frame_start;
  logic             update;
  logic [PIX_W-1:0] h_low_upd, h_high_upd;
  logic [PIX_W:0]   up_lo, up_hi;

  always_comb begin
    frame_start = ce && ctrl_i.valid && ctrl_i.vStart;
    update      = frame_start && seen_frame_q;

    up_lo = (PIX_W+1)'(h_low_q)  + (PIX_W+1)'(STEP);
    up_hi = (PIX_W+1)'(h_high_q) + (PIX_W+1)'(STEP);

    if (cnt_lo_q < THRESH_LO)
      h_low_upd = (up_lo > LIM_MAX) ? PIX_W'(PIX_MAX) : up_lo[PIX_W-1:0];
    else if (cnt_lo_q > THRESH_LO)
      h_low_upd = (h_low_q < PIX_W'(STEP)) ? '0 : h_low_q - PIX_W'(STEP);
    else
      h_low_upd = h_low_q;

    if (cnt_hi_q < THRESH_HI)
      h_high_upd = (h_high_q < PIX_W'(STEP)) ? '0 : h_high_q - PIX_W'(STEP);
    else if (cnt_hi_q > THRESH_HI)
      h_high_upd = (up_hi > LIM_MAX) ? PIX_W'(PIX_MAX) : up_hi[PIX_W-1:0];
    else
      h_high_upd = h_high_q;

    h_low_o  = update ? h_low_upd  : h_low_q;
    h_high_o = update ? h_high_upd : h_high_q;
  end

  logic below, above;
  always_comb begin
    below = (y_i < h_low_o);
    above = (y_i > h_high_o);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_low_q      <= '0;
      h_high_q     <= PIX_W'(PIX_MAX);
      cnt_lo_q     <= '0;
      cnt_hi_q     <= '0;
      seen_frame_q <= 1'b0;
    end else if (ce && ctrl_i.valid) begin
      if (ctrl_i.vStart) begin
        h_low_q      <= h_low_o;
        h_high_q     <= h_high_o;
        cnt_lo_q     <= CNT_W'(below);
        cnt_hi_q     <= CNT_W'(above);
        seen_frame_q <= 1'b1;
      end else begin
        if (below && cnt_lo_q != CNT_MAX) cnt_lo_q <= cnt_lo_q + 1'b1;
        if (above && cnt_hi_q != CNT_MAX) cnt_hi_q <= cnt_hi_q + 1'b1;
      end
    end
  end

endmodule
