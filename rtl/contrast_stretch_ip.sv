// Contrast stretching IP core with AXI4-Stream video ports.
//
// The core stretches the luminance of a video stream so that, frame by
// frame, its useful range [h_low, h_high] (all but 1 % of pixels at each
// end) fills the full 8-bit range [0, 255]. The limits are tracked online,
// one step per frame, from counts taken while the previous frame streamed
// through; no frame or histogram is stored.
//
// Input stream: 32-bit beats, one pixel each, R in bits [7:0], G in [15:8],
// B in [23:16]; bits [31:24] (alpha/transparency) are ignored. tuser marks
// the first pixel of a frame, tlast the last pixel of a line. A line and row
// counter rebuild the hStart/hEnd/vStart/vEnd control bundle the core uses;
// vEnd is the tlast of row FRAME_H-1.
// Output stream: the stretched luminance Y replicated on R, G and B, alpha
// 0xFF (opaque), with tuser/tlast carried through the pipeline.
//
// Flow control: the whole pipeline advances on ce = m_tready | !m_tvalid,
// and s_tready = ce, so a stalled output freezes every stage and a bubble
// at the output lets the pipeline refill. One pixel per cycle, latency 6.
//
// hStart and vEnd are rebuilt for completeness of the control bundle; the
// core uses only valid, vStart and hEnd, so the lint notes on unused bits
// of the bundle are expected.
//
// The AXI4-Stream video ports, the four 8-bit channels per beat with an
// unused transparency channel and the 640 x 480 frame follow the original design.
// The byte order of the channels, the grey RGB output, the stall scheme and
// the row counter are this implementation's choices.
module contrast_stretch_ip
  import cs_pkg::*;
#(
  parameter int unsigned FRAME_W = 640,
  parameter int unsigned FRAME_H = 480,
  parameter int unsigned P1_PCT  = 1,
  parameter int unsigned P2_PCT  = 1,
  parameter int unsigned CNT_W   = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Stream video in
  input  logic [31:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tuser,
  input  logic        s_tlast,
  output logic        s_tready,
  // AXI4-Stream video out
  output logic [31:0] m_tdata,
  output logic        m_tvalid,
  output logic        m_tuser,
  output logic        m_tlast,
  input  logic        m_tready,
  // Limits in force, for observation
  output logic [7:0]  h_low_o,
  output logic [7:0]  h_high_o
);

  localparam int unsigned ROW_W = (FRAME_H > 1) ? $clog2(FRAME_H) : 1;

  logic        ce;
  logic        beat;
  logic        at_line_start_q;
  logic [ROW_W-1:0] row_q;
  logic [ROW_W-1:0] row_now;
  pixel_ctrl_t ctrl_in;
  pixel_ctrl_t ctrl_out;
  logic [PIX_W-1:0] y_out;

  assign ce       = m_tready || !m_tvalid;
  assign s_tready = ce;
  assign beat     = s_tvalid && ce;

  // Row of the current beat: tuser restarts the frame at row 0.
  always_comb begin
    row_now        = s_tuser ? '0 : row_q;
    ctrl_in.valid  = beat;
    ctrl_in.vStart = beat && s_tuser;
    ctrl_in.hStart = beat && (s_tuser || at_line_start_q);
    ctrl_in.hEnd   = beat && s_tlast;
    ctrl_in.vEnd   = beat && s_tlast && (row_now == ROW_W'(FRAME_H - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q           <= '0;
      at_line_start_q <= 1'b1;
    end else if (beat) begin
      at_line_start_q <= s_tlast;
      if (s_tlast) row_q <= (row_now == ROW_W'(FRAME_H - 1)) ? '0 : row_now + 1'b1;
      else         row_q <= row_now;
    end
  end

  contrast_stretch_hw #(
    .FRAME_W (FRAME_W),
    .FRAME_H (FRAME_H),
    .P1_PCT  (P1_PCT),
    .P2_PCT  (P2_PCT),
    .CNT_W   (CNT_W)
  ) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .ce       (ce),
    .r_i      (s_tdata[7:0]),
    .g_i      (s_tdata[15:8]),
    .b_i      (s_tdata[23:16]),
    .ctrl_i   (ctrl_in),
    .y_o      (y_out),
    .ctrl_o   (ctrl_out),
    .h_low_o  (h_low_o),
    .h_high_o (h_high_o)
  );

  assign m_tvalid = ctrl_out.valid;
  assign m_tuser  = ctrl_out.vStart;
  assign m_tlast  = ctrl_out.hEnd;
  assign m_tdata  = {8'hFF, y_out, y_out, y_out};

  // AXI4-Stream rule: a beat offered and not taken stays unchanged.
  logic        stalled_q;
  logic [33:0] held_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stalled_q <= 1'b0;
      held_q    <= '0;
    end else begin
      stalled_q <= m_tvalid && !m_tready;
      held_q    <= {m_tuser, m_tlast, m_tdata};
      if (stalled_q)
        assert (m_tvalid && held_q == {m_tuser, m_tlast, m_tdata})
          else $error("output beat changed while stalled");
    end
  end

endmodule
