// End-to-end testbench for contrast_stretch_ip on small 32 x 16 frames
// (1 % target = 5 pixels). 263 frames of four kinds drive the limits up,
// down, to a standstill and across each other, with input bubbles and
// output stalls; every output beat is compared with the reference model,
// and one clean frame is timed for the one-pixel-per-cycle rate.
module tb_contrast_stretch_ip;
  logic clk = 1'b0;
  logic rst_n;
  logic [31:0] s_tdata, m_tdata;
  logic s_tvalid, s_tuser, s_tlast, s_tready;
  logic m_tvalid, m_tuser, m_tlast, m_tready;
  logic [7:0] h_low, h_high;

  always #5 clk = ~clk;

  contrast_stretch_ip #(.FRAME_W(32), .FRAME_H(16)) dut (
    .clk(clk), .rst_n(rst_n),
    .s_tdata(s_tdata), .s_tvalid(s_tvalid), .s_tuser(s_tuser), .s_tlast(s_tlast), .s_tready(s_tready),
    .m_tdata(m_tdata), .m_tvalid(m_tvalid), .m_tuser(m_tuser), .m_tlast(m_tlast), .m_tready(m_tready),
    .h_low_o(h_low), .h_high_o(h_high)
  );

  cs_ip_harness #(.W(32), .H(16)) harness (
    .clk(clk), .rst_n(rst_n),
    .s_tdata(s_tdata), .s_tvalid(s_tvalid), .s_tuser(s_tuser), .s_tlast(s_tlast), .s_tready(s_tready),
    .m_tdata(m_tdata), .m_tvalid(m_tvalid), .m_tuser(m_tuser), .m_tlast(m_tlast), .m_tready(m_tready),
    .h_low(h_low), .h_high(h_high)
  );
endmodule
