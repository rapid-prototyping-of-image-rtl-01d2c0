// Full-size testbench for contrast_stretch_ip: the IP at its default
// 640 x 480 frame size and 20-bit counters (1 % target = 3072 pixels),
// thirty frames: three clean ones (the second timed for one pixel per
// cycle), then twenty-five low-contrast frames in which the limits climb to
// the 1 % outliers and hold, one dark and one full-range frame, all with
// input bubbles and output stalls. Every output beat is compared with the
// reference model.
module tb_contrast_stretch_ip_full;
  logic clk = 1'b0;
  logic rst_n;
  logic [31:0] s_tdata, m_tdata;
  logic s_tvalid, s_tuser, s_tlast, s_tready;
  logic m_tvalid, m_tuser, m_tlast, m_tready;
  logic [7:0] h_low, h_high;

  always #5 clk = ~clk;

  contrast_stretch_ip dut (
    .clk(clk), .rst_n(rst_n),
    .s_tdata(s_tdata), .s_tvalid(s_tvalid), .s_tuser(s_tuser), .s_tlast(s_tlast), .s_tready(s_tready),
    .m_tdata(m_tdata), .m_tvalid(m_tvalid), .m_tuser(m_tuser), .m_tlast(m_tlast), .m_tready(m_tready),
    .h_low_o(h_low), .h_high_o(h_high)
  );

  cs_ip_harness #(
    .W(640), .H(480), .CLEAN(3), .N_KIND0(25), .N_KIND1(1), .N_KIND2(0), .N_KIND3(1),
    .REQUIRE_ALL(1'b0), .WATCHDOG(20000000)
  ) harness (
    .clk(clk), .rst_n(rst_n),
    .s_tdata(s_tdata), .s_tvalid(s_tvalid), .s_tuser(s_tuser), .s_tlast(s_tlast), .s_tready(s_tready),
    .m_tdata(m_tdata), .m_tvalid(m_tvalid), .m_tuser(m_tuser), .m_tlast(m_tlast), .m_tready(m_tready),
    .h_low(h_low), .h_high(h_high)
  );
endmodule
