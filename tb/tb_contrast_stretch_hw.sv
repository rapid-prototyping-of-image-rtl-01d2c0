// Self-checking testbench for contrast_stretch_hw, the pixel-stream core.
// Drives 16 x 8 frames (128 pixels, so the 1 % target is 1 pixel) of random
// colour pixels with bubbles (valid low) and stalls (ce low), predicts each
// output with cs_ref_pkg (luminance, limit tracker, stretch), and checks the
// output pixel, its control bundle, the limits shown and the 6-cycle latency.
module tb_contrast_stretch_hw;
  import cs_pkg::*;
  import cs_ref_pkg::*;

  localparam int W = 16;
  localparam int H = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b0;
  logic [7:0] r = '0, g = '0, b = '0;
  pixel_ctrl_t ctrl_i = CTRL_IDLE, ctrl_o;
  logic [7:0] y, h_low, h_high;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  contrast_stretch_hw #(.FRAME_W(W), .FRAME_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .r_i(r), .g_i(g), .b_i(b), .ctrl_i(ctrl_i),
    .y_o(y), .ctrl_o(ctrl_o), .h_low_o(h_low), .h_high_o(h_high)
  );

  typedef struct { int y; pixel_ctrl_t c; } exp_t;
  exp_t q[$];
  limit_tracker model;
  bit ce_at_edge = 1'b0;

  task automatic check_out();
    exp_t e;
    if (ce_at_edge && ctrl_o.valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        e = q.pop_front();
        if (int'(y) != e.y || ctrl_o != e.c) begin
          failures++;
          if (failures < 10) $display("FAIL: y=%0d ctrl=%b, expected %0d %b", y, ctrl_o, e.y, e.c);
        end
      end
    end
  endtask

  task automatic drive(input int rr, input int gg, input int bb, input pixel_ctrl_t c, input bit en);
    exp_t e;
    @(negedge clk);
    check_out();
    r = 8'(rr); g = 8'(gg); b = 8'(bb); ctrl_i = c; ce = en; ce_at_edge = en;
    if (c.valid && en) begin
      e.y = model.push(luma(rr, gg, bb), c.vStart);
      e.c = c;
      q.push_back(e);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, base, span, v;
    pixel_ctrl_t c;
    model = new(W * H);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Latency, with a lone pixel that starts a frame.
    c = CTRL_IDLE; c.valid = 1'b1; c.vStart = 1'b1; c.hStart = 1'b1;
    drive(200, 200, 200, c, 1'b1);
    @(negedge clk);
    ctrl_i = CTRL_IDLE;
    lat = 1;
    while (!ctrl_o.valid && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 6) begin failures++; $display("FAIL: latency %0d, expected 6", lat); end
    void'(q.pop_front());
    repeat (3) @(negedge clk);

    // Frames of narrow-range content whose range wanders from frame to frame.
    for (int f = 0; f < 150; f++) begin
      base = 40 + (f % 50);
      span = 30 + (f % 7) * 10;
      for (int i = 0; i < W * H; i++) begin
        c = '{hStart: (i % W) == 0, hEnd: (i % W) == W - 1, vStart: i == 0,
              vEnd: i == W * H - 1, valid: 1'b1};
        while ($urandom_range(0, 7) == 0)
          drive(0, 0, 0, ($urandom_range(0, 1) != 0) ? CTRL_IDLE : c, 1'b0);
        if ($urandom_range(0, 9) == 0) drive(0, 0, 0, CTRL_IDLE, 1'b1);
        v = base + $urandom_range(0, span);
        drive(v + $urandom_range(0, 10), v, v - $urandom_range(0, 10), c, 1'b1);
      end
    end
    repeat (10) drive(0, 0, 0, CTRL_IDLE, 1'b1);

    checks += 2;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    if (int'(h_low) != model.lo || int'(h_high) != model.hi) begin
      failures++; $display("FAIL: limits %0d/%0d, model %0d/%0d", h_low, h_high, model.lo, model.hi);
    end
    $display("limit moves: up %0d down %0d held %0d; final %0d/%0d",
             model.n_up, model.n_down, model.n_hold, h_low, h_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
