// Self-checking testbench for rgb2intensity.
// Checks the luminance of random and corner-case pixels against the BT.601
// weighted sum computed in real arithmetic (rounded to nearest; one code of
// difference is allowed only where the real value sits at a .5 boundary,
// and at most 5 such cases), checks that the control
// bundle travels with its pixel, that the latency is two cycles, and that
// ce low freezes the pipeline.
module tb_rgb2intensity;
  import cs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b0;
  logic [7:0] r, g, b;
  pixel_ctrl_t ctrl_i, ctrl_o;
  logic [7:0] y;

  int checks = 0;
  int failures = 0;
  int near_misses = 0;

  always #5 clk = ~clk;

  rgb2intensity dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .r_i(r), .g_i(g), .b_i(b),
    .ctrl_i(ctrl_i), .y_o(y), .ctrl_o(ctrl_o)
  );

  function automatic int ref_y(int rr, int gg, int bb, output bit near);
    real v;
    int  k;
    v = 0.299 * rr + 0.587 * gg + 0.114 * bb;
    k = int'($floor(v + 0.5));
    near = ((v - $floor(v)) > 0.49) && ((v - $floor(v)) < 0.51);
    return k;
  endfunction

  typedef struct { int y; bit near; logic hs; logic ve; } exp_t;
  exp_t q[$];
  bit   ce_at_edge = 1'b0;

  task automatic check_out();
    exp_t e;
    if (ce_at_edge && ctrl_o.valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: output with nothing expected");
      end else begin
        e = q.pop_front();
        if (int'(y) != e.y && !(e.near && (int'(y) - e.y == 1 || e.y - int'(y) == 1))) begin
          failures++;
          $display("FAIL: y=%0d expected %0d", y, e.y);
        end
        if (ctrl_o.hStart !== e.hs || ctrl_o.vEnd !== e.ve) begin
          failures++;
          $display("FAIL: control bundle did not follow its pixel");
        end
        if (int'(y) != e.y) near_misses++;
      end
    end
  endtask

  task automatic drive(input int rr, input int gg, input int bb, input bit v, input bit en);
    exp_t e;
    bit   nr;
    @(negedge clk);
    check_out();
    r = 8'(rr); g = 8'(gg); b = 8'(bb);
    ctrl_i = CTRL_IDLE;
    ctrl_i.valid  = v;
    ctrl_i.hStart = v && rr[0];
    ctrl_i.vEnd   = v && gg[0];
    ce = en;
    ce_at_edge = en;
    if (v && en) begin
      e.y = ref_y(rr, gg, bb, nr);
      e.near = nr;
      e.hs = ctrl_i.hStart;
      e.ve = ctrl_i.vEnd;
      q.push_back(e);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    r = 0; g = 0; b = 0; ctrl_i = CTRL_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Latency: one pixel, then count cycles until it appears.
    @(negedge clk);
    r = 8'd255; g = 8'd255; b = 8'd255; ctrl_i = CTRL_IDLE; ctrl_i.valid = 1'b1; ce = 1'b1;
    @(negedge clk);
    ctrl_i = CTRL_IDLE;
    lat = 1;
    while (!ctrl_o.valid && lat < 10) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 2) begin failures++; $display("FAIL: latency %0d, expected 2", lat); end
    checks++;
    if (y != 8'd255) begin failures++; $display("FAIL: white gave %0d", y); end
    repeat (3) @(negedge clk);

    // Corners.
    drive(0, 0, 0, 1, 1);
    drive(255, 0, 0, 1, 1);
    drive(0, 255, 0, 1, 1);
    drive(0, 0, 255, 1, 1);
    drive(255, 255, 255, 1, 1);
    drive(128, 128, 128, 1, 1);
    // Random stream with random stalls and bubbles.
    for (int i = 0; i < 5000; i++)
      drive($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255),
            ($urandom_range(0, 9) != 0), ($urandom_range(0, 4) != 0));
    repeat (6) drive(0, 0, 0, 0, 1);

    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d pixels never came out", q.size()); end
    checks++;
    $display("off-by-one results next to a .5 boundary: %0d", near_misses);
    if (near_misses > 5) begin failures++; $display("FAIL: %0d off-by-one results", near_misses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
