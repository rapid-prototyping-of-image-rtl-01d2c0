// Accuracy of the online hardware stretch against a full-precision software
// stretch. Three synthetic low-contrast stills are fed, one after the
// other, as a video of identical 64 x 48 frames (1 % target = 30 pixels):
// a washed-out one (luminance mostly 170..240), a dark one (10..80) and a
// flat one (100..150), each a smooth gradient plus fixed noise and 0.5 %
// outliers at either end. Each still runs for 260 frames so that the
// limits, which move one level per frame, have settled. On the last frame
// of each still, every output pixel is compared with the software result:
// limits from the frame's own histogram (the largest h_low with at most
// 1 % of pixels below it, the smallest h_high with at most 1 % above it),
// then (y - h_low) * 255 / (h_high - h_low) in real arithmetic, rounded
// and clipped. The mean error must stay within 3 and the largest within 10
// codes per pixel, the bounds reported for the original design.
module tb_accuracy_vs_software;
  import cs_pkg::*;
  import cs_ref_pkg::*;

  localparam int W = 64;
  localparam int H = 48;
  localparam int N = W * H;
  localparam int T = N / 100;
  localparam int FRAMES = 260;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] r = '0, g = '0, b = '0;
  pixel_ctrl_t ctrl_i = CTRL_IDLE, ctrl_o;
  logic [7:0] y, h_low, h_high;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  contrast_stretch_hw #(.FRAME_W(W), .FRAME_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .ce(1'b1), .r_i(r), .g_i(g), .b_i(b), .ctrl_i(ctrl_i),
    .y_o(y), .ctrl_o(ctrl_o), .h_low_o(h_low), .h_high_o(h_high)
  );

  int img_r[N], img_g[N], img_b[N], img_y[N];
  int sw_out[N];
  int sw_lo, sw_hi;
  bit measuring = 0;
  int out_idx = 0;
  longint err_sum = 0;
  int err_max = 0;

  function automatic int clip8(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // Build a still: gradient across [lo, hi] plus fixed noise, with T/2 dark and
  // T/2 bright outliers; then its software-stretched version.
  task automatic make_image(input int lo, input int hi);
    int hist[256];
    int v, acc;
    for (int i = 0; i < N; i++) begin
      v = lo + ((hi - lo) * ((i % W) + (i / W))) / (W + H - 2);
      v = clip8(v + $urandom_range(0, 10) - 5);
      if (i % (2 * N / T) == 3) v = clip8(lo - 40);
      if (i % (2 * N / T) == 17) v = clip8(hi + 10);
      img_r[i] = clip8(v + $urandom_range(0, 6) - 3);
      img_g[i] = v;
      img_b[i] = clip8(v + $urandom_range(0, 6) - 3);
      img_y[i] = luma(img_r[i], img_g[i], img_b[i]);
    end
    foreach (hist[k]) hist[k] = 0;
    for (int i = 0; i < N; i++) hist[img_y[i]]++;
    // Largest h_low with at most T pixels below it.
    acc = 0;
    sw_lo = 0;
    for (int x = 0; x < 256; x++) begin
      if (acc <= T) sw_lo = x;
      acc += hist[x];
    end
    // Smallest h_high with at most T pixels above it.
    acc = 0;
    sw_hi = 255;
    for (int x = 255; x >= 0; x--) begin
      if (acc <= T) sw_hi = x;
      acc += hist[x];
    end
    for (int i = 0; i < N; i++)
      sw_out[i] = clip8(int'($floor((img_y[i] - sw_lo) * 255.0 / (sw_hi - sw_lo) + 0.5)));
  endtask

  // Compare the output of the measured frame.
  always @(negedge clk) begin
    int e;
    if (ctrl_o.valid) begin
      if (ctrl_o.vStart) out_idx = 0;
      if (measuring && out_idx < N) begin
        e = int'(y) - sw_out[out_idx];
        if (e < 0) e = -e;
        err_sum += e;
        if (e > err_max) err_max = e;
      end
      out_idx++;
    end
  end

  task automatic run_still(input string name, input int lo, input int hi);
    real mean;
    make_image(lo, hi);
    for (int f = 0; f < FRAMES; f++) begin
      // The measured frame's outputs appear 6 cycles after its pixels enter;
      // switch measuring on at the start of the last frame.
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        r = 8'(img_r[i]); g = 8'(img_g[i]); b = 8'(img_b[i]);
        ctrl_i = '{hStart: (i % W) == 0, hEnd: (i % W) == W - 1, vStart: i == 0,
                   vEnd: i == N - 1, valid: 1'b1};
        if (f == FRAMES - 1 && i == 5) begin
          measuring = 1; err_sum = 0; err_max = 0;
        end
      end
    end
    @(negedge clk);
    ctrl_i = CTRL_IDLE;
    repeat (10) @(negedge clk);
    measuring = 0;
    mean = real'(err_sum) / N;
    $display("%s: software limits %0d/%0d, hardware limits %0d/%0d, error mean %0.3f max %0d",
             name, sw_lo, sw_hi, h_low, h_high, mean, err_max);
    checks += 2;
    if (mean > 3.0) begin failures++; $display("FAIL: %s mean error %0.3f > 3", name, mean); end
    if (err_max > 10) begin failures++; $display("FAIL: %s max error %0d > 10", name, err_max); end
  endtask

  initial begin
    repeat (3 * (FRAMES + 2) * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_still("washed out", 170, 240);
    run_still("dark", 10, 80);
    run_still("flat", 100, 150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
