// Self-checking testbench for adaptive_limits.
// Runs a 20 x 10 frame (200 pixels, so the 1 % target is 2 pixels) through
// a sequence of frame types: mid-grey frames with exactly two dark and two
// bright outliers, dark frames, bright frames and all-white frames, with
// bubbles (valid low) and stalls (ce low) in between. A reference model in
// the testbench counts the pixels outside the limits in force and applies
// the per-frame rule (+1 / -1 / hold for each limit, clipped at 0 and 255).
// Every cycle the limits the block shows are compared with the model. Each
// of the rule's cases (h_low up, down, held, saturated at 255; h_high up,
// down, held) must occur at least once.
module tb_adaptive_limits;
  import cs_pkg::*;

  localparam int W = 20;
  localparam int H = 10;
  localparam int THRESH = W * H / 100;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b0;
  logic [7:0] y = '0;
  pixel_ctrl_t ctrl = CTRL_IDLE;
  logic [7:0] h_low, h_high;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  adaptive_limits #(.FRAME_W(W), .FRAME_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .y_i(y), .ctrl_i(ctrl),
    .h_low_o(h_low), .h_high_o(h_high)
  );

  // Reference model state.
  int ref_lo = 0, ref_hi = 255;
  int cnt_lo = 0, cnt_hi = 0;
  bit seen = 0;
  int n_lo_up = 0, n_lo_down = 0, n_lo_hold = 0, n_lo_sat = 0;
  int n_hi_up = 0, n_hi_down = 0, n_hi_hold = 0;

  task automatic frame_update();
    if (seen) begin
      if (cnt_lo < THRESH) begin
        if (ref_lo == 255) n_lo_sat++; else begin ref_lo++; n_lo_up++; end
      end else if (cnt_lo > THRESH) begin ref_lo = (ref_lo == 0) ? 0 : ref_lo - 1; n_lo_down++; end
      else n_lo_hold++;
      if (cnt_hi < THRESH) begin ref_hi = (ref_hi == 0) ? 0 : ref_hi - 1; n_hi_down++; end
      else if (cnt_hi > THRESH) begin ref_hi = (ref_hi == 255) ? 255 : ref_hi + 1; n_hi_up++; end
      else n_hi_hold++;
    end
    seen = 1;
    cnt_lo = 0;
    cnt_hi = 0;
  endtask

  // One pixel, preceded by random bubbles and stalls.
  task automatic send(input int v, input bit hs, input bit he, input bit vs, input bit ve);
    // Idle cycles: either a bubble or a stalled pixel.
    while ($urandom_range(0, 7) == 0) begin
      @(negedge clk);
      if ($urandom_range(0, 1) == 0) begin
        ce = 1'b1; ctrl = CTRL_IDLE; y = 8'($urandom_range(0, 255));
      end else begin
        ce = 1'b0; y = 8'(v); ctrl = '{hStart: hs, hEnd: he, vStart: vs, vEnd: ve, valid: 1'b1};
      end
    end
    @(negedge clk);
    ce = 1'b1;
    y = 8'(v);
    ctrl = '{hStart: hs, hEnd: he, vStart: vs, vEnd: ve, valid: 1'b1};
    if (vs) frame_update();
    #1;
    checks++;
    if (int'(h_low) != ref_lo || int'(h_high) != ref_hi) begin
      failures++;
      $display("FAIL: limits %0d/%0d, expected %0d/%0d", h_low, h_high, ref_lo, ref_hi);
    end
    if (v < ref_lo) cnt_lo++;
    if (v > ref_hi) cnt_hi++;
  endtask

  task automatic send_frame(input int kind);
    int pix[W*H];
    int a, b2;
    for (int i = 0; i < W * H; i++) begin
      case (kind)
        0: pix[i] = $urandom_range(80, 180);
        1: pix[i] = $urandom_range(0, 40);
        2: pix[i] = $urandom_range(200, 255);
        default: pix[i] = 255;
      endcase
    end
    if (kind == 0) begin
      // Exactly THRESH (2) dark and 2 bright outliers.
      a = $urandom_range(0, 49);
      b2 = $urandom_range(50, 99);
      pix[a] = 10; pix[a + 100] = 10;
      pix[b2] = 250; pix[b2 + 100] = 250;
    end
    for (int i = 0; i < W * H; i++)
      send(pix[i], (i % W) == 0, (i % W) == W - 1, i == 0, i == W * H - 1);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (h_low != 8'd0 || h_high != 8'd255) begin
      failures++; $display("FAIL: reset limits %0d/%0d", h_low, h_high);
    end
    repeat (30) send_frame(0);
    repeat (15) send_frame(1);
    repeat (40) send_frame(2);
    repeat (25) send_frame(0);
    repeat (270) send_frame(3);
    send(0, 1, 0, 1, 0);   // start of one more frame applies the last update

    $display("h_low: up %0d down %0d hold %0d sat %0d; h_high: up %0d down %0d hold %0d",
             n_lo_up, n_lo_down, n_lo_hold, n_lo_sat, n_hi_up, n_hi_down, n_hi_hold);
    checks += 7;
    if (n_lo_up == 0)   begin failures++; $display("FAIL: h_low never rose"); end
    if (n_lo_down == 0) begin failures++; $display("FAIL: h_low never fell"); end
    if (n_lo_hold == 0) begin failures++; $display("FAIL: h_low never held"); end
    if (n_lo_sat == 0)  begin failures++; $display("FAIL: h_low never saturated"); end
    if (n_hi_up == 0)   begin failures++; $display("FAIL: h_high never rose"); end
    if (n_hi_down == 0) begin failures++; $display("FAIL: h_high never fell"); end
    if (n_hi_hold == 0) begin failures++; $display("FAIL: h_high never held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
