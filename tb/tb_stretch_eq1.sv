// Self-checking testbench for stretch_eq1.
// Streams random pixels with random limits through the datapath and checks
// each result twice: against the exact stretch (p - lo) * 255 / (hi - lo),
// rounded and clipped to [0, 255], in real arithmetic (at most one code of
// difference, the cost of the 1.15 reciprocal), and against a bit-exact
// integer model built from the reciprocal formula round(32768 / d).
// Also covers limits that have met or crossed (output becomes a threshold
// at h_low), pixels outside the limits (clipping), the 4-cycle latency and
// ce stalls.
module tb_stretch_eq1;
  import cs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b0;
  logic [7:0] p, lo, hi;
  pixel_ctrl_t ctrl_i, ctrl_o;
  logic [7:0] y;

  int checks = 0;
  int failures = 0;
  int n_clip_lo = 0, n_clip_hi = 0, n_degenerate = 0;

  always #5 clk = ~clk;

  stretch_eq1 dut (
    .clk(clk), .rst_n(rst_n), .ce(ce), .p_i(p), .ctrl_i(ctrl_i),
    .h_low_i(lo), .h_high_i(hi), .p_o(y), .ctrl_o(ctrl_o)
  );

  function automatic int clip(longint v);
    if (v < 0) return 0;
    if (v > 255) return 255;
    return int'(v);
  endfunction

  function automatic int ideal(int pp, int l, int h);
    if (h <= l) return (pp > l) ? 255 : 0;
    return clip(longint'($floor((pp - l) * 255.0 / (h - l) + 0.5)));
  endfunction

  function automatic int exact(int pp, int l, int h);
    longint d, rec, prod;
    d    = (h > l) ? h - l : 1;
    rec  = (32768 + d / 2) / d;
    prod = longint'((pp - l) * 255) * rec;
    return clip((prod + 16384) >>> 15);
  endfunction

  typedef struct { int ideal; int exact; } exp_t;
  exp_t q[$];
  bit ce_at_edge = 1'b0;

  task automatic check_out();
    exp_t e;
    if (ce_at_edge && ctrl_o.valid) begin
      if (q.size() == 0) begin
        checks++; failures++; $display("FAIL: unexpected output");
      end else begin
        e = q.pop_front();
        checks += 2;
        if (int'(y) != e.exact) begin
          failures++; $display("FAIL: y=%0d, integer model %0d", y, e.exact);
        end
        if (int'(y) - e.ideal > 1 || e.ideal - int'(y) > 1) begin
          failures++; $display("FAIL: y=%0d, exact stretch %0d", y, e.ideal);
        end
      end
    end
  endtask

  task automatic drive(input int pp, input int l, input int h, input bit v, input bit en);
    exp_t e;
    @(negedge clk);
    check_out();
    p = 8'(pp); lo = 8'(l); hi = 8'(h);
    ctrl_i = CTRL_IDLE; ctrl_i.valid = v;
    ce = en; ce_at_edge = en;
    if (v && en) begin
      e.ideal = ideal(pp, l, h);
      e.exact = exact(pp, l, h);
      q.push_back(e);
      if (h <= l) n_degenerate++;
      else if (pp < l) n_clip_lo++;
      else if (pp > h) n_clip_hi++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, l, h;
    p = 0; lo = 0; hi = 255; ctrl_i = CTRL_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Latency.
    @(negedge clk);
    p = 8'd100; lo = 8'd50; hi = 8'd150; ctrl_i = CTRL_IDLE; ctrl_i.valid = 1'b1; ce = 1'b1;
    @(negedge clk);
    ctrl_i = CTRL_IDLE;
    lat = 1;
    while (!ctrl_o.valid && lat < 10) begin @(negedge clk); lat++; end
    checks += 2;
    if (lat != 4) begin failures++; $display("FAIL: latency %0d, expected 4", lat); end
    if (y != 8'd128) begin failures++; $display("FAIL: 100 in [50,150] gave %0d", y); end
    repeat (5) @(negedge clk);

    // Every pixel value through a few fixed windows.
    for (int pp = 0; pp < 256; pp++) begin
      drive(pp, 0, 255, 1, 1);
      drive(pp, 16, 235, 1, 1);
      drive(pp, 100, 101, 1, 1);
      drive(pp, 120, 120, 1, 1);
    end
    // Random windows with stalls and bubbles.
    for (int i = 0; i < 20000; i++) begin
      l = $urandom_range(0, 255);
      h = ($urandom_range(0, 19) == 0) ? $urandom_range(0, 255) : $urandom_range(l, 255);
      drive($urandom_range(0, 255), l, h, ($urandom_range(0, 7) != 0), ($urandom_range(0, 5) != 0));
    end
    repeat (8) drive(0, 0, 255, 0, 1);

    checks += 4;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    if (n_clip_lo == 0 || n_clip_hi == 0 || n_degenerate == 0) begin
      failures++; $display("FAIL: a case was not exercised");
    end
    $display("cases: below h_low %0d, above h_high %0d, limits met/crossed %0d",
             n_clip_lo, n_clip_hi, n_degenerate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
