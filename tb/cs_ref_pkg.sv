// Reference model of the contrast stretching core, for testbenches.
// Written from the algorithm, not from the RTL:
//  - luminance: Y = 0.299 R + 0.587 G + 0.114 B with the weights quantised
//    to 1/65536 (the green weight takes the rounding remainder so that the
//    three add up to one), rounded to nearest;
//  - stretch: (p - lo) * 255 * r(d) / 32768, rounded and clipped to
//    [0, 255], where r(d) = round(32768 / d) and d = hi - lo (d = 1 when
//    the limits have met or crossed);
//  - limits: one tracker object per stream that counts pixels below h_low
//    and above h_high over a frame and moves each limit by one at the next
//    frame start.
package cs_ref_pkg;

  function automatic int luma(int r, int g, int b);
    longint kr, kg, kb;
    kr = longint'($floor(0.299 * 65536.0 + 0.5));
    kb = longint'($floor(0.114 * 65536.0 + 0.5));
    kg = 65536 - kr - kb;
    return int'((kr * r + kg * g + kb * b + 32768) / 65536);
  endfunction

  function automatic int stretch(int p, int lo, int hi);
    longint d, rec, prod, v;
    d    = (hi > lo) ? longint'(hi - lo) : 1;
    rec  = (32768 + d / 2) / d;
    prod = longint'(p - lo) * 255 * rec;
    v    = (prod + 16384) >>> 15;
    if (v < 0) return 0;
    if (v > 255) return 255;
    return int'(v);
  endfunction

  class limit_tracker;
    int thresh_lo, thresh_hi;
    int lo = 0, hi = 255;
    int cnt_lo = 0, cnt_hi = 0;
    bit seen = 0;
    int n_up = 0, n_down = 0, n_hold = 0;   // events on either limit

    function new(int pixels, int p1_pct = 1, int p2_pct = 1);
      thresh_lo = pixels * p1_pct / 100;
      thresh_hi = pixels * p2_pct / 100;
    endfunction

    // Call for every pixel, in stream order; returns the stretched value.
    function int push(int y, bit frame_start);
      if (frame_start) begin
        if (seen) begin
          if (cnt_lo < thresh_lo) begin if (lo < 255) lo++; n_up++; end
          else if (cnt_lo > thresh_lo) begin if (lo > 0) lo--; n_down++; end
          else n_hold++;
          if (cnt_hi < thresh_hi) begin if (hi > 0) hi--; n_down++; end
          else if (cnt_hi > thresh_hi) begin if (hi < 255) hi++; n_up++; end
          else n_hold++;
        end
        seen = 1;
        cnt_lo = 0;
        cnt_hi = 0;
      end
      if (y < lo) cnt_lo++;
      if (y > hi) cnt_hi++;
      return stretch(y, lo, hi);
    endfunction
  endclass

endpackage
