// Stimulus, reference model and scoreboard for contrast_stretch_ip.
// The harness plays the camera on the input AXI4-Stream (tuser on the first
// pixel of a frame, tlast on the last of each line) and the sink on the
// output, and predicts every output beat with cs_ref_pkg. Frames are
// generated on the fly, so no image is stored:
//   kind 0  low-contrast grey around 90..140 with 1 % dark and 1 % bright outliers
//   kind 1  dark frame, 10..60
//   kind 2  constant 128 (the limits close in and cross)
//   kind 3  full-range noise
// Frames 0..CLEAN-1 (CLEAN >= 3) run with no bubbles and no back-pressure; frame 1 is
// timed and must take exactly one cycle per pixel. Later frames get random
// input bubbles (tvalid low) and output stalls (tready low).
// It counts how often each mechanism happened and, for those listed as
// required, counts a failure if one never did.
module cs_ip_harness
  import cs_ref_pkg::*;
#(
  parameter int W = 32,
  parameter int H = 16,
  parameter int N_KIND0 = 60,
  parameter int N_KIND1 = 40,
  parameter int N_KIND2 = 150,
  parameter int N_KIND3 = 10,
  parameter int CLEAN = 3,
  parameter bit REQUIRE_ALL = 1'b1,
  parameter int WATCHDOG = 2000000
) (
  input  logic        clk,
  output logic        rst_n,
  output logic [31:0] s_tdata,
  output logic        s_tvalid,
  output logic        s_tuser,
  output logic        s_tlast,
  input  logic        s_tready,
  input  logic [31:0] m_tdata,
  input  logic        m_tvalid,
  input  logic        m_tuser,
  input  logic        m_tlast,
  output logic        m_tready,
  input  logic [7:0]  h_low,
  input  logic [7:0]  h_high
);

  localparam int N_FRAMES = N_KIND0 + N_KIND1 + N_KIND2 + N_KIND3;
  localparam int LATENCY = 6;

  int checks = 0;
  int failures = 0;

  typedef struct { int y; bit sof; bit eol; int lum; int lo; int hi; } exp_t;
  exp_t q[$];
  limit_tracker model;

  // Mechanism counters.
  int n_bubble = 0, n_stall = 0, n_clip_lo = 0, n_clip_hi = 0, n_crossed = 0, n_frames_out = 0;

  // Driver state.
  int  frame = 0, idx = 0;
  bit  done_sending = 0;
  bit  acc_in = 0;
  longint cycle = 0;
  longint t_first_in = -1, t_last_out = -1;
  int out_idx = 0;

  function automatic int kind_of(int f);
    if (f < CLEAN + N_KIND0) return 0;
    if (f < CLEAN + N_KIND0 + N_KIND1) return 1;
    if (f < CLEAN + N_KIND0 + N_KIND1 + N_KIND2) return 2;
    return 3;
  endfunction

  function automatic int clip8(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // Kind 0 carries exactly 1 % dark (5) and 1 % bright (250) outliers, so
  // the limits settle between them and hold.
  localparam int SPACING = (W * H) / ((W * H) / 100 > 0 ? (W * H) / 100 : 1);

  function automatic logic [31:0] gen_pixel(int kind, int i);
    int v, r, g, b;
    case (kind)
      0: v = (i % SPACING == 7) ? 5 : (i % SPACING == 50) ? 250 : $urandom_range(90, 140);
      1: v = $urandom_range(10, 60);
      2: v = 128;
      default: v = $urandom_range(0, 255);
    endcase
    if (kind == 2) begin
      r = v; g = v; b = v;
    end else begin
      r = clip8(v + $urandom_range(0, 16) - 8);
      g = clip8(v + $urandom_range(0, 16) - 8);
      b = clip8(v + $urandom_range(0, 16) - 8);
    end
    return {8'($urandom_range(0, 255)), 8'(b), 8'(g), 8'(r)};
  endfunction

  // Acceptance, model and scoreboard, on the clock edge.
  always @(posedge clk) begin
    exp_t e;
    int y;
    cycle++;
    acc_in = s_tvalid && s_tready && rst_n;
    if (acc_in) begin
      if (frame == 1 && s_tuser && t_first_in < 0) t_first_in = cycle;
      y = luma(int'(s_tdata[7:0]), int'(s_tdata[15:8]), int'(s_tdata[23:16]));
      e.y   = model.push(y, s_tuser);
      e.sof = s_tuser;
      e.eol = s_tlast;
      e.lum = y; e.lo = model.lo; e.hi = model.hi;
      if (model.hi <= model.lo) n_crossed++;
      else if (y < model.lo) n_clip_lo++;
      else if (y > model.hi) n_clip_hi++;
      q.push_back(e);
    end
    if (rst_n && m_tvalid && !m_tready) n_stall++;
    if (rst_n && m_tvalid && m_tready) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: output beat with nothing expected");
      end else begin
        e = q.pop_front();
        if (m_tdata != {8'hFF, 8'(e.y), 8'(e.y), 8'(e.y)} || m_tuser != e.sof || m_tlast != e.eol) begin
          failures++;
          if (failures < 10)
            $display("FAIL: out %h user %b last %b, expected y=%0d user %b last %b (luma %0d, limits %0d/%0d)",
                     m_tdata, m_tuser, m_tlast, e.y, e.sof, e.eol, e.lum, e.lo, e.hi);
        end
        if (e.sof) n_frames_out++;
        out_idx = e.sof ? 1 : out_idx + 1;
        if (n_frames_out == 2 && out_idx == W * H && t_last_out < 0) t_last_out = cycle;
      end
    end
  end

  // Driver and sink, half a cycle after the edge.
  always @(negedge clk) begin
    if (!rst_n) begin
      m_tready <= 1'b1;
    end else begin
      // Sink: back-pressure only outside the clean frames.
      m_tready <= (frame < CLEAN) ? 1'b1 : ($urandom_range(0, 5) != 0);
      if (acc_in || !s_tvalid) begin
        if (acc_in) begin
          idx++;
          if (idx == W * H) begin idx = 0; frame++; end
        end
        if (frame >= CLEAN + N_FRAMES) begin
          // One closing frame-start beat, so the last frame's counts are used.
          if (frame == CLEAN + N_FRAMES && !done_sending) begin
            s_tvalid <= 1'b1;
            s_tdata  <= gen_pixel(3, 0);
            s_tuser  <= 1'b1;
            s_tlast  <= 1'b0;
            done_sending = 1;
          end else begin
            s_tvalid <= 1'b0;
          end
        end else if (frame >= CLEAN && $urandom_range(0, 9) == 0) begin
          s_tvalid <= 1'b0;
          n_bubble++;
        end else begin
          s_tvalid <= 1'b1;
          s_tdata  <= gen_pixel(kind_of(frame), idx);
          s_tuser  <= (idx == 0);
          s_tlast  <= ((idx % W) == W - 1);
        end
      end
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (frame %0d)", frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = new(W * H);
    rst_n = 1'b0;
    s_tvalid = 1'b0; s_tdata = '0; s_tuser = 1'b0; s_tlast = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (frame > CLEAN + N_FRAMES || (done_sending && !s_tvalid));
    repeat (50) @(posedge clk);
    repeat (50) @(posedge clk);

    // The extra frame-start pixel stays queued, so one result is left.
    checks++;
    if (q.size() > 1) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    checks++;
    if (int'(h_low) != model.lo || int'(h_high) != model.hi) begin
      failures++;
      $display("FAIL: final limits %0d/%0d, model %0d/%0d", h_low, h_high, model.lo, model.hi);
    end
    // Rate: frame 1 (no bubbles, no stalls) in W*H cycles plus the latency.
    checks++;
    if (t_last_out - t_first_in != longint'(W * H - 1) + longint'(LATENCY)) begin
      failures++;
      $display("FAIL: frame 1 took %0d cycles from first pixel in to last pixel out, expected %0d",
               t_last_out - t_first_in + 1, W * H + LATENCY);
    end
    $display("mechanisms: limit up %0d, down %0d, held %0d; below h_low %0d, above h_high %0d,",
             model.n_up, model.n_down, model.n_hold, n_clip_lo, n_clip_hi);
    $display("            limits met/crossed %0d; input bubbles %0d, output stalls %0d",
             n_crossed, n_bubble, n_stall);
    $display("final limits h_low=%0d h_high=%0d", h_low, h_high);
    checks += 6;
    if (model.n_up == 0)   begin failures++; $display("FAIL: no limit ever rose"); end
    if (model.n_down == 0) begin failures++; $display("FAIL: no limit ever fell"); end
    if (n_clip_lo == 0 || n_clip_hi == 0) begin failures++; $display("FAIL: no clipping"); end
    if (n_bubble == 0 || n_stall == 0) begin failures++; $display("FAIL: no bubble or stall"); end
    if (REQUIRE_ALL && model.n_hold == 0) begin failures++; $display("FAIL: no limit ever held"); end
    if (REQUIRE_ALL && n_crossed == 0) begin failures++; $display("FAIL: limits never met"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
