// Contrast stretching datapath: p' = (p - h_low) * 255 / (h_high - h_low).
//
// The division is replaced by a multiplication with a reciprocal taken from
// recip_lut. Stage 1 forms the two operands: out1 = 255 * (p - h_low), a
// signed integer, and out2 = h_high - h_low, the table address (0 when the
// limits have met or crossed). Stage 2 reads the table while out1 waits.
// Stage 3 multiplies out1 by the 1.15 reciprocal (one multiplier). Stage 4
// drops the 15 fraction bits with round-to-nearest and saturates to
// [0, 255], so pixels below h_low go to 0 and pixels above h_high to 255.
//
// Interface: one 8-bit luminance sample, its pixel_ctrl_t and the limits to
// apply, all sampled together when ce is high.
// Timing: four ce-qualified cycles of latency, one pixel per cycle.
//
// The split into out1/out2, the table of reciprocals and the 1.15 word
// follow the original design; the saturation, the rounding and the pipeline depth are
// this implementation's choices.
module stretch_eq1
  import cs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic [PIX_W-1:0]  p_i,
  input  pixel_ctrl_t       ctrl_i,
  input  logic [PIX_W-1:0]  h_low_i,
  input  logic [PIX_W-1:0]  h_high_i,
  output logic [PIX_W-1:0]  p_o,
  output pixel_ctrl_t       ctrl_o
);

  localparam int unsigned OUT1_W = 2 * PIX_W + 2;          // 255 * [-255, 255]
  localparam int unsigned PROD_W = OUT1_W + RECIP_W + 1;   // signed product

  // Stage 1: operands.
  logic signed [OUT1_W-1:0] out1_q1;
  logic        [PIX_W-1:0]  out2_q1;
  pixel_ctrl_t              ctrl_q1;

  logic signed [PIX_W:0]    diff;

  always_comb begin
    diff = $signed({1'b0, p_i}) - $signed({1'b0, h_low_i});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out1_q1 <= '0;
      out2_q1 <= '0;
      ctrl_q1 <= CTRL_IDLE;
    end else if (ce) begin
      out1_q1 <= OUT1_W'(diff) * $signed(OUT1_W'(PIX_MAX));
      out2_q1 <= (h_high_i > h_low_i) ? h_high_i - h_low_i : '0;
      ctrl_q1 <= ctrl_i;
    end
  end

  // Stage 2: reciprocal look-up.
  logic        [RECIP_W-1:0] recip_q2;
  logic signed [OUT1_W-1:0]  out1_q2;
  pixel_ctrl_t               ctrl_q2;

  recip_lut u_lut (
    .clk    (clk),
    .ce     (ce),
    .addr_i (out2_q1),
    .data_o (recip_q2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out1_q2 <= '0;
      ctrl_q2 <= CTRL_IDLE;
    end else if (ce) begin
      out1_q2 <= out1_q1;
      ctrl_q2 <= ctrl_q1;
    end
  end

  // Stage 3: multiply.
  logic signed [PROD_W-1:0] prod_q3;
  pixel_ctrl_t              ctrl_q3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q3 <= '0;
      ctrl_q3 <= CTRL_IDLE;
    end else if (ce) begin
      prod_q3 <= PROD_W'(out1_q2) * $signed({1'b0, recip_q2});
      ctrl_q3 <= ctrl_q2;
    end
  end

  // Stage 4: round, drop the fraction, saturate to 8 bits.
  logic signed [PROD_W-1:0] rounded;
  logic signed [PROD_W-1:0] whole;

  always_comb begin
    rounded = prod_q3 + PROD_W'(1 << (RECIP_FRAC - 1));
    whole   = rounded >>> RECIP_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_o    <= '0;
      ctrl_o <= CTRL_IDLE;
    end else if (ce) begin
      if (whole < 0)                      p_o <= '0;
      else if (whole > $signed(PROD_W'(PIX_MAX))) p_o <= PIX_W'(PIX_MAX);
      else                                p_o <= whole[PIX_W-1:0];
      ctrl_o <= ctrl_q3;
    end
  end

endmodule
