// Colour space converter: RGB to intensity (luminance).
//
// Computes Y = 0.299 R + 0.587 G + 0.114 B, the standard BT.601 luma
// weights, in fixed point. The three coefficients are held as 16-bit
// unsigned fractions (19595, 38470, 7471; they add up to exactly 65536 so a
// white pixel maps to 255), the three products are formed in one register
// stage (three multipliers) and summed, rounded to nearest and truncated to
// 8 bits in a second stage.
//
// Interface: one RGB pixel plus its pixel_ctrl_t per cycle when ce is high.
// Timing: two ce-qualified cycles of latency, one pixel per cycle, and the
// control bundle is delayed by the same amount. ce low freezes the pipeline.
//
// The original design only specifies this block as an RGB-to-intensity conversion;
// the BT.601 weights, the 16-bit coefficient precision and the two-stage
// pipeline are this implementation's choices.
module rgb2intensity
  import cs_pkg::*;
#(
  parameter int unsigned COEF_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic [PIX_W-1:0]  r_i,
  input  logic [PIX_W-1:0]  g_i,
  input  logic [PIX_W-1:0]  b_i,
  input  pixel_ctrl_t       ctrl_i,
  output logic [PIX_W-1:0]  y_o,
  output pixel_ctrl_t       ctrl_o
);

  localparam logic [COEF_W-1:0] KR = COEF_W'(longint'(0.299 * (2.0 ** COEF_W)));
  localparam logic [COEF_W-1:0] KG = COEF_W'(longint'(0.587 * (2.0 ** COEF_W)));
  localparam logic [COEF_W-1:0] KB = COEF_W'((2 ** COEF_W) - int'(KR) - int'(KG));

  localparam int unsigned PROD_W = PIX_W + COEF_W;

  logic [PROD_W-1:0] pr_q, pg_q, pb_q;
  pixel_ctrl_t       ctrl_q1;
  logic [PROD_W+1:0] sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pr_q    <= '0;
      pg_q    <= '0;
      pb_q    <= '0;
      ctrl_q1 <= CTRL_IDLE;
    end else if (ce) begin
      pr_q    <= PROD_W'(r_i) * PROD_W'(KR);
      pg_q    <= PROD_W'(g_i) * PROD_W'(KG);
      pb_q    <= PROD_W'(b_i) * PROD_W'(KB);
      ctrl_q1 <= ctrl_i;
    end
  end

  always_comb begin
    sum = (PROD_W+2)'(pr_q) + (PROD_W+2)'(pg_q) + (PROD_W+2)'(pb_q)
        + (PROD_W+2)'(1 << (COEF_W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_o    <= '0;
      ctrl_o <= CTRL_IDLE;
    end else if (ce) begin
      // Weights sum to 1.0, so the rounded result never exceeds 255.
      y_o    <= sum[COEF_W +: PIX_W];
      ctrl_o <= ctrl_q1;
    end
  end

endmodule
