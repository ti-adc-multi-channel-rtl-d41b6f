// chan_comp -- compensation path of one ADC channel (the front of "Cali").
//
// Removes the channel's offset and gain mismatch from its sample stream:
//     y = (s - O_cal) * (1 - G_cal)
// s is the raw signed code, O_cal the offset calibration amount in codes and
// G_cal the gain calibration amount.  The offset subtraction is the published method's
// y_out = s_out - O_cal.  For gain, the published method's block diagram subtracts
// s*G_cal from s, i.e. y = s - s*G_cal = s*(1 - G_cal); with the iteration
// driving the measured gain of y to 1, G_cal settles at 1 - 1/g.  Applying the
// offset before the gain, so that the two corrections compose, is this
// design's choice.  The result keeps OUT_FRAC fractional bits, is rounded to
// nearest and saturated to OUT_W bits.
//
// Timing: registered output, one cycle of latency; in_valid is carried along.
module chan_comp
  import tiadc_cal_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t s,
  input  ofs_t    o_cal,
  input  gain_t   g_cal,
  output logic    out_valid,
  output out_t    y
);
  // s - O_cal in OFS_FRAC fractional bits.
  localparam int unsigned DIFF_W = OFS_W + 2;
  // 1 - G_cal in GAIN_FRAC fractional bits.
  localparam int unsigned SCL_W  = GAIN_W + 2;
  localparam int unsigned PROD_W = DIFF_W + SCL_W;
  localparam int unsigned SHIFT  = OFS_FRAC + GAIN_FRAC - OUT_FRAC;

  logic signed [DIFF_W-1:0] diff;
  logic signed [SCL_W-1:0]  scale;
  logic signed [PROD_W-1:0] prod, prod_rnd, q;
  out_t                     y_sat;

  localparam logic signed [PROD_W-1:0] Y_MAX = PROD_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [PROD_W-1:0] Y_MIN = -PROD_W'(1 << (OUT_W - 1));

  always_comb begin
    diff     = (DIFF_W'(s) <<< OFS_FRAC) - DIFF_W'(o_cal);
    scale    = SCL_W'(G_REF) - SCL_W'(g_cal);
    prod     = PROD_W'(diff) * PROD_W'(scale);
    prod_rnd = prod + PROD_W'(1 << (SHIFT - 1));
    q        = prod_rnd >>> SHIFT;
    if (q > Y_MAX)      y_sat = out_t'(Y_MAX);
    else if (q < Y_MIN) y_sat = out_t'(Y_MIN);
    else                y_sat = out_t'(q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      y         <= y_sat;
    end
  end
endmodule
