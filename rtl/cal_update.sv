// cal_update -- the M offset and M gain calibration registers.
//
// Holds O_cal and G_cal for every channel and applies the equalisation
// update of the published method's calibration loop,
//     O_cal,t = mu_o * D_o + O_cal,t-1        G_cal,t = mu_g * D_g + G_cal,t-1
// for the channel named by upd_ch whenever upd_valid is high.  clear zeroes
// the registers of the enabled loops, so the first update gives the
// published method's initial value O_cal,1 = mu_o * D_o.  off_en and gain_en enable
// the two loops separately, so offset and gain can be calibrated in turn (the
// registers of a disabled loop keep their value) or together.  The
// products are rounded to the register's fraction and the sums saturate; both
// are this design's choices.  When no update comes the registers simply hold,
// which is how converged values keep correcting later samples.
//
// Timing: an update is visible on o_cal/g_cal the cycle after upd_valid.
module cal_update
  import tiadc_cal_pkg::*;
#(
  parameter int unsigned NCH = M
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   upd_valid,
  input  logic [$clog2(NCH)-1:0] upd_ch,
  input  ofs_t                   d_o,
  input  gain_t                  d_g,
  input  logic                   off_en,
  input  logic                   gain_en,
  input  mu_t                    mu_o,
  input  mu_t                    mu_g,
  output ofs_t                   o_cal [NCH],
  output gain_t                  g_cal [NCH]
);
  localparam int unsigned OPW = OFS_W + MU_W + 1;
  localparam int unsigned GPW = GAIN_W + MU_W + 1;

  logic signed [OPW-1:0] o_prod, o_step, o_sum;
  logic signed [GPW-1:0] g_prod, g_step, g_sum;
  ofs_t                  o_next;
  gain_t                 g_next;

  localparam logic signed [OPW-1:0] O_MAX = OPW'((1 << (OFS_W - 1)) - 1);
  localparam logic signed [OPW-1:0] O_MIN = -OPW'(1 << (OFS_W - 1));
  localparam logic signed [GPW-1:0] G_MAX = GPW'((1 << (GAIN_W - 1)) - 1);
  localparam logic signed [GPW-1:0] G_MIN = -GPW'(1 << (GAIN_W - 1));

  always_comb begin
    o_prod = OPW'(d_o) * $signed({1'b0, mu_o});
    g_prod = GPW'(d_g) * $signed({1'b0, mu_g});
    o_step = (o_prod + OPW'(1 << (MU_FRAC - 1))) >>> MU_FRAC;
    g_step = (g_prod + GPW'(1 << (MU_FRAC - 1))) >>> MU_FRAC;
    o_sum  = OPW'(o_cal[upd_ch]) + o_step;
    g_sum  = GPW'(g_cal[upd_ch]) + g_step;
    o_next = (o_sum > O_MAX) ? ofs_t'(O_MAX)  : (o_sum < O_MIN) ? ofs_t'(O_MIN)  : ofs_t'(o_sum);
    g_next = (g_sum > G_MAX) ? gain_t'(G_MAX) : (g_sum < G_MIN) ? gain_t'(G_MIN) : gain_t'(g_sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) begin
        o_cal[i] <= '0;
        g_cal[i] <= '0;
      end
    end else if (clear) begin
      for (int i = 0; i < NCH; i++) begin
        if (off_en)  o_cal[i] <= '0;
        if (gain_en) g_cal[i] <= '0;
      end
    end else if (upd_valid) begin
      if (off_en)  o_cal[upd_ch] <= o_next;
      if (gain_en) g_cal[upd_ch] <= g_next;
    end
  end
endmodule
