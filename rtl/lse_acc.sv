// lse_acc -- least-squares sine-fit accumulators of one channel.
//
// Over one record the block sums, for the channel's corrected samples y,
//     s_cos = sum y*cos(w n),  s_sin = sum y*sin(w n),  s_dc = sum y.
// Because the record is coherent (it spans a whole number of tone periods in
// every channel), the regressors are orthogonal and the least-squares fit of
// A*cos + B*sin + C reduces to A = 2*s_cos/K, B = 2*s_sin/K, C = s_dc/K for
// K samples; mismatch_solver does those divisions once per record.
// Reducing the general least-squares solve to these three sums is this
// design's choice.
//
// With POW_EN the block also sums the power s_pow = sum y^2, which the
// accumulate-and-average estimator (the earlier equalisation method the
// published work compares against) needs; without it s_pow is 0 and no
// register is built.
//
// Interface: clear zeroes the sums (it wins over en); en adds the current
// sample.  Sums are registered and valid the cycle after the last en.
module lse_acc
  import tiadc_cal_pkg::*;
#(
  parameter int unsigned ACC_W  = 40,
  parameter bit          POW_EN = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    en,
  input  out_t                    y,
  input  tone_t                   cos_i,
  input  tone_t                   sin_i,
  output logic signed [ACC_W-1:0] s_cos,
  output logic signed [ACC_W-1:0] s_sin,
  output logic signed [ACC_W-1:0] s_dc,
  output logic signed [ACC_W-1:0] s_pow
);
  localparam int unsigned PW = OUT_W + TONE_W;

  logic signed [PW-1:0] p_cos, p_sin;

  always_comb begin
    p_cos = PW'(y) * PW'(cos_i);
    p_sin = PW'(y) * PW'(sin_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_cos <= '0;
      s_sin <= '0;
      s_dc  <= '0;
    end else if (clear) begin
      s_cos <= '0;
      s_sin <= '0;
      s_dc  <= '0;
    end else if (en) begin
      s_cos <= s_cos + ACC_W'(p_cos);
      s_sin <= s_sin + ACC_W'(p_sin);
      s_dc  <= s_dc  + ACC_W'(y);
    end
  end
  if (POW_EN) begin : g_pow
    logic signed [2*OUT_W-1:0] p_pow;
    always_comb p_pow = (2*OUT_W)'(y) * (2*OUT_W)'(y);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      s_pow <= '0;
      else if (clear)  s_pow <= '0;
      else if (en)     s_pow <= s_pow + ACC_W'(p_pow);
    end
  end else begin : g_no_pow
    assign s_pow = '0;
  end
endmodule
