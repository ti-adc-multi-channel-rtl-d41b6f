// tiadc_cal_top -- background offset/gain mismatch calibration of a
// time-interleaved ADC.
//
// The M sub-ADCs of a TI-ADC each have their own offset and gain, which turn
// into spurs at multiples of f_s/M.  This engine removes them digitally,
// against an ideal reference channel (offset 0, gain 1) rather than against
// one of the real channels, so every channel is calibrated:
//
//   adc_data --> chan_comp x M --> out_data                (every frame)
//                    ^    |
//        o_cal,g_cal |    +--> lse_acc x M  (cos/sin from tone_ref_gen)
//                    |                 |
//              cal_update <-- mismatch_solver <-- cal_ctrl (iterations)
//
// While a known test tone is applied, each iteration fits a sine to every
// channel's corrected samples, turns the fit into a residual offset and gain
// error per channel, and adds mu times that error to the channel's
// calibration registers.  Iterations repeat until all channels are within
// tolerance or max_iter is reached; the registers then stay frozen and go on
// correcting the stream.  The corrected stream is produced every frame,
// calibrating or not.
//
// Interface: one frame of NCH codes per cycle with adc_valid (channel i is
// sample f*NCH+i), corrected frame on out_data/out_valid one cycle later
// (OUT_FRAC fractional bits).  Configuration inputs are static during a
// calibration; start begins one.  ref_amp (non-zero) / ref_dc are the ideal
// channel's tone amplitude and DC level in codes (OFS_FRAC fractional bits); mu_o,
// mu_g the step sizes; tol_o, tol_g the convergence tolerances.  Status:
// state, iter, converged, limit_hit, the registers o_cal/g_cal, and the
// per-channel estimates of each iteration on the est_* outputs, including
// est_dt, the channel's timing skew against channel 0 in sample periods
// (DT_FRAC fractional bits).  Skew is reported but not corrected.
//
// EST_ACCAVG = 1 swaps the fit-based estimator for the accumulate-and-average
// one of the earlier equalisation method (channel power against the average
// channel), for comparison; it adds a power sum per channel and NCH cycles
// per solve.  The default is the fit-based method.
//
// Timing: one iteration takes K_REC valid frames plus about
// NCH*(2*ACC_W+22) cycles of solving, about 2,050 cycles per iteration at the
// defaults.
module tiadc_cal_top
  import tiadc_cal_pkg::*;
#(
  parameter int unsigned NCH    = M,
  parameter int unsigned K_REC  = 400,
  parameter int unsigned F_NUM  = 3,
  parameter int unsigned F_DEN  = 100,
  parameter int unsigned ACC_W  = 40,
  parameter int unsigned ITER_W = 8,
  parameter bit          EST_ACCAVG = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // sample stream
  input  logic              adc_valid,
  input  sample_t           adc_data [NCH],
  output logic              out_valid,
  output out_t              out_data [NCH],
  // configuration
  input  logic              start,
  input  logic              off_en,
  input  logic              gain_en,
  input  mu_t               mu_o,
  input  mu_t               mu_g,
  input  logic [OFS_W-1:0]  ref_amp,
  input  ofs_t              ref_dc,
  input  ofs_t              tol_o,
  input  gain_t             tol_g,
  input  logic [ITER_W-1:0] max_iter,
  // status
  output cal_state_t        state,
  output logic [ITER_W-1:0] iter,
  output logic              converged,
  output logic              limit_hit,
  output ofs_t              o_cal [NCH],
  output gain_t             g_cal [NCH],
  // per-channel estimates of every iteration (O_i, G_i and their errors)
  output logic              est_valid,
  output logic [$clog2(NCH)-1:0] est_ch,
  output ofs_t              est_os,
  output gain_t             est_g,
  output dt_t               est_dt,
  output ofs_t              est_d_o,
  output gain_t             est_d_g,
  output logic              est_in_tol
);
  localparam int unsigned CHW = $clog2(NCH);

  logic                    cv [NCH];
  tone_t                   cos_w [NCH];
  tone_t                   sin_w [NCH];
  logic signed [ACC_W-1:0] s_cos [NCH];
  logic signed [ACC_W-1:0] s_sin [NCH];
  logic signed [ACC_W-1:0] s_dc  [NCH];
  logic signed [ACC_W-1:0] s_pow [NCH];

  logic             cal_clear, acc_clear, tone_clear, acc_en, solve_start;
  logic             solve_busy, solve_done, solve_all_tol;
  logic [CHW-1:0]   ch_sel;

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    chan_comp u_comp (
      .clk, .rst_n, .in_valid(adc_valid), .s(adc_data[i]),
      .o_cal(o_cal[i]), .g_cal(g_cal[i]), .out_valid(cv[i]), .y(out_data[i]));

    lse_acc #(.ACC_W(ACC_W), .POW_EN(EST_ACCAVG)) u_acc (
      .clk, .rst_n, .clear(acc_clear), .en(acc_en), .y(out_data[i]),
      .cos_i(cos_w[i]), .sin_i(sin_w[i]),
      .s_cos(s_cos[i]), .s_sin(s_sin[i]), .s_dc(s_dc[i]), .s_pow(s_pow[i]));
  end

  assign out_valid = cv[0];

  tone_ref_gen #(.NCH(NCH), .F_NUM(F_NUM), .F_DEN(F_DEN)) u_tone (
    .clk, .rst_n, .clear(tone_clear), .adv(acc_en), .cos_o(cos_w), .sin_o(sin_w));

  cal_ctrl #(.K_REC(K_REC), .ITER_W(ITER_W)) u_ctrl (
    .clk, .rst_n, .start, .max_iter, .frame_valid(out_valid),
    .solve_done, .solve_all_tol, .state, .cal_clear, .acc_clear, .tone_clear,
    .acc_en, .solve_start, .iter, .converged, .limit_hit);

  mismatch_solver #(.NCH(NCH), .ACC_W(ACC_W), .K_REC(K_REC), .F_NUM(F_NUM),
                    .F_DEN(F_DEN), .ACC_AVG(EST_ACCAVG)) u_solver (
    .clk, .rst_n, .start(solve_start), .ref_amp, .ref_dc, .tol_o, .tol_g,
    .off_en, .gain_en, .ch_sel,
    .s_cos(s_cos[ch_sel]), .s_sin(s_sin[ch_sel]), .s_dc(s_dc[ch_sel]),
    .s_pow(s_pow[ch_sel]),    .busy(solve_busy), .est_valid, .est_ch, .est_os, .est_g, .est_dt, .d_o(est_d_o),
    .d_g(est_d_g), .in_tol(est_in_tol), .done(solve_done), .all_tol(solve_all_tol));

  cal_update #(.NCH(NCH)) u_upd (
    .clk, .rst_n, .clear(cal_clear), .upd_valid(est_valid), .upd_ch(est_ch),
    .d_o(est_d_o), .d_g(est_d_g), .off_en, .gain_en, .mu_o, .mu_g, .o_cal, .g_cal);

  // The solver is only started by the controller while it is idle.
  assert property (@(posedge clk) disable iff (!rst_n) solve_start |-> !solve_busy);
endmodule
