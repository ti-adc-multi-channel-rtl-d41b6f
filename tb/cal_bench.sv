// cal_bench -- test harness: a behavioural TI-ADC (tiadc_model) with random
// per-channel gain and offset mismatch feeding tiadc_cal_top, plus a task
// that runs one whole calibration and reports iteration count, convergence
// and the RMS error of the corrected stream against the ideal tone before
// and after; spur_dbc measures the largest mismatch spur of the corrected
// stream; set_skew adds random timing skew and skew_err gives the largest
// error of the last iteration's skew estimates against channel 0;
// first_gain_err gives the mean relative error of the first iteration's gain
// estimates (percent).  EST_ACCAVG selects the engine's estimator.  Used by the workload testbench to run the engine at several
// channel counts, tone frequencies and step sizes.
module cal_bench
  import tiadc_cal_pkg::*;
#(
  parameter int unsigned NCH   = M,
  parameter int unsigned F_NUM = 3,
  parameter int unsigned F_DEN = 100,
  parameter int unsigned K_REC = 400,
  parameter bit          EST_ACCAVG = 1'b0
) (
  input logic clk,
  input logic rst_n
);
  logic        adc_valid, out_valid;
  sample_t     adc_data [NCH];
  out_t        out_data [NCH];
  logic        start, off_en, gain_en;
  mu_t         mu_o, mu_g;
  logic [OFS_W-1:0] ref_amp;
  ofs_t        ref_dc, tol_o;
  gain_t       tol_g;
  logic [7:0]  max_iter, iter;
  cal_state_t  state;
  logic        converged, limit_hit;
  ofs_t        o_cal [NCH];
  gain_t       g_cal [NCH];
  logic        est_valid, est_in_tol;
  logic [$clog2(NCH)-1:0] est_ch;
  ofs_t        est_os, est_d_o;
  gain_t       est_g, est_d_g;
  dt_t         est_dt;

  tiadc_model #(.NCH(NCH), .F_NUM(F_NUM), .F_DEN(F_DEN)) u_adc (
    .clk, .en(rst_n), .valid(adc_valid), .data(adc_data));

  tiadc_cal_top #(.NCH(NCH), .K_REC(K_REC), .F_NUM(F_NUM), .F_DEN(F_DEN),
                  .EST_ACCAVG(EST_ACCAVG)) dut (
    .clk, .rst_n, .adc_valid, .adc_data, .out_valid, .out_data,
    .start, .off_en, .gain_en, .mu_o, .mu_g, .ref_amp, .ref_dc, .tol_o, .tol_g,
    .max_iter, .state, .iter, .converged, .limit_hit, .o_cal, .g_cal,
    .est_valid, .est_ch, .est_os, .est_g, .est_dt, .est_d_o, .est_d_g, .est_in_tol);

  longint unsigned pf;
  always @(posedge clk) pf <= u_adc.data_frame;

  initial begin
    start = 0; off_en = 1; gain_en = 1; mu_o = 10'd128; mu_g = 10'd128;
    ref_amp = OFS_W'(100 * 256); ref_dc = '0;
    tol_o = ofs_t'(13); tol_g = gain_t'(66); max_iter = 8'd200;
  end

  dt_t dt_last [NCH];
  gain_t g_first [NCH];
  always @(posedge clk) if (est_valid) begin
    dt_last[est_ch] <= est_dt;
    if (iter == '0) g_first[est_ch] <= est_g;
  end

  task automatic first_gain_err(output real e);
    e = 0.0;
    for (int i = 0; i < NCH; i++) begin
      real d;
      d = (real'(g_first[i]) / real'(1 << GAIN_FRAC) - u_adc.gain[i]) / u_adc.gain[i];
      e += (d < 0.0 ? -d : d) * 100.0 / real'(NCH);
    end
  endtask

  task automatic set_skew(input real span);
    for (int i = 0; i < NCH; i++)
      u_adc.skew[i] = -span + 2.0 * span * real'($urandom_range(0, 1000)) / 1000.0;
  endtask

  task automatic skew_err(output real e);
    e = 0.0;
    for (int i = 0; i < NCH; i++) begin
      real d;
      d = real'(dt_last[i]) / real'(1 << DT_FRAC) - (u_adc.skew[i] - u_adc.skew[0]);
      if (d < 0.0) d = -d;
      if (d > e) e = d;
    end
  endtask

  task automatic mismatch(input real gspan, input real ospan, input real noise);
    for (int i = 0; i < NCH; i++) begin
      u_adc.gain[i] = 1.0 - gspan + 2.0 * gspan * real'($urandom_range(0, 1000)) / 1000.0;
      u_adc.ofs[i]  = -ospan + 2.0 * ospan * real'($urandom_range(0, 1000)) / 1000.0;
    end
    u_adc.amp = 100.0;
    u_adc.noise = noise;
  endtask

  task automatic rms_err(input int nf, output real rms);
    real acc;
    acc = 0.0;
    for (int f = 0; f < nf; f++) begin
      @(negedge clk);
      for (int i = 0; i < NCH; i++) begin
        real e;
        e = real'(out_data[i]) / 16.0 - u_adc.ideal(i, pf);
        acc += e * e;
      end
    end
    rms = $sqrt(acc / real'(nf * NCH));
  endtask

  // Largest distance of the registers from the values the model implies.
  task automatic reg_err(output real eo, output real eg);
    eo = 0.0; eg = 0.0;
    for (int i = 0; i < NCH; i++) begin
      real a, b;
      a = real'(o_cal[i]) / 256.0 - u_adc.ofs[i];
      b = real'(g_cal[i]) / 65536.0 - (1.0 - 1.0 / u_adc.gain[i]);
      if (a < 0.0) a = -a;
      if (b < 0.0) b = -b;
      if (a > eo) eo = a;
      if (b > eg) eg = b;
    end
  endtask

  // Largest mismatch spur of the corrected stream, in dB below the tone,
  // from a DFT over nf frames (nf*NCH samples) evaluated at the bins where
  // offset mismatch (k*f_s/NCH) and gain mismatch (+-f_in + k*f_s/NCH) put
  // their spurs, k = 1..NCH-1.  nf*NCH*F_NUM must be a multiple of F_DEN.
  task automatic spur_dbc(input int nf, output real dbc);
    int  n_tot, sb;
    real x [];
    real ps, pmax;
    n_tot = nf * NCH;
    sb = n_tot * F_NUM / F_DEN;
    x = new[n_tot];
    for (int f = 0; f < nf; f++) begin
      @(negedge clk);
      for (int i = 0; i < NCH; i++) x[f * NCH + i] = real'(out_data[i]) / 16.0;
    end
    ps = bin_pow(x, sb);
    pmax = 0.0;
    for (int k = 1; k < NCH; k++) begin
      int b [3];
      b[0] = k * nf;
      b[1] = (k * nf + sb) % n_tot;
      b[2] = (k * nf - sb + n_tot) % n_tot;
      for (int j = 0; j < 3; j++) begin
        real p;
        if (b[j] != sb && b[j] != n_tot - sb && b[j] != 0) begin
          p = bin_pow(x, b[j]);
          if (p > pmax) pmax = p;
        end
      end
    end
    dbc = 10.0 * $log10(pmax / ps);
  endtask

  function automatic real bin_pow(input real x [], input int b);
    real re, im, w;
    re = 0.0; im = 0.0;
    w = 2.0 * 3.14159265358979323846 * real'(b) / real'(x.size());
    for (int n = 0; n < x.size(); n++) begin
      re += x[n] * $cos(w * real'(n));
      im -= x[n] * $sin(w * real'(n));
    end
    return re * re + im * im;
  endfunction

  task automatic run(input bit o_en, input bit g_en, input int mu_q8, input int lim,
                     output int iters, output bit conv, output real rms0, output real rms1);
    rms_err(100, rms0);
    off_en = o_en; gain_en = g_en; mu_o = mu_t'(mu_q8); mu_g = mu_t'(mu_q8);
    max_iter = 8'(lim);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    @(negedge clk);
    while (state != CAL_DONE) @(negedge clk);
    iters = int'(iter);
    conv = converged;
    rms_err(100, rms1);
  endtask
endmodule
