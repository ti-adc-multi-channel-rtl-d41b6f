// tb_tiadc_cal_top -- end-to-end test of the calibration engine at its
// default size (16 channels, 400-frame records, 1.2 GHz tone at 40 GS/s).
//
// A behavioural 16-channel TI-ADC with random per-channel gain (0.9..1.1),
// offset (-8..+8 codes), timing skew (-0.2..+0.2 sample periods),
// quantisation and +-0.5 code noise feeds the engine.  The test runs, in order: offset calibration alone, then gain
// calibration alone (the offset registers must survive it), a frozen
// phase, a joint offset+gain calibration from zero, and a run that must stop
// on the iteration limit.  It checks the converged registers against the
// values the model's mismatch implies (O_cal = ofs, G_cal = 1 - 1/gain), the
// skew estimates against the model's skew relative to channel 0, the
// corrected samples against the ideal tone, the one-cycle latency, that
// frames keep flowing while the solver runs, and counts each mechanism.
module tb_tiadc_cal_top;
  import tiadc_cal_pkg::*;

  localparam int unsigned NCH = M;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        en;
  logic        adc_valid, out_valid;
  sample_t     adc_data [NCH];
  out_t        out_data [NCH];
  logic        start, off_en, gain_en;
  mu_t         mu_o, mu_g;
  logic [OFS_W-1:0] ref_amp;
  ofs_t        ref_dc, tol_o;
  gain_t       tol_g;
  logic [7:0]  max_iter;
  cal_state_t  state;
  logic [7:0]  iter;
  logic        converged, limit_hit;
  ofs_t        o_cal [NCH];
  gain_t       g_cal [NCH];
  logic        est_valid, est_in_tol;
  logic [3:0]  est_ch;
  ofs_t        est_os, est_d_o;
  gain_t       est_g, est_d_g;
  dt_t         est_dt;

  tiadc_model #(.NCH(NCH)) u_adc (.clk, .en, .valid(adc_valid), .data(adc_data));

  tiadc_cal_top dut (
    .clk, .rst_n, .adc_valid, .adc_data, .out_valid, .out_data,
    .start, .off_en, .gain_en, .mu_o, .mu_g, .ref_amp, .ref_dc, .tol_o, .tol_g,
    .max_iter, .state, .iter, .converged, .limit_hit, .o_cal, .g_cal,
    .est_valid, .est_ch, .est_os, .est_g, .est_dt, .est_d_o, .est_d_g, .est_in_tol);

  int checks = 0, failures = 0;
  int n_off_conv = 0, n_gain_conv = 0, n_joint_conv = 0, n_limit = 0;
  int n_skew = 0;
  int n_bg_frames = 0, n_frozen_ok = 0, n_keep = 0, n_est = 0;
  longint unsigned cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Frame index of the frame on out_data (the one on adc_data a cycle ago).
  longint unsigned pf;
  logic            pv;
  // Iteration period: cycles between channel 0's estimates of consecutive
  // iterations (K_REC frames plus the solver pass).
  longint unsigned last_est0 = 0;
  dt_t dt_last [NCH];
  int max_period = 0, min_period = 1 << 30;
  always @(posedge clk) begin
    cycles++;
    pf <= u_adc.data_frame;
    pv <= adc_valid;
    if (est_valid) n_est++;
    if (est_valid) dt_last[est_ch] = est_dt;
    if (est_valid && est_ch == 0) begin
      if (last_est0 != 0 && state == CAL_SOLVE && iter != 0) begin
        if (int'(cycles - last_est0) > max_period) max_period = int'(cycles - last_est0);
        if (int'(cycles - last_est0) < min_period) min_period = int'(cycles - last_est0);
      end
      last_est0 = cycles;
    end
  end

  // Latency: out_valid follows adc_valid by exactly one cycle.
  always @(negedge clk) if (rst_n && cycles > 4) begin
    if (out_valid !== pv) begin
      failures++;
      checks++;
      $display("FAIL: out_valid does not follow adc_valid by one cycle");
    end
  end

  // RMS error of the corrected stream against the ideal tone over nf frames.
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

  task automatic run_cal(input bit o_en, input bit g_en, input int lim);
    off_en = o_en; gain_en = g_en; max_iter = 8'(lim);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (state != CAL_DONE) begin
      @(negedge clk);
      if (state == CAL_SOLVE && out_valid) begin
        real e;
        n_bg_frames++;
        e = real'(out_data[0]) / 16.0 - u_adc.ideal(0, pf);
        // the stream stays corrected with the current registers
        if (e > 40.0 || e < -40.0) begin
          checks++; failures++;
          $display("FAIL: corrupted output during solve");
        end
      end
    end
  endtask

  real true_g [NCH];
  real true_o [NCH];
  real true_dt [NCH];

  initial begin
    real rms0, rms1, rms2;
    ofs_t  o_save [NCH];
    gain_t g_save [NCH];
    en = 0; start = 0; off_en = 0; gain_en = 0;
    mu_o = 10'd128; mu_g = 10'd128;             // 0.5
    ref_amp = OFS_W'(100 * 256); ref_dc = '0;
    tol_o = ofs_t'(13);                         // 0.05 code
    tol_g = gain_t'(66);                        // 0.001
    max_iter = 8'd100;
    #1;   // after the model has set its defaults
    for (int i = 0; i < NCH; i++) begin
      true_g[i] = 0.9 + 0.2 * real'($urandom_range(0, 1000)) / 1000.0;
      true_o[i] = -8.0 + 16.0 * real'($urandom_range(0, 1000)) / 1000.0;
      u_adc.gain[i] = true_g[i];
      u_adc.ofs[i]  = true_o[i];
      true_dt[i] = -0.2 + 0.4 * real'($urandom_range(0, 1000)) / 1000.0;
      u_adc.skew[i] = true_dt[i];
    end
    u_adc.amp = 100.0; u_adc.noise = 0.5; u_adc.phi = 0.7;
    repeat (5) @(negedge clk);
    rst_n = 1;
    en = 1;
    repeat (5) @(negedge clk);
    rms_err(200, rms0);
    $display("uncalibrated RMS error %f codes", rms0);

    // 1) offset calibration alone
    run_cal(1, 0, 100);
    $display("offset loop: converged=%0d after %0d iterations", converged, iter);
    check(converged && !limit_hit, "offset loop converges");
    if (converged) n_off_conv++;
    for (int i = 0; i < NCH; i++) begin
      real o;
      o = real'(o_cal[i]) / 256.0;
      check(o - true_o[i] < 0.15 && true_o[i] - o < 0.15, $sformatf("ch%0d O_cal %f vs %f", i, o, true_o[i]));
      check(g_cal[i] == 0, "gain registers untouched by offset loop");
      o_save[i] = o_cal[i];
    end

    // 2) gain calibration alone, offset registers must stay
    run_cal(0, 1, 100);
    $display("gain loop: converged=%0d after %0d iterations", converged, iter);
    check(converged && !limit_hit, "gain loop converges");
    if (converged) n_gain_conv++;
    for (int i = 0; i < NCH; i++) begin
      real g, gx;
      g = real'(g_cal[i]) / 65536.0;
      gx = 1.0 - 1.0 / true_g[i];
      check(g - gx < 0.003 && gx - g < 0.003, $sformatf("ch%0d G_cal %f vs %f", i, g, gx));
      check(o_cal[i] == o_save[i], "offset registers kept during gain loop");
      if (o_cal[i] == o_save[i]) n_keep++;
      g_save[i] = g_cal[i];
    end

    // 3) frozen: registers hold, stream corrected
    rms_err(400, rms1);
    $display("calibrated RMS error %f codes", rms1);
    check(rms1 < 0.6, "corrected stream close to the ideal tone");
    check(rms1 < rms0 / 4.0, "calibration reduces the error");
    for (int i = 0; i < NCH; i++) begin
      check(o_cal[i] == o_save[i] && g_cal[i] == g_save[i], "registers frozen after convergence");
      if (o_cal[i] == o_save[i] && g_cal[i] == g_save[i]) n_frozen_ok++;
    end

    // 4) joint calibration from zero
    run_cal(1, 1, 100);
    $display("joint loop: converged=%0d after %0d iterations", converged, iter);
    check(converged, "joint loop converges");
    if (converged) n_joint_conv++;
    rms_err(200, rms2);
    check(rms2 < 0.6, "joint calibration corrects the stream");
    for (int i = 0; i < NCH; i++) begin
      real g, gx, o;
      g = real'(g_cal[i]) / 65536.0;
      gx = 1.0 - 1.0 / true_g[i];
      o = real'(o_cal[i]) / 256.0;
      check(g - gx < 0.003 && gx - g < 0.003, "joint G_cal");
      check(o - true_o[i] < 0.15 && true_o[i] - o < 0.15, "joint O_cal");
    end
    // skew estimates of the last iteration, against channel 0
    for (int i = 0; i < NCH; i++) begin
      real d, dx;
      d  = real'(dt_last[i]) / real'(1 << DT_FRAC);
      dx = true_dt[i] - true_dt[0];
      check(d - dx < 0.01 && dx - d < 0.01, $sformatf("ch%0d skew %f vs %f", i, d, dx));
      if (d - dx < 0.01 && dx - d < 0.01) n_skew++;
    end
    $display("skew estimates within 0.01 sample: %0d of %0d", n_skew, NCH);

    // 5) unreachable tolerance: stops on the iteration limit
    tol_o = '0; tol_g = '0;
    run_cal(1, 1, 5);
    check(limit_hit && !converged && iter == 8'd5, "stop on iteration limit");
    if (limit_hit) n_limit++;

    $display("mechanisms: off_conv=%0d gain_conv=%0d joint_conv=%0d limit=%0d bg_frames=%0d frozen=%0d kept=%0d estimates=%0d",
             n_off_conv, n_gain_conv, n_joint_conv, n_limit, n_bg_frames, n_frozen_ok, n_keep, n_est);
    check(n_off_conv > 0,  "offset-only mode exercised");
    check(n_gain_conv > 0, "gain-only mode exercised");
    check(n_joint_conv > 0, "joint mode exercised");
    check(n_limit > 0,     "iteration limit exercised");
    check(n_bg_frames > 0, "background frames during solve");
    check(n_frozen_ok > 0, "freeze exercised");
    check(n_est > 0,       "estimates produced");
    // 400 frames + 16 channels * (2*40+22) solver cycles + a few of control
    $display("iteration period %0d..%0d cycles", min_period, max_period);
    check(min_period >= 400 + 16 * 100 && max_period <= 400 + 16 * 102 + 10, "iteration period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
