// tb_mismatch_solver -- feeds the solver fit sums built from known sine
// parameters (amplitude, phase, DC per channel) and checks the offset, gain
// and timing-skew estimates (skew against channel 0, phase difference times
// F_DEN/F_NUM = 100/3, within 0.003 sample), their errors against the ideal channel, the tolerance
// flags and the pass timing.  A second solver built with the
// accumulate-and-average estimator gets power sums and must return
// g_i = NCH * P_i / sum P (within 2 LSB) and the same offsets.
module tb_mismatch_solver;
  import tiadc_cal_pkg::*;

  localparam int unsigned NCH = 4;
  localparam int unsigned ACC_W = 40;
  localparam int unsigned K_REC = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, off_en, gain_en;
  logic [OFS_W-1:0] ref_amp;
  ofs_t ref_dc, tol_o;
  gain_t tol_g;
  logic [1:0] ch_sel, est_ch;
  logic signed [ACC_W-1:0] sc [NCH];
  logic signed [ACC_W-1:0] ss [NCH];
  logic signed [ACC_W-1:0] sd [NCH];
  logic busy, est_valid, in_tol, done, all_tol;
  ofs_t est_os, d_o;
  gain_t est_g, d_g;
  dt_t est_dt;

  mismatch_solver #(.NCH(NCH), .ACC_W(ACC_W), .K_REC(K_REC)) dut (
    .clk, .rst_n, .start, .ref_amp, .ref_dc, .tol_o, .tol_g, .off_en, .gain_en,
    .ch_sel, .s_cos(sc[ch_sel]), .s_sin(ss[ch_sel]), .s_dc(sd[ch_sel]), .s_pow(sp[ch_sel]),
    .busy, .est_valid, .est_ch, .est_os, .est_g, .est_dt, .d_o, .d_g, .in_tol, .done, .all_tol);

  // accumulate-and-average copy
  logic [1:0] ch_sel2, est_ch2;
  logic signed [ACC_W-1:0] sp [NCH];
  logic busy2, est_valid2, in_tol2, done2, all_tol2;
  ofs_t est_os2, d_o2;
  gain_t est_g2, d_g2;
  dt_t est_dt2;

  mismatch_solver #(.NCH(NCH), .ACC_W(ACC_W), .K_REC(K_REC), .ACC_AVG(1'b1)) dut2 (
    .clk, .rst_n, .start, .ref_amp, .ref_dc, .tol_o, .tol_g, .off_en, .gain_en,
    .ch_sel(ch_sel2), .s_cos(sc[ch_sel2]), .s_sin(ss[ch_sel2]), .s_dc(sd[ch_sel2]), .s_pow(sp[ch_sel2]),
    .busy(busy2), .est_valid(est_valid2), .est_ch(est_ch2), .est_os(est_os2), .est_g(est_g2),
    .est_dt(est_dt2), .d_o(d_o2), .d_g(d_g2), .in_tol(in_tol2), .done(done2), .all_tol(all_tol2));

  int n_est2;
  always @(negedge clk) if (rst_n && est_valid2) begin
    int i;
    real ptot, eg, e;
    i = int'(est_ch2);
    ptot = 0.0;
    for (int j = 0; j < NCH; j++) ptot += real'(sp[j]);
    eg = real'(NCH) * real'(sp[i]) / ptot * 65536.0;
    e = real'(est_g2) - eg;
    checks += 3;
    if (!(e <= 2.0 && e >= -2.0)) begin failures++; $display("FAIL: acc-avg ch%0d g %0d vs %f", i, est_g2, eg); end
    if (est_os2 != est_os_fit[i]) begin failures++; $display("FAIL: acc-avg ch%0d offset differs", i); end
    if (d_g2 != est_g2 - gain_t'(65536)) begin failures++; $display("FAIL: acc-avg D_g"); end
    n_est2++;
  end

  ofs_t est_os_fit [NCH];
  always @(posedge clk) if (est_valid) est_os_fit[est_ch] <= est_os;

  int checks = 0, failures = 0;
  real amp [NCH];
  real dcv [NCH];
  real phs [NCH];
  int  n_est;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Sums a record of K_REC samples of a*cos(th+ph)+c would give (samples with
  // 4 fractional bits, regressors scaled by 2^14).
  task automatic set_ch(input int i, input real a, input real ph, input real c);
    real k;
    k = real'(K_REC);
    amp[i] = a; dcv[i] = c; phs[i] = ph;
    // power sum of the record: K*(a^2/2 + c^2), samples with 4 fractional bits
    sp[i] = ACC_W'(longint'(k * (a * a / 2.0 + c * c) * 256.0));
    sc[i] = ACC_W'(longint'(a * $cos(ph) * k / 2.0 * 16.0 * 16384.0));
    ss[i] = ACC_W'(longint'(-a * $sin(ph) * k / 2.0 * 16.0 * 16384.0));
    sd[i] = ACC_W'(longint'(c * k * 16.0));
  endtask

  task automatic run_pass(input real ra, input bit exp_all);
    int t0, t1;
    real e;
    n_est = 0;
    @(negedge clk); start = 1; t0 = int'($time); @(negedge clk); start = 0;
    while (!done) begin
      @(negedge clk);
      if (est_valid) begin
        int i;
        real eo, eg, ed, edg;
        i = int'(est_ch);
        check(i == n_est, "channels in order");
        n_est++;
        eo = (dcv[i] - real'(ref_dc) / 256.0) * 256.0;
        eg = amp[i] / ra * 65536.0;
        e = real'(est_os) - eo;
        check(e <= 1.0 && e >= -1.0, $sformatf("ch%0d os %0d vs %f", i, est_os, eo));
        e = real'(est_g) - eg;
        check(e <= 2.0 && e >= -2.0, $sformatf("ch%0d g %0d vs %f", i, est_g, eg));
        begin
          real dp, dx;
          dp = (phs[i] - phs[0]) / (2.0 * 3.14159265358979323846);
          dp = dp - $floor(dp + 0.5);
          dx = dp * 100.0 / 3.0;
          e = real'(est_dt) / 4096.0 - dx;
          check(e <= 0.003 && e >= -0.003, $sformatf("ch%0d dt %f vs %f", i, real'(est_dt) / 4096.0, dx));
        end
        check(d_o == est_os, "D_o = O_i - O_ref");
        check(d_g == est_g - gain_t'(65536), "D_g = G_i - G_ref");
        ed  = real'(d_o) < 0 ? -real'(d_o) : real'(d_o);
        edg = real'(d_g) < 0 ? -real'(d_g) : real'(d_g);
        check(in_tol == ((!off_en || ed <= real'(tol_o)) && (!gain_en || edg <= real'(tol_g))), "in_tol flag");
      end
    end
    t1 = int'($time);
    check(n_est == NCH, "one estimate per channel");
    while (!done2) @(negedge clk);
    @(negedge clk);
    check(all_tol == exp_all, "all_tol");
    // each channel needs the square root and two divisions
    check((t1 - t0) / 10 < NCH * (3 * ACC_W + 40), "pass time");
    $display("pass of %0d channels took %0d cycles", NCH, (t1 - t0) / 10);
  endtask

  initial begin
    start = 0; off_en = 1; gain_en = 1; n_est2 = 0;
    ref_amp = OFS_W'(100 * 256); ref_dc = '0;
    tol_o = ofs_t'(26); tol_g = gain_t'(131);
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_ch(0, 100.0, 0.0, 0.0);
    set_ch(1, 110.0, 1.0, 5.25);
    set_ch(2, 92.5, -2.0, -7.5);
    set_ch(3, 100.05, 3.0, 0.05);
    run_pass(100.0, 0);
    // all inside tolerance
    set_ch(0, 100.0, 0.3, 0.0);
    set_ch(1, 100.1, 1.3, 0.08);
    set_ch(2, 99.9, -2.0, -0.09);
    set_ch(3, 100.05, 2.9, 0.0);
    run_pass(100.0, 1);
    // a DC reference and a different amplitude reference
    ref_dc = ofs_t'(2 * 256); ref_amp = OFS_W'(60 * 256);
    set_ch(0, 60.0, 0.5, 2.0);
    set_ch(1, 66.0, 1.5, -3.0);
    set_ch(2, 54.0, 2.5, 10.0);
    set_ch(3, 30.0, -0.5, 2.5);
    run_pass(60.0, 0);
    // gain loop only: offsets do not count for tolerance
    gain_en = 1; off_en = 0; ref_dc = '0; ref_amp = OFS_W'(60 * 256);
    set_ch(0, 60.0, 0.5, 20.0);
    set_ch(1, 60.0, 1.5, -30.0);
    set_ch(2, 60.05, 2.5, 10.0);
    set_ch(3, 59.95, -0.5, 2.5);
    run_pass(60.0, 1);
    check(n_est2 == 4 * NCH, "accumulate-and-average estimates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    check(n_est2 == 4 * NCH, "accumulate-and-average estimates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
