// tb_tiadc_cal_workloads -- runs the calibration on the configurations the
// design is meant for, each with random mismatch (gain within +-10 %, offset
// within +-8 codes, +-0.5 code noise):
//   A  16 channels, 1.2 GHz tone at 40 GS/s: offset calibration, then gain
//      calibration, each within the 100 iterations the loop is run for;
//      then a step-size sweep (mu = 0.05 .. 1.75) whose iteration count must
//      be smallest near mu = 1 and grow towards both ends (above mu = 1
//      the loop is allowed to run into its 250-iteration cap)
//   B  128 sub-ADCs calibrated one by one (the per-sub-ADC view), 1.2 GHz
//   C  4 channels with a 12 GHz tone (f_in/f_s = 6/20) and with 1.2 GHz;
//      the 1.2 GHz case also has +-0.25 sample timing skew, whose estimates
//      must be within 0.01 sample of the model's skew against channel 0
//   D  the same 16-channel mismatch calibrated with the fit-based estimator
//      and with the accumulate-and-average one (Tables 5 and 6 of the
//      method's comparison): the first gain estimate of the fit must be the
//      more accurate, and both must suppress the mismatch spurs
// and checks the residual error, the registers against the model's mismatch
// and, from a DFT of the corrected stream, that the mismatch spurs at
// k*f_s/M and +-f_in + k*f_s/M drop by at least 15 dB.
module tb_tiadc_cal_workloads;
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  cal_bench #(.NCH(16))                                         wa (.clk, .rst_n);
  cal_bench #(.NCH(128))                                        wb (.clk, .rst_n);
  cal_bench #(.NCH(4), .F_NUM(6), .F_DEN(20), .K_REC(400))       wc (.clk, .rst_n);
  cal_bench #(.NCH(4), .F_NUM(3), .F_DEN(100), .K_REC(400))      wd (.clk, .rst_n);
  cal_bench #(.NCH(16))                                         wf (.clk, .rst_n);
  cal_bench #(.NCH(16), .EST_ACCAVG(1'b1))                      we (.clk, .rst_n);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int it, it_lo, it_mid, it_hi;
    bit cv;
    real r0, r1, eo, eg, sp0, sp1;
    int mus [7];
    int its [7];
    mus = '{13, 26, 64, 128, 256, 384, 448};   // mu * 256
    #1;   // after the models have set their defaults
    wa.mismatch(0.1, 8.0, 0.5);
    wb.mismatch(0.1, 8.0, 0.5);
    wc.mismatch(0.1, 8.0, 0.5);
    wd.mismatch(0.1, 8.0, 0.5);
    wd.set_skew(0.25);
    wf.mismatch(0.1, 8.0, 0.5);
    for (int i = 0; i < 16; i++) begin
      we.u_adc.gain[i] = wf.u_adc.gain[i];
      we.u_adc.ofs[i]  = wf.u_adc.ofs[i];
    end
    we.u_adc.amp = wf.u_adc.amp; we.u_adc.noise = wf.u_adc.noise;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // A: offset, then gain (16 channels); mismatch spurs before and after
    wa.spur_dbc(100, sp0);
    wa.run(1, 0, 128, 100, it, cv, r0, r1);
    $display("A offset: %0d iterations, converged %0d, rms %f -> %f", it, cv, r0, r1);
    check(cv && it <= 100, "A offset converges within 100 iterations");
    wa.run(0, 1, 128, 100, it, cv, r0, r1);
    wa.reg_err(eo, eg);
    $display("A gain:   %0d iterations, converged %0d, rms %f -> %f (reg err %f codes, %f)", it, cv, r0, r1, eo, eg);
    check(cv && it <= 100, "A gain converges within 100 iterations");
    check(r1 < 0.6 && eo < 0.15 && eg < 0.003, "A corrected");
    wa.spur_dbc(100, sp1);
    $display("A largest mismatch spur: %f dBc before, %f dBc after", sp0, sp1);
    check(sp1 < sp0 - 15.0 && sp1 < -50.0, "A spurs suppressed");

    // A: step-size sweep, joint loops, from zero each time
    for (int k = 0; k < 7; k++) begin
      wa.run(1, 1, mus[k], 250, its[k], cv, r0, r1);
      $display("A sweep mu=%f: %0d iterations, converged %0d, rms %f", real'(mus[k]) / 256.0, its[k], cv, r1);
      // above mu = 1 the loop amplifies the estimation noise (by about
      // mu/(2-mu)), so meeting the tolerance on all channels at once
      // becomes a matter of chance; only mu <= 1 must converge
      if (mus[k] <= 256) check(cv, "A sweep converges");
    end
    it_lo = its[0]; it_mid = its[4]; it_hi = its[6];
    check(it_mid < it_lo && it_mid < it_hi, "iterations smallest near mu = 1");

    // B: 128 sub-ADCs; with 128 noisy estimates per iteration the
    // tolerances are doubled so that all of them can be met at once
    wb.spur_dbc(100, sp0);
    wb.tol_o = 26; wb.tol_g = 131;
    wb.run(1, 1, 128, 100, it, cv, r0, r1);
    wb.reg_err(eo, eg);
    $display("B 128 sub-ADCs: %0d iterations, converged %0d, rms %f -> %f (reg err %f, %f)", it, cv, r0, r1, eo, eg);
    check(cv && r1 < 0.6 && eo < 0.15 && eg < 0.003, "B corrected");
    wb.spur_dbc(100, sp1);
    $display("B largest mismatch spur: %f dBc before, %f dBc after", sp0, sp1);
    check(sp1 < sp0 - 15.0, "B spurs suppressed");

    // C: 4 channels at 12 GHz and at 1.2 GHz
    wc.spur_dbc(100, sp0);
    wc.run(1, 1, 128, 100, it, cv, r0, r1);
    wc.reg_err(eo, eg);
    $display("C 4 ch 12 GHz: %0d iterations, converged %0d, rms %f -> %f (reg err %f, %f)", it, cv, r0, r1, eo, eg);
    check(cv && r1 < 0.6 && eo < 0.15 && eg < 0.003, "C 12 GHz corrected");
    wc.spur_dbc(100, sp1);
    $display("C 12 GHz largest mismatch spur: %f dBc before, %f dBc after", sp0, sp1);
    check(sp1 < sp0 - 15.0, "C spurs suppressed");
    wd.run(1, 1, 128, 100, it, cv, r0, r1);
    wd.reg_err(eo, eg);
    $display("C 4 ch 1.2 GHz: %0d iterations, converged %0d, rms %f -> %f (reg err %f, %f)", it, cv, r0, r1, eo, eg);
    check(cv && r1 < 0.6 && eo < 0.15 && eg < 0.003, "C 1.2 GHz corrected");
    wd.skew_err(eo);
    $display("C 4 ch 1.2 GHz largest skew estimate error %f sample", eo);
    check(eo < 0.01, "C 1.2 GHz skew estimated");

    // D: the two estimators on the same mismatch
    begin
      real ef, ea, spf0, spf1, spa0, spa1;
      int itf, ita;
      bit cvf, cva;
      wf.spur_dbc(100, spf0);
      wf.run(1, 1, 128, 100, itf, cvf, r0, r1);
      wf.first_gain_err(ef);
      wf.spur_dbc(100, spf1);
      we.spur_dbc(100, spa0);
      we.run(1, 1, 128, 100, ita, cva, r0, r1);
      we.first_gain_err(ea);
      we.spur_dbc(100, spa1);
      $display("D fit:          first gain estimate error %f %%, %0d iterations (converged %0d), spur %f -> %f dBc",
               ef, itf, cvf, spf0, spf1);
      $display("D acc-and-avg:  first gain estimate error %f %%, %0d iterations (converged %0d), spur %f -> %f dBc",
               ea, ita, cva, spa0, spa1);
      check(ef < ea, "D fit estimate more accurate than accumulate-and-average");
      check(cvf && spf1 < spf0 - 15.0, "D fit calibration suppresses spurs");
      check(spa1 < spa0 - 15.0, "D accumulate-and-average suppresses spurs");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
