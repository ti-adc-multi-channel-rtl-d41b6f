// tb_lse_acc -- checks the three fit sums and the power sum against sums
// kept by the test over random samples and regressors, with en gaps and
// clear; a second copy built without the power sum must hold it at 0.
module tb_lse_acc;
  import tiadc_cal_pkg::*;

  localparam int unsigned ACC_W = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, en;
  out_t y;
  tone_t cos_i, sin_i;
  logic signed [ACC_W-1:0] s_cos, s_sin, s_dc, s_pow, s_cos2, s_sin2, s_dc2, s_pow2;

  lse_acc #(.ACC_W(ACC_W), .POW_EN(1'b1)) dut (.clk, .rst_n, .clear, .en, .y, .cos_i, .sin_i,
    .s_cos, .s_sin, .s_dc, .s_pow);
  lse_acc #(.ACC_W(ACC_W), .POW_EN(1'b0)) dut2 (.clk, .rst_n, .clear, .en, .y, .cos_i, .sin_i,
    .s_cos(s_cos2), .s_sin(s_sin2), .s_dc(s_dc2), .s_pow(s_pow2));

  int checks = 0, failures = 0;
  longint ec, es, ed, ep;

  task automatic compare(input string tag);
    checks += 5;
    if (longint'(s_cos) != ec || longint'(s_sin) != es || longint'(s_dc) != ed) begin
      failures++;
      $display("FAIL %s: %0d %0d %0d vs %0d %0d %0d", tag, s_cos, s_sin, s_dc, ec, es, ed);
    end
    if (longint'(s_pow) != ep) begin
      failures++;
      $display("FAIL %s: power %0d vs %0d", tag, s_pow, ep);
    end
    if (s_pow2 != '0 || s_cos2 != s_cos || s_sin2 != s_sin || s_dc2 != s_dc) begin
      failures++;
      $display("FAIL %s: copy without power sum differs", tag);
    end
  endtask

  initial begin
    clear = 0; en = 0; y = '0; cos_i = '0; sin_i = '0;
    ec = 0; es = 0; ed = 0; ep = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rec = 0; rec < 3; rec++) begin
      clear = 1; @(negedge clk); clear = 0;
      ec = 0; es = 0; ed = 0; ep = 0;
      compare("after clear");
      for (int k = 0; k < 500; k++) begin
        y     = out_t'($urandom_range(0, 8191) - 4096);
        cos_i = tone_t'($urandom_range(0, 32768) - 16384);
        sin_i = tone_t'($urandom_range(0, 32768) - 16384);
        en    = ($urandom_range(0, 3) != 0);
        if (en) begin
          ec += longint'(y) * longint'(cos_i);
          es += longint'(y) * longint'(sin_i);
          ed += longint'(y);
          ep += longint'(y) * longint'(y);
        end
        @(negedge clk);
      end
      en = 0;
      @(negedge clk);
      compare("end of record");
    end
    // clear wins over en
    clear = 1; en = 1; y = 100; @(negedge clk); clear = 0; en = 0;
    ec = 0; es = 0; ed = 0; ep = 0;
    compare("clear over en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
