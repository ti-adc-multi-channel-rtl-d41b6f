// tb_chan_comp -- checks the per-channel correction y = (s - O_cal)*(1 - G_cal)
// against a real-number model, including rounding, saturation and the
// one-cycle latency.
module tb_chan_comp;
  import tiadc_cal_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid, out_valid;
  sample_t s;
  ofs_t    o_cal;
  gain_t   g_cal;
  out_t    y;

  chan_comp dut (.clk, .rst_n, .in_valid, .s, .o_cal, .g_cal, .out_valid, .y);

  int checks = 0, failures = 0;

  // Expected output from real arithmetic: round half up, then saturate.
  function automatic int expect_y(input int sv, input int ov, input int gv);
    real v;
    int  q;
    v = (real'(sv) - real'(ov) / 256.0) * (1.0 - real'(gv) / 65536.0) * 16.0;
    q = $rtoi($floor(v + 0.5));
    if (q > 4095)  q = 4095;
    if (q < -4096) q = -4096;
    return q;
  endfunction

  task automatic apply(input int sv, input int ov, input int gv);
    int e;
    @(negedge clk);
    s = sample_t'(sv); o_cal = ofs_t'(ov); g_cal = gain_t'(gv); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    e = expect_y(sv, ov, gv);
    checks++;
    if (!out_valid || int'(y) != e) begin
      failures++;
      $display("FAIL s=%0d o=%0d g=%0d: y=%0d valid=%0d expected %0d", sv, ov, gv, y, out_valid, e);
    end
  endtask

  initial begin
    in_valid = 0; s = '0; o_cal = '0; g_cal = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // identity
    apply(37, 0, 0);
    apply(-128, 0, 0);
    // pure offset: 10 - 2.5 codes
    apply(10, 640, 0);
    // pure gain: 100 * (1 - 0.25)
    apply(100, 0, 16384);
    // gain above one: G_cal negative
    apply(-50, 0, -13107);
    // saturation at both ends
    apply(127, -32768, -65536);
    apply(-128, 32768, -65536);
    // random
    for (int k = 0; k < 300; k++)
      apply($urandom_range(0, 255) - 128, $urandom_range(0, 8191) - 4096,
            $urandom_range(0, 26214) - 13107);
    // out_valid drops one cycle after in_valid
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL: out_valid stuck"); end
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
