// tb_cal_update -- checks the register bank update O_cal += mu_o*D_o,
// G_cal += mu_g*D_g against a model kept by the test, with per-loop enables,
// per-loop clear, rounding and saturation.
module tb_cal_update;
  import tiadc_cal_pkg::*;

  localparam int unsigned NCH = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, upd_valid, off_en, gain_en;
  logic [3:0] upd_ch;
  ofs_t d_o;
  gain_t d_g;
  mu_t mu_o, mu_g;
  ofs_t o_cal [NCH];
  gain_t g_cal [NCH];

  cal_update #(.NCH(NCH)) dut (.clk, .rst_n, .clear, .upd_valid, .upd_ch, .d_o, .d_g,
    .off_en, .gain_en, .mu_o, .mu_g, .o_cal, .g_cal);

  int checks = 0, failures = 0;
  longint mo [NCH];
  longint mg [NCH];

  function automatic longint step(input longint d, input longint mu, input longint lo, input longint hi, input longint cur);
    longint v;
    v = cur + longint'($floor(real'(d * mu) / 256.0 + 0.5));
    if (v > hi) v = hi;
    if (v < lo) v = lo;
    return v;
  endfunction

  task automatic compare(input string tag);
    for (int i = 0; i < NCH; i++) begin
      checks++;
      if (longint'(o_cal[i]) != mo[i] || longint'(g_cal[i]) != mg[i]) begin
        failures++;
        $display("FAIL %s ch%0d: %0d %0d vs %0d %0d", tag, i, o_cal[i], g_cal[i], mo[i], mg[i]);
      end
    end
  endtask

  initial begin
    clear = 0; upd_valid = 0; off_en = 1; gain_en = 1; upd_ch = '0;
    d_o = '0; d_g = '0; mu_o = 10'd64; mu_g = 10'd192;
    for (int i = 0; i < NCH; i++) begin mo[i] = 0; mg[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("reset");
    for (int k = 0; k < 400; k++) begin
      int c;
      c = $urandom_range(0, NCH - 1);
      upd_ch = 4'(c);
      d_o = ofs_t'($urandom_range(0, 8191) - 4096);
      d_g = gain_t'($urandom_range(0, 16383) - 8192);
      off_en = ($urandom_range(0, 3) != 0);
      gain_en = ($urandom_range(0, 3) != 0);
      mu_o = mu_t'($urandom_range(0, 1023));
      mu_g = mu_t'($urandom_range(0, 1023));
      upd_valid = ($urandom_range(0, 4) != 0);
      if (upd_valid && off_en)  mo[c] = step(longint'(d_o), longint'(mu_o), -131072, 131071, mo[c]);
      if (upd_valid && gain_en) mg[c] = step(longint'(d_g), longint'(mu_g), -131072, 131071, mg[c]);
      @(negedge clk);
      upd_valid = 0;
      compare("update");
    end
    // clear only the offset loop
    off_en = 1; gain_en = 0; clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < NCH; i++) mo[i] = 0;
    compare("clear offset");
    // saturation: repeated large positive steps
    off_en = 1; gain_en = 1; mu_o = 10'd1023; mu_g = 10'd1023; upd_ch = 4'd3;
    d_o = ofs_t'(131071); d_g = gain_t'(131071);
    repeat (4) begin
      upd_valid = 1;
      mo[3] = step(131071, 1023, -131072, 131071, mo[3]);
      mg[3] = step(131071, 1023, -131072, 131071, mg[3]);
      @(negedge clk);
    end
    upd_valid = 0;
    compare("saturate");
    checks++;
    if (o_cal[3] != ofs_t'(131071)) begin failures++; $display("FAIL: no saturation"); end
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
