// tb_tone_ref_gen -- checks the cos/sin regressors of every channel against
// real cos/sin of 2*pi*F_NUM/F_DEN*(f*NCH+i) over several frames, and that
// clear returns to frame 0 and adv low holds the phase.
module tb_tone_ref_gen;
  import tiadc_cal_pkg::*;

  localparam int unsigned NCH = 16;
  localparam int unsigned F_NUM = 3, F_DEN = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  clear, adv;
  tone_t cos_o [NCH];
  tone_t sin_o [NCH];

  tone_ref_gen #(.NCH(NCH), .F_NUM(F_NUM), .F_DEN(F_DEN)) dut (
    .clk, .rst_n, .clear, .adv, .cos_o, .sin_o);

  int checks = 0, failures = 0;

  task automatic check_frame(input int f);
    for (int i = 0; i < NCH; i++) begin
      real th, ec, es;
      th = 2.0 * 3.14159265358979323846 * real'(F_NUM) / real'(F_DEN) * real'(f * NCH + i);
      ec = $cos(th) * 16384.0;
      es = $sin(th) * 16384.0;
      checks += 2;
      if (real'(cos_o[i]) - ec > 1.0 || ec - real'(cos_o[i]) > 1.0) begin
        failures++; $display("FAIL f=%0d ch=%0d cos %0d vs %f", f, i, cos_o[i], ec);
      end
      if (real'(sin_o[i]) - es > 1.0 || es - real'(sin_o[i]) > 1.0) begin
        failures++; $display("FAIL f=%0d ch=%0d sin %0d vs %f", f, i, sin_o[i], es);
      end
    end
  endtask

  initial begin
    clear = 0; adv = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < 60; f++) begin
      check_frame(f);
      adv = 1; @(negedge clk); adv = 0;
      if (f % 7 == 3) begin @(negedge clk); @(negedge clk); end   // hold
    end
    clear = 1; @(negedge clk); clear = 0;
    check_frame(0);
    adv = 1; @(negedge clk); adv = 0;
    check_frame(1);
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
