// tb_cal_ctrl -- drives the iteration controller with a gappy frame stream
// and a stand-in solver, and checks: K_REC accumulated frames per record,
// the clears at each record, the stop on convergence, the stop on the
// iteration limit, the frozen DONE state and a restart in mid-run.
module tb_cal_ctrl;
  import tiadc_cal_pkg::*;

  localparam int unsigned K_REC = 25;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, frame_valid, solve_done, solve_all_tol;
  logic [7:0] max_iter, iter;
  cal_state_t state;
  logic cal_clear, acc_clear, tone_clear, acc_en, solve_start, converged, limit_hit;

  cal_ctrl #(.K_REC(K_REC), .ITER_W(8)) dut (
    .clk, .rst_n, .start, .max_iter, .frame_valid, .solve_done, .solve_all_tol,
    .state, .cal_clear, .acc_clear, .tone_clear, .acc_en, .solve_start, .iter,
    .converged, .limit_hit);

  int checks = 0, failures = 0;
  int acc_count, records, conv_at, n_starts, n_cal_clear;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Random frame stream.
  always @(negedge clk) frame_valid <= ($urandom_range(0, 3) != 0);

  // Stand-in solver: answers solve_start after a few cycles; reports all
  // channels within tolerance from iteration conv_at on (0 = never).
  initial begin
    solve_done = 0; solve_all_tol = 0;
    forever begin
      @(posedge clk);
      if (solve_start) begin
        n_starts++;
        check(acc_count == K_REC, $sformatf("record of %0d frames", acc_count));
        check(state == CAL_SOLVE, "solve_start comes with SOLVE");
        records++;
        repeat ($urandom_range(3, 20)) @(posedge clk);
        #1;
        solve_done = 1;
        solve_all_tol = (conv_at != 0) && (records >= conv_at);
        @(posedge clk);
        #1;
        solve_done = 0;
      end
    end
  end

  // Frame counting and state rules.
  always @(posedge clk) if (rst_n) begin
    if (acc_clear) acc_count <= 0;
    else if (acc_en) acc_count <= acc_count + 1;
    if (acc_en && state != CAL_ACQ) begin checks++; failures++; $display("FAIL: acc_en outside ACQ"); end
    if (acc_en && !frame_valid)     begin checks++; failures++; $display("FAIL: acc_en without frame"); end
    if (acc_clear != tone_clear)    begin checks++; failures++; $display("FAIL: clears differ"); end
    if (cal_clear) n_cal_clear++;
  end

  task automatic go(input int lim, input int conv);
    max_iter = 8'(lim); conv_at = conv; records = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    @(negedge clk);
  endtask

  initial begin
    start = 0; max_iter = 8'd100; conv_at = 0;
    acc_count = 0; records = 0; n_starts = 0; n_cal_clear = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(state == CAL_IDLE, "idle after reset");

    // converges on the 4th iteration
    go(100, 4);
    check(n_cal_clear == 1, "cal_clear on start");
    wait (state == CAL_DONE);
    @(negedge clk);
    check(converged && !limit_hit && iter == 8'd4, $sformatf("converged at 4, iter=%0d", iter));
    // frozen: nothing happens in DONE
    begin
      int s0;
      s0 = n_starts;
      repeat (200) @(negedge clk);
      check(state == CAL_DONE && n_starts == s0 && iter == 8'd4, "DONE holds");
    end

    // never converges: stops at max_iter = 6
    go(6, 0);
    wait (state == CAL_DONE);
    @(negedge clk);
    check(limit_hit && !converged && iter == 8'd6, $sformatf("limit at 6, iter=%0d", iter));

    // restart in the middle of a run
    go(50, 0);
    wait (records == 2);
    repeat (10) @(negedge clk);
    go(50, 1);
    check(iter == 8'd0 && state == CAL_ACQ, "restart clears iteration count");
    wait (state == CAL_DONE);
    @(negedge clk);
    check(converged && iter == 8'd1, "converged at first iteration after restart");
    check(n_cal_clear == 4, "one cal_clear per start");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
