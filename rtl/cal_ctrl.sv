// cal_ctrl -- iteration controller of the background calibration.
//
// One calibration iteration is: acquire a record of K_REC corrected frames
// into the fit accumulators (ACQ), let the solver estimate every channel's
// mismatch and update its registers (SOLVE), then decide.  The loop repeats
// until every channel's error lies within tolerance (converged) or max_iter
// iterations have run, and then stops in DONE.  In DONE the calibration
// registers are frozen and keep correcting the stream without further
// iteration; start launches a new calibration, zeroing the registers of the
// enabled loops.  The
// iteration with stop on convergence follows the published method; the tolerance
// test, the iteration limit input and the record length are this design's.
//
// The sample stream is never stalled: frames that arrive while the solver
// runs are corrected and passed on but not accumulated (background mode).
//
// Interface: start is a one-cycle request honoured in any state.  frame_valid
// marks a corrected frame.  acc_clear/tone_clear/acc_en drive the fit
// accumulators and the tone generator, cal_clear the register bank,
// solve_start the solver.  iter counts finished iterations; converged and
// limit_hit tell why the loop stopped.
module cal_ctrl
  import tiadc_cal_pkg::*;
#(
  parameter int unsigned K_REC  = 400,
  parameter int unsigned ITER_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ITER_W-1:0] max_iter,
  input  logic              frame_valid,
  input  logic              solve_done,
  input  logic              solve_all_tol,
  output cal_state_t        state,
  output logic              cal_clear,
  output logic              acc_clear,
  output logic              tone_clear,
  output logic              acc_en,
  output logic              solve_start,
  output logic [ITER_W-1:0] iter,
  output logic              converged,
  output logic              limit_hit
);
  localparam int unsigned KW = $clog2(K_REC + 1);

  logic [KW-1:0] frames;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= CAL_IDLE;
      frames      <= '0;
      iter        <= '0;
      converged   <= 1'b0;
      limit_hit   <= 1'b0;
      cal_clear   <= 1'b0;
      acc_clear   <= 1'b0;
      tone_clear  <= 1'b0;
      solve_start <= 1'b0;
    end else begin
      cal_clear   <= 1'b0;
      acc_clear   <= 1'b0;
      tone_clear  <= 1'b0;
      solve_start <= 1'b0;
      if (start) begin
        state      <= CAL_ACQ;
        frames     <= '0;
        iter       <= '0;
        converged  <= 1'b0;
        limit_hit  <= 1'b0;
        cal_clear  <= 1'b1;
        acc_clear  <= 1'b1;
        tone_clear <= 1'b1;
      end else begin
        unique case (state)
          CAL_IDLE: ;
          CAL_ACQ: if (acc_en) begin
            if (frames == KW'(K_REC - 1)) begin
              frames      <= '0;
              solve_start <= 1'b1;
              state       <= CAL_SOLVE;
            end else begin
              frames <= frames + 1'b1;
            end
          end
          CAL_SOLVE: if (solve_done) begin
            iter <= iter + 1'b1;
            if (solve_all_tol) begin
              converged <= 1'b1;
              state     <= CAL_DONE;
            end else if (iter + 1'b1 >= max_iter) begin
              limit_hit <= 1'b1;
              state     <= CAL_DONE;
            end else begin
              acc_clear  <= 1'b1;
              tone_clear <= 1'b1;
              state      <= CAL_ACQ;
            end
          end
          CAL_DONE: ;
          default: state <= CAL_IDLE;
        endcase
      end
    end
  end

  // Accumulate only in ACQ and not in the cycle that clears the sums.
  assign acc_en = (state == CAL_ACQ) && frame_valid && !acc_clear;
endmodule
