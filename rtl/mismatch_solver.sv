// mismatch_solver -- per-channel offset and gain estimates from the fit sums.
//
// After a record of K_REC samples per channel, the sine fit of channel i is
//     A = 2*s_cos/K, B = 2*s_sin/K, C = s_dc/K   (in codes, see lse_acc).
// Comparing it with the fit of the ideal reference channel (amplitude a_ref,
// DC level c_ref) gives the channel's mismatch:
//     os_i = C - c_ref
//     g_i  = sqrt(A^2 + B^2) / a_ref
// The published method writes g_i as A_hat / (A_bar*cos(phi) + B_bar*sin(phi)), where
// phi is the skew phase; because the mismatch matrix is a rotation scaled by
// g_i, that quotient equals the amplitude ratio used here, which needs no
// arctangent and no reference phase.  The errors against the ideal channel
// are D_o = os_i - O_REF (O_REF = 0) and D_g = g_i - G_REF (G_REF = 1).
//
// The timing skew follows the published method's phase comparison,
//     dt_i = (phi_i - phi_ref) / (2*pi*f_in),   phi_i = atan2(-B, A),
// with channel 0 as the phase reference: the tone's phase at the start of a
// record is arbitrary, and the method's ideal sequence is itself obtained by
// interpolating the first channel.  est_dt is therefore the skew of channel
// i against channel 0, in sample periods (f_s/f_in = F_DEN/F_NUM), and is
// 0 for channel 0.  It is an estimate only; nothing corrects skew, as in the
// published method, which assumes aligned channels.  It is unambiguous for
// |dt| below F_DEN/(2*F_NUM) sample periods.
//
// The channels are solved one after another with one square-root, one
// arctangent and two dividers (C and g); the C division and the arctangent
// run beside the square root, so a
// channel takes about 2*(ACC_W+8)+6 cycles (102 at the defaults); the
// division by K and by a_ref is done by the dividers, so neither needs to be a
// power of two.
//
// ACC_AVG = 1 selects instead the accumulate-and-average estimator of the
// earlier equalisation method, which the published work compares against:
//     os_i = C - c_ref                (mean of the channel minus the DC)
//     g_i  = NCH * P_i / sum_j P_j    (P_i = sum of y^2 over the record)
// so each channel's power is compared with the average channel rather than
// with an ideal one.  The pass then starts with NCH cycles that add up the
// powers.  It is a comparison option; the default is the fit-based method.
//
// Interface: start (while idle) begins a pass over all NCH channels.  The
// solver drives ch_sel and reads that channel's sums on s_cos/s_sin/s_dc
// (and s_pow with ACC_AVG) the next cycle.  For every channel it pulses
// est_valid with est_ch, est_os, est_g, est_dt, d_o, d_g and in_tol
// (|D_o| <= tol_o when off_en, |D_g| <= tol_g when gain_en).  done pulses one cycle after the last channel, with all_tol
// telling whether every channel was within tolerance.
module mismatch_solver
  import tiadc_cal_pkg::*;
#(
  parameter int unsigned NCH   = M,
  parameter int unsigned ACC_W = 40,
  parameter int unsigned K_REC = 400,
  parameter int unsigned F_NUM = 3,
  parameter int unsigned F_DEN = 100,
  parameter bit          ACC_AVG = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [OFS_W-1:0]         ref_amp,   // a_ref, unsigned, OFS_FRAC frac bits
  input  ofs_t                     ref_dc,    // c_ref
  input  ofs_t                     tol_o,
  input  gain_t                    tol_g,
  input  logic                     off_en,
  input  logic                     gain_en,
  output logic [$clog2(NCH)-1:0]   ch_sel,
  input  logic signed [ACC_W-1:0]  s_cos,
  input  logic signed [ACC_W-1:0]  s_sin,
  input  logic signed [ACC_W-1:0]  s_dc,
  input  logic signed [ACC_W-1:0]  s_pow,     // used only with ACC_AVG
  output logic                     busy,
  output logic                     est_valid,
  output logic [$clog2(NCH)-1:0]   est_ch,
  output ofs_t                     est_os,
  output gain_t                    est_g,
  output dt_t                      est_dt,
  output ofs_t                     d_o,
  output gain_t                    d_g,
  output logic                     in_tol,
  output logic                     done,
  output logic                     all_tol
);
  localparam int unsigned CHW   = $clog2(NCH);
  localparam int unsigned NUM_W = ACC_W + 8;
  localparam int unsigned DEN_W = 32;
  localparam int unsigned X_W   = 2 * ACC_W + 2;
  // C in OFS_FRAC bits = s_dc * 2^(OFS_FRAC-OUT_FRAC) / K
  localparam int unsigned CSH   = OFS_FRAC - OUT_FRAC;
  // g in GAIN_FRAC bits = sqrt(s_cos^2+s_sin^2) * 2^GSH / (K * ref_amp)
  localparam int unsigned GSH   = 1 + OFS_FRAC + GAIN_FRAC - OUT_FRAC - TONE_FRAC;
  localparam logic [NUM_W-1:0] G_SAT = NUM_W'((1 << (GAIN_W - 1)) - 1);
  localparam int DT_MAX = (1 << (DT_W - 1)) - 1;
  localparam logic [NUM_W-1:0] C_SAT = NUM_W'((1 << (OFS_W - 2)) - 1);

  localparam int unsigned PT_W  = ACC_W + CHW + 1;   // sum of NCH powers
  localparam int unsigned AN_W  = PT_W + GAIN_FRAC + 1;

  typedef enum logic [2:0] {S_IDLE, S_PSUM, S_LOAD, S_ROOT, S_GDIV, S_OUT, S_FIN} st_t;
  st_t st;

  logic [ACC_W-1:0] abs_dc;
  logic             dc_neg;
  logic [X_W-1:0]   pow;
  logic [DEN_W-1:0] den_g;

  logic             c_start, c_busy, c_done;
  logic [NUM_W-1:0] c_num, c_quot;
  logic [DEN_W-1:0] c_rem;
  logic             g_start, g_busy, g_done;
  gain_t            g_val;
  logic [PT_W-1:0]  ptot;
  logic [ACC_W-1:0] pw;
  logic             r_start, r_busy, r_done;
  logic [X_W/2-1:0] root;
  logic             a_start, a_busy, a_done;
  ph_t              a_ang, ph0;
  logic             c_ok, r_ok, a_ok;
  logic             tol_acc;

  ofs_t             os_w, do_w;
  gain_t            g_w, dg_w;
  dt_t              dt_w;
  logic             tol_w;

  function automatic logic [ACC_W-1:0] absv(input logic signed [ACC_W-1:0] v);
    return v[ACC_W-1] ? ACC_W'(-v) : ACC_W'(v);
  endfunction

  assign den_g = DEN_W'(K_REC) * DEN_W'(ref_amp);
  assign c_num = (NUM_W'(abs_dc) << CSH) + NUM_W'(K_REC / 2);

  seq_udiv #(.NUM_W(NUM_W), .DEN_W(DEN_W)) u_cdiv (
    .clk, .rst_n, .start(c_start), .num(c_num), .den(DEN_W'(K_REC)),
    .busy(c_busy), .done(c_done), .quot(c_quot), .rem(c_rem));

  seq_isqrt #(.X_W(X_W)) u_root (
    .clk, .rst_n, .start(r_start), .x(pow),
    .busy(r_busy), .done(r_done), .root(root));

  if (ACC_AVG) begin : g_accavg
    // g = NCH * P_i * 2^GAIN_FRAC / sum P, rounded; an all-zero record
    // divides by 1.
    logic [AN_W-1:0] a_num, p_quot;
    logic [PT_W-1:0] p_den, p_rem;
    assign p_den = (ptot == '0) ? PT_W'(1) : ptot;
    assign a_num = ((AN_W'(pw) * AN_W'(NCH)) << GAIN_FRAC) + AN_W'(p_den >> 1);
    seq_udiv #(.NUM_W(AN_W), .DEN_W(PT_W)) u_gdiv (
      .clk, .rst_n, .start(g_start), .num(a_num), .den(p_den),
      .busy(g_busy), .done(g_done), .quot(p_quot), .rem(p_rem));
    assign g_val = (p_quot > AN_W'(G_SAT)) ? gain_t'(G_SAT) : gain_t'(p_quot);
  end else begin : g_fit
    logic [NUM_W-1:0] g_num, g_quot;
    logic [DEN_W-1:0] g_rem;
    assign g_num = (NUM_W'(root) << GSH) + NUM_W'(den_g >> 1);
    seq_udiv #(.NUM_W(NUM_W), .DEN_W(DEN_W)) u_gdiv (
      .clk, .rst_n, .start(g_start), .num(g_num), .den(den_g),
      .busy(g_busy), .done(g_done), .quot(g_quot), .rem(g_rem));
    assign g_val = (g_quot > G_SAT) ? gain_t'(G_SAT) : gain_t'(g_quot);
  end

  // Phase of A*cos - B*sin, i.e. atan2(-B, A).
  seq_atan2 #(.IN_W(ACC_W + 1), .PH_W(PH_W)) u_atan (
    .clk, .rst_n, .start(a_start), .x((ACC_W + 1)'(s_cos)),
    .y(-((ACC_W + 1)'(s_sin))), .busy(a_busy), .done(a_done), .ang(a_ang));

  // Skew against channel 0: phase difference (wrapping) times F_DEN/F_NUM,
  // rounded to DT_FRAC bits and saturated.
  always_comb begin
    ph_t dph;
    int  num, q;
    dph = a_ang - ((ch_sel == '0) ? a_ang : ph0);
    num = int'(dph) * int'(F_DEN);
    if (num >= 0) q =  ( num + int'(F_NUM << (PH_W - DT_FRAC - 1))) / int'(F_NUM << (PH_W - DT_FRAC));
    else          q = -((-num + int'(F_NUM << (PH_W - DT_FRAC - 1))) / int'(F_NUM << (PH_W - DT_FRAC)));
    if (q > DT_MAX)       dt_w = dt_t'(DT_MAX);
    else if (q < -DT_MAX) dt_w = dt_t'(-DT_MAX);
    else                  dt_w = dt_t'(q);
  end

  // Result of the current channel, from the divider outputs.
  always_comb begin
    ofs_t cq;
    cq   = (c_quot > C_SAT) ? ofs_t'(C_SAT) : ofs_t'(c_quot);
    os_w = (dc_neg ? -cq : cq) - ref_dc;
    g_w  = g_val;
    do_w = os_w - O_REF;
    dg_w = g_w - G_REF;
    tol_w = (!off_en  || ((do_w[OFS_W-1]  ? -do_w : do_w) <= tol_o)) &&
            (!gain_en || ((dg_w[GAIN_W-1] ? -dg_w : dg_w) <= tol_g));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ch_sel <= '0; abs_dc <= '0;
      dc_neg <= 1'b0; pow <= '0; c_start <= 1'b0; r_start <= 1'b0; g_start <= 1'b0;
      a_start <= 1'b0; c_ok <= 1'b0; r_ok <= 1'b0; a_ok <= 1'b0; tol_acc <= 1'b1; ph0 <= '0;
      ptot <= '0; pw <= '0;
      est_valid <= 1'b0; est_ch <= '0; est_os <= '0; est_g <= '0; est_dt <= '0;
      d_o <= '0; d_g <= '0;
      in_tol <= 1'b0; done <= 1'b0; all_tol <= 1'b0;
    end else begin
      c_start   <= 1'b0;
      r_start   <= 1'b0;
      g_start   <= 1'b0;
      a_start   <= 1'b0;
      est_valid <= 1'b0;
      done      <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          ch_sel  <= '0;
          tol_acc <= 1'b1;
          ptot    <= '0;
          st      <= ACC_AVG ? S_PSUM : S_LOAD;
        end
        S_PSUM: begin
          ptot <= ptot + PT_W'(absv(s_pow));
          if (ch_sel == CHW'(NCH - 1)) begin
            ch_sel <= '0;
            st     <= S_LOAD;
          end else ch_sel <= ch_sel + 1'b1;
        end
        S_LOAD: begin
          abs_dc  <= absv(s_dc);
          pw      <= absv(s_pow);
          dc_neg  <= s_dc[ACC_W-1];
          pow     <= X_W'(absv(s_cos)) * X_W'(absv(s_cos)) +
                     X_W'(absv(s_sin)) * X_W'(absv(s_sin));
          c_start <= 1'b1;
          r_start <= 1'b1;
          a_start <= 1'b1;
          c_ok    <= 1'b0;
          r_ok    <= 1'b0;
          a_ok    <= 1'b0;
          st      <= S_ROOT;
        end
        S_ROOT: begin
          if (c_done) c_ok <= 1'b1;
          if (r_done) r_ok <= 1'b1;
          if (a_done) a_ok <= 1'b1;
          if ((c_ok || c_done) && (r_ok || r_done) && (a_ok || a_done) &&
              !c_start && !r_start && !a_start) begin
            g_start <= 1'b1;
            st      <= S_GDIV;
          end
        end
        S_GDIV: if (g_done) st <= S_OUT;
        S_OUT: begin
          est_valid <= 1'b1;
          est_ch    <= ch_sel;
          est_os    <= os_w;
          est_g     <= g_w;
          est_dt    <= dt_w;
          if (ch_sel == '0) ph0 <= a_ang;
          d_o       <= do_w;
          d_g       <= dg_w;
          in_tol    <= tol_w;
          tol_acc   <= tol_acc && tol_w;
          if (ch_sel == CHW'(NCH - 1)) st <= S_FIN;
          else begin
            ch_sel <= ch_sel + 1'b1;
            st     <= S_LOAD;
          end
        end
        S_FIN: begin
          done    <= 1'b1;
          all_tol <= tol_acc;
          st      <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  // The arithmetic units are only started when idle; the remainders are not
  // needed (the numerators carry the rounding offset).
  assert property (@(posedge clk) disable iff (!rst_n) c_start |-> !c_busy);
  assert property (@(posedge clk) disable iff (!rst_n) r_start |-> !r_busy);
  assert property (@(posedge clk) disable iff (!rst_n) g_start |-> !g_busy);
  assert property (@(posedge clk) disable iff (!rst_n) a_start |-> !a_busy);
endmodule
