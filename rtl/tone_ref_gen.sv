// tone_ref_gen -- cos/sin regressors of the least-squares sine fit.
//
// The fit models every channel's output as A*cos(w n) + B*sin(w n) + C with
// w = 2*pi*f_in/f_s.  This block supplies cos(w n) and sin(w n) for the M
// samples of the current frame (sample n = f*M + i for channel i).  The tone
// frequency is given as the exact ratio f_in/f_s = F_NUM/F_DEN, so the phase
// is kept as an integer index k = (F_NUM*n) mod F_DEN and looked up in a
// table of cos(2*pi*k/F_DEN); sin uses the same table shifted by three
// quarters of a turn (F_DEN must be a multiple of 4).  The defaults,
// F_NUM/F_DEN = 3/100, are the 1.2 GHz tone sampled at 40 GS/s.  The table
// is computed at elaboration: entry k = round(TONE_ONE*cos(2*pi*k/F_DEN)).
//
// Interface: clear puts the frame phase back to n = 0; adv moves it on by one
// frame (M samples).  cos_o/sin_o follow the registered phase
// combinationally, i.e. they belong to the frame presented in the cycle in
// which adv is high.
module tone_ref_gen
  import tiadc_cal_pkg::*;
#(
  parameter int unsigned NCH   = M,
  parameter int unsigned F_NUM = 3,
  parameter int unsigned F_DEN = 100
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  adv,
  output tone_t cos_o [NCH],
  output tone_t sin_o [NCH]
);
  localparam int unsigned PW = $clog2(F_DEN) + 1;
  localparam int unsigned IW = $clog2(F_DEN);
  localparam int unsigned FRAME_STEP = (F_NUM * NCH) % F_DEN;
  localparam int unsigned QUARTER3   = (3 * F_DEN) / 4;

  typedef tone_t tab_t [F_DEN];

  function automatic tab_t make_table();
    tab_t t;
    for (int k = 0; k < F_DEN; k++) begin
      real v;
      v = $cos(2.0 * 3.14159265358979323846 * real'(k) / real'(F_DEN)) * real'(TONE_ONE);
      t[k] = tone_t'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam tab_t COS_TAB = make_table();

  logic [PW-1:0] phase;   // phase index of the frame's channel-0 sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     phase <= '0;
    else if (clear) phase <= '0;
    else if (adv) begin
      if (phase + PW'(FRAME_STEP) >= PW'(F_DEN))
        phase <= phase + PW'(FRAME_STEP) - PW'(F_DEN);
      else
        phase <= phase + PW'(FRAME_STEP);
    end
  end

  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      logic [PW:0] kc, ks;
      kc = (PW+1)'(phase) + (PW+1)'((F_NUM * i) % F_DEN);
      if (kc >= (PW+1)'(F_DEN)) kc = kc - (PW+1)'(F_DEN);
      ks = kc + (PW+1)'(QUARTER3);
      if (ks >= (PW+1)'(F_DEN)) ks = ks - (PW+1)'(F_DEN);
      cos_o[i] = COS_TAB[kc[IW-1:0]];
      sin_o[i] = COS_TAB[ks[IW-1:0]];
    end
  end

  initial assert (F_DEN % 4 == 0) else $error("F_DEN must be a multiple of 4");
endmodule
