// tiadc_cal_pkg -- shared constants and number formats of the TI-ADC
// background calibration engine.
//
// The engine serves a time-interleaved ADC of M sub-channels whose samples
// arrive at the logic as frames of M parallel words, one word per channel
// (channel i holds sample n = f*M + i of frame f).  The defaults follow the
// prototype the design is built for: 16 channels of 8-bit codes at 40 GS/s,
// calibrated with a 1.2 GHz test tone.  The fixed-point formats are this
// design's own choice:
//   samples       signed two's complement, DW bits, 1 LSB = 1 code
//   offset cal    signed Q(OFS_W-OFS_FRAC).OFS_FRAC in codes
//   gain cal      signed Q(GAIN_W-GAIN_FRAC).GAIN_FRAC, dimensionless
//   corrected out signed, OUT_FRAC fractional bits, saturated to OUT_W
//   tone table    signed, cos = 1 is TONE_ONE
//   step sizes    unsigned Q(MU_W-MU_FRAC).MU_FRAC
//   phase         signed, PH_W bits, a full turn is 2^PH_W
//   timing skew   signed, DT_FRAC fractional bits, in sample periods
package tiadc_cal_pkg;

  localparam int unsigned M          = 16;   // channels
  localparam int unsigned DW         = 8;    // ADC resolution
  localparam int unsigned OFS_W      = 18;
  localparam int unsigned OFS_FRAC   = 8;
  localparam int unsigned GAIN_W     = 18;
  localparam int unsigned GAIN_FRAC  = 16;
  localparam int unsigned OUT_FRAC   = 4;
  localparam int unsigned OUT_W      = DW + OUT_FRAC + 1;
  localparam int unsigned TONE_W     = 16;
  localparam int unsigned TONE_FRAC  = 14;
  localparam int          TONE_ONE   = 1 << TONE_FRAC;
  localparam int unsigned MU_W       = 10;
  localparam int unsigned MU_FRAC    = 8;
  localparam int unsigned PH_W       = 16;
  localparam int unsigned DT_W       = 20;
  localparam int unsigned DT_FRAC    = 12;

  typedef logic signed [DW-1:0]     sample_t;
  typedef logic signed [OFS_W-1:0]  ofs_t;
  typedef logic signed [GAIN_W-1:0] gain_t;
  typedef logic signed [OUT_W-1:0]  out_t;
  typedef logic signed [TONE_W-1:0] tone_t;
  typedef logic        [MU_W-1:0]   mu_t;
  typedef logic signed [PH_W-1:0]   ph_t;
  typedef logic signed [DT_W-1:0]   dt_t;

  // Ideal reference channel: offset 0 codes, gain 1.
  localparam ofs_t  O_REF = '0;
  localparam gain_t G_REF = gain_t'(1 << GAIN_FRAC);

  // Controller states.
  typedef enum logic [1:0] {
    CAL_IDLE  = 2'd0,
    CAL_ACQ   = 2'd1,
    CAL_SOLVE = 2'd2,
    CAL_DONE  = 2'd3
  } cal_state_t;

endpackage
