// tiadc_model -- behavioural model of an NCH-channel time-interleaved ADC
// driven by a sine test tone (testbench only, not synthesizable).
//
// Channel i of frame f samples x(t) = amp*cos(2*pi*F_NUM/F_DEN*n + phi) + dc
// at n = f*NCH + i + skew[i] (skew in sample periods) and returns round(gain[i]*x + ofs[i] + noise) clipped to
// the signed DW-bit code range, noise being uniform in +-noise.  gain, ofs,
// skew, amp, phi, dc and noise are variables the testbench sets.  One frame is
// produced on every rising clk edge while en is high, with valid.
module tiadc_model
  import tiadc_cal_pkg::*;
#(
  parameter int unsigned NCH   = M,
  parameter int unsigned F_NUM = 3,
  parameter int unsigned F_DEN = 100
) (
  input  logic    clk,
  input  logic    en,
  output logic    valid,
  output sample_t data [NCH]
);
  real gain [NCH];
  real ofs  [NCH];
  real skew [NCH];
  real amp   = 100.0;
  real phi   = 0.3;
  real dc    = 0.0;
  real noise = 0.0;
  longint unsigned frame;       // next frame to produce
  longint unsigned data_frame;  // frame now on data

  // Ideal (mismatch-free, noise-free, unquantised) value of channel i in
  // frame f.
  function automatic real ideal(input int i, input longint unsigned f);
    real n;
    n = real'(f * NCH + longint'(i)) + skew[i];
    return amp * $cos(2.0 * 3.14159265358979323846 * real'(F_NUM) / real'(F_DEN) * n + phi) + dc;
  endfunction

  function automatic sample_t quant(input real v);
    real r;
    int  q;
    r = v >= 0.0 ? v + 0.5 : v - 0.5;
    q = $rtoi(r);
    if (q > (1 << (DW - 1)) - 1) q = (1 << (DW - 1)) - 1;
    if (q < -(1 << (DW - 1)))    q = -(1 << (DW - 1));
    return sample_t'(q);
  endfunction

  initial begin
    valid = 1'b0;
    frame = 0;
    data_frame = 0;
    for (int i = 0; i < NCH; i++) begin
      gain[i] = 1.0;
      ofs[i]  = 0.0;
      skew[i] = 0.0;
      data[i] = '0;
    end
  end

  always @(posedge clk) begin
    valid <= en;
    if (en) begin
      for (int i = 0; i < NCH; i++) begin
        real nz;
        nz = noise * (2.0 * real'($urandom_range(0, 1000000)) / 1000000.0 - 1.0);
        data[i] <= quant(gain[i] * ideal(i, frame) + ofs[i] + nz);
      end
      data_frame <= frame;
      frame <= frame + 1;
    end
  end
endmodule
