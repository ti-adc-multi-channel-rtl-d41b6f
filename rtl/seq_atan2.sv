// seq_atan2 -- sequential four-quadrant arctangent (helper).
//
// ang = atan2(y, x) as a fraction of a full turn, signed PH_W bits (a full
// turn is 2^PH_W, so the range is -1/2 .. +1/2 turn), by CORDIC in vectoring
// mode: a vector in the left half-plane is first turned by half a turn, then
// each step i turns it by +-atan(2^-i) towards the x axis and adds the
// opposite angle to an accumulator.  The accumulator carries ZG guard bits
// and is rounded to PH_W bits at the end; the error stays within 2 LSB.  The
// step angles are computed at elaboration from atan(2^-i).  It serves the
// published method's skew estimate, which takes the arctangent of the fit's
// phase; CORDIC and its sizes are this design's own choice.
//
// Timing: start loads x and y (ignored while busy); NIT = PH_W+2 steps
// follow, one per cycle, and done pulses for one cycle with the result of the
// last step.  ang stays valid until the next start.  The angle of x = y = 0
// is meaningless.
module seq_atan2 #(
  parameter int unsigned IN_W = 40,
  parameter int unsigned PH_W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [IN_W-1:0] x,
  input  logic signed [IN_W-1:0] y,
  output logic                   busy,
  output logic                   done,
  output logic signed [PH_W-1:0] ang
);
  localparam int unsigned ZG  = 4;
  localparam int unsigned Z_W = PH_W + ZG;
  localparam int unsigned NIT = PH_W + 2;
  localparam int unsigned W   = IN_W + 2;   // room for the CORDIC growth (1.65)
  localparam int unsigned CW  = $clog2(NIT + 1);

  typedef logic signed [Z_W-1:0] ztab_t [NIT];

  function automatic ztab_t make_table();
    ztab_t t;
    for (int i = 0; i < NIT; i++) begin
      real v;
      v = $atan(2.0 ** (-i)) / (2.0 * 3.14159265358979323846) * (2.0 ** Z_W);
      t[i] = Z_W'($rtoi(v + 0.5));
    end
    return t;
  endfunction

  localparam ztab_t ATAN_TAB = make_table();

  logic signed [W-1:0]   xr, yr;
  logic signed [Z_W-1:0] zr;
  logic [CW-1:0]         it;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0; yr <= '0; zr <= '0; it <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          if (x < 0) begin
            xr <= -W'(x);
            yr <= -W'(y);
            zr <= {1'b1, {(Z_W-1){1'b0}}};   // half a turn
          end else begin
            xr <= W'(x);
            yr <= W'(y);
            zr <= '0;
          end
          it   <= '0;
          busy <= 1'b1;
        end
      end else begin
        if (yr >= 0) begin
          xr <= xr + (yr >>> it);
          yr <= yr - (xr >>> it);
          zr <= zr + ATAN_TAB[it];
        end else begin
          xr <= xr - (yr >>> it);
          yr <= yr + (xr >>> it);
          zr <= zr - ATAN_TAB[it];
        end
        it <= it + 1'b1;
        if (it == CW'(NIT - 1)) busy <= 1'b0;
      end
      if (busy && it == CW'(NIT - 1)) done <= 1'b1;
    end
  end

  // Round the accumulator to PH_W bits.
  always_comb ang = PH_W'((zr + Z_W'(1 << (ZG - 1))) >>> ZG);
endmodule
