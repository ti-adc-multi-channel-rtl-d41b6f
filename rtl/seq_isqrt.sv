// seq_isqrt -- sequential integer square root (helper).
//
// root = floor(sqrt(x)) for an unsigned X_W-bit x (X_W even), one result bit
// per cycle by the digit-by-digit method.  start loads x (ignored while
// busy); done pulses for one cycle X_W/2+1 cycles later and root stays valid
// until the next start.
module seq_isqrt #(
  parameter int unsigned X_W = 80
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [X_W-1:0]   x,
  output logic             busy,
  output logic             done,
  output logic [X_W/2-1:0] root
);
  localparam int unsigned RW = X_W / 2;
  localparam int unsigned CW = $clog2(RW + 1);

  logic [X_W-1:0] xs;        // radicand, two bits shifted out per step
  logic [RW:0]    rem;       // partial remainder, at most 2*res
  logic [RW-1:0]  res;
  logic [CW-1:0]  cnt;
  logic [RW+2:0]  rem_sh, trial;

  always_comb begin
    rem_sh = {rem, xs[X_W-1 -: 2]};
    trial  = rem_sh - {1'b0, res, 2'b01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs <= '0; rem <= '0; res <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          xs   <= x;
          rem  <= '0;
          res  <= '0;
          cnt  <= CW'(RW);
          busy <= 1'b1;
        end
      end else begin
        xs <= xs << 2;
        if (!trial[RW+2]) begin
          rem <= trial[RW:0];
          res <= {res[RW-2:0], 1'b1};
        end else begin
          rem <= rem_sh[RW:0];
          res <= {res[RW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign root = res;
endmodule
