// seq_udiv -- sequential unsigned restoring divider (helper).
//
// Computes quot = num / den and rem = num % den, one quotient bit per cycle.
// start loads the operands (ignored while busy); done pulses for one cycle
// NUM_W+1 cycles later, with quot/rem valid from then until the next start.
// den must not be zero; the quotient is then meaningless.
module seq_udiv #(
  parameter int unsigned NUM_W = 48,
  parameter int unsigned DEN_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quot,
  output logic [DEN_W-1:0] rem
);
  localparam int unsigned CW = $clog2(NUM_W + 1);

  logic [DEN_W-1:0] r;      // partial remainder
  logic [NUM_W-1:0] q;      // dividend shifting out, quotient shifting in
  logic [DEN_W-1:0] d;
  logic [CW-1:0]    cnt;
  logic [DEN_W:0]   r_sh, r_sub;

  always_comb begin
    r_sh  = {r, q[NUM_W-1]};
    r_sub = r_sh - {1'b0, d};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; q <= '0; d <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          r    <= '0;
          q    <= num;
          d    <= den;
          cnt  <= CW'(NUM_W);
          busy <= 1'b1;
        end
      end else begin
        if (!r_sub[DEN_W]) begin
          r <= r_sub[DEN_W-1:0];
          q <= {q[NUM_W-2:0], 1'b1};
        end else begin
          r <= r_sh[DEN_W-1:0];
          q <= {q[NUM_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quot = q;
  assign rem  = r;
endmodule
