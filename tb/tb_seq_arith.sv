// tb_seq_arith -- checks the bit-serial divider, square root and CORDIC
// arctangent used by the mismatch solver on random and corner operands, and
// their cycle counts (NUM_W+1, X_W/2+1 and PH_W+3 cycles from start to done).
// The arctangent must be within 2 LSB of atan2 for vectors of 2^14 or more.
module tb_seq_arith;
  localparam int unsigned NUM_W = 48, DEN_W = 32, X_W = 82, IN_W = 41, PH_W = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d_start, d_busy, d_done;
  logic [NUM_W-1:0] num, quot;
  logic [DEN_W-1:0] den, rem;
  logic r_start, r_busy, r_done;
  logic [X_W-1:0] x;
  logic [X_W/2-1:0] root;
  logic a_start, a_busy, a_done;
  logic signed [IN_W-1:0] ax, ay;
  logic signed [PH_W-1:0] ang;
  int worst_ang = 0;

  seq_udiv  #(.NUM_W(NUM_W), .DEN_W(DEN_W)) u_div (.clk, .rst_n, .start(d_start), .num, .den,
    .busy(d_busy), .done(d_done), .quot, .rem);
  seq_isqrt #(.X_W(X_W)) u_sqrt (.clk, .rst_n, .start(r_start), .x, .busy(r_busy), .done(r_done), .root);

  seq_atan2 #(.IN_W(IN_W), .PH_W(PH_W)) u_atan (.clk, .rst_n, .start(a_start), .x(ax), .y(ay),
    .busy(a_busy), .done(a_done), .ang);

  int checks = 0, failures = 0;

  // Vector of length r at angle th (radians).
  task automatic at(input real r, input real th);
    int c, e;
    real v;
    @(negedge clk);
    ax = IN_W'(longint'(r * $cos(th))); ay = IN_W'(longint'(r * $sin(th)));
    a_start = 1; @(negedge clk); a_start = 0;
    c = 1;
    while (!a_done) begin @(negedge clk); c++; end
    v = $atan2(real'(ay), real'(ax)) / (2.0 * 3.14159265358979323846) * 65536.0;
    e = (int'(ang) - $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5)) & 32'hFFFF;
    if (e >= 32768) e = 65536 - e;
    if (e > worst_ang) worst_ang = e;
    checks += 2;
    if (e > 2) begin failures++; $display("FAIL atan2(%0d, %0d) = %0d vs %f", ay, ax, ang, v); end
    if (c != PH_W + 3) begin failures++; $display("FAIL atan2 took %0d cycles", c); end
  endtask

  task automatic div(input logic [NUM_W-1:0] n, input logic [DEN_W-1:0] d);
    int c;
    @(negedge clk); num = n; den = d; d_start = 1; @(negedge clk); d_start = 0;
    c = 1;
    while (!d_done) begin @(negedge clk); c++; end
    checks += 2;
    if (quot != n / NUM_W'(d) || rem != DEN_W'(n % NUM_W'(d))) begin
      failures++; $display("FAIL div %0d/%0d = %0d r %0d", n, d, quot, rem);
    end
    if (c != NUM_W + 1) begin failures++; $display("FAIL div took %0d cycles", c); end
  endtask

  task automatic sq(input logic [X_W-1:0] v);
    int c;
    logic [X_W:0] lo, hi;
    @(negedge clk); x = v; r_start = 1; @(negedge clk); r_start = 0;
    c = 1;
    while (!r_done) begin @(negedge clk); c++; end
    lo = (X_W+1)'(root) * (X_W+1)'(root);
    hi = ((X_W+1)'(root) + 1) * ((X_W+1)'(root) + 1);
    checks += 2;
    if (!(lo <= (X_W+1)'(v) && (X_W+1)'(v) < hi)) begin failures++; $display("FAIL sqrt(%0d) = %0d", v, root); end
    if (c != X_W / 2 + 1) begin failures++; $display("FAIL sqrt took %0d cycles", c); end
  endtask

  initial begin
    d_start = 0; r_start = 0; a_start = 0; num = '0; den = '1; x = '0; ax = '0; ay = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    div(0, 7); div(100, 7); div(48'hFFFF_FFFF_FFFF, 1); div(48'hFFFF_FFFF_FFFF, 32'hFFFF_FFFF);
    for (int k = 0; k < 200; k++)
      div(NUM_W'({$urandom, $urandom} >> $urandom_range(0, 40)), DEN_W'($urandom_range(1, 1 << 30) >> $urandom_range(0, 29)) | 32'd1);
    sq(0); sq(1); sq(2); sq(3); sq(4); sq(99); sq(100); sq('1);
    for (int k = 0; k < 200; k++) sq(X_W'({$urandom, $urandom, $urandom} >> $urandom_range(0, 80)));
    // axes, diagonals, near the +-1/2 turn cut, largest inputs
    for (int k = -4; k <= 4; k++) at(1.0e6, real'(k) * 3.14159265358979323846 / 4.0);
    at(1.0e9, 3.14159265358979323846 - 1.0e-4); at(1.0e9, -3.14159265358979323846 + 1.0e-4);
    at(0.99 * (2.0 ** 39), 0.3); at(0.99 * (2.0 ** 39), -2.5);
    for (int k = 0; k < 300; k++)
      at((2.0 ** (14 + $urandom_range(0, 24))) * (1.0 + real'($urandom_range(0, 999)) / 1000.0),
         (real'($urandom_range(0, 100000)) / 100000.0 - 0.5) * 2.0 * 3.14159265358979323846);
    $display("worst arctangent error %0d LSB of 2^-%0d turn", worst_ang, PH_W);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
