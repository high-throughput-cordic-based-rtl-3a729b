// cordic_stage_tb: two stage instances (iteration 0 with a 13-bit angle path and
// iteration 5 narrowing 9 -> 8 bits, N = 15) driven with random vectors and
// angles. Outputs are compared, one clock after the inputs, with
//   x' = x - s*floor(y/2^I), y' = y + s*floor(x/2^I), z' = z - s*arctan(2^-I)
// evaluated in integer arithmetic, s = sign of z. Angles are drawn so that the
// result fits the narrower output width, as it does inside a rotator.
module cordic_stage_tb;
  import ddfs_pkg::*;
  localparam int N = 15, B = 13;
  localparam int I0 = 0, I1 = 5;
  localparam int WI0 = zw(I0, B), WO0 = zw(I0 + 1, B);
  localparam int WI1 = zw(I1, B), WO1 = zw(I1 + 1, B);
  localparam int A0 = atan_lsb(I0, B), A1 = atan_lsb(I1, B);

  logic clk = 0;
  always #5 clk = ~clk;

  logic [N-1:0] x0, y0, x1, y1, xo0, yo0, xo1, yo1;
  logic [WI0-1:0] z0;
  logic [WO0-1:0] zo0;
  logic [WI1-1:0] z1;
  logic [WO1-1:0] zo1;

  cordic_stage #(.I(I0), .N(N), .WZI(WI0), .WZO(WO0), .ALPHA(A0)) dut0 (
    .clk(clk), .x_i(x0), .y_i(y0), .z_i(z0), .x_o(xo0), .y_o(yo0), .z_o(zo0));
  cordic_stage #(.I(I1), .N(N), .WZI(WI1), .WZO(WO1), .ALPHA(A1)) dut1 (
    .clk(clk), .x_i(x1), .y_i(y1), .z_i(z1), .x_o(xo1), .y_o(yo1), .z_o(zo1));

  int checks = 0, failures = 0;

  function automatic int fdiv(input int v, input int sh);  // floor(v / 2^sh)
    return int'($floor(real'(v) / (2.0 ** sh)));
  endfunction

  function automatic int rnd(input int lim);  // uniform in [-lim, lim]
    return int'($urandom % (2 * lim + 1)) - lim;
  endfunction

  task automatic one(input int i, input int x, input int y, input int z, input int a,
                     input int wo, input int gx, input int gy, input int gz);
    int s, ex, ey, ez;
    s  = (z >= 0) ? 1 : -1;
    ex = x - s * fdiv(y, i);
    ey = y + s * fdiv(x, i);
    ez = z - s * a;
    checks++;
    if (gx != ex || gy != ey || gz != ez) begin
      failures++;
      if (failures < 10)
        $display("FAIL I=%0d in (%0d,%0d,%0d) got (%0d,%0d,%0d) expected (%0d,%0d,%0d)",
                 i, x, y, z, gx, gy, gz, ex, ey, ez);
    end
  endtask

  initial begin
    $display("alpha0=%0d alpha5=%0d widths %0d->%0d %0d->%0d", A0, A1, WI0, WO0, WI1, WO1);
    for (int k = 0; k < 5000; k++) begin
      int vx0, vy0, vz0, vx1, vy1, vz1;
      vx0 = rnd(5700); vy0 = rnd(5700);
      vz0 = rnd((1 << (WO0 - 1)) - A0 - 1);
      vx1 = rnd(5700); vy1 = rnd(5700);
      vz1 = rnd((1 << (WO1 - 1)) - A1 - 1);
      if (k < 4) begin vz0 = (k % 2) ? -1 : 0; vz1 = (k % 2) ? -1 : 0; end
      @(negedge clk);
      x0 = N'(vx0); y0 = N'(vy0); z0 = WI0'(vz0);
      x1 = N'(vx1); y1 = N'(vy1); z1 = WI1'(vz1);
      @(posedge clk);
      #1;
      one(I0, vx0, vy0, vz0, A0, WO0, $signed(xo0), $signed(yo0), $signed(zo0));
      one(I1, vx1, vy1, vz1, A1, WO1, $signed(xo1), $signed(yo1), $signed(zo1));
    end
    checks++;
    if (A0 != 2048) begin failures++; $display("FAIL arctan(1) = %0d", A0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
