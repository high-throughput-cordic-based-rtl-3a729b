// cordic_rotator_tb: default rotator (B=13, L=10, M=4, n=10, N=15).
// Streams every angle of the convergence region [-pi/2, pi/2) (all 2^13 binary
// angles), one per clock, and compares cos and sin, NSTAGES clocks later, with
// floating-point values. The bound is the quantisation error bound of the
// pre-scaled CORDIC, 2K*arctan(2^(1-n)) + 2^(1-L-M)*(1 + sum_{i=M+1}^{L-1}
// sum_{j=i}^{L-1} sqrt(1+2^-2j)), plus one angle LSB for the phase word and the
// quantisation of 1/K to L bits. Also checks the latency with a marker angle
// and that the final residual angle stays small.
module cordic_rotator_tb;
  import ddfs_pkg::*;
  localparam int B = 13, L = 10, M = 4, NSTAGES = 10, N = 1 + L + M;
  localparam int ZR = zw(NSTAGES, B);

  logic clk = 0;
  always #5 clk = ~clk;

  logic [B-1:0] angle = '0;
  logic [N-1:0] c, s;
  logic [ZR-1:0] zres;

  cordic_rotator #(.B(B), .L(L), .M(M), .NSTAGES(NSTAGES)) dut (
    .clk(clk), .angle_i(angle), .cos_o(c), .sin_o(s), .z_res_o(zres));

  int checks = 0, failures = 0;
  int sent [$];
  real bound, worst = 0;

  initial begin
    real k;
    k = cordic_gain(NSTAGES);
    bound = 2.0 * k * $atan(2.0 ** (1 - NSTAGES));
    begin
      real acc;
      acc = 1.0;
      for (int i = M + 1; i <= L - 1; i++)
        for (int j = i; j <= L - 1; j++) acc += $sqrt(1.0 + 2.0 ** (-2 * j));
      bound += (2.0 ** (1 - L - M)) * acc;
    end
    bound += PI / (2.0 ** B) + 2.0 ** (-L);
    $display("error bound %f", bound);
  end

  // compare output of the angle sent NSTAGES clocks earlier
  always @(negedge clk) begin
    if (sent.size() > NSTAGES) begin
      int a;
      real th, ec, es;
      a = sent.pop_front();
      th = PI * real'(a) / (2.0 ** B);
      ec = real'($signed(c)) / (2.0 ** (N - 2)) - $cos(th);
      es = real'($signed(s)) / (2.0 ** (N - 2)) - $sin(th);
      if (ec < 0) ec = -ec;
      if (es < 0) es = -es;
      if (ec > worst) worst = ec;
      if (es > worst) worst = es;
      checks++;
      if (ec > bound || es > bound) begin
        failures++;
        if (failures < 10) $display("FAIL angle %0d cos %0d sin %0d", a, $signed(c), $signed(s));
      end
      checks++;
      if ($signed(zres) > 8 || $signed(zres) < -8) begin
        failures++;
        if (failures < 10) $display("FAIL residual %0d for angle %0d", $signed(zres), a);
      end
    end
  end

  initial begin
    for (int a = -(1 << (B - 1)); a < (1 << (B - 1)); a++) begin
      @(posedge clk);
      angle <= B'(a);
      sent.push_back(a);
    end
    // latency: hold angle 0 (cos=1, sin=0) then one clock of -pi/2 (sin=-1)
    repeat (NSTAGES + 2) begin @(posedge clk); angle <= '0; sent.push_back(0); end
    @(posedge clk); angle <= B'(-(1 << (B - 1))); sent.push_back(-(1 << (B - 1)));
    @(posedge clk); angle <= '0; sent.push_back(0);
    sent.delete();
    // sample time of the -pi/2 angle: the edge above; result NSTAGES edges on
    repeat (NSTAGES - 1) @(posedge clk);
    #1;
    checks++;
    if ($signed(s) > -(1 << (N - 2)) + 16) begin
      failures++; $display("FAIL latency: sin %0d not -1 after %0d clocks", $signed(s), NSTAGES);
    end
    @(posedge clk); #1;
    checks++;
    if ($signed(s) < -16 || $signed(s) > 16) begin
      failures++; $display("FAIL latency: sin %0d not 0 one clock later", $signed(s));
    end
    $display("worst error %f", worst);
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
