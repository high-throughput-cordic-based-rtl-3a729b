// ddfs_word_lengths_tb: the synthesizer elaborated with each optimised
// word-length set for 4 to 11 bits of accuracy (accuracy a: L = a+1, n = a+1,
// B = a+4, M = 3 for a <= 6 and 4 above; J = 16 throughout), all eight running
// side by side. Each instance sweeps one full output period with an FTW chosen
// so that every one of its 2^(B+1) truncated phases is visited once, and its
// samples are compared with sin(2*pi*phase/2^J). Pass criteria per instance:
//   * worst error within the pre-scaled CORDIC error bound
//     2K*arctan(2^(1-n)) + 2^(1-L-M)*(1 + sum_{i=M+1}^{L-1} sum_{j=i}^{L-1}
//     sqrt(1+2^-2j)) plus one phase LSB (pi/2^B) and the 1/K quantisation (2^-L);
//   * worst error below 2^(1-a), i.e. about a bits of accuracy;
//   * exactly one period flag over the sweep.
module ddfs_word_lengths_tb;
  import ddfs_pkg::*;

  localparam int NCFG = 8;
  localparam int J = 16;
  // accuracy, L, M, n, B per row
  localparam int ACC [NCFG] = '{4, 5, 6, 7, 8, 9, 10, 11};
  localparam int LL  [NCFG] = '{5, 6, 7, 8, 9, 10, 11, 12};
  localparam int MM  [NCFG] = '{3, 3, 3, 4, 4, 4, 4, 4};
  localparam int NN  [NCFG] = '{5, 6, 7, 8, 9, 10, 11, 12};
  localparam int BB  [NCFG] = '{8, 9, 10, 11, 12, 13, 14, 15};

  logic clk = 0, rst = 1, ftw_we = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [NCFG-1:0] done;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int L = LL[g], M = MM[g], NS = NN[g], B = BB[g], N = 1 + L + M;
    localparam int LAT = NS + 1;
    localparam logic [J-1:0] FTW = J'(1) << (J - B - 1);
    localparam int NSAMP = 1 << (B + 1);

    logic [N-1:0] sine;
    logic valid, period;

    cordic_ddfs #(.J(J), .B(B), .L(L), .M(M), .NSTAGES(NS)) dut (
      .clk(clk), .rst(rst), .ftw_we(ftw_we), .ftw(FTW),
      .sine_o(sine), .valid_o(valid), .period_o(period)
    );

    real bound, worst, sum;
    int  seen, periods;
    logic [J-1:0] ph;   // phase of the sample now on sine_o

    initial begin
      real acc;
      bound = 2.0 * cordic_gain(NS) * $atan(2.0 ** (1 - NS));
      acc = 1.0;
      for (int i = M + 1; i <= L - 1; i++)
        for (int j = i; j <= L - 1; j++) acc += $sqrt(1.0 + 2.0 ** (-2 * j));
      bound += (2.0 ** (1 - L - M)) * acc + PI / (2.0 ** B) + 2.0 ** (-L);
      worst = 0; sum = 0; seen = 0; periods = 0; ph = '0;
      done[g] = 1'b0;
    end

    // The FTW is loaded into the frequency register by the first clock after
    // reset, so the first output sample repeats phase 0: it is skipped.
    logic first = 1'b1;

    always @(negedge clk) begin
      if (!rst && valid && first) begin
        first = 1'b0;
      end else if (!rst && valid && seen == NSAMP) begin
        // first sample of the next period: the wrap flag must be set here
        if (period) periods++;
        seen++;
        $display("accuracy %0d (L=%0d M=%0d n=%0d B=%0d N=%0d): worst %f mean %f bound %f 2^(1-a) %f periods %0d",
                 ACC[g], L, M, NS, B, N, worst, sum / NSAMP, bound, 2.0 ** (1 - ACC[g]), periods);
        checks += 3;
        if (worst > bound)               begin failures++; $display("FAIL bound, accuracy %0d", ACC[g]); end
        if (worst > 2.0 ** (1 - ACC[g])) begin failures++; $display("FAIL accuracy %0d", ACC[g]); end
        if (periods != 1)                begin failures++; $display("FAIL periods, accuracy %0d", ACC[g]); end
        done[g] = 1'b1;
      end else if (!rst && valid && seen < NSAMP) begin
        real e;
        e = real'($signed(sine)) / (2.0 ** (N - 2)) - $sin(2.0 * PI * real'(ph) / (2.0 ** J));
        if (e < 0) e = -e;
        if (e > worst) worst = e;
        sum += e;
        if (period) periods++;
        ph = ph + FTW;
        seen++;
      end
    end

    // latency: valid must rise exactly LAT clocks after reset release
    initial begin
      int n;
      n = 0;
      @(negedge rst);
      while (!valid && n < 100) begin @(negedge clk); n++; end
      checks++;
      if (n != LAT) begin failures++; $display("FAIL latency %0d expected %0d", n, LAT); end
    end
  end

  initial begin
    ftw_we = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
