// cordic_ddfs_tb: end-to-end test of the synthesizer at its default word
// lengths (J=16, B=13, L=10, M=4, n=10, N=15).
//
// The bench keeps its own model of the phase accumulator (frequency register
// and J-bit phase register) and compares every valid output sample, with the
// pipeline latency of NSTAGES+1 clocks, against sin(2*pi*phase/2^J) computed in
// floating point. Sequence:
//   1. reset, FTW = 1: one full output period (65536 samples); worst and mean
//      absolute error must stay within 0.0044 and 0.0020 (the figures reported
//      for the 9-bit-accuracy FPGA build) and exactly one period flag is seen.
//   2. FTW = 2 for 65536 samples: exactly two periods, i.e. twice the frequency.
//   3. FTW changed on the fly to random values: the phase must continue
//      without a jump (the model never resets).
//   4. reset in the middle of operation: valid_o must drop and return after
//      exactly NSTAGES+1 clocks.
// Counted mechanisms: accumulator wrap, front complement (quadrant 2/4),
// end complement (second half period), FTW switch while running, restart
// after reset. Each must occur at least once.
module cordic_ddfs_tb;
  import ddfs_pkg::*;

  localparam int J = 16, B = 13, L = 10, M = 4, NSTAGES = 10, N = 1 + L + M;
  localparam int LAT = NSTAGES + 1;
  localparam real PI2 = 2.0 * PI;

  logic clk = 0, rst = 1, ftw_we = 0;
  logic [J-1:0] ftw = '0;
  logic [N-1:0] sine;
  logic valid, period;

  cordic_ddfs dut (
    .clk(clk), .rst(rst), .ftw_we(ftw_we), .ftw(ftw),
    .sine_o(sine), .valid_o(valid), .period_o(period)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // reference accumulator
  logic [J-1:0] m_freq = '0, m_phase = '0;
  logic [J-1:0] hist [LAT+1];   // hist[k] = model phase k cycles ago
  logic         mvalid_hist [LAT+1];

  // statistics
  real err, max_err, sum_err;
  int  nsamp, nperiods;
  int  cnt_wrap = 0, cnt_front = 0, cnt_end = 0, cnt_switch = 0, cnt_restart = 0;

  // the model phase register in the same cycle as the DUT's
  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst) begin
      m_freq  <= '0;
      m_phase <= '0;
    end else begin
      if (ftw_we) m_freq <= ftw;
      m_phase <= m_phase + m_freq;
    end
  end

  // history of the model phase (value held during the cycle) and of its validity
  always_ff @(posedge clk) begin
    hist[0] <= m_phase;
    mvalid_hist[0] <= ~rst;
    for (int k = 1; k <= LAT; k++) begin
      hist[k] <= hist[k-1];
      mvalid_hist[k] <= rst ? 1'b0 : mvalid_hist[k-1];
    end
  end

  // check every output sample
  always @(negedge clk) begin
    if (!rst) begin
      logic [J-1:0] p;
      real ref_v, got;
      p = hist[LAT-1];
      checks++;
      if (valid !== mvalid_hist[LAT-1]) begin
        failures++;
        $display("FAIL valid at cycle %0d: got %0b expected %0b", cycle, valid, mvalid_hist[LAT-1]);
      end
      if (valid && mvalid_hist[LAT-1]) begin
        ref_v = $sin(PI2 * real'(p) / (2.0 ** J));
        got   = real'($signed(sine)) / (2.0 ** (N - 2));
        err   = got - ref_v;
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        sum_err += err;
        nsamp++;
        checks++;
        if (err > 0.0044) begin
          failures++;
          if (failures < 10)
            $display("FAIL sample cycle %0d phase %0d: got %f expected %f", cycle, p, got, ref_v);
        end
        if (period) begin
          nperiods++;
          cnt_wrap++;
        end
        if (p[J-2]) cnt_front++;
        if (p[J-1]) cnt_end++;
      end
    end
  end

  task automatic run(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic set_ftw(input logic [J-1:0] v);
    @(negedge clk);
    ftw = v; ftw_we = 1;
    @(negedge clk);
    ftw_we = 0;
  endtask

  task automatic begin_stats();
    max_err = 0; sum_err = 0; nsamp = 0; nperiods = 0;
  endtask

  initial begin
    begin_stats();
    for (int k = 0; k <= LAT; k++) begin hist[k] = '0; mvalid_hist[k] = 0; end
    // phase 1: FTW = 1, one full period
    @(negedge clk); ftw = 16'h0001; ftw_we = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk); ftw_we = 0;
    begin_stats();
    run(65536 + LAT + 2);
    $display("FTW=0001: samples %0d periods %0d worst %f mean %f",
             nsamp, nperiods, max_err, sum_err / nsamp);
    checks++;
    if (nperiods != 1) begin failures++; $display("FAIL FTW=1 periods %0d", nperiods); end
    checks++;
    if (sum_err / nsamp > 0.0020) begin failures++; $display("FAIL mean error"); end

    // phase 2: FTW = 2, double frequency
    set_ftw(16'h0002);
    cnt_switch++;
    run(LAT + 2);
    begin_stats();
    run(65536);
    $display("FTW=0002: samples %0d periods %0d worst %f mean %f",
             nsamp, nperiods, max_err, sum_err / nsamp);
    checks++;
    if (nperiods != 2) begin failures++; $display("FAIL FTW=2 periods %0d", nperiods); end

    // phase 3: random FTW switches while running
    for (int s = 0; s < 40; s++) begin
      set_ftw(J'($urandom));
      cnt_switch++;
      run(200 + ($urandom % 300));
    end

    // phase 4: restart by reset while running
    @(negedge clk); rst = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid during reset"); end
    ftw = 16'h0123; ftw_we = 1;
    @(negedge clk); rst = 0; ftw_we = 0;
    begin
      int lat_seen;
      lat_seen = 0;
      while (!valid && lat_seen < 100) begin @(negedge clk); lat_seen++; end
      checks++;
      // rst released at this negedge; phase register holds 0 from the next edge,
      // which reaches sine_o LAT edges later
      if (lat_seen != LAT) begin
        failures++;
        $display("FAIL restart latency %0d expected %0d", lat_seen, LAT);
      end else cnt_restart++;
    end
    run(3000);

    $display("mechanisms: wrap=%0d front_complement=%0d end_complement=%0d ftw_switch=%0d restart=%0d",
             cnt_wrap, cnt_front, cnt_end, cnt_switch, cnt_restart);
    checks += 5;
    if (cnt_wrap == 0)    failures++;
    if (cnt_front == 0)   failures++;
    if (cnt_end == 0)     failures++;
    if (cnt_switch == 0)  failures++;
    if (cnt_restart == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
