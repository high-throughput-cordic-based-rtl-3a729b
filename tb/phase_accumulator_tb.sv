// phase_accumulator_tb: random FTW writes against a reference accumulator.
// Checks each cycle the truncated phase output and the wrap flag (carry out of
// the modulo-2^J addition), the one-cycle delay between an FTW write and its
// first use, and the reset value. Default sizes J=16, PW=14.
module phase_accumulator_tb;
  localparam int J = 16, PW = 14;

  logic clk = 0, rst = 1, ftw_we = 0;
  logic [J-1:0] ftw = '0;
  logic [PW-1:0] phase;
  logic wrap;

  phase_accumulator #(.J(J), .PW(PW)) dut (
    .clk(clk), .rst(rst), .ftw_we(ftw_we), .ftw(ftw), .phase_o(phase), .wrap_o(wrap)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, wraps = 0;
  longint unsigned m_freq = 0, m_phase = 0;  // reference, kept in 64-bit arithmetic
  logic m_wrap = 0;

  always @(posedge clk) begin
    if (rst) begin
      m_freq = 0; m_phase = 0; m_wrap = 0;
    end else begin
      longint unsigned s;
      s = m_phase + m_freq;
      m_wrap  = (s >= (64'd1 << J));
      m_phase = s % (64'd1 << J);
      if (ftw_we) m_freq = ftw;
    end
  end

  always @(negedge clk) begin
    checks++;
    if (phase !== PW'(m_phase >> (J - PW)) || wrap !== m_wrap) begin
      failures++;
      if (failures < 10)
        $display("FAIL phase %0h wrap %0b expected %0h %0b", phase, wrap,
                 PW'(m_phase >> (J - PW)), m_wrap);
    end
    if (wrap) wraps++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // a write becomes visible in the phase step one cycle later
    ftw = 16'h4000; ftw_we = 1;
    @(negedge clk); ftw_we = 0;
    checks++;
    if (phase !== '0) begin failures++; $display("FAIL FTW used too early"); end
    @(negedge clk);
    checks++;
    if (phase !== PW'(16'h4000 >> (J - PW))) begin failures++; $display("FAIL FTW not used"); end
    repeat (20) @(negedge clk);
    for (int k = 0; k < 3000; k++) begin
      ftw_we = ($urandom % 8) == 0;
      ftw = J'($urandom);
      @(negedge clk);
    end
    ftw_we = 0;
    rst = 1;
    @(negedge clk);
    checks++;
    if (phase !== '0 || wrap !== 1'b0) begin failures++; $display("FAIL reset"); end
    checks++;
    if (wraps < 10) begin failures++; $display("FAIL too few wraps %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
