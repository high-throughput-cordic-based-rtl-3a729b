// phase_complementor_tb: exhaustive test over all 2^(B+1) truncated phases
// (B=13). Checks that the CORDIC angle is non-negative, that it equals the
// phase within its half period in quadrants 1 and 3, and pi minus that phase
// less one LSB in quadrants 2 and 4; and that |sin| of the folded angle matches
// |sin| of the original phase to within one angle LSB.
module phase_complementor_tb;
  localparam int B = 13;
  localparam real PI = 3.14159265358979323846;

  logic [B:0]   phase;
  logic [B-1:0] angle;

  phase_complementor #(.B(B)) dut (.phase_i(phase), .angle_o(angle));

  int checks = 0, failures = 0;

  initial begin
    for (int p = 0; p < (1 << (B + 1)); p++) begin
      int u, expect_a;
      real d;
      phase = (B+1)'(p);
      #1;
      u = p % (1 << B);                        // position within the half period
      expect_a = (u >= (1 << (B - 1))) ? (1 << B) - 1 - u : u;
      checks++;
      if (int'(angle) != expect_a || angle[B-1]) begin
        failures++;
        if (failures < 10) $display("FAIL phase %0d angle %0d expected %0d", p, angle, expect_a);
      end
      d = $sin(PI * real'(angle) / (2.0 ** B)) - $sin(PI * real'(u) / (2.0 ** B));
      if (d < 0) d = -d;
      checks++;
      if (d > PI / (2.0 ** B)) begin
        failures++;
        if (failures < 10) $display("FAIL sine mismatch phase %0d", p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
