// output_complementor_tb: exhaustive over the sample range [-1, +1] of an N=15
// bit word (N-2 fraction bits) with both values of the control bit; the
// result must be the sample itself or its arithmetic negation.
module output_complementor_tb;
  localparam int N = 15;

  logic         neg;
  logic [N-1:0] din, dout;

  output_complementor #(.N(N)) dut (.neg_i(neg), .data_i(din), .data_o(dout));

  int checks = 0, failures = 0;

  initial begin
    for (int v = -(1 << (N - 2)); v <= (1 << (N - 2)); v++) begin
      for (int n = 0; n < 2; n++) begin
        int expect_v;
        din = N'(v);
        neg = n[0];
        #1;
        expect_v = n ? -v : v;
        checks++;
        if (int'($signed(dout)) != expect_v) begin
          failures++;
          if (failures < 10) $display("FAIL v=%0d neg=%0d got %0d", v, n, $signed(dout));
        end
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
