// delay_line: W-bit shift register of DEPTH stages with synchronous reset to 0.
// Keeps side-band bits (sample valid, half-period bit) aligned with samples
// that travel through the CORDIC pipeline. DEPTH >= 1; latency DEPTH clocks.
module delay_line #(
  parameter int W     = 1,
  parameter int DEPTH = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] d_o
);

  logic [W-1:0] q [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < DEPTH; k++) q[k] <= '0;
    end else begin
      q[0] <= d_i;
      for (int k = 1; k < DEPTH; k++) q[k] <= q[k-1];
    end
  end

  assign d_o = q[DEPTH-1];

endmodule
