// cordic_rotator: pre-scaled, fully pipelined CORDIC rotator.
//
// The rotator is started with the constant vector (1/K, 0), K being the CORDIC
// gain of NSTAGES iterations, so after the last iteration the vector is
// (cos a, sin a) with no scaling multiplier at the output. The input angle a is
// a B-bit two's complement binary angle (LSB = pi/2^B), so every angle of the
// convergence region [-pi/2, pi/2) is accepted; inside the synthesizer it is
// always in [0, pi/2).
//
// NSTAGES cordic_stage instances are chained. The x/y words are N = 1+L+M bits
// with N-2 fraction bits (1.0 = 2^(N-2)): the start value 1/K is quantised to
// the L-bit input word and padded with M guard bits. The angle word is B bits
// wide for stages 0 and 1 and B-i+1 bits for stage i >= 1; the final residual
// angle (B-NSTAGES+1 bits) is brought out on z_res_o for observation only.
//
// Timing: latency NSTAGES clocks, throughput one angle per clock.
// Pre-scaling, the pipelined structure, the word lengths (Table of optimised
// word lengths: L, M, n, B) and the narrowing angle adders follow the source
// architecture; the binary-angle scaling of the phase is this design's reading
// of its phase format.
module cordic_rotator
  import ddfs_pkg::*;
#(
  parameter int B       = 13,  // angle (phase) word length
  parameter int L       = 10,  // input word length
  parameter int M       = 4,   // guard bits
  parameter int NSTAGES = 10,  // number of iterations n
  parameter int N       = 1 + L + M
) (
  input  logic                      clk,
  input  logic [B-1:0]              angle_i,
  output logic [N-1:0]              cos_o,
  output logic [N-1:0]              sin_o,
  output logic [zw(NSTAGES, B)-1:0] z_res_o
);

  localparam logic [N-1:0] X0 = N'(inv_k_word(NSTAGES, L, M));

  logic [N-1:0] xs [NSTAGES+1];
  logic [N-1:0] ys [NSTAGES+1];
  logic [B-1:0] zs [NSTAGES+1];   // stage i uses the low zw(i,B) bits

  assign xs[0] = X0;
  assign ys[0] = '0;
  assign zs[0] = angle_i;

  for (genvar i = 0; i < NSTAGES; i++) begin : g_stage
    localparam int WI = zw(i, B);
    localparam int WO = zw(i + 1, B);
    logic [WO-1:0] z_nx;

    cordic_stage #(
      .I    (i),
      .N    (N),
      .WZI  (WI),
      .WZO  (WO),
      .ALPHA(atan_lsb(i, B))
    ) u_stage (
      .clk(clk),
      .x_i(xs[i]),
      .y_i(ys[i]),
      .z_i(zs[i][WI-1:0]),
      .x_o(xs[i+1]),
      .y_o(ys[i+1]),
      .z_o(z_nx)
    );

    // sign-extend back to the common array width
    assign zs[i+1] = B'($signed(z_nx));
  end

  assign cos_o   = xs[NSTAGES];
  assign sin_o   = ys[NSTAGES];
  assign z_res_o = zs[NSTAGES][zw(NSTAGES, B)-1:0];

  initial assert (N == 1 + L + M) else $error("cordic_rotator: N must be 1+L+M");
  initial assert (NSTAGES >= 1 && zw(NSTAGES, B) >= 2)
    else $error("cordic_rotator: too many stages for angle width B");

endmodule
