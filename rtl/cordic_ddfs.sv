// cordic_ddfs: direct digital frequency synthesizer with a pipelined CORDIC
// phase-to-amplitude converter.
//
// Data flow (one sample per clock):
//   FTW -> phase_accumulator (J bits, modulo 2^J) -> top B+1 phase bits
//       -> phase_complementor (bit B-1: mirror quadrants 2 and 4 onto quadrant 1)
//       -> cordic_rotator (NSTAGES pipelined iterations, pre-scaled by 1/K)
//       -> output_complementor (bit B: negate the second half period)
//       -> output register -> sine_o
// Bit B of the phase, the start-of-period flag and a valid flag travel through
// a delay_line of NSTAGES stages beside the rotator so they meet their sample.
//
// sine_o is an N = 1+L+M bit two's complement word with N-2 fraction bits:
// +1.0 = 2^(N-2). With the default word lengths (the 9-bit-accuracy set:
// J=16, B=13, L=10, M=4, n=10, N=15) the output frequency is
// f_out = FTW * f_clk / 65536.
//
// Timing: ftw is captured when ftw_we is high; reset (synchronous, active high)
// clears the phase to 0. A phase held by the phase register in cycle t shows on
// sine_o in cycle t + NSTAGES + 1. valid_o goes high NSTAGES+1 cycles after
// reset is released, when the first sample of the new phase sequence arrives;
// period_o is high with the first sample of each period after the phase
// accumulator wraps. A new FTW changes the frequency without a phase jump.
// Reset clears the frequency register too, so an FTW presented during reset is
// taken by the first clock after it and the first two samples both have phase 0.
// The block structure, the word lengths and the use of bits B and B-1 follow
// the source architecture; the valid/period flags, the output register and the
// reset are this design's choices.
module cordic_ddfs
  import ddfs_pkg::*;
#(
  parameter int J       = 16,  // phase accumulator width
  parameter int B       = 13,  // CORDIC phase word length
  parameter int L       = 10,  // CORDIC input word length
  parameter int M       = 4,   // guard bits
  parameter int NSTAGES = 10,  // CORDIC iterations n
  parameter int N       = 1 + L + M  // output word length
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ftw_we,
  input  logic [J-1:0] ftw,
  output logic [N-1:0] sine_o,
  output logic         valid_o,
  output logic         period_o
);

  logic [B:0]   phase;
  logic         wrap;
  logic [B-1:0] angle;
  logic [N-1:0] rot_cos, rot_sin, sine_nx;
  logic [zw(NSTAGES, B)-1:0] rot_zres;
  logic [2:0]   side_d;   // {valid, wrap, half-period bit} after NSTAGES clocks

  phase_accumulator #(.J(J), .PW(B + 1)) u_acc (
    .clk    (clk),
    .rst    (rst),
    .ftw_we (ftw_we),
    .ftw    (ftw),
    .phase_o(phase),
    .wrap_o (wrap)
  );

  phase_complementor #(.B(B)) u_front (
    .phase_i(phase),
    .angle_o(angle)
  );

  cordic_rotator #(.B(B), .L(L), .M(M), .NSTAGES(NSTAGES), .N(N)) u_rot (
    .clk    (clk),
    .angle_i(angle),
    .cos_o  (rot_cos),
    .sin_o  (rot_sin),
    .z_res_o(rot_zres)
  );

  delay_line #(.W(3), .DEPTH(NSTAGES)) u_side (
    .clk(clk),
    .rst(rst),
    .d_i({1'b1, wrap, phase[B]}),
    .d_o(side_d)
  );

  output_complementor #(.N(N)) u_end (
    .neg_i (side_d[0]),
    .data_i(rot_sin),
    .data_o(sine_nx)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sine_o   <= '0;
      valid_o  <= 1'b0;
      period_o <= 1'b0;
    end else begin
      sine_o   <= sine_nx;
      valid_o  <= side_d[2];
      period_o <= side_d[1] & side_d[2];
    end
  end

  initial assert (J >= B + 1) else $error("cordic_ddfs: J must be at least B+1");

endmodule
