// cordic_stage: one pipelined iteration of a rotation-mode CORDIC.
//
// Iteration I rotates the vector (x, y) by +/- arctan(2^-I) towards the
// remaining angle z:
//   sigma = +1 if z >= 0, else -1
//   x' = x - sigma * (y >>> I)
//   y' = y + sigma * (x >>> I)
//   z' = z - sigma * ALPHA,   ALPHA = arctan(2^-I) in binary-angle LSBs
// The shift by I is a fixed wiring (arithmetic shift, dropped bits truncated),
// so a stage is just three adder/subtractors and a register bank. The angle
// path narrows from WZI to WZO bits: the residual angle after this iteration
// is bounded well inside WZO bits, so only sign copies are dropped.
//
// Timing: all outputs are registered; one clock of latency, a new input every
// clock. No reset: the pipeline carries data only and is flushed by new input.
// The iteration equations, hard-wired shifts and the reduced angle widths follow
// the source architecture; the register on every stage output is the
// pipelining it calls for.
module cordic_stage #(
  parameter int I     = 0,   // iteration index (shift amount)
  parameter int N     = 15,  // x/y word length
  parameter int WZI   = 13,  // angle width in
  parameter int WZO   = 13,  // angle width out (<= WZI)
  parameter int ALPHA = 2048 // elementary angle, binary-angle LSBs
) (
  input  logic           clk,
  input  logic [N-1:0]   x_i,
  input  logic [N-1:0]   y_i,
  input  logic [WZI-1:0] z_i,
  output logic [N-1:0]   x_o,
  output logic [N-1:0]   y_o,
  output logic [WZO-1:0] z_o
);

  localparam logic [WZI-1:0] ALPHA_W = WZI'(ALPHA);

  logic           pos;      // sigma = +1
  logic [N-1:0]   x_sh, y_sh;
  logic [N-1:0]   x_nx, y_nx;
  logic [WZI-1:0] z_nx;

  always_comb begin
    pos  = ~z_i[WZI-1];
    x_sh = N'($signed(x_i) >>> I);
    y_sh = N'($signed(y_i) >>> I);
    if (pos) begin
      x_nx = x_i - y_sh;
      y_nx = y_i + x_sh;
      z_nx = z_i - ALPHA_W;
    end else begin
      x_nx = x_i + y_sh;
      y_nx = y_i - x_sh;
      z_nx = z_i + ALPHA_W;
    end
  end

  always_ff @(posedge clk) begin
    x_o <= x_nx;
    y_o <= y_nx;
    z_o <= z_nx[WZO-1:0];
  end

  initial assert (WZO <= WZI) else $error("cordic_stage: angle path may only narrow");

endmodule
