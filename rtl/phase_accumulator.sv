// phase_accumulator: frequency register, J-bit adder and J-bit phase register.
//
// The frequency tuning word (FTW) is written into the frequency register when
// ftw_we is high. Every clock the phase register adds the frequency register to
// itself modulo 2^J, so the phase wraps once per output period and the output
// frequency is f_out = FTW * f_clk / 2^J. The PW most significant phase bits
// (PW = B+1 in the synthesizer) leave on phase_o; the rest of the phase word
// is kept only for frequency resolution.
//
// Timing: an FTW written in cycle t is in the frequency register after edge t
// and first changes the phase step at edge t+1. wrap_o is high for the cycle
// in which phase_o holds the value produced by an overflowing addition (the
// adder's carry out, registered with the sum), marking the start of a period.
// Reset (synchronous, active high) clears frequency and phase registers.
// Structure follows the source architecture; the write strobe, reset and the
// wrap flag are this design's choices.
module phase_accumulator #(
  parameter int J  = 16,  // accumulator word length
  parameter int PW = 14   // truncated phase width passed on (B+1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ftw_we,
  input  logic [J-1:0]  ftw,
  output logic [PW-1:0] phase_o,
  output logic          wrap_o
);

  logic [J-1:0] freq_q;
  logic [J-1:0] phase_q;
  logic [J:0]   sum;

  assign sum = {1'b0, phase_q} + {1'b0, freq_q};

  always_ff @(posedge clk) begin
    if (rst) begin
      freq_q  <= '0;
      phase_q <= '0;
      wrap_o  <= 1'b0;
    end else begin
      if (ftw_we) freq_q <= ftw;
      phase_q <= sum[J-1:0];
      wrap_o  <= sum[J];
    end
  end

  assign phase_o = phase_q[J-1 -: PW];

  initial assert (PW <= J && PW >= 3) else $error("phase_accumulator: need 3 <= PW <= J");

endmodule
