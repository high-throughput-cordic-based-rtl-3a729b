// output_complementor: the end complementor of the synthesizer.
//
// The CORDIC rotator always returns sin(a) for a in [0, pi/2], i.e. the first
// half period of the wave. When bit B of the phase (the half-period bit) is set
// the sample belongs to the second half period and is negated in two's
// complement: sin(pi + a) = -sin(a). Values lie in [-1, 1] of an N-bit word
// with N-2 fraction bits, so negation cannot overflow.
//
// The control bit follows the source architecture; two's complement negation
// is this design's choice. Purely combinational; the caller must delay the
// control bit by the rotator latency so it meets its own sample.
module output_complementor #(
  parameter int N = 15
) (
  input  logic         neg_i,
  input  logic [N-1:0] data_i,
  output logic [N-1:0] data_o
);

  always_comb begin
    if (neg_i) data_o = N'(-signed'(data_i));
    else       data_o = data_i;
  end

endmodule
