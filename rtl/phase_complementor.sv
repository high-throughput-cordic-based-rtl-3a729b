// phase_complementor: the front complementor of the synthesizer.
//
// Input is the (B+1)-bit truncated phase: bit B selects the half period, bit
// B-1 the quadrant within it (00, 01, 10, 11 = first to fourth quadrant of the
// sine). The lower B bits, read as a two's complement binary angle (LSB =
// pi/2^B), lie in [0, pi/2) in the first and third quadrant and need no change.
// In the second and fourth quadrant bit B-1 is set and the angle has to be
// mirrored about pi/2, since sin(pi - a) = sin(a): the B-bit word is inverted
// bit by bit, which yields 2^B - 1 - u, i.e. pi - a less one LSB, with bit
// B-1 cleared. The result is therefore always a non-negative angle in
// [0, pi/2) for the CORDIC rotator. Bit B itself is not used here; it steers
// the output complementor.
//
// Using bit B-1 as control follows the source architecture; bitwise inversion
// (rather than negation, whose result pi/2 would not fit the B-bit word) is
// this design's choice. Purely combinational.
module phase_complementor #(
  parameter int B = 13
) (
  input  logic [B:0]   phase_i,
  output logic [B-1:0] angle_o
);

  always_comb begin
    if (phase_i[B-1]) angle_o = ~phase_i[B-1:0];
    else              angle_o =  phase_i[B-1:0];
  end

endmodule
