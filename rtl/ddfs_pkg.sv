// ddfs_pkg: constants and elaboration-time helper functions shared by the
// CORDIC-based direct digital frequency synthesizer.
//
// Number formats used throughout the design:
//   * Angle (CORDIC z path): B-bit two's complement "binary angle". One LSB is
//     pi/2^B rad, so the B-bit range [-2^(B-1), 2^(B-1)) covers exactly the
//     CORDIC region of convergence [-pi/2, pi/2). Stage i of the angle path keeps
//     only zw(i) bits: B for i = 0 and B-i+1 for i >= 1 (the residual angle
//     shrinks as the iterations proceed, so its upper bits are pure sign copies).
//   * Vector (CORDIC x/y path): N = 1+L+M bit two's complement with N-2 fraction
//     bits, i.e. range [-2, 2). The L-bit input word carries a sign and L-1
//     fraction bits, the M guard bits extend it at the bottom and the extra top
//     bit keeps intermediate values from overflowing. 1.0 = 2^(N-2).
// The elementary angles and the pre-scaling constant 1/K are computed here from
// their definitions, so any word-length set can be elaborated.
package ddfs_pkg;

  localparam real PI = 3.14159265358979323846;

  // Width of the angle word entering CORDIC stage i (i = 0 .. n), for phase width b.
  function automatic int zw(input int i, input int b);
    return (i == 0) ? b : b - i + 1;
  endfunction

  // Elementary angle arctan(2^-i) in binary-angle LSBs (pi/2^b rad), rounded.
  function automatic int atan_lsb(input int i, input int b);
    return int'($atan(2.0 ** (-i)) * (2.0 ** b) / PI);
  endfunction

  // CORDIC gain after n iterations: K = prod_{i=0}^{n-1} sqrt(1 + 2^-2i).
  function automatic real cordic_gain(input int n);
    real k;
    k = 1.0;
    for (int i = 0; i < n; i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    return k;
  endfunction

  // Pre-scaled start value x0 = 1/K, quantised to the L-bit input word
  // (sign + L-1 fraction bits) and extended by M zero guard bits.
  function automatic int inv_k_word(input int n, input int l, input int m);
    return int'((2.0 ** (l - 1)) / cordic_gain(n)) * (2 ** m);
  endfunction

endpackage
