// neg_circuit: two's complement negative circuit, y = -a.
//
// Inverts every bit and adds one. The 4-point DFT uses it to offer -x to its
// sign multiplexers, and the 8-point top uses two of them to build the
// imaginary parts of X(7) and X(3) from those of X(1) and X(5), which the
// conjugate symmetry of a real-input DFT allows. Purely combinational.
// The caller gives it one bit more than the largest magnitude needs, so the
// most negative code, whose negation would wrap, never reaches it.
module neg_circuit #(
  parameter int W = 8
) (
  input  logic signed [W-1:0] a,
  output logic signed [W-1:0] y
);
  always_comb y = ~a + W'(1);
endmodule
