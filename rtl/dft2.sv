// dft2: 2-point DFT, X0 = x0 + x1 and X1 = x0 - x1.
//
// Both twiddle factors of a 2-point DFT are +1 and -1, so no multiplier is
// needed: one adder forms the sum, and a second adder forms the difference by
// adding the bitwise inverse of x1 with a carry in of one. Purely
// combinational; W is the width of inputs and outputs, and the caller widens
// the operands so that sum and difference cannot overflow.
module dft2 #(
  parameter int W = 11
) (
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] x1,
  output logic signed [W-1:0] y0,
  output logic signed [W-1:0] y1
);
  logic [W-1:0] x1_inv;

  always_comb begin
    x1_inv = ~x1;
    y0 = x0 + x1;
    y1 = x0 + x1_inv + W'(1);  // carry in completes the two's complement
  end
endmodule
