// twiddle_w81: multiplication of a complex value by W8^1 = (1 - j)/sqrt(2).
//
// (a + jb)(1 - j)/sqrt(2) = ((a + b) + j(b - a))/sqrt(2), so one adder, one
// subtractor and two multiplications by the constant 1/sqrt(2) do it. The
// constant is held with TW_FRAC fraction bits, rounded to nearest, and each
// product is rounded to the nearest integer (ties upward), so the result is
// on the same integer scale as the input. Purely combinational. OUT_W is one
// bit wider than IN_W, which covers the largest magnitude |a+b|/sqrt(2).
// The fixed-point format is this design's own choice.
module twiddle_w81 #(
  parameter int IN_W    = 10,
  parameter int OUT_W   = IN_W + 1,
  parameter int TW_FRAC = dft8_pkg::TW_FRAC_DEF
) (
  input  logic signed [IN_W-1:0]  a_re,
  input  logic signed [IN_W-1:0]  a_im,
  output logic signed [OUT_W-1:0] y_re,
  output logic signed [OUT_W-1:0] y_im
);
  localparam int CW = TW_FRAC + 1;  // unsigned coefficient, below 1.0
  localparam logic [CW-1:0] COEF = CW'(dft8_pkg::inv_sqrt2_q(TW_FRAC));
  localparam int PW = IN_W + 1 + CW + 1;  // product width

  logic signed [IN_W:0]  sum, dif;
  logic signed [PW-1:0]  p_re, p_im;
  logic signed [PW-1:0]  half;

  always_comb begin
    sum  = (IN_W+1)'(a_re) + (IN_W+1)'(a_im);
    dif  = (IN_W+1)'(a_im) - (IN_W+1)'(a_re);
    half = PW'(1) <<< (TW_FRAC - 1);
    p_re = PW'(sum) * $signed({1'b0, COEF}) + half;
    p_im = PW'(dif) * $signed({1'b0, COEF}) + half;
    y_re = OUT_W'(p_re >>> TW_FRAC);
    y_im = OUT_W'(p_im >>> TW_FRAC);
  end
endmodule
