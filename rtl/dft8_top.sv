// dft8_top: area-reduced serial-input 8-point DFT of real samples.
//
// Real samples x(0..7) enter one per enter pulse, in order. A 3-bit sample
// counter sends the even samples to the first modified 4-point DFT (U) and the
// odd ones to the second (L): the decimation-in-time split. Each 4-point core
// builds only U0, U1 (real and imaginary), U2 and the same of L, because U3
// and L3 are the conjugates of U1 and L1. The combinational back end then
// forms the 8-point result with three 2-point DFTs instead of four:
//   #1  X0, X4 = U0 +/- L0                           (real)
//   #2  X1, X5 = U1 +/- W8^1 L1                      (a real and an imaginary
//                                                     lane, one dft2 each)
//   #3  X2, X6 = U2 -/+ j L2                         (W8^2 = -j needs no
//       multiplier: L2 enters the imaginary lane as is, with its two outputs
//       swapped to absorb the sign, and U2 is the real part of both)
// X3 and X7, which the removed fourth 2-point DFT would have made, are the
// conjugates of X5 and X1: their real parts are shared, and two negative
// circuits give their imaginary parts.
//
// Interface: x_re[k] and x_im[k] hold X(k); X(0) and X(4) are real, so their
// imaginary outputs are zero. out_valid is high for one cycle, three cycles
// after the cycle in which x(7) was entered, and the results hold until the
// next frame's samples start reaching the accumulators. The first sample
// after reset is x(0). Results are integers of DATA_W + 3 bits; only the
// products by 1/sqrt(2) in X(1), X(3), X(5) and X(7) are rounded, to the
// nearest integer. Input width, fixed-point format, reset and handshake are
// this design's own choices. Two assertions check that the even core's
// results are complete and held whenever the odd core reports its frame.
module dft8_top #(
  parameter int DATA_W  = dft8_pkg::DATA_W_DEF,
  parameter int TW_FRAC = dft8_pkg::TW_FRAC_DEF,
  localparam int OUT_W  = DATA_W + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enter,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [OUT_W-1:0] x_re [8],
  output logic signed [OUT_W-1:0] x_im [8],
  output logic                    out_valid
);
  localparam int UW = DATA_W + 2;  // 4-point DFT result width

  // ---------------- even / odd split ----------------
  logic [2:0] n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     n <= '0;
    else if (enter) n <= n + 3'd1;
  end

  logic enter_even, enter_odd;
  assign enter_even = enter && !n[0];
  assign enter_odd  = enter &&  n[0];

  // ---------------- two 4-point DFTs ----------------
  logic signed [UW-1:0] u0, u1r, u2, u1i;
  logic signed [UW-1:0] l0, l1r, l2, l1i;
  logic                 u_valid, l_valid;

  dft4_mod #(.DATA_W(DATA_W)) u_dft4_even (
    .clk, .rst_n, .enter(enter_even), .x,
    .xr0(u0), .xr1(u1r), .xr2(u2), .xi1(u1i), .out_valid(u_valid)
  );

  dft4_mod #(.DATA_W(DATA_W)) u_dft4_odd (
    .clk, .rst_n, .enter(enter_odd), .x,
    .xr0(l0), .xr1(l1r), .xr2(l2), .xi1(l1i), .out_valid(l_valid)
  );

  // The odd core finishes last; the even core's results still hold then.
  assign out_valid = l_valid;

  // ---------------- twiddle W8^1 ----------------
  logic signed [OUT_W-1:0] t1r, t1i;

  twiddle_w81 #(.IN_W(UW), .OUT_W(OUT_W), .TW_FRAC(TW_FRAC)) u_tw1 (
    .a_re(l1r), .a_im(l1i), .y_re(t1r), .y_im(t1i)
  );

  // ---------------- three 2-point DFTs ----------------
  logic signed [OUT_W-1:0] x0, x4, x1r, x5r, x1i, x5i, x6i, x2i;

  dft2 #(.W(OUT_W)) u_dft2_1 (
    .x0(OUT_W'(u0)), .x1(OUT_W'(l0)), .y0(x0), .y1(x4)
  );

  dft2 #(.W(OUT_W)) u_dft2_2re (
    .x0(OUT_W'(u1r)), .x1(t1r), .y0(x1r), .y1(x5r)
  );

  dft2 #(.W(OUT_W)) u_dft2_2im (
    .x0(OUT_W'(u1i)), .x1(t1i), .y0(x1i), .y1(x5i)
  );

  // Imaginary lane of #3: U2 has no imaginary part, W8^2 * L2 = -j L2.
  dft2 #(.W(OUT_W)) u_dft2_3im (
    .x0('0), .x1(OUT_W'(l2)), .y0(x6i), .y1(x2i)
  );

  // ---------------- negative circuits for X7 and X3 ----------------
  logic signed [OUT_W-1:0] x7i, x3i;

  neg_circuit #(.W(OUT_W)) u_neg_x7 (.a(x1i), .y(x7i));
  neg_circuit #(.W(OUT_W)) u_neg_x3 (.a(x5i), .y(x3i));

  // ---------------- outputs ----------------
  always_comb begin
    x_re[0] = x0;            x_im[0] = '0;
    x_re[1] = x1r;           x_im[1] = x1i;
    x_re[2] = OUT_W'(u2);    x_im[2] = x2i;
    x_re[3] = x5r;           x_im[3] = x3i;
    x_re[4] = x4;            x_im[4] = '0;
    x_re[5] = x5r;           x_im[5] = x5i;
    x_re[6] = OUT_W'(u2);    x_im[6] = x6i;
    x_re[7] = x1r;           x_im[7] = x7i;
  end

  // The even core must have finished the current frame (u_valid) before the
  // odd core reports it: its results are then still held in its output
  // buffers. u_fresh tracks a u_valid not yet matched by l_valid.
  logic u_fresh;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       u_fresh <= 1'b0;
    else if (u_valid) u_fresh <= 1'b1;
    else if (l_valid) u_fresh <= 1'b0;
  end

  a_even_first: assert property (@(posedge clk) disable iff (!rst_n) l_valid |-> u_fresh)
    else $error("odd 4-point DFT finished without a finished even frame");
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(u_valid && l_valid))
    else $error("both 4-point DFTs finished in the same cycle");
endmodule
