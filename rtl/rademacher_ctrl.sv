// rademacher_ctrl: control circuit of the serial 4-point DFT.
//
// A 2-bit counter advances on every sample that is entered (enter = 1). Its
// two bits are the two non-constant Rademacher functions over a 4-sample frame,
// sampled at the middle of each sample interval: phi2_n = count[1] says that
// phi(2) = -1 (pattern + + - -) and phi3_n = count[0] says that phi(3) = -1
// (pattern + - + -). The rows of the 4-point DFT matrix are products of these
// functions, and from them the circuit derives, for the sample now on the
// input, the en/neg control of each accumulator:
//   Xr0 : + + + +        always, never negated            (phi(0))
//   Xr1 : + 0 - 0        even samples, negated if phi2_n  ((phi2+phi2*phi3)/2)
//   Xr2 : + - + -        always, negated if phi3_n         (phi3)
//   Xi1 : 0 - 0 +        odd samples, negated unless phi2_n ((phi2*phi3-phi2)/2)
// first and last flag samples 0 and 3 of a frame. All outputs are
// combinational from the counter and describe the sample presented with
// enter in the same cycle. An asynchronous active-low reset sets the count to
// zero, so the first sample after reset is sample 0 of a frame.
module rademacher_ctrl (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enter,
  output logic [1:0]            idx,
  output logic                  phi2_n,
  output logic                  phi3_n,
  output logic                  first,
  output logic                  last,
  output dft8_pkg::acc_ctl_t [dft8_pkg::NACC-1:0] ctl
);
  import dft8_pkg::*;

  logic [1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (enter) count <= count + 2'd1;
  end

  always_comb begin
    idx    = count;
    phi2_n = count[1];
    phi3_n = count[0];
    first  = (count == 2'd0);
    last   = (count == 2'd3);
    ctl[ACC_R0] = '{en: 1'b1,    neg: 1'b0};
    ctl[ACC_R1] = '{en: ~phi3_n, neg: phi2_n};
    ctl[ACC_R2] = '{en: 1'b1,    neg: phi3_n};
    ctl[ACC_I1] = '{en: phi3_n,  neg: ~phi2_n};
  end
endmodule
