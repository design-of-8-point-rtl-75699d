// dft4_mod: modified serial-input 4-point DFT for use inside the 8-point DFT.
//
// Real samples x(0..3) arrive one per enter pulse, in order. No multiplier is
// used: each DFT output is a running sum of +x, -x or nothing, chosen by the
// Rademacher-function control circuit (rademacher_ctrl). Only the four
// outputs the 8-point DFT needs are built, Xr0, Xr1, Xr2 and Xi1, with three
// real and one imaginary accumulator; X(3) is the conjugate of X(1) and is not
// produced, and Xi0 = Xi2 = 0 for real input. This is why the core is not a
// complete 4-point DFT on its own.
//
// Datapath, one stage per register:
//   negative circuit and sign multiplexers -> data buffers (loaded on enter,
//   together with the control of that sample) -> accumulators -> output
//   buffers.
// The Xr0 data buffer is fed from x directly, as its matrix row holds only +1.
// The output buffers take no control: they copy the accumulators every cycle.
// Timing: the results of a frame are on the outputs, with out_valid high for
// one cycle, three cycles after the cycle in which x(3) was entered. Since
// the accumulators only move when samples arrive, the results then stay on the
// outputs until two cycles after x(0) of the next frame is entered. Samples may
// come back to back or with idle cycles between them.
// Output width is DATA_W + 2 bits, enough for a sum of four samples.
module dft4_mod #(
  parameter int DATA_W = dft8_pkg::DATA_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enter,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [DATA_W+1:0] xr0,
  output logic signed [DATA_W+1:0] xr1,
  output logic signed [DATA_W+1:0] xr2,
  output logic signed [DATA_W+1:0] xi1,
  output logic                     out_valid
);
  import dft8_pkg::*;

  localparam int SW = DATA_W + 1;  // signed sample, room for -(-2^(DATA_W-1))
  localparam int AW = DATA_W + 2;  // accumulator width

  // ---------------- control circuit ----------------
  acc_ctl_t [NACC-1:0] ctl;
  logic                first, last;
  logic [1:0]          idx;
  logic                phi2_n, phi3_n;

  rademacher_ctrl u_ctrl (
    .clk, .rst_n, .enter,
    .idx, .phi2_n, .phi3_n, .first, .last, .ctl
  );

  // ---------------- negative circuit and multiplexers ----------------
  logic signed [SW-1:0] x_pos, x_neg;
  logic signed [SW-1:0] sel [NACC];

  assign x_pos = SW'(x);

  neg_circuit #(.W(SW)) u_neg (.a(x_pos), .y(x_neg));

  always_comb begin
    sel[ACC_R0] = x_pos;  // first row is all +1: no multiplexer
    for (int i = 1; i < NACC; i++)
      sel[i] = ctl[i].neg ? x_neg : x_pos;
  end

  // ---------------- data buffers ----------------
  logic signed [SW-1:0] dbuf [NACC];
  logic [NACC-1:0]      dbuf_en;
  logic                 dbuf_v, dbuf_first, dbuf_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NACC; i++) dbuf[i] <= '0;
      dbuf_en    <= '0;
      dbuf_v     <= 1'b0;
      dbuf_first <= 1'b0;
      dbuf_last  <= 1'b0;
    end else begin
      dbuf_v <= enter;
      if (enter) begin
        for (int i = 0; i < NACC; i++) begin
          dbuf[i]    <= sel[i];
          dbuf_en[i] <= ctl[i].en;
        end
        dbuf_first <= first;
        dbuf_last  <= last;
      end
    end
  end

  // ---------------- accumulators ----------------
  logic signed [AW-1:0] acc [NACC];

  for (genvar i = 0; i < NACC; i++) begin : g_acc
    accumulator #(.IN_W(SW), .W(AW)) u_acc (
      .clk, .rst_n,
      .valid (dbuf_v),
      .clear (dbuf_first),
      .en    (dbuf_en[i]),
      .d     (dbuf[i]),
      .q     (acc[i])
    );
  end

  logic acc_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc_done <= 1'b0;
    else        acc_done <= dbuf_v && dbuf_last;
  end

  // ---------------- output buffers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr0 <= '0; xr1 <= '0; xr2 <= '0; xi1 <= '0;
      out_valid <= 1'b0;
    end else begin
      xr0 <= acc[ACC_R0];
      xr1 <= acc[ACC_R1];
      xr2 <= acc[ACC_R2];
      xi1 <= acc[ACC_I1];
      out_valid <= acc_done;
    end
  end

  // idx and the Rademacher outputs are used only through ctl here.
  logic unused_ok;
  assign unused_ok = ^{idx, phi2_n, phi3_n};
endmodule
