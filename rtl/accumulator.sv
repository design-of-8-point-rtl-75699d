// accumulator: one real or imaginary accumulator of the 4-point DFT.
//
// On a cycle with valid = 1 it takes one buffered, already signed sample d.
// If clear is set (sample 0 of a frame) the running sum restarts from that
// sample, otherwise the sample is added to it; en = 0 means the sample does
// not belong to this sum (a zero in the DFT matrix row), and it then counts
// as zero. With valid = 0 the sum holds, so a finished result stays in place
// until the next frame starts. The sum is registered (one cycle from d to q);
// IN_W is the sample width and W the sum width, wide enough for four samples.
module accumulator #(
  parameter int IN_W = 9,
  parameter int W    = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid,
  input  logic                   clear,
  input  logic                   en,
  input  logic signed [IN_W-1:0] d,
  output logic signed [W-1:0]    q
);
  logic signed [W-1:0] term;
  logic signed [W-1:0] base;

  always_comb begin
    term = en ? W'(d) : '0;
    base = clear ? '0 : q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (valid) q <= base + term;
  end
endmodule
