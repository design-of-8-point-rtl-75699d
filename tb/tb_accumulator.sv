// tb_accumulator: random valid/clear/en/d sequences; a running sum kept here
// (restart on clear, add when enabled, hold when not valid) must match q one
// clock after each input.
module tb_accumulator;
  localparam int IN_W = 9, W = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0, clear = 1'b0, en = 1'b0;
  logic signed [IN_W-1:0] d = '0;
  logic signed [W-1:0] q;
  int checks = 0, failures = 0;
  int model = 0;

  accumulator #(.IN_W(IN_W), .W(W)) dut (.clk, .rst_n, .valid, .clear, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      valid = $urandom_range(0, 3) != 0;
      clear = (model > 200 || model < -200) ? 1'b1 : ($urandom_range(0, 4) == 0);
      en    = $urandom_range(0, 1);
      d     = IN_W'($urandom_range(0, 511) - 256);
      if (valid) model = (clear ? 0 : model) + (en ? int'(d) : 0);
      @(negedge clk);
      valid = 1'b0;
      checks++;
      if (int'(q) != model) begin
        failures++;
        $display("FAIL: q=%0d expected %0d", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
