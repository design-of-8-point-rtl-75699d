// tb_rademacher_ctrl: drives random enter pulses and checks, for every cycle,
// the sample index against a counter kept here, the Rademacher outputs against
// sgn(sin(2 pi t)) and sgn(sin(4 pi t)) at the middle t = (n + 0.5)/4 of the
// sample interval, and each accumulator's en/neg against the sign of the
// matching entry of the 4-point DFT matrix, exp(-j 2 pi k n / 4), computed
// with $cos and $sin.
module tb_rademacher_ctrl;
  import dft8_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, enter = 1'b0;
  logic [1:0] idx;
  logic phi2_n, phi3_n, first, last;
  acc_ctl_t [NACC-1:0] ctl;
  int checks = 0, failures = 0;
  int n_model = 0;

  rademacher_ctrl dut (.clk, .rst_n, .enter, .idx, .phi2_n, .phi3_n, .first, .last, .ctl);

  always #5 clk = ~clk;

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: n=%0d %s got %b expected %b", n_model, what, got, exp);
    end
  endtask

  function automatic real entry(input int k, input int n, input bit imag);
    real ang = 2.0 * PI * real'(k * n) / 4.0;
    real v = imag ? -$sin(ang) : $cos(ang);
    return (v > -1e-9 && v < 1e-9) ? 0.0 : v;
  endfunction

  task automatic check_acc(input int a, input int k, input bit imag);
    real v = entry(k, n_model, imag);
    expect_bit(ctl[a].en, v != 0.0, $sformatf("acc%0d en", a));
    if (v != 0.0) expect_bit(ctl[a].neg, v < 0.0, $sformatf("acc%0d neg", a));
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      enter = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (int'(idx) != n_model) begin failures++; $display("FAIL: idx %0d expected %0d", idx, n_model); end
      begin
        real t;
        t = (real'(n_model) + 0.5) / 4.0;
        expect_bit(phi2_n, $sin(2.0 * PI * t) < 0.0, "phi2");
        expect_bit(phi3_n, $sin(4.0 * PI * t) < 0.0, "phi3");
      end
      expect_bit(first, n_model == 0, "first");
      expect_bit(last, n_model == 3, "last");
      check_acc(ACC_R0, 0, 1'b0);
      check_acc(ACC_R1, 1, 1'b0);
      check_acc(ACC_R2, 2, 1'b0);
      check_acc(ACC_I1, 1, 1'b1);
      @(posedge clk);
      if (enter) n_model = (n_model + 1) % 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
