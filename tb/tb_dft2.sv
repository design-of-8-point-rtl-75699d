// tb_dft2: checks the 2-point DFT against x0 + x1 and x0 - x1 for random
// operands kept within half the range (so neither result can overflow) and
// for the worked example x = {2, 5}, which gives {7, -3}.
module tb_dft2;
  localparam int W = 11;
  logic signed [W-1:0] x0, x1, y0, y1;
  int checks = 0, failures = 0;

  dft2 #(.W(W)) dut (.x0, .x1, .y0, .y1);

  task automatic apply(input int a, input int b);
    x0 = W'(a);
    x1 = W'(b);
    #1;
    checks += 2;
    if (int'(y0) != a + b) begin failures++; $display("FAIL: %0d + %0d gave %0d", a, b, y0); end
    if (int'(y1) != a - b) begin failures++; $display("FAIL: %0d - %0d gave %0d", a, b, y1); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(2, 5);
    apply(-512, -512);
    apply(511, -512);
    apply(0, 0);
    for (int i = 0; i < 2000; i++)
      apply($urandom_range(0, 1023) - 512, $urandom_range(0, 1023) - 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
