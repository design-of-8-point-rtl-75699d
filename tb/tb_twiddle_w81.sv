// tb_twiddle_w81: multiplies random and extreme complex inputs by W8^1 and
// compares with (a + jb)(cos(pi/4) - j sin(pi/4)) in floating point: each part
// must be within 0.51 of the exact value: 0.5 for rounding to nearest and a
// small margin for the error of the 16-bit coefficient.
module tb_twiddle_w81;
  localparam int IN_W = 10, OUT_W = 11;
  localparam real PI = 3.14159265358979323846;
  logic signed [IN_W-1:0] a_re, a_im;
  logic signed [OUT_W-1:0] y_re, y_im;
  int checks = 0, failures = 0;

  twiddle_w81 #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.a_re, .a_im, .y_re, .y_im);

  task automatic apply(input int a, input int b);
    real c, s, er, ei;
    a_re = IN_W'(a);
    a_im = IN_W'(b);
    #1;
    c = $cos(PI / 4.0);
    s = $sin(PI / 4.0);
    er = real'(a) * c + real'(b) * s;
    ei = real'(b) * c - real'(a) * s;
    checks += 2;
    if (real'(y_re) - er > 0.51 || er - real'(y_re) > 0.51) begin
      failures++; $display("FAIL: re (%0d,%0d) gave %0d expected %f", a, b, y_re, er);
    end
    if (real'(y_im) - ei > 0.51 || ei - real'(y_im) > 0.51) begin
      failures++; $display("FAIL: im (%0d,%0d) gave %0d expected %f", a, b, y_im, ei);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(-512, -512);
    apply(511, 511);
    apply(511, -512);
    apply(-2, 6);   // the L1 of the worked example x = 1..8
    apply(1, 0);
    for (int i = 0; i < 3000; i++)
      apply($urandom_range(0, 1023) - 512, $urandom_range(0, 1023) - 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
