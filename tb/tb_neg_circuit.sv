// tb_neg_circuit: checks y = -a for every 9-bit code except the most negative
// one, whose negation does not fit and which the design never feeds in.
module tb_neg_circuit;
  localparam int W = 9;
  logic signed [W-1:0] a, y;
  int checks = 0, failures = 0;

  neg_circuit #(.W(W)) dut (.a, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(2**(W-1)) + 1; v < 2**(W-1); v++) begin
      a = W'(v);
      #1;
      checks++;
      if (int'(y) != -v) begin
        failures++;
        $display("FAIL: -(%0d) gave %0d", v, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
