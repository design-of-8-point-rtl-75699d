// tb_dft4_mod: test of the modified serial 4-point DFT.
//
// Frames of four real samples (the worked example {2, 4, 3, 5}, extremes and
// random frames) are entered back to back or with random idle cycles. For
// each frame the outputs are compared with X(0), Re X(1), X(2) and Im X(1) of
// a 4-point DFT computed here with $cos and $sin. The test also checks that
// out_valid comes three cycles after x(3) is entered, once per frame, and that
// the results stay on the outputs until two cycles after the next frame's
// x(0) is entered.
module tb_dft4_mod;
  localparam int DATA_W = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, enter = 1'b0;
  logic signed [DATA_W-1:0] x = '0;
  logic signed [DATA_W+1:0] xr0, xr1, xr2, xi1;
  logic out_valid;
  int checks = 0, failures = 0;
  int cov_gap = 0, cov_b2b = 0, cov_hold = 0;

  dft4_mod #(.DATA_W(DATA_W)) dut (.clk, .rst_n, .enter, .x, .xr0, .xr1, .xr2, .xi1, .out_valid);

  always #5 clk = ~clk;

  typedef logic signed [3:0][DATA_W-1:0] frame_t;
  typedef int res_t [4];
  frame_t pending [$];
  int t3_q [$];
  int cyc = 0, sent = 0;
  int t0_q [$];
  bit have_res = 1'b0;
  res_t res;

  function automatic res_t reference(input frame_t f);
    real r0 = 0.0, r1 = 0.0, r2 = 0.0, i1 = 0.0;
    res_t r;
    for (int n = 0; n < 4; n++) begin
      real v;
      v = real'(int'($signed(f[n])));
      r0 += v;
      r1 += v * $cos(2.0 * PI * real'(n) / 4.0);
      i1 -= v * $sin(2.0 * PI * real'(n) / 4.0);
      r2 += v * $cos(2.0 * PI * real'(2 * n) / 4.0);
    end
    r[0] = $rtoi(r0 + (r0 < 0 ? -0.5 : 0.5));
    r[1] = $rtoi(r1 + (r1 < 0 ? -0.5 : 0.5));
    r[2] = $rtoi(r2 + (r2 < 0 ? -0.5 : 0.5));
    r[3] = $rtoi(i1 + (i1 < 0 ? -0.5 : 0.5));
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit outputs_are(input res_t r);
    return int'(xr0) == r[0] && int'(xr1) == r[1] && int'(xr2) == r[2] && int'(xi1) == r[3];
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    // hold: results must stay until two cycles after the next x(0)
    if (have_res && !out_valid && (t0_q.size() == 0 || cyc <= t0_q[0] + 2)) begin
      check(outputs_are(res), "result did not hold");
      cov_hold++;
    end
    if (rst_n && enter) begin
      if (sent == 3) t3_q.push_back(cyc);
      if (sent == 0) t0_q.push_back(cyc);
      sent = (sent + 1) % 4;
    end
    if (rst_n && out_valid) begin
      if (pending.size() == 0) check(1'b0, "out_valid without a frame");
      else begin
        res = reference(pending.pop_front());
        check(cyc - t3_q.pop_front() == 3, "latency is not 3 cycles");
        check(outputs_are(res), $sformatf("got %0d %0d %0d %0d expected %0d %0d %0d %0d",
              xr0, xr1, xr2, xi1, res[0], res[1], res[2], res[3]));
        have_res = 1'b1;
        void'(t0_q.pop_front());
      end
    end
  end

  task automatic send(input frame_t f, input bit gaps);
    pending.push_back(f);
    for (int n = 0; n < 4; n++) begin
      @(negedge clk);
      enter = 1'b1;
      x = f[n];
      if (gaps) begin
        @(negedge clk);
        enter = 1'b0;
        x = DATA_W'($urandom);
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    if (gaps) cov_gap++; else cov_b2b++;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t f;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // worked example: {2, 4, 3, 5} -> X(0) = 14, X(1) = -1 + j, X(2) = -4
    f = {8'sd5, 8'sd3, 8'sd4, 8'sd2};
    send(f, 1'b0);
    @(negedge clk); enter = 1'b0;
    repeat (6) @(negedge clk);
    check(int'(xr0) == 14 && int'(xr1) == -1 && int'(xi1) == 1 && int'(xr2) == -4,
          "worked example {2,4,3,5}");
    f = {4{8'sh80}};                   send(f, 1'b0);
    f = {4{8'sh7f}};                   send(f, 1'b1);
    f = {8'sh80, 8'sh7f, 8'sh80, 8'sh7f}; send(f, 1'b0);
    f = {8'sh7f, 8'sh80, 8'sh80, 8'sh7f}; send(f, 1'b1);
    for (int i = 0; i < 400; i++) begin
      f = frame_t'($urandom);
      send(f, i % 2 == 0);
    end
    @(negedge clk); enter = 1'b0;
    repeat (8) @(negedge clk);
    check(pending.size() == 0, "frames without a result");
    check(cov_gap > 0 && cov_b2b > 0 && cov_hold > 0, "a timing case never happened");
    $display("coverage: gap_frames=%0d back_to_back=%0d hold_checks=%0d", cov_gap, cov_b2b, cov_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
