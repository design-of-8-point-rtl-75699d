// tb_dft8_top: end-to-end test of the serial 8-point DFT at its default size.
//
// Frames of eight real samples are entered: the worked example
// x = 1..8, extreme frames (all most-negative, all most-positive, alternating
// signs, an impulse) and random frames. Frames are sent back to back or with
// random idle cycles inside and between them. Each result is compared with a
// DFT computed here in floating point, X(k) = sum x(n) exp(-j 2 pi k n / 8):
// outputs that need no 1/sqrt(2) product must be exact, the others within
// 0.51 of the exact value. The latency from entering x(7) to out_valid must be
// three cycles, and every frame must produce exactly one out_valid.
// Coverage counters make sure that back-to-back frames, frames with gaps,
// non-zero imaginary parts made by the two negative circuits (X3, X7) and a
// non-zero L2 on the W8^2 path all occur.
module tb_dft8_top;
  localparam int DATA_W = 8;
  localparam int OUT_W  = DATA_W + 3;
  localparam int NRAND  = 300;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enter = 1'b0;
  logic signed [DATA_W-1:0] x = '0;
  logic signed [OUT_W-1:0]  x_re [8];
  logic signed [OUT_W-1:0]  x_im [8];
  logic out_valid;

  int checks = 0, failures = 0;
  int cov_b2b = 0, cov_gap = 0, cov_neg = 0, cov_l2 = 0, cov_example = 0;

  dft8_top dut (.clk, .rst_n, .enter, .x, .x_re, .x_im, .out_valid);

  always #5 clk = ~clk;

  // frames waiting for their result
  typedef logic signed [7:0][DATA_W-1:0] frame_t;  // frame_t[n] = x(n)
  frame_t pending [$];
  int     t7_q [$];
  int     cyc = 0;
  int     sent_idx = 0;

  function automatic real ref_re(input frame_t f, input int k);
    real acc = 0.0;
    for (int n = 0; n < 8; n++) acc += real'(int'($signed(f[n]))) * $cos(2.0 * PI * real'(k * n) / 8.0);
    return acc;
  endfunction

  function automatic real ref_im(input frame_t f, input int k);
    real acc = 0.0;
    for (int n = 0; n < 8; n++) acc -= real'(int'($signed(f[n]))) * $sin(2.0 * PI * real'(k * n) / 8.0);
    return acc;
  endfunction

  function automatic frame_t make_frame(input int v [8]);
    frame_t r;
    for (int n = 0; n < 8; n++) r[n] = DATA_W'(v[n]);
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // monitor: sample index, latency and results
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && enter) begin
      if (sent_idx == 7) t7_q.push_back(cyc);
      sent_idx = (sent_idx + 1) % 8;
    end
    if (rst_n && out_valid) begin
      if (pending.size() == 0) begin
        check(1'b0, "out_valid without a pending frame");
      end else begin
        frame_t f;
        int t7;
        f  = pending.pop_front();
        t7 = t7_q.pop_front();
        check(cyc - t7 == 3, $sformatf("latency %0d, expected 3", cyc - t7));
        for (int k = 0; k < 8; k++) begin
          real re, im, tol;
          re = ref_re(f, k);
          im = ref_im(f, k);
          tol = (k % 2 == 1) ? 0.51 : 1e-6;
          check((x_re[k] - re) < tol && (re - x_re[k]) < tol,
                $sformatf("X%0d re %0d expected %f", k, x_re[k], re));
          check((x_im[k] - im) < tol && (im - x_im[k]) < tol,
                $sformatf("X%0d im %0d expected %f", k, x_im[k], im));
        end
        if (x_im[7] != 0 || x_im[3] != 0) cov_neg++;
        if (int'($signed(f[1])) - int'($signed(f[3])) + int'($signed(f[5])) - int'($signed(f[7])) != 0) cov_l2++;
      end
    end
  end

  task automatic send_frame(input frame_t f, input bit gaps);
    pending.push_back(f);
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      enter = 1'b1;
      x = f[n];
      @(negedge clk);
      enter = 1'b0;
      x = DATA_W'($urandom);  // junk while idle must be ignored
      if (gaps) repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  // back-to-back streaming: one sample per cycle
  task automatic send_stream(input frame_t f);
    pending.push_back(f);
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      enter = 1'b1;
      x = f[n];
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // worked example: X = {36, -4+9.66j, -4+4j, -4+1.66j, -4, ...}
    f = make_frame('{1,2,3,4,5,6,7,8});
    send_frame(f, 1'b0);
    cov_example++;
    repeat (6) @(negedge clk);

    // extreme frames
    f = make_frame('{-128,-128,-128,-128,-128,-128,-128,-128}); send_frame(f, 1'b0);
    f = make_frame('{127,127,127,127,127,127,127,127});         send_frame(f, 1'b1);
    f = make_frame('{127,-128,127,-128,127,-128,127,-128});     send_frame(f, 1'b0);
    f = make_frame('{-128,127,-128,127,-128,127,-128,127});     send_frame(f, 1'b0);
    f = make_frame('{127,127,-128,-128,127,127,-128,-128});     send_frame(f, 1'b1);
    f = make_frame('{0,127,0,-128,0,127,0,-128});               send_frame(f, 1'b0);
    f = make_frame('{1,0,0,0,0,0,0,0});                         send_frame(f, 1'b0);
    f = make_frame('{0,1,0,0,0,0,0,0});                         send_frame(f, 1'b0);

    // random frames, some with gaps
    for (int i = 0; i < NRAND; i++) begin
      for (int n = 0; n < 8; n++) f[n] = DATA_W'($urandom);
      if (i % 3 == 0) begin
        send_frame(f, 1'b1);
        cov_gap++;
      end else begin
        send_frame(f, 1'b0);
      end
    end

    // a run of back-to-back frames
    for (int i = 0; i < 40; i++) begin
      for (int n = 0; n < 8; n++) f[n] = DATA_W'($urandom);
      send_stream(f);
      cov_b2b++;
    end
    @(negedge clk);
    enter = 1'b0;

    repeat (10) @(negedge clk);
    check(pending.size() == 0, $sformatf("%0d frames without a result", pending.size()));

    $display("coverage: example=%0d gap_frames=%0d back_to_back=%0d neg_circuit_nonzero=%0d l2_nonzero=%0d",
             cov_example, cov_gap, cov_b2b, cov_neg, cov_l2);
    check(cov_example > 0, "worked example not run");
    check(cov_gap > 0, "no frame with idle cycles");
    check(cov_b2b > 0, "no back-to-back frames");
    check(cov_neg > 0, "negative circuits never produced a non-zero value");
    check(cov_l2 > 0, "L2 path never carried a non-zero value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
