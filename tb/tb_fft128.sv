// tb_fft128: checks the 128-point FFT against a floating-point DFT.
//
// Several frames are loaded: random samples, a pure cosine on one bin,
// a constant, and an alternating full-scale sequence. For each frame the
// testbench checks that all 128 bins come out exactly once, in
// bit-reversed index order, that xk_re/xk_im are within 2 LSB of
// DFT(x)/128 computed here with reals, that mag = |re| + |im|, that done
// precedes the first output, that last marks the 128th output, and that
// the frame takes 128 + 448 + 128 clocks plus the fixed pipeline stages,
// well inside the 1039 clocks of one 48 kHz sample.
//
// The 128-point size, bit-reversed unload and |re| + |im| are the document's;
// the reference DFT, the tolerances and the test frames are this design's own.
module tb_fft128;
  localparam int N = 128;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [7:0] xn;
  logic              xn_valid;
  logic busy, done, dv, last;
  logic [6:0]        xk_index;
  logic signed [7:0] xk_re, xk_im;
  logic [8:0]        mag;

  fft128 dut (.clk, .rst, .xn, .xn_valid, .busy, .done, .dv, .last,
              .xk_index, .xk_re, .xk_im, .mag);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [N];

  function automatic int br7(input int v);
    int r = 0;
    for (int i = 0; i < 7; i++) if (v & (1 << i)) r |= 1 << (6 - i);
    return r;
  endfunction

  task automatic run_frame();
    real ref_re, ref_im;
    int  seen [N];
    int  nout, t0, t_done, t_last;
    bit  got_done;
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk);
    t0 = $time / 10;
    for (int n = 0; n < N; n++) begin
      xn = 8'(x[n]);
      xn_valid = 1;
      @(negedge clk);
    end
    xn_valid = 0;
    nout = 0;
    got_done = 0;
    t_done = 0;
    t_last = 0;
    while (nout < N) begin
      @(posedge clk); #1;
      if (done) begin
        got_done = 1;
        t_done = $time / 10;
      end
      if (dv) begin
        check(got_done, "done before first output");
        check(int'(xk_index) == br7(nout), $sformatf("bit-reversed order %0d got %0d", nout, xk_index));
        seen[xk_index]++;
        ref_re = 0.0;
        ref_im = 0.0;
        for (int n = 0; n < N; n++) begin
          ref_re += x[n] * $cos(2.0 * 3.141592653589793 * xk_index * n / N);
          ref_im -= x[n] * $sin(2.0 * 3.141592653589793 * xk_index * n / N);
        end
        ref_re /= N;
        ref_im /= N;
        check((xk_re - ref_re) <= 2.0 && (ref_re - xk_re) <= 2.0,
              $sformatf("bin %0d re %0d ref %f", xk_index, xk_re, ref_re));
        check((xk_im - ref_im) <= 2.0 && (ref_im - xk_im) <= 2.0,
              $sformatf("bin %0d im %0d ref %f", xk_index, xk_im, ref_im));
        check(int'(mag) == (xk_re < 0 ? -xk_re : xk_re) + (xk_im < 0 ? -xk_im : xk_im), "mag = |re|+|im|");
        check(last == (nout == N - 1), "last flag");
        if (last) t_last = $time / 10;
        nout++;
      end
    end
    foreach (seen[i]) check(seen[i] == 1, $sformatf("bin %0d seen %0d times", i, seen[i]));
    // load 128 + compute 448 + unload 128; t0 is taken half a clock before
    // the first sample is clocked in
    check(t_last - t0 == 127 + 448 + 128, $sformatf("frame latency %0d", t_last - t0));
    check(t_done - t0 == 127 + 448, $sformatf("done latency %0d", t_done - t0));
    check(t_last - t0 < 1039, "frame fits one 48 kHz sample period");
    @(posedge clk); #1;
    check(!busy, "idle after frame");
  endtask

  initial begin
    xn = 0;
    xn_valid = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 3; f++) begin
      foreach (x[i]) x[i] = int'($urandom_range(0, 255)) - 128;
      run_frame();
    end
    foreach (x[i]) x[i] = int'($floor(120.0 * $cos(2.0 * 3.141592653589793 * 37 * i / N) + 0.5));
    run_frame();
    foreach (x[i]) x[i] = 77;
    run_frame();
    foreach (x[i]) x[i] = (i % 2) ? -128 : 127;
    run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
