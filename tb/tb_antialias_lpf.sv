// tb_antialias_lpf: checks the anti-aliasing filter's response.
//
// With SHIFT = 6 the two-pole filter must: hold its output while
// sample_en is low; settle to within 2 LSB of a constant input; follow
// a real-valued model of two cascaded y += (x - y) / 64 sections within
// 2 LSB on a slow (100 Hz) sine; and attenuate a tone near the Nyquist
// rate of the 280 Hz buffer (2 kHz at 48 kHz sampling) to under a tenth
// of its amplitude.
//
// The need for a filter is the document's; the filter, the model and the
// test tones are this design's own.
module tb_antialias_lpf;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic sample_en;
  logic signed [7:0] din, dout;

  antialias_lpf #(.SHIFT(6)) dut (.clk, .rst, .sample_en, .din, .dout);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real y1 = 0.0, y2 = 0.0;

  task automatic sample(input int x);
    @(negedge clk);
    din = 8'(x);
    sample_en = 1;
    y1 = y1 + (x - y1) / 64.0;
    y2 = y2 + (y1 - y2) / 64.0;
    @(negedge clk);
    sample_en = 0;
  endtask

  initial begin
    logic signed [7:0] held;
    int peak;
    din = 0; sample_en = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // constant input
    for (int n = 0; n < 2000; n++) sample(100);
    check(dout >= 98 && dout <= 100, $sformatf("DC settles: %0d", dout));
    // no change without sample_en
    held = dout;
    @(negedge clk);
    din = -100;
    repeat (20) @(posedge clk);
    #1 check(dout == held, "holds without sample_en");
    // slow sine against the model
    for (int n = 0; n < 3000; n++) begin
      sample(int'($floor(100.0 * $sin(2.0 * 3.141592653589793 * 100.0 * n / 48000.0) + 0.5)));
      if (n > 500) check((dout - y2) < 2.5 && (y2 - dout) < 2.5,
                         $sformatf("tracks model: %0d vs %f", dout, y2));
    end
    // 2 kHz tone
    peak = 0;
    for (int n = 0; n < 4000; n++) begin
      sample(int'($floor(120.0 * $sin(2.0 * 3.141592653589793 * 2000.0 * n / 48000.0) + 0.5)));
      if (n > 2000 && (dout > peak || -dout > peak)) peak = (dout < 0) ? -dout : dout;
    end
    check(peak < 12, $sformatf("2 kHz attenuated to %0d", peak));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
