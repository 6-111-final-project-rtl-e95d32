// tb_frame_buffer: checks sampling rate, frame order and streaming timing.
//
// With DIV = 7 the buffer must write exactly every 7th clock. The
// testbench changes din every clock and records the value present at each
// write. After more than 128 writes, fft_start must produce 128
// back-to-back xn_valid cycles starting on the clock after the one
// that takes fft_start, carrying the
// last 128 recorded samples oldest first; a second fft_start during the
// stream must be ignored. Several frames are taken at different moments,
// including one whose start coincides with a write.
//
// Oldest-first reading is the document's; the streaming timing checked here
// and the reduced divider are this design's own.
module tb_frame_buffer;
  localparam int DIV = 7;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0] din, xn;
  logic fft_start, sample_we, xn_valid;

  frame_buffer #(.DIV(DIV)) dut (.clk, .rst, .din, .fft_start, .sample_we, .xn, .xn_valid);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$];
  int last_we = -1, clk_n = 0;

  always @(posedge clk) begin
    clk_n++;
    if (!rst && sample_we) begin
      hist.push_back(int'(din));
      if (last_we >= 0) check(clk_n - last_we == DIV, "write period");
      last_we = clk_n;
    end
  end

  always @(negedge clk) din <= 8'($urandom);

  task automatic take_frame(input bit align_with_write);
    int expect_q [$];
    if (align_with_write) begin
      @(negedge clk);
      while (!(dut.div_cnt == 3'(DIV - 1))) @(negedge clk);
    end else begin
      @(negedge clk);
    end
    fft_start = 1;
    @(posedge clk); #1;
    // the buffer's contents at the start: last 128 written, including one
    // written on this very clock
    expect_q = hist[hist.size() - 128 : hist.size() - 1];
    check(!xn_valid, "no sample on the clock that takes fft_start");
    for (int k = 0; k < 128; k++) begin
      @(negedge clk);
      if (k == 0) fft_start = 0;
      if (k == 40) fft_start = 1;      // ignored while streaming
      if (k == 41) fft_start = 0;
      @(posedge clk); #1;
      check(xn_valid, $sformatf("xn_valid at %0d", k));
      check(int'(xn) == expect_q[k], $sformatf("sample %0d got %0d exp %0d", k, xn, expect_q[k]));
    end
    @(posedge clk); #1;
    check(!xn_valid, "stream is 128 long");
  endtask

  initial begin
    fft_start = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    repeat (DIV * 140) @(posedge clk);
    take_frame(0);
    repeat (DIV * 13 + 3) @(posedge clk);
    take_frame(0);
    take_frame(1);
    repeat (DIV * 200) @(posedge clk);
    take_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
