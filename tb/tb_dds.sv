// tb_dds: checks the 12-channel time-shared DDS against a phase model.
//
// Frequency words are written to random channels while the DDS runs. The
// model here visits channel (n mod 12) on clock n after reset, adds the
// channel's word (the value before any write on that same clock) to a
// 26-bit phase, and expects sine_out = round(65535 * sin(2 pi * top 10
// phase bits / 1024)) within 1 LSB, together with channel_out. Also
// checked: rdy after the first round, and the number of sign changes of
// one channel over 240000 clocks against 2 * f_out * time with
// f_out = (f_clk / 12) * word / 2^26.
//
// The output formula and widths are the document's; the table size, the
// tolerance and the stimulus are this design's own.
module tb_dds;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic we, rdy;
  logic [3:0] we_channel, channel_out;
  logic [25:0] freq;
  logic signed [16:0] sine_out;

  dds dut (.clk, .rst, .we, .we_channel, .freq, .channel_out, .rdy, .sine_out);

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

  longint phase_ref [12], word_ref [12];
  int ch_model = 0;
  int cycles = 0;
  int sign_changes = 0;
  logic prev_sign = 0;
  bit model_on = 0;

  always @(posedge clk) begin
    if (model_on) begin
      int c, idx, e;
      c = ch_model;
      phase_ref[c] = (phase_ref[c] + word_ref[c]) & 64'h3FFFFFF;
      idx = int'(phase_ref[c] >> 16);
      e = int'($floor($sin(2.0 * 3.141592653589793 * idx / 1024.0) * 65535.0 + 0.5));
      if (we && we_channel < 12) word_ref[we_channel] = longint'(freq);
      ch_model = (c + 1) % 12;
      cycles++;
      #1;
      check(int'(channel_out) == c, $sformatf("channel %0d got %0d", c, channel_out));
      check(int'(sine_out) - e <= 1 && e - int'(sine_out) <= 1,
            $sformatf("ch %0d sine %0d exp %0d", c, sine_out, e));
      if (cycles > 12) check(rdy, "rdy after first round");
      if (c == 3) begin
        if (sine_out[16] != prev_sign) sign_changes++;
        prev_sign = sine_out[16];
      end
    end
  end

  initial begin
    real f_out, expect_changes;
    we = 0; we_channel = 0; freq = 0;
    foreach (phase_ref[i]) begin phase_ref[i] = 0; word_ref[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    model_on = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      we = ($urandom_range(0, 3) == 0);
      we_channel = 4'($urandom_range(0, 11));
      freq = 26'($urandom_range(0, 32'h3FFFFF));
    end
    // fixed word on channel 3 for the frequency check
    @(negedge clk);
    we = 1; we_channel = 3; freq = 26'd227456;  // A at bitshift 7
    @(negedge clk);
    we = 0;
    repeat (24) @(negedge clk);
    sign_changes = 0;
    cycles = 0;
    repeat (240000) @(negedge clk);
    f_out = (49.85e6 / 12.0) * 227456.0 / 67108864.0;         // Hz at 49.85 MHz
    expect_changes = 2.0 * f_out * (cycles / 49.85e6);
    check(sign_changes >= int'(expect_changes) - 2 && sign_changes <= int'(expect_changes) + 2,
          $sformatf("sign changes %0d expected %f", sign_changes, expect_changes));
    model_on = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
