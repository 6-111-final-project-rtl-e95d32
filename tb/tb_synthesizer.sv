// tb_synthesizer: checks the magnitude-weighted mix of the DDS outputs.
//
// Two DDS inputs (NUM_DDS = 2) carry random sine samples and magnitudes
// that change every clock. After each start pulse the expected sample is
// the sum over the next 12 clocks of sine[d] * mag[d], arithmetically
// shifted right by 7 (the shift that fits 12 * 2 * 65536 * 31 into 20
// signed bits). Checked: sound_out, sample_valid exactly 12 clocks after
// the clock that samples start, sound_out held until the next update,
// and full-scale inputs without overflow.
//
// Summing magnitude-scaled sines per audio sample is the document's; the
// output shift, the timing checked here and the two-DDS size are this
// design's own.
module tb_synthesizer;
  localparam int ND = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, sample_valid;
  logic signed [16:0] sine [ND];
  logic [4:0] mag [ND];
  logic signed [19:0] sound_out;

  synthesizer #(.NUM_DDS(ND)) dut (.clk, .rst, .start, .sine, .mag, .sound_out, .sample_valid);

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

  task automatic one_sample(input bit full_scale);
    longint sum = 0;
    longint e;
    @(negedge clk);
    start = 1;
    for (int d = 0; d < ND; d++) begin
      sine[d] = 17'($urandom); mag[d] = 5'($urandom);
    end
    @(posedge clk); #1;
    start = 0;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      for (int d = 0; d < ND; d++) begin
        sine[d] = full_scale ? 17'sd65535 : 17'($urandom);
        mag[d]  = full_scale ? 5'd31 : 5'($urandom);
        sum += longint'(sine[d]) * longint'(mag[d]);
      end
      @(posedge clk); #1;
      check(sample_valid == (k == 11), $sformatf("sample_valid at clock %0d", k + 1));
    end
    e = sum >>> 7;
    check(longint'(sound_out) == e, $sformatf("sound_out %0d exp %0d", sound_out, e));
    repeat (5) begin
      @(negedge clk);
      sine[0] = 17'($urandom);
      @(posedge clk); #1;
      check(longint'(sound_out) == e && !sample_valid, "sound_out held");
    end
  endtask

  initial begin
    start = 0;
    foreach (sine[d]) begin sine[d] = 0; mag[d] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < 200; s++) one_sample(0);
    one_sample(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
