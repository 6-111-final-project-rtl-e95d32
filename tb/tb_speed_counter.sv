// tb_speed_counter: checks the per-note slow timer.
//
// Note updates for random notes are sent with note-array times that mostly
// count up and sometimes restart. A reference model kept here computes,
// per note, low += 1 and a step of t_out whenever low reaches
// (32 - speed) << 8, with both cleared on a restart (t_in = 0 or t_in
// below the last t_in of that note). Checked: t_out, the unchanged
// frequency / magnitude / index and the one-clock latency of we_out.
// Speeds 31 and 29 give a step every 256 and 768 updates.
//
// The counter structure and (32 - speed) << 8 follow the document; the
// restart test, saturation and stimulus are this design's own.
module tb_speed_counter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic we_in, we_out;
  logic [3:0] index_in, index_out;
  logic [19:0] t_in;
  logic [25:0] freq_in, freq_out;
  logic [4:0] mag_in, mag_out, speed;
  logic [7:0] t_out;

  speed_counter dut (.clk, .rst, .we_in, .index_in, .t_in, .freq_in, .mag_in, .speed,
                     .we_out, .index_out, .freq_out, .mag_out, .t_out);

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

  int lo [12], hi [12], told [12], tna [12];
  int steps = 0;

  task automatic update(input int n, input int t);
    int maxc, exp_t;
    logic [25:0] f;
    logic [4:0] m;
    f = 26'($urandom);
    m = 5'($urandom);
    @(negedge clk);
    we_in = 1; index_in = 4'(n); t_in = 20'(t); freq_in = f; mag_in = m;
    maxc = (32 - int'(speed)) * 256;
    if (t == 0 || t < told[n]) begin
      lo[n] = 0; hi[n] = 0;
    end else begin
      lo[n]++;
      if (lo[n] >= maxc) begin
        lo[n] = 0;
        if (hi[n] < 255) begin
          hi[n]++;
          steps++;
        end
      end
    end
    told[n] = t;
    exp_t = hi[n];
    @(posedge clk); #1;
    we_in = 0;
    check(we_out, "we_out one clock after we_in");
    check(int'(t_out) == exp_t, $sformatf("note %0d t_out %0d exp %0d", n, t_out, exp_t));
    check(freq_out == f && mag_out == m && index_out == 4'(n), "pass-through");
    @(posedge clk); #1;
    check(!we_out, "we_out is one clock");
  endtask

  initial begin
    we_in = 0; index_in = 0; t_in = 0; freq_in = 0; mag_in = 0; speed = 31;
    foreach (lo[i]) begin lo[i] = 0; hi[i] = 0; told[i] = 0; tna[i] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 9000; k++) begin
      int n;
      if (k == 4500) speed = 29;
      n = (k % 3 == 0) ? 5 : int'($urandom_range(0, 11));
      if (n != 5 && $urandom_range(0, 400) == 0) tna[n] = 0;
      else tna[n]++;
      update(n, tna[n]);
    end
    check(steps >= 5, $sformatf("t_out stepped %0d times", steps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
