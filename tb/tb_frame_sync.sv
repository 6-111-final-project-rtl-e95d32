// tb_frame_sync: checks the ready synchronizer and frame pulse.
//
// audio_ready is driven as pulses of random length (2..40 clocks) at
// random times, changing away from the clock edges. Each pulse must give
// exactly one frame_pulse, one clock long, 3 to 4 clocks after the rising
// edge of audio_ready, and ready_sync must be high while frame_pulse is.
//
// The synchronised ready strobe is the document's; the random pulse test
// and the 3..4 clock latency window are this design's own.
module tb_frame_sync;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic audio_ready = 0, ready_sync, frame_pulse;

  frame_sync dut (.clk, .rst, .audio_ready, .ready_sync, .frame_pulse);

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

  int pulses = 0;
  always @(posedge clk) #1 if (frame_pulse) begin
    pulses++;
    check(ready_sync, "ready_sync high with frame_pulse");
  end

  initial begin
    int n_prev, len;
    time t_rise;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 300; k++) begin
      #($urandom_range(30, 300));
      #3;
      n_prev = pulses;
      audio_ready = 1;
      t_rise = $time;
      len = $urandom_range(2, 40);
      // wait for the pulse
      fork
        begin
          @(posedge frame_pulse);
          check(($time - t_rise) >= 20 && ($time - t_rise) <= 40,
                $sformatf("latency %0t", $time - t_rise));
        end
        begin
          #(10 * len);
          audio_ready = 0;
        end
      join
      #100;
      check(pulses == n_prev + 1, $sformatf("one pulse per ready, got %0d", pulses - n_prev));
      @(posedge clk); #1;
      check(!frame_pulse, "pulse is one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
