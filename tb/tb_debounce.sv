// tb_debounce: checks the button debouncer with CYCLES = 20: bursts of
// bounces shorter than 20 clocks never reach the output, a level held for
// 20 clocks does, exactly 20 clocks after it settled, in both directions.
//
// Debounced buttons are the document's; the timing rule checked here is
// this design's own.
module tb_debounce;
  localparam int C = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic noisy, clean;
  debounce #(.CYCLES(C)) dut (.clk, .rst, .noisy, .clean);

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

  task automatic press(input logic level);
    int settle;
    // bounce: random toggles, each shorter than C clocks
    for (int b = 0; b < 6; b++) begin
      @(negedge clk);
      noisy = level;
      repeat ($urandom_range(1, C - 2)) begin
        @(posedge clk); #1;
        check(clean == !level, "bounce filtered");
      end
      @(negedge clk);
      noisy = !level;
      repeat ($urandom_range(1, 4)) begin
        @(posedge clk); #1;
        check(clean == !level, "bounce filtered");
      end
    end
    @(negedge clk);
    noisy = level;
    settle = 0;
    while (clean != level && settle < 5 * C) begin
      @(posedge clk); #1;
      settle++;
    end
    check(settle == C, $sformatf("settled after %0d clocks", settle));
  endtask

  initial begin
    noisy = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < 20; k++) begin
      press(1);
      repeat (30) @(posedge clk);
      press(0);
      repeat (30) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
