// tb_xvga: checks the 800 x 600 timing over two full frames: 1040 clocks
// per line, 666 lines per frame, hsync low for 120 clocks starting 56
// clocks after the visible 800, vsync low for 6 lines starting 37 lines
// after the visible 600, and blank exactly outside the visible area.
//
// The 800 x 600 screen is the document's; the 72 Hz timing checked here is
// this design's own.
module tb_xvga;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank;

  xvga dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .blank);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, v, hs_low, frames, lines;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    h = 0; v = 0; hs_low = 0; frames = 0; lines = 0;
    // the counters start at 0 and advance on each clock
    while (frames < 2) begin
      @(posedge clk); #1;
      h = (h == 1039) ? 0 : h + 1;
      if (h == 0) begin
        v = (v == 665) ? 0 : v + 1;
        lines++;
        if (v == 0) frames++;
      end
      check(int'(hcount) == h && int'(vcount) == v, $sformatf("counters %0d,%0d exp %0d,%0d", hcount, vcount, h, v));
      check(hsync == !(h >= 856 && h < 976), $sformatf("hsync at h=%0d", h));
      check(vsync == !(v >= 637 && v < 643), $sformatf("vsync at v=%0d", v));
      check(blank == (h >= 800 || v >= 600), $sformatf("blank at %0d,%0d", h, v));
    end
    check(lines == 2 * 666, "lines per two frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
