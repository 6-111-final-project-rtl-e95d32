// tb_graph: checks the spectrum bar graph.
//
// Random bar heights are stored, some through out-of-range indices that
// must be ignored, and random pixels are compared, one clock later, with
// the drawing rule: column LEFT + 8*i .. +7 belongs to bar i, and the
// pixel is lit when 4 * height > BOTTOM - vcount with vcount < BOTTOM.
// Writes without we must not change any bar.
//
// The bar graph is the document's; bar width, scale and the pixel rule
// checked here are this design's own.
module tb_graph;
  localparam int LEFT = 408, BOTTOM = 550;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic we;
  logic [4:0] data;
  logic [3:0] data_index;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic [2:0] pixel;

  graph #(.LEFT(11'(LEFT)), .COLOR(3'b101)) dut (.clk, .rst, .we, .data, .data_index, .hcount, .vcount, .pixel);

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

  int bars [12];
  int lit = 0;

  task automatic scan(input int count);
    int hx, vy, bi, on;
    for (int p = 0; p < count; p++) begin
      @(negedge clk);
      hx = (p % 2) ? $urandom_range(LEFT - 4, LEFT + 100) : $urandom_range(0, 799);
      vy = (p % 2) ? $urandom_range(BOTTOM - 130, BOTTOM + 2) : $urandom_range(0, 599);
      hcount = 11'(hx); vcount = 10'(vy);
      @(posedge clk); #1;
      bi = (hx - LEFT) / 8;
      on = (hx >= LEFT && hx < LEFT + 96 && vy < BOTTOM && bars[bi] * 4 > BOTTOM - vy);
      if (on) lit++;
      check(pixel == (on ? 3'b101 : 3'b000), $sformatf("pixel (%0d,%0d)", hx, vy));
    end
  endtask

  initial begin
    we = 0; data = 0; data_index = 0; hcount = 0; vcount = 0;
    foreach (bars[i]) bars[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    scan(200);
    for (int r = 0; r < 10; r++) begin
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        we = $urandom_range(0, 3) != 0;
        data_index = 4'($urandom_range(0, 15));
        data = 5'($urandom);
        @(posedge clk);
        if (we && data_index < 12) bars[data_index] = int'(data);
      end
      @(negedge clk);
      we = 0;
      scan(1000);
    end
    check(lit > 200, $sformatf("lit pixels %0d", lit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
