// tb_blob: checks the rectangle sprite on random rectangles and pixels,
// including pixels on and just outside each edge.
//
// The sprite is the document's; the random test and its edge cases are
// this design's own.
module tb_blob;
  logic [10:0] x, w, hcount;
  logic [9:0] y, h, vcount;
  logic [2:0] color, pixel;

  blob dut (.x, .y, .w, .h, .hcount, .vcount, .color, .pixel);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hits = 0;

  initial begin
    int in_rect;
    for (int r = 0; r < 300; r++) begin
      x = 11'($urandom_range(0, 700)); y = 10'($urandom_range(0, 500));
      w = 11'($urandom_range(1, 90));  h = 10'($urandom_range(1, 90));
      color = 3'($urandom_range(1, 7));
      for (int p = 0; p < 40; p++) begin
        case (p % 4)
          0: begin hcount = x + 11'($urandom_range(0, 1)) - 11'(p % 8 == 0); vcount = y + 10'($urandom_range(0, 3)); end
          1: begin hcount = x + w - 11'($urandom_range(0, 1)); vcount = y + h - 10'($urandom_range(0, 1)); end
          default: begin hcount = 11'($urandom_range(0, 799)); vcount = 10'($urandom_range(0, 599)); end
        endcase
        #1;
        in_rect = (int'(hcount) >= int'(x) && int'(hcount) < int'(x) + int'(w) &&
                  int'(vcount) >= int'(y) && int'(vcount) < int'(y) + int'(h));
        if (in_rect) hits++;
        check(pixel == (in_rect ? color : 3'b000), $sformatf("(%0d,%0d) rect %0d,%0d %0dx%0d", hcount, vcount, x, y, w, h));
      end
    end
    check(hits > 100, $sformatf("only %0d pixels inside the rectangles", hits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
