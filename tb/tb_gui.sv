// tb_gui: checks the control panel's button handling and drawing.
//
// A model of the panel kept here follows random button presses (rising
// edges only, held buttons act once): left/right move the current control
// with wrap-around between 0 and 5, up/down step its slider within 0..31,
// select picks the effect of controls 0, 1, 2 and 3. After every press the
// outputs fx, speed, intensity and the delay settings are compared with
// the model, and sample pixels are compared with the drawing rules: the
// border, the dividing lines, each bar, each slider at its height and
// colour, and the active-effect marker.
//
// The six sliders, the button behaviour and the effect selection follow
// the document; the saturating sliders and the test script are this
// design's own.
module tb_gui;
  import fxbox_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic up, down, left, right, select;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic [2:0] pixel;
  fx_mode_t fx;
  logic [4:0] speed, intensity, delay_speed, delay_int;

  gui dut (.clk, .rst, .up, .down, .left, .right, .select, .hcount, .vcount, .pixel,
           .fx, .speed, .intensity, .delay_speed, .delay_int);

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

  int set_m [6];
  int ctrl = 1;
  int fx_m = 0;
  int bar_x [6] = '{57, 120, 175, 270, 342, 390};
  int mode_seen [3];

  task automatic pix(input int hx, input int vy, input logic [2:0] exp, input string what);
    @(negedge clk);
    hcount = 11'(hx); vcount = 10'(vy);
    @(posedge clk); #1;
    check(pixel == exp, $sformatf("%s at (%0d,%0d): %b exp %b", what, hx, vy, pixel, exp));
  endtask

  task automatic press(input int b);
    @(negedge clk);
    case (b)
      0: up = 1;
      1: down = 1;
      2: left = 1;
      3: right = 1;
      default: select = 1;
    endcase
    repeat ($urandom_range(1, 4)) @(negedge clk);
    up = 0; down = 0; left = 0; right = 0; select = 0;
    @(negedge clk);
    case (b)
      0: if (set_m[ctrl] < 31) set_m[ctrl]++;
      1: if (set_m[ctrl] > 0) set_m[ctrl]--;
      2: ctrl = (ctrl == 0) ? 5 : ctrl - 1;
      3: ctrl = (ctrl == 5) ? 0 : ctrl + 1;
      default: case (ctrl)
        0: fx_m = 0;
        1, 2: fx_m = 1;
        3: fx_m = 2;
        default: ;
      endcase
    endcase
  endtask

  task automatic check_outputs();
    int sp;
    sp = (fx_m == 1) ? set_m[1] : (fx_m == 2) ? set_m[3] : set_m[0];
    check(int'(fx) == fx_m, $sformatf("fx %0d exp %0d", fx, fx_m));
    check(int'(speed) == sp, "speed of the active effect");
    check(int'(intensity) == set_m[2], "intensity");
    check(int'(delay_speed) == set_m[4] && int'(delay_int) == set_m[5], "delay settings");
    mode_seen[fx_m]++;
  endtask

  task automatic check_screen();
    int ys, mx;
    pix(0, 50, 3'b111, "left border");
    pix(450, 599, 3'b111, "bottom border");
    pix(600, 403, 3'b011, "horizontal divider");
    pix(400, 500, 3'b011, "vertical divider");
    pix(600, 300, 3'b000, "empty area");
    for (int i = 0; i < 6; i++) begin
      ys = 133 + 100 - 5 - 4 * set_m[i];
      // slider centred on its bar, red on the current control
      pix(bar_x[i] - 2, ys + 2, (i == ctrl) ? 3'b100 : 3'b001, $sformatf("slider %0d edge", i));
      pix(bar_x[i] + 3, ys + 2, ((i == ctrl) ? 3'b100 : 3'b001) | 3'b010, $sformatf("slider %0d on bar", i));
      // bar well away from its slider
      pix(bar_x[i] + 5, (ys > 160) ? 102 : 230, 3'b010, $sformatf("bar %0d", i));
    end
    mx = (fx_m == 1) ? 150 : (fx_m == 2) ? 258 : 44;
    pix(mx + 10, 280, 3'b100, "effect marker");
  endtask

  initial begin
    up = 0; down = 0; left = 0; right = 0; select = 0; hcount = 0; vcount = 0;
    foreach (set_m[i]) set_m[i] = 0;
    foreach (mode_seen[i]) mode_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    check_outputs();
    check_screen();
    for (int k = 0; k < 600; k++) begin
      int b;
      b = $urandom_range(0, 9);
      press((b < 4) ? 0 : (b == 4) ? 1 : (b < 7) ? 2 + (b % 2) : 4);
      check_outputs();
      if (k % 20 == 0) check_screen();
    end
    foreach (mode_seen[i]) check(mode_seen[i] > 0, $sformatf("effect %0d selected", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
