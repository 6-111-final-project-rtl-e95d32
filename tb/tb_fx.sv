// tb_fx: checks the three effects against arithmetic done here.
//
// Random frequency words, times and intensities are sent in every mode:
// bender f + (f >> 7) * t; vibrato f, f + d, f, f - d on t mod 4 with
// d = f >> (11 - i/4) (+ f >> (18 - i/2) when i mod 4 >= 2); arpeggio
// root, 5/4, 3/2, 2, 5/2, 2, 3/2, 5/4 on t mod 8; mode 3 unchanged.
// Results saturate at 2^26 - 1. Also checked: magnitude and index pass
// through, dds_we one clock after we_in, and outputs hold without we_in.
//
// The effect formulas are the document's; the saturation and the random
// stimulus are this design's own.
module tb_fx;
  import fxbox_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic we_in, dds_we;
  logic [3:0] index_in, index_out;
  logic [25:0] freq_in, freq_out;
  logic [4:0] mag_in, mag_out, intensity;
  logic [7:0] t_in;
  fx_mode_t mode;

  fx dut (.clk, .rst, .we_in, .index_in, .freq_in, .mag_in, .t_in, .mode, .intensity,
          .dds_we, .index_out, .freq_out, .mag_out);

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

  function automatic longint expect_f(input longint f, input int t, input int md, input int it);
    longint r, d;
    case (md)
      0: r = f + (f / 128) * t;
      1: begin
        d = f >> (11 - it / 4);
        if (it % 4 >= 2) d += f >> (18 - it / 2);
        case (t % 4)
          1: r = f + d;
          3: r = f - d;
          default: r = f;
        endcase
      end
      2: case (t % 8)
        0: r = f;
        1, 7: r = f + f / 4;
        2, 6: r = f + f / 2;
        3, 5: r = 2 * f;
        default: r = 2 * f + f / 2;
      endcase
      default: r = f;
    endcase
    if (r > 64'h3FFFFFF) r = 64'h3FFFFFF;
    return r;
  endfunction

  int mode_count [4];

  initial begin
    longint f, e;
    int t, md, it;
    we_in = 0; index_in = 0; freq_in = 0; mag_in = 0; t_in = 0; intensity = 0; mode = FX_BEND;
    foreach (mode_count[i]) mode_count[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 4000; k++) begin
      md = k % 4;
      f  = (k % 5 == 0) ? longint'($urandom_range(0, 32'h3FFFFFF)) : longint'($urandom_range(1186, 2239 << 7));
      t  = $urandom_range(0, 255);
      it = $urandom_range(0, 31);
      @(negedge clk);
      we_in = 1; freq_in = 26'(f); t_in = 8'(t); intensity = 5'(it); mode = fx_mode_t'(md);
      index_in = 4'($urandom_range(0, 11)); mag_in = 5'($urandom);
      e = expect_f(f, t, md, it);
      @(posedge clk); #1;
      check(dds_we, "dds_we follows we_in");
      check(longint'(freq_out) == e, $sformatf("mode %0d f %0d t %0d i %0d: got %0d exp %0d", md, f, t, it, freq_out, e));
      check(index_out == index_in && mag_out == mag_in, "index/mag pass through");
      mode_count[md]++;
      @(negedge clk);
      we_in = 0; freq_in = 26'($urandom);
      @(posedge clk); #1;
      check(!dds_we && longint'(freq_out) == e, "hold without we_in");
    end
    foreach (mode_count[i]) check(mode_count[i] > 0, "every mode exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
