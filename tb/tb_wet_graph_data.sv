// tb_wet_graph_data: checks the frequency-to-bar mapping of the wet graph.
//
// For every octave shift 0..7 the exact note words, the words one below,
// frequencies far below and above the octave, and random frequencies are
// applied. The expected bar is the highest note whose word (table written
// out here) shifted by the octave is <= the frequency, 0 below D and 11
// anywhere above C#. Magnitude passes through and we_out follows we_in by
// one clock.
//
// The mapping back to twelve bars and the clamp at 11 are the document's;
// the stimulus is this design's own.
module tb_wet_graph_data;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic we_in, we_out;
  logic [25:0] freq_in;
  logic [3:0] bitshift, index_out;
  logic [4:0] mag_in, mag_out;

  wet_graph_data dut (.clk, .rst, .we_in, .freq_in, .bitshift, .mag_in, .we_out, .index_out, .mag_out);

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

  int word [12] = '{1186, 1257, 1331, 1410, 1494, 1583, 1677, 1777, 1883, 1995, 2113, 2239};

  task automatic apply(input longint f, input int sh);
    int e;
    logic [4:0] m;
    e = 0;
    for (int n = 0; n < 12; n++) if (f >= (longint'(word[n]) << sh)) e = n;
    m = 5'($urandom);
    @(negedge clk);
    we_in = 1; freq_in = 26'(f); bitshift = 4'(sh); mag_in = m;
    @(posedge clk); #1;
    check(we_out, "we_out");
    check(int'(index_out) == e, $sformatf("f %0d shift %0d: got %0d exp %0d", f, sh, index_out, e));
    check(mag_out == m, "mag passes");
    @(negedge clk);
    we_in = 0;
    @(posedge clk); #1;
    check(!we_out, "we_out one clock");
  endtask

  initial begin
    we_in = 0; freq_in = 0; bitshift = 0; mag_in = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int sh = 0; sh < 8; sh++) begin
      for (int n = 0; n < 12; n++) begin
        apply(longint'(word[n]) << sh, sh);
        apply((longint'(word[n]) << sh) - 1, sh);
      end
      apply(10, sh);
      apply(longint'(word[0]) << (sh + 1), sh);       // octave above D
      apply((longint'(2239) << sh) * 5 / 2, sh);      // tenth above C#
      repeat (50) apply(longint'($urandom_range(1000, 2300)) << sh, sh);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
