// tb_note_array: checks the bin-to-note mapping, magnitude sums, octave
// shift, onset timer and the 12-note sweep of the note array.
//
// Frames of 128 spec are presented in bit-reversed order with chosen 5-bit
// magnitudes. The expected note magnitude is the saturated sum of the
// note's spec (bin table written out here), the expected frequency the
// octave-2 word shifted by bitshift, and the expected timer follows the
// rule "restart at 0 when the magnitude rises by more than the tolerance,
// else count up". The sweep must emit notes 0..11 on 12 consecutive clocks
// starting the clock after the last bin, with na_done on the last.
//
// The bin table, note words and onset rule are the document's; the
// burst timing checked here and the random frames are this design's own.
module tb_note_array;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [6:0] fft_index;
  logic [4:0] fft_mag;
  logic fft_dv, fft_last;
  logic [3:0] bitshift, mag_tolerance;
  logic we, na_done;
  logic [3:0] index_out;
  logic [25:0] freq_out;
  logic [4:0] mag_out;
  logic [19:0] t_out;

  note_array dut (.clk, .rst, .fft_index, .fft_mag, .fft_dv, .fft_last, .bitshift,
                  .mag_tolerance, .we, .index_out, .freq_out, .mag_out, .t_out, .na_done);

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

  // D, Eb, E, F, Gb, G, Ab, A, Bb, B, C, Db
  int word [12] = '{1186, 1257, 1331, 1410, 1494, 1583, 1677, 1777, 1883, 1995, 2113, 2239};
  int b0   [12] = '{33, 35, 37, 39, 42, 44, 47, 50, 53, 56, 59, 63};
  int b1   [12] = '{34, 36, 38, 40, -1, 45, 48, 51, 54, 57, 60, -1};

  int spec [128];
  int prev_mag [12];
  int tref [12];

  function automatic int br7(input int v);
    int r = 0;
    for (int i = 0; i < 7; i++) if (v & (1 << i)) r |= 1 << (6 - i);
    return r;
  endfunction

  task automatic frame(input int shift, input int tol);
    int m, got;
    bitshift = 4'(shift);
    mag_tolerance = 4'(tol);
    @(negedge clk);
    for (int k = 0; k < 128; k++) begin
      fft_index = 7'(br7(k));
      fft_mag   = 5'(spec[br7(k)]);
      fft_dv    = 1;
      fft_last  = (k == 127);
      @(negedge clk);
    end
    fft_dv = 0;
    fft_last = 0;
    for (int n = 0; n < 12; n++) begin
      @(posedge clk); #1;
      check(we, $sformatf("we on sweep cycle %0d", n));
      check(index_out == 4'(n), $sformatf("index %0d got %0d", n, index_out));
      check(freq_out == 26'(word[n] << shift), $sformatf("freq note %0d", n));
      m = spec[b0[n]] + ((b1[n] >= 0) ? spec[b1[n]] : 0);
      if (m > 31) m = 31;
      check(int'(mag_out) == m, $sformatf("mag note %0d got %0d exp %0d", n, mag_out, m));
      if (m > prev_mag[n] + tol) tref[n] = 0;
      else tref[n]++;
      prev_mag[n] = m;
      got = int'(t_out);
      check(got == tref[n], $sformatf("t note %0d got %0d exp %0d", n, got, tref[n]));
      check(na_done == (n == 11), "na_done on last note");
    end
    @(posedge clk); #1;
    check(!we, "sweep ends after 12 notes");
  endtask

  initial begin
    fft_index = 0; fft_mag = 0; fft_dv = 0; fft_last = 0; bitshift = 0; mag_tolerance = 0;
    foreach (prev_mag[i]) prev_mag[i] = 0;
    foreach (tref[i]) tref[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // random spectra with various shifts and tolerances
    for (int f = 0; f < 6; f++) begin
      foreach (spec[i]) spec[i] = $urandom_range(0, 31);
      frame(f, f % 3);
    end
    // steady spectrum: every note keeps counting
    for (int f = 0; f < 4; f++) frame(2, 1);
    // one note rises by exactly the tolerance (no onset), then beyond it
    spec[50] = 0; spec[51] = 0;
    frame(2, 3);
    spec[50] = 3;
    frame(2, 3);
    spec[51] = 4;
    frame(2, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
