// tb_octave_sets: the eight octave sets of the effects box at full size.
//
// Plays, one after the other, a note in each octave covered by the
// design (set i: D..C# of octave 2+i, frame buffer at 280 * 2^i Hz) and
// checks for each set:
//   - its frame buffer writes a sample every BASE_DIV >> i clocks, i.e.
//     at 280 * 2^i Hz for a 49.85 MHz clock (the sampling-rate column of
//     the octave table);
//   - once its buffer holds only the new note, its note array reports
//     that note as the strongest of the twelve;
//   - its DDS channel for the note holds the note's frequency word moved
//     to the set's octave (W = NOTE_WORD[n] << i), plus a whole number of
//     bender steps W >> 7 (the bender runs at speed 0).
// Every parameter is at its default; the codec model delivers one 8-bit
// sample every 1039 clocks (48 kHz). The whole run is about 46 M clocks.
//
// The sampling rates and note ranges per octave follow the document; the
// notes played and the order of the sets are this design's own.
module tb_octave_sets;
  import fxbox_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [7:0] audio_in;
  logic audio_ready;
  logic signed [19:0] sound_out;
  logic sound_valid;
  logic [2:0] vga_rgb;
  logic vga_hsync, vga_vsync, vga_blank;
  logic [4:0] delay_speed, delay_int;

  effects_box dut (
    .clk, .rst, .audio_in, .audio_ready, .sound_out, .sound_valid,
    .btn_up(1'b0), .btn_down(1'b0), .btn_left(1'b0), .btn_right(1'b0), .btn_select(1'b0),
    .mag_tolerance(4'd15), .vga_rgb, .vga_hsync, .vga_vsync, .vga_blank, .delay_speed, .delay_int
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // codec model: the tone frequency is given per clock of 49.85 MHz
  longint cyc = 0;
  real tone_hz = 0.0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc % 1039 == 5)
      audio_in <= 8'($rtoi($floor(120.0 * $sin(2.0 * 3.141592653589793 * tone_hz * real'(cyc) / 49.85e6) + 0.5)));
    audio_ready <= (cyc % 1039) >= 10 && (cyc % 1039) < 60;
  end

  // latest note-array magnitudes and sample-write periods of every set
  int na_mag [8][NOTES];
  longint last_we [8];
  longint we_period [8];
  freq_t dds_word [8][NOTES];
  bit snap = 0;
  for (genvar s = 0; s < 8; s++) begin : g_probe
    always @(posedge clk) if (!rst) begin
      if (dut.g_set[s].u_chain.na_we) na_mag[s][dut.g_set[s].u_chain.na_index] = int'(dut.g_set[s].u_chain.na_mag);
      if (dut.g_set[s].u_chain.sample_we) begin
        if (last_we[s] >= 0) we_period[s] = cyc - last_we[s];
        last_we[s] = cyc;
      end
      if (snap) for (int n = 0; n < NOTES; n++) dds_word[s][n] = dut.g_set[s].u_chain.u_dds.word[n];
    end
  end

  function automatic freq_t word_of(input int n, input int set);
    return freq_t'(NOTE_WORD[n]) << set;
  endfunction

  initial begin
    audio_in = 0;
    audio_ready = 0;
    foreach (last_we[s]) begin
      last_we[s] = -1;
      we_period[s] = 0;
    end
    foreach (na_mag[s, n]) na_mag[s][n] = 0;
    repeat (10) @(posedge clk);
    rst = 0;
    for (int s = 7; s >= 0; s--) begin
      automatic int n = (5 * s + 1) % 12;
      automatic int best = 0;
      automatic int div = 178036 >> s;
      // equal temperament, D2 = MIDI 38
      tone_hz = 440.0 * 2.0 ** (real'(38 + n + 12 * s - 69) / 12.0);
      repeat (128 * div + 40 * 1039) @(posedge clk);
      snap = 1;
      @(posedge clk);
      @(posedge clk);
      snap = 0;
      for (int k = 1; k < NOTES; k++) if (na_mag[s][k] > na_mag[s][best]) best = k;
      $display("set %0d: %8.2f Hz, sample period %0d, strongest note %0d (mag %0d), expected %0d",
               s, tone_hz, we_period[s], best, na_mag[s][best], n);
      check(we_period[s] == div, $sformatf("set %0d samples every %0d clocks, expected %0d", s, we_period[s], div));
      check(best == n && na_mag[s][n] > 0, $sformatf("set %0d hears note %0d, expected %0d", s, best, n));
      // the bender (speed 0, one step per 8192 samples) may have moved it on
      check(dds_word[s][n] >= word_of(n, s) && (dds_word[s][n] - word_of(n, s)) % (word_of(n, s) >> 7) == 0,
            $sformatf("set %0d DDS word %0d of note %0d, base %0d", s, dds_word[s][n], n, word_of(n, s)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
