// tb_effects_box_full: one complete operation of the effects box with
// every parameter at its default (8 octave sets, 280 Hz .. 35.84 kHz
// frame buffers, 10 ms debouncers).
//
// An A9 tone (14080 Hz, amplitude 110) is played as 8-bit samples at
// 48 kHz (audio_ready every 1039 clocks of a 49.85 MHz clock). Once the
// top set's frame buffer (35.84 kHz) has filled, its FFT, note array,
// speed counter, FX unit (bender, speed 0) and DDS must report and
// regenerate the note. Checked: the note array of set 7 gives note A
// (index 7) the largest magnitude, the DDS of set 7 holds the word
// 1777 << 7 for channel 7 (A9, the bend is still at t = 0), one
// sound_valid per audio sample, a non-zero and sign-changing output
// once the note is present, and the VGA line period of 1040 clocks.
//
// The 48 kHz pacing, the note tables and the octave layout follow the
// document; the choice of tone and the checks are this design's own.
module tb_effects_box_full;
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
    .mag_tolerance(4'd1), .vga_rgb, .vga_hsync, .vga_vsync, .vga_blank, .delay_speed, .delay_int
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
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 48 kHz codec model: a sample and a ready pulse every 1039 clocks.
  int cyc = 0;
  int frames = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc % 1039 == 5) begin
      audio_in <= 8'($rtoi($floor(110.0 * $sin(2.0 * 3.141592653589793 * 14080.0 * frames / 48000.0) + 0.5)));
      frames <= frames + 1;
    end
    audio_ready <= (cyc % 1039) >= 10 && (cyc % 1039) < 60;
  end

  // Set 7 note array: latest magnitude per note.
  int na_mag [12];
  int na_updates = 0;
  always @(posedge clk) if (!rst && dut.g_set[7].u_chain.na_we) begin
    na_mag[dut.g_set[7].u_chain.na_index] = int'(dut.g_set[7].u_chain.na_mag);
    na_updates++;
  end

  int valids = 0, sign_changes = 0, nonzero = 0;
  logic last_sign = 0;
  always @(posedge clk) if (!rst && sound_valid) begin
    valids++;
    if (sound_out != 0) nonzero++;
    if (sound_out[19] != last_sign) sign_changes++;
    last_sign = sound_out[19];
  end

  int hs_fall_prev = -1, hs_period = 0;
  logic hs_q = 1;
  always @(posedge clk) begin
    if (hs_q && !vga_hsync) begin
      if (hs_fall_prev >= 0) hs_period = cyc - hs_fall_prev;
      hs_fall_prev = cyc;
    end
    hs_q = vga_hsync;
  end

  initial begin
    int best, frames0, valids0;
    audio_in = 0;
    audio_ready = 0;
    foreach (na_mag[i]) na_mag[i] = 0;
    repeat (10) @(posedge clk);
    rst = 0;
    // fill the 35.84 kHz buffer (128 * 1390 clocks) and let a few frames pass
    repeat (128 * 1390 + 20 * 1039) @(posedge clk);
    best = 0;
    for (int n = 1; n < 12; n++) if (na_mag[n] > na_mag[best]) best = n;
    check(best == 7, $sformatf("strongest note in set 7 is %0d (mag %0d), expected A", best, na_mag[best]));
    check(na_mag[7] > 0, $sformatf("note A magnitude %0d", na_mag[7]));
    check(dut.g_set[7].u_chain.u_dds.word[7] == 26'(1777 << 7), "DDS channel 7 of set 7 plays A9");
    check(dut.g_set[7].u_chain.u_mag.mag[7] == 5'(na_mag[7]), "magnitude memory holds the note");
    // listen for 40 audio samples
    frames0 = frames;
    valids0 = valids;
    nonzero = 0;
    sign_changes = 0;
    repeat (40 * 1039) @(posedge clk);
    check(valids - valids0 == frames - frames0, $sformatf("%0d outputs for %0d samples", valids - valids0, frames - frames0));
    check(nonzero > 30, $sformatf("non-zero output samples %0d", nonzero));
    check(sign_changes > 4, $sformatf("output sign changes %0d", sign_changes));
    check(na_updates >= 12 * 20, "note updates every audio sample");
    check(hs_period == 1040, $sformatf("VGA line period %0d", hs_period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
