// tb_effects_box: end-to-end test of the effects box.
//
// Runs the whole design at its default octave sets and dividers with a
// 48 kHz codec model (one 8-bit sample and one audio_ready pulse every
// 1039 clocks) and fast debouncers (DEBOUNCE_CYCLES = 4). An A9 tone
// (14080 Hz) is played while the buttons walk the GUI through its effects:
//   bend     - left to the bend slider, speed raised to 31;
//   vibrato  - right, speed 31, select; right, intensity 12;
//   arpeggio - right, speed 31, select; then the tone is stopped, and
//              played again once it has faded.
// Every FX output of set 7 is compared with a model of the effect applied
// to the speed counter output one clock earlier; the note array, DDS
// word memory and the wet-graph index are checked against the note
// tables. Each mechanism of the design is counted and a failure is
// counted for any that never happened: audio frames, frame-buffer
// writes, FFT frames, note updates, note onsets (timer reset), timer
// growth, speed-counter steps and restarts, the three effects changing a
// frequency, DDS writes, non-zero synthesizer output, the wet graph's
// clamp of notes above the octave, GUI moves, slider changes, effect
// switches and pixels on the display.
//
// The effects, note tables, button use and the wet-graph clamp checked here
// follow the document; the tone, the button script and the shortened
// debouncers are this design's own.
module tb_effects_box;
  import fxbox_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic signed [7:0] audio_in;
  logic audio_ready;
  logic signed [19:0] sound_out;
  logic sound_valid;
  logic btn_up = 0, btn_down = 0, btn_left = 0, btn_right = 0, btn_select = 0;
  logic [3:0] mag_tolerance;
  logic [2:0] vga_rgb;
  logic vga_hsync, vga_vsync, vga_blank;
  logic [4:0] delay_speed, delay_int;

  effects_box #(.DEBOUNCE_CYCLES(4)) dut (
    .clk, .rst, .audio_in, .audio_ready, .sound_out, .sound_valid,
    .btn_up, .btn_down, .btn_left, .btn_right, .btn_select,
    .mag_tolerance, .vga_rgb, .vga_hsync, .vga_vsync, .vga_blank, .delay_speed, .delay_int
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  localparam int WATCHDOG = 8_000_000;
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- codec
  int cyc = 0, frames = 0;
  bit tone_on = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc % 1039 == 5) begin
      audio_in <= tone_on ? 8'($rtoi($floor(110.0 * $sin(2.0 * 3.141592653589793 * 14080.0 * frames / 48000.0) + 0.5))) : 8'sd0;
      frames <= frames + 1;
    end
    audio_ready <= (cyc % 1039) >= 10 && (cyc % 1039) < 60;
  end

  // ---------------------------------------------------------- mechanisms
  typedef enum int {
    M_FRAME, M_SAMPLE_WE, M_FFT_DONE, M_NOTE_UPDATE, M_ONSET, M_T_GROW,
    M_SC_STEP, M_SC_RESTART, M_BEND, M_VIBRATO, M_ARPEGGIO, M_DDS_WRITE,
    M_SOUND, M_WET_CLAMP, M_GUI_MOVE, M_SLIDER, M_FX_SWITCH, M_PIXEL, M_COUNT
  } mech_t;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{
    "audio frame", "frame-buffer write", "FFT frame", "note update", "note onset",
    "note timer growth", "speed-counter step", "speed-counter restart", "pitch bend",
    "vibrato", "arpeggio", "DDS write", "synthesizer output", "wet-graph clamp",
    "GUI move", "slider change", "effect switch", "display pixel"
  };

  // set 7 pipeline probes
  logic [T_W-1:0] na_t_prev [NOTES];
  logic [TS_W-1:0] sc_t_prev [NOTES];
  logic sc_we_q;
  note_idx_t sc_index_q;
  freq_t sc_freq_q;
  mag_t sc_mag_q;
  logic [TS_W-1:0] sc_t_q;
  fx_mode_t mode_q;
  logic [4:0] intensity_q;
  int na_mag7 [NOTES];
  int fx_checked = 0;

  function automatic freq_t model_fx(input fx_mode_t m, input freq_t f_in, input int t, input int inten);
    longint f, r, d;
    f = longint'(f_in);
    case (m)
      FX_BEND: r = f + (f / 128) * t;
      FX_VIBRATO: begin
        d = f / (longint'(1) << (11 - inten / 4));
        if (inten % 4 >= 2) d += f / (longint'(1) << (18 - inten / 2));
        r = (t % 4 == 1) ? f + d : (t % 4 == 3) ? f - d : f;
      end
      FX_ARPEGGIO: begin
        case (t % 8)
          0: r = f;
          1, 7: r = f + f / 4;
          2, 6: r = f + f / 2;
          3, 5: r = 2 * f;
          default: r = 2 * f + f / 2;
        endcase
      end
      default: r = f;
    endcase
    if (r > 64'h3ff_ffff) r = 64'h3ff_ffff;
    return freq_t'(r);
  endfunction

  logic [2:0] control_q;
  logic [4:0] setting_q [6];
  fx_mode_t gui_fx_q;

  always @(posedge clk) begin
    if (!rst) begin
      if (dut.frame_pulse) mech[M_FRAME]++;
      if (dut.g_set[7].u_chain.sample_we) mech[M_SAMPLE_WE]++;
      if (dut.g_set[7].u_chain.fft_done) mech[M_FFT_DONE]++;
      // note array of set 7
      if (dut.g_set[7].u_chain.na_we) begin
        automatic int n = int'(dut.g_set[7].u_chain.na_index);
        automatic logic [T_W-1:0] t = dut.g_set[7].u_chain.na_t;
        mech[M_NOTE_UPDATE]++;
        check(dut.g_set[7].u_chain.na_freq == freq_t'(NOTE_WORD[n]) << 7, "note array frequency word of set 7");
        if (t == 0 && na_t_prev[n] > 0) mech[M_ONSET]++;
        if (t > na_t_prev[n]) mech[M_T_GROW]++;
        na_t_prev[n] = t;
        na_mag7[n] = int'(dut.g_set[7].u_chain.na_mag);
      end
      // speed counter of set 7
      if (dut.g_set[7].u_chain.sc_we) begin
        automatic int n = int'(dut.g_set[7].u_chain.sc_index);
        automatic logic [TS_W-1:0] t = dut.g_set[7].u_chain.sc_t;
        if (t == sc_t_prev[n] + 1) mech[M_SC_STEP]++;
        if (t == 0 && sc_t_prev[n] > 0) mech[M_SC_RESTART]++;
        sc_t_prev[n] = t;
      end
      // FX of set 7 against the model
      if (dut.g_set[7].u_chain.fx_we) begin
        freq_t exp_f;
        check(sc_we_q, "FX write one clock after the speed counter");
        exp_f = model_fx(mode_q, sc_freq_q, int'(sc_t_q), int'(intensity_q));
        check(dut.g_set[7].u_chain.fx_freq == exp_f,
              $sformatf("FX mode %s t=%0d: freq %0d expected %0d", mode_q.name(), sc_t_q,
                        dut.g_set[7].u_chain.fx_freq, exp_f));
        check(dut.g_set[7].u_chain.fx_index == sc_index_q && dut.g_set[7].u_chain.fx_mag == sc_mag_q,
              "FX passes index and magnitude");
        fx_checked++;
        if (dut.g_set[7].u_chain.fx_freq != sc_freq_q) begin
          case (mode_q)
            FX_BEND: mech[M_BEND]++;
            FX_VIBRATO: mech[M_VIBRATO]++;
            FX_ARPEGGIO: mech[M_ARPEGGIO]++;
            default: ;
          endcase
        end
        mech[M_DDS_WRITE]++;
      end
      sc_we_q     <= dut.g_set[7].u_chain.sc_we;
      sc_index_q  <= dut.g_set[7].u_chain.sc_index;
      sc_freq_q   <= dut.g_set[7].u_chain.sc_freq;
      sc_mag_q    <= dut.g_set[7].u_chain.sc_mag;
      sc_t_q      <= dut.g_set[7].u_chain.sc_t;
      mode_q      <= dut.fx_mode;
      intensity_q <= dut.intensity;
      // synthesizer
      if (sound_valid && sound_out != 0) mech[M_SOUND]++;
      // wet graph: set 0 notes above its octave land on the last bar
      if (dut.wet_we) begin
        if (dut.u_wet.index_out == 4'd11 && wet_freq_q >= freq_t'(NOTE_WORD[0]) << 1) mech[M_WET_CLAMP]++;
        check(dut.u_wet.index_out == exp_wet_q, $sformatf("wet index %0d expected %0d", dut.u_wet.index_out, exp_wet_q));
      end
      // GUI
      if (dut.u_gui.control != control_q) mech[M_GUI_MOVE]++;
      for (int i = 0; i < 6; i++) if (dut.u_gui.setting[i] != setting_q[i]) mech[M_SLIDER]++;
      if (dut.fx_mode != gui_fx_q) mech[M_FX_SWITCH]++;
      if (vga_rgb != 0) mech[M_PIXEL]++;
    end
    control_q <= dut.u_gui.control;
    for (int i = 0; i < 6; i++) setting_q[i] <= dut.u_gui.setting[i];
    gui_fx_q <= dut.fx_mode;
  end

  // expected wet-graph bar from the set-0 FX output, by the note table
  freq_t wet_freq_q;
  int exp_wet_q;
  always @(posedge clk) if (dut.fx_we[0]) begin
    automatic int e = 0;
    for (int n = 0; n < NOTES; n++) if (dut.fx_freq[0] >= freq_t'(NOTE_WORD[n])) e = n;
    wet_freq_q <= dut.fx_freq[0];
    exp_wet_q  <= e;
  end

  // ------------------------------------------------------------- buttons
  task automatic press(ref logic b);
    b = 1;
    repeat (20) @(posedge clk);
    b = 0;
    repeat (20) @(posedge clk);
  endtask

  task automatic run_steps(input int steps);
    // one speed-counter step at speed 31 is 256 audio samples
    repeat (steps * 256 * 1039) @(posedge clk);
  endtask

  initial begin
    int best;
    audio_in = 0;
    audio_ready = 0;
    mag_tolerance = 4'd0;
    foreach (mech[i]) mech[i] = 0;
    foreach (na_t_prev[i]) na_t_prev[i] = 0;
    foreach (sc_t_prev[i]) sc_t_prev[i] = 0;
    foreach (na_mag7[i]) na_mag7[i] = 0;
    repeat (10) @(posedge clk);
    rst = 0;

    // bend: control 1 -> 0, speed 31
    press(btn_left);
    check(dut.u_gui.control == 3'd0, "left moves to the bend slider");
    repeat (31) press(btn_up);
    check(dut.speed == 5'd31 && dut.fx_mode == FX_BEND, "bend speed 31");

    // let the 35.84 kHz buffer fill with the tone; a zero tolerance makes
    // every rise of the magnitude during the fill an onset
    repeat (128 * 1390 + 30 * 1039) @(posedge clk);
    best = 0;
    for (int n = 1; n < NOTES; n++) if (na_mag7[n] > na_mag7[best]) best = n;
    check(best == 7 && na_mag7[7] > 0, $sformatf("set 7 hears note %0d, expected A", best));
    mag_tolerance = 4'd15;
    run_steps(3);
    check(dut.g_set[7].u_chain.u_dds.word[7] > 26'(1777 << 7), "A9 bent upward");

    // vibrato: speed 31, intensity 12
    press(btn_right);
    repeat (31) press(btn_up);
    press(btn_select);
    check(dut.fx_mode == FX_VIBRATO && dut.speed == 5'd31, "vibrato selected");
    press(btn_right);
    repeat (12) press(btn_up);
    check(dut.intensity == 5'd12, "vibrato intensity 12");
    run_steps(4);

    // arpeggio: speed 31, a full chord cycle
    press(btn_right);
    repeat (31) press(btn_up);
    press(btn_select);
    check(dut.fx_mode == FX_ARPEGGIO && dut.speed == 5'd31, "arpeggio selected");
    run_steps(9);

    // stop the tone: the note fades from the set-7 buffer
    tone_on = 0;
    repeat (128 * 1390 + 30 * 1039) @(posedge clk);
    check(na_mag7[7] < 2, $sformatf("note A fades after the tone stops (mag %0d)", na_mag7[7]));

    // play it again: the new onset restarts the note's slow timer
    tone_on = 1;
    mag_tolerance = 4'd0;
    repeat (128 * 1390) @(posedge clk);
    check(na_mag7[7] > 2, $sformatf("note A returns (mag %0d)", na_mag7[7]));

    check(fx_checked > 1000, "FX outputs checked");
    check(mech[M_FRAME] == frames || mech[M_FRAME] == frames - 1, "one frame per audio sample");
    for (int i = 0; i < M_COUNT; i++) begin
      $display("  %-24s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism never happened: %s", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
