// effects_box: top level of the digital guitar effects box.
//
// The instrument's audio arrives as 8-bit samples at 48 kHz (audio_in,
// valid at each audio_ready strobe). NUM_SETS octave sets analyse it in
// parallel: set i low-pass filters the audio, samples it into a 128-sample
// frame buffer at 280 * 2^i Hz (divider BASE_DIV >> i), and runs a 128-point
// FFT on the buffer once per audio sample, so that the twelve notes D..C#
// of octave 2+i always fall on the same FFT bins. Each set's note array
// reports magnitude and duration of its twelve notes, the speed counter
// and FX unit apply the effect chosen on the GUI (pitch bend, vibrato or
// arpeggio), and the set's 12-channel DDS regenerates the modified notes as
// sine waves. The synthesizer sums all DDS channels, weighted by note
// magnitude, into one 20-bit sample per audio sample (sound_out with
// sound_valid).
//
// The GUI is operated with five buttons (debounced here) and drawn on an
// 800 x 600 display together with two spectrum graphs of set 0: the notes
// found in the input (dry, left) and the notes after the effect (wet,
// right). vga_rgb and the syncs are registered and aligned.
//
// Everything runs on one clock (49.85 MHz in the reference system);
// audio_ready may be asynchronous to it. The AC97 codec interface, the
// clock generator and the delay effect are outside this module: the delay
// settings chosen on the GUI are brought out as delay_speed / delay_int.
// Only the pulse of the ready synchronizer is used; its level output is
// left open.
//
// The eight octave sets running in parallel on the ready pulse, one DDS
// per set summed by the synthesizer, the GUI and both graphs follow the
// document. The filter shifts per set, the eighth set at 35.84 kHz and
// graphing set 0 are this design's choices.
module effects_box
  import fxbox_pkg::*;
#(
  parameter int NUM_SETS        = 8,
  parameter int BASE_DIV        = 178036,
  parameter int DEBOUNCE_CYCLES = 500000
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [7:0]       audio_in,
  input  logic                    audio_ready,
  output logic signed [PCM_W-1:0] sound_out,
  output logic                    sound_valid,
  input  logic                    btn_up,
  input  logic                    btn_down,
  input  logic                    btn_left,
  input  logic                    btn_right,
  input  logic                    btn_select,
  input  logic [3:0]              mag_tolerance,
  output logic [2:0]              vga_rgb,
  output logic                    vga_hsync,
  output logic                    vga_vsync,
  output logic                    vga_blank,
  output logic [4:0]              delay_speed,
  output logic [4:0]              delay_int
);
  logic ready_sync, frame_pulse;

  frame_sync u_sync (
    .clk(clk), .rst(rst), .audio_ready(audio_ready),
    .ready_sync(ready_sync), .frame_pulse(frame_pulse)
  );

  // Buttons and GUI.
  logic up, down, left, right, select;
  debounce #(.CYCLES(DEBOUNCE_CYCLES)) u_db_up     (.clk(clk), .rst(rst), .noisy(btn_up),     .clean(up));
  debounce #(.CYCLES(DEBOUNCE_CYCLES)) u_db_down   (.clk(clk), .rst(rst), .noisy(btn_down),   .clean(down));
  debounce #(.CYCLES(DEBOUNCE_CYCLES)) u_db_left   (.clk(clk), .rst(rst), .noisy(btn_left),   .clean(left));
  debounce #(.CYCLES(DEBOUNCE_CYCLES)) u_db_right  (.clk(clk), .rst(rst), .noisy(btn_right),  .clean(right));
  debounce #(.CYCLES(DEBOUNCE_CYCLES)) u_db_select (.clk(clk), .rst(rst), .noisy(btn_select), .clean(select));

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;

  xvga u_xvga (
    .clk(clk), .rst(rst), .hcount(hcount), .vcount(vcount),
    .hsync(hsync), .vsync(vsync), .blank(blank)
  );

  fx_mode_t   fx_mode;
  logic [4:0] speed, intensity;
  logic [2:0] gui_px, dry_px, wet_px;

  gui u_gui (
    .clk(clk), .rst(rst), .up(up), .down(down), .left(left), .right(right), .select(select),
    .hcount(hcount), .vcount(vcount), .pixel(gui_px), .fx(fx_mode), .speed(speed),
    .intensity(intensity), .delay_speed(delay_speed), .delay_int(delay_int)
  );

  // Octave sets.
  logic signed [SINE_W-1:0] sine [NUM_SETS];
  mag_t                     mag  [NUM_SETS];
  logic                     na_we   [NUM_SETS];
  note_idx_t                na_index[NUM_SETS];
  mag_t                     na_mag  [NUM_SETS];
  logic                     fx_we   [NUM_SETS];
  freq_t                    fx_freq [NUM_SETS];
  mag_t                     fx_mag  [NUM_SETS];

  for (genvar i = 0; i < NUM_SETS; i++) begin : g_set
    octave_chain #(
      .DIV      (BASE_DIV >> i),
      .LPF_SHIFT((i < 6) ? 6 - i : 0),
      .BITSHIFT (i)
    ) u_chain (
      .clk(clk), .rst(rst), .audio_in(audio_in), .frame_pulse(frame_pulse),
      .mag_tolerance(mag_tolerance), .speed(speed), .fx_mode(fx_mode), .intensity(intensity),
      .sine(sine[i]), .mag(mag[i]),
      .na_we(na_we[i]), .na_index(na_index[i]), .na_mag(na_mag[i]),
      .fx_we(fx_we[i]), .fx_freq(fx_freq[i]), .fx_mag(fx_mag[i])
    );
  end

  synthesizer #(.NUM_DDS(NUM_SETS)) u_synth (
    .clk(clk), .rst(rst), .start(frame_pulse), .sine(sine), .mag(mag),
    .sound_out(sound_out), .sample_valid(sound_valid)
  );

  // Spectrum graphs of set 0.
  logic      wet_we;
  note_idx_t wet_index;
  mag_t      wet_mag;

  wet_graph_data u_wet (
    .clk(clk), .rst(rst), .we_in(fx_we[0]), .freq_in(fx_freq[0]), .bitshift(4'd0),
    .mag_in(fx_mag[0]), .we_out(wet_we), .index_out(wet_index), .mag_out(wet_mag)
  );

  graph #(.LEFT(11'd8)) u_graph_dry (
    .clk(clk), .rst(rst), .we(na_we[0]), .data(na_mag[0]), .data_index(na_index[0]),
    .hcount(hcount), .vcount(vcount), .pixel(dry_px)
  );

  graph #(.LEFT(11'd408)) u_graph_wet (
    .clk(clk), .rst(rst), .we(wet_we), .data(wet_mag), .data_index(wet_index),
    .hcount(hcount), .vcount(vcount), .pixel(wet_px)
  );

  // Pixel path: sprites and graphs are one clock behind the counters, so
  // the syncs are delayed once before the shared output register.
  logic hsync_q, vsync_q, blank_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      hsync_q   <= 1'b1;
      vsync_q   <= 1'b1;
      blank_q   <= 1'b1;
      vga_hsync <= 1'b1;
      vga_vsync <= 1'b1;
      vga_blank <= 1'b1;
      vga_rgb   <= '0;
    end else begin
      hsync_q   <= hsync;
      vsync_q   <= vsync;
      blank_q   <= blank;
      vga_hsync <= hsync_q;
      vga_vsync <= vsync_q;
      vga_blank <= blank_q;
      vga_rgb   <= blank_q ? 3'b000 : (gui_px | dry_px | wet_px);
    end
  end
endmodule
