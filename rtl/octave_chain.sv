// octave_chain: everything one octave set of the effects box owns, from
// the audio sample to its twelve sine channels.
//
//   antialias_lpf -> frame_buffer -> fft128 -> note_array -> speed_counter
//   -> fx -> (mag_memory, dds)
//
// The set samples the filtered audio at f_clk / DIV into its frame buffer.
// Each frame_pulse (one per 48 kHz audio sample) both clocks the filter
// and starts a frame: the buffer streams its 128 samples to the FFT, the
// note array turns the bins into twelve note updates for the octave
// selected by BITSHIFT, the speed counter and FX unit turn them into
// effect-modified frequency words, and these are written to the set's DDS
// channel of the same note index, while the magnitudes go to the set's
// magnitude memory. sine/mag present one DDS channel per clock, with the
// magnitude of the channel on the sine output, for the synthesizer.
// Intermediate note streams are brought out for the spectrum graphs.
// Latency from frame_pulse to the first DDS write is about 720 clocks.
//
// The chain of units and one chain per octave follow the document; putting
// a chain in its own module is this design's choice. Status outputs of
// the units that nothing here needs are left open: the buffer's sample
// strobe, the FFT's busy/done and re/im, the low four magnitude bits
// (only the top five are used), na_done and the DDS rdy.
module octave_chain
  import fxbox_pkg::*;
#(
  parameter int DIV       = 178036,
  parameter int LPF_SHIFT = 6,
  parameter int BITSHIFT  = 0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [7:0]        audio_in,
  input  logic                     frame_pulse,
  input  logic [3:0]               mag_tolerance,
  input  logic [4:0]               speed,
  input  fx_mode_t                 fx_mode,
  input  logic [4:0]               intensity,
  output logic signed [SINE_W-1:0] sine,
  output mag_t                     mag,
  // note array output (dry spectrum)
  output logic                     na_we,
  output note_idx_t                na_index,
  output mag_t                     na_mag,
  // FX output (wet spectrum)
  output logic                     fx_we,
  output freq_t                    fx_freq,
  output mag_t                     fx_mag
);
  logic signed [7:0] filtered, xn;
  logic              xn_valid, sample_we;

  antialias_lpf #(.DATA_W(8), .SHIFT(LPF_SHIFT)) u_lpf (
    .clk(clk), .rst(rst), .sample_en(frame_pulse), .din(audio_in), .dout(filtered)
  );

  frame_buffer #(.DIV(DIV)) u_buf (
    .clk(clk), .rst(rst), .din(filtered), .fft_start(frame_pulse),
    .sample_we(sample_we), .xn(xn), .xn_valid(xn_valid)
  );

  logic                   fft_busy, fft_done, fft_dv, fft_last;
  logic [BIN_W-1:0]       xk_index;
  logic signed [7:0]      xk_re, xk_im;
  logic [8:0]             fft_mag;

  fft128 u_fft (
    .clk(clk), .rst(rst), .xn(xn), .xn_valid(xn_valid),
    .busy(fft_busy), .done(fft_done), .dv(fft_dv), .last(fft_last),
    .xk_index(xk_index), .xk_re(xk_re), .xk_im(xk_im), .mag(fft_mag)
  );

  freq_t            na_freq;
  logic [T_W-1:0]   na_t;
  logic             na_done;

  note_array u_na (
    .clk(clk), .rst(rst), .fft_index(xk_index), .fft_mag(fft_mag[8:4]),
    .fft_dv(fft_dv), .fft_last(fft_last), .bitshift(4'(BITSHIFT)),
    .mag_tolerance(mag_tolerance), .we(na_we), .index_out(na_index),
    .freq_out(na_freq), .mag_out(na_mag), .t_out(na_t), .na_done(na_done)
  );

  logic             sc_we;
  note_idx_t        sc_index;
  freq_t            sc_freq;
  mag_t             sc_mag;
  logic [TS_W-1:0]  sc_t;

  speed_counter u_sc (
    .clk(clk), .rst(rst), .we_in(na_we), .index_in(na_index), .t_in(na_t),
    .freq_in(na_freq), .mag_in(na_mag), .speed(speed),
    .we_out(sc_we), .index_out(sc_index), .freq_out(sc_freq), .mag_out(sc_mag), .t_out(sc_t)
  );

  note_idx_t fx_index;

  fx u_fx (
    .clk(clk), .rst(rst), .we_in(sc_we), .index_in(sc_index), .freq_in(sc_freq),
    .mag_in(sc_mag), .t_in(sc_t), .mode(fx_mode), .intensity(intensity),
    .dds_we(fx_we), .index_out(fx_index), .freq_out(fx_freq), .mag_out(fx_mag)
  );

  note_idx_t dds_channel;
  logic      dds_rdy;

  mag_memory u_mag (
    .clk(clk), .rst(rst), .we(fx_we), .index_in(fx_index), .mag_in(fx_mag),
    .channel(dds_channel), .mag_out(mag)
  );

  dds u_dds (
    .clk(clk), .rst(rst), .we(fx_we), .we_channel(fx_index), .freq(fx_freq),
    .channel_out(dds_channel), .rdy(dds_rdy), .sine_out(sine)
  );
endmodule
