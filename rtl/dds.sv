// dds: twelve-channel time-shared direct digital synthesizer.
//
// One phase accumulator per channel lives in a small memory. A channel
// counter visits channels 0..11 in turn, one per clock; on its visit a
// channel's phase advances by its 26-bit frequency word, so each channel
// is updated at f_clk/12 and produces
//     f_out = (f_clk / 12) * freq / 2^26
// (about 0.06 Hz per step at 49.85 MHz). The top LUT_BITS of the new phase
// address a full-wave sine table of 17-bit signed samples (amplitude
// 2^16 - 1), computed at elaboration. sine_out and channel_out are
// registered together, so sine_out always belongs to channel_out; rdy goes
// high after the first full round following reset.
// A frequency word is written with we / we_channel / freq at any time and
// is used from the channel's next visit.
//
// Channel count, word and sample widths and the output formula are the
// document's; the document uses a vendor core, so the accumulator memory,
// table size and output timing are this design's choices.
// An assertion flags a frequency write to a channel that does not exist.
module dds
  import fxbox_pkg::*;
#(
  parameter int CHANNELS = NOTES,
  parameter int LUT_BITS = 10,
  localparam int CH_W    = $clog2(CHANNELS)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  logic [CH_W-1:0]          we_channel,
  input  freq_t                    freq,
  output logic [CH_W-1:0]          channel_out,
  output logic                     rdy,
  output logic signed [SINE_W-1:0] sine_out
);
  localparam int LUT_N = 1 << LUT_BITS;

  typedef logic signed [SINE_W-1:0] lut_t [LUT_N];

  function automatic lut_t make_sine();
    lut_t t;
    for (int i = 0; i < LUT_N; i++)
      t[i] = SINE_W'($rtoi($floor($sin(2.0 * 3.141592653589793 * i / LUT_N) *
                                  ((2.0 ** (SINE_W - 1)) - 1.0) + 0.5)));
    return t;
  endfunction

  localparam lut_t SINE = make_sine();

  freq_t             word  [CHANNELS];
  freq_t             phase [CHANNELS];
  logic [CH_W-1:0]   ch;
  freq_t             phase_next;

  assign phase_next = phase[ch] + word[ch];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < CHANNELS; c++) begin
        word[c]  <= '0;
        phase[c] <= '0;
      end
      ch          <= '0;
      channel_out <= '0;
      sine_out    <= '0;
      rdy         <= 1'b0;
    end else begin
      phase[ch]   <= phase_next;
      sine_out    <= SINE[phase_next[F_W-1 -: LUT_BITS]];
      channel_out <= ch;
      if (ch == CH_W'(CHANNELS - 1)) begin
        ch  <= '0;
        rdy <= 1'b1;
      end else begin
        ch <= ch + 1'b1;
      end
      if (we && (32'(we_channel) < CHANNELS)) word[we_channel] <= freq;
    end
  end

  // A frequency word must name one of the channels.
  a_we_channel: assert property (@(posedge clk) disable iff (rst) we |-> (32'(we_channel) < CHANNELS))
    else $error("dds: write to channel %0d", we_channel);
endmodule
