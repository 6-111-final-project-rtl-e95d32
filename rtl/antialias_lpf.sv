// antialias_lpf: low-pass filter placed in front of a frame buffer.
//
// The frame buffers resample the 48 kHz audio at 280 Hz .. 35.84 kHz, so
// content above half the buffer's rate would alias into the FFT. This is
// the simplest filter that removes it: two cascaded one-pole IIR sections,
// each computing y <= y + ((x - y) >>> SHIFT) once per 48 kHz sample
// (sample_en). The -3 dB point of one section is about
// 48 kHz / (2*pi*2^SHIFT). SHIFT = 0 makes the filter a plain register.
// State keeps FRAC_W fraction bits below the sample so small steps are not
// lost. Latency: dout follows the second section's state, updated on the
// same clock as sample_en.
//
// The need for the filter is the document's; its structure and cutoffs
// are this design's choice.
module antialias_lpf #(
  parameter int DATA_W = 8,
  parameter int SHIFT  = 6,
  parameter int FRAC_W = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     sample_en,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] dout
);
  localparam int W = DATA_W + FRAC_W + 1;

  logic signed [W-1:0] s1, s2, x_ext, d1, d2;

  assign x_ext = W'(din) <<< FRAC_W;
  assign d1    = (x_ext - s1) >>> SHIFT;
  assign d2    = (s1 - s2) >>> SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0;
      s2 <= '0;
    end else if (sample_en) begin
      s1 <= s1 + d1;
      s2 <= s2 + d2;
    end
  end

  assign dout = DATA_W'(s2 >>> FRAC_W);
endmodule
