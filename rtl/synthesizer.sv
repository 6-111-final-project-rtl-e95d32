// synthesizer: mixes the DDS outputs into one 20-bit PCM sample per audio
// frame.
//
// Every DDS presents one channel per clock, so any 12 consecutive clocks
// show each of its 12 notes once. On start (the synchronized 48 kHz ready
// pulse) the synthesizer clears its accumulator and, for the next 12
// clocks, adds sine[d] * mag[d] for every DDS d, mag being the magnitude of
// the note currently on that DDS's output (from its magnitude memory).
// The 12 x NUM_DDS products are then shifted right by SHIFT, the smallest
// shift that makes the largest possible sum fit PCM_W bits, and sound_out
// is updated with a one-clock sample_valid. sound_out holds its value until
// the next update, 13 clocks after start. A start during a sum restarts
// it.
//
// Summing the DDS channels scaled by their magnitudes on each ready pulse
// is the document's; holding the output and the shift are this design's.
module synthesizer
  import fxbox_pkg::*;
#(
  parameter int NUM_DDS  = 8,
  parameter int CHANNELS = NOTES
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic signed [SINE_W-1:0] sine [NUM_DDS],
  input  mag_t                     mag  [NUM_DDS],
  output logic signed [PCM_W-1:0]  sound_out,
  output logic                     sample_valid
);
  localparam int PROD_W = SINE_W + MAG_W + 1;
  localparam int ACC_W  = SINE_W + MAG_W + $clog2(CHANNELS * NUM_DDS);
  localparam int SHIFT  = ACC_W - PCM_W;
  localparam int CNT_W  = $clog2(CHANNELS + 1);

  logic signed [ACC_W-1:0] acc, frame_sum, acc_next;
  logic [CNT_W-1:0]        cnt;
  logic                    active;

  always_comb begin
    frame_sum = '0;
    for (int d = 0; d < NUM_DDS; d++)
      frame_sum += ACC_W'(PROD_W'(sine[d]) * PROD_W'($signed({1'b0, mag[d]})));
    acc_next = acc + frame_sum;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc          <= '0;
      cnt          <= '0;
      active       <= 1'b0;
      sound_out    <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      if (start) begin
        active <= 1'b1;
        acc    <= '0;
        cnt    <= '0;
      end else if (active) begin
        acc <= acc_next;
        cnt <= cnt + 1'b1;
        if (cnt == CNT_W'(CHANNELS - 1)) begin
          active       <= 1'b0;
          sound_out    <= PCM_W'(acc_next >>> SHIFT);
          sample_valid <= 1'b1;
        end
      end
    end
  end
endmodule
