// frame_sync: brings the codec's sample-ready strobe into the system clock
// domain and marks the start of each 48 kHz audio frame.
//
// audio_ready comes from the AC97 interface, which runs on the codec's bit
// clock. It passes through three flip-flops; ready_sync is the AND of the
// last two stages, and frame_pulse is high for exactly one system clock on
// each rising edge of ready_sync. That pulse starts the FFTs, the note
// pipeline and the synthesizer once per audio sample (about every 1039
// clocks at 49.85 MHz). Synchronizer depth and edge detect follow the
// document; the synchronous reset is this design's addition.
module frame_sync (
  input  logic clk,
  input  logic rst,
  input  logic audio_ready,
  output logic ready_sync,
  output logic frame_pulse
);
  logic [2:0] sync_q;
  logic       ready_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q  <= '0;
      ready_q <= 1'b0;
    end else begin
      sync_q  <= {sync_q[1:0], audio_ready};
      ready_q <= ready_sync;
    end
  end

  assign ready_sync  = sync_q[2] & sync_q[1];
  assign frame_pulse = ready_sync & ~ready_q;
endmodule
