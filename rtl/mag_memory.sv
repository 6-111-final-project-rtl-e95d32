// mag_memory: holds the latest magnitude of each of the 12 notes so the
// synthesizer can weight the DDS output of the matching channel.
//
// Notes leave the FX unit long before their sine samples come out of the
// time-shared DDS, so the magnitudes are parked here: a synchronous write
// (we, index_in, mag_in) per note update, and an asynchronous read of the
// row named by the DDS's current output channel. Rows are cleared on
// reset. Twelve rows, 5 bits, synchronous write and asynchronous read are
// the document's; the write enable and reset are this design's.
module mag_memory
  import fxbox_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      we,
  input  note_idx_t index_in,
  input  mag_t      mag_in,
  input  note_idx_t channel,
  output mag_t      mag_out
);
  mag_t mag [NOTES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < NOTES; n++) mag[n] <= '0;
    end else if (we && (32'(index_in) < NOTES)) begin
      mag[index_in] <= mag_in;
    end
  end

  assign mag_out = (32'(channel) < NOTES) ? mag[channel] : '0;

endmodule
