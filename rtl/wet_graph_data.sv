// wet_graph_data: finds the bar of the wet (after-effect) spectrum graph
// that a modified note frequency belongs to.
//
// index_out is the highest note n (0 = D .. 11 = C#) whose base frequency
// word, shifted left by bitshift, is not above freq_in; a frequency below
// D reads 0 and any frequency above C# of the octave, such as an arpeggio
// octave or tenth, reads 11. The magnitude passes through. One register
// stage: we_out, index_out and mag_out follow we_in by one clock.
//
// Mapping a frequency back to one of the twelve bars, including the
// clamp to 11 above the octave, is the document's; the comparator chain
// is this design's.
module wet_graph_data
  import fxbox_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      we_in,
  input  freq_t     freq_in,
  input  logic [3:0] bitshift,
  input  mag_t      mag_in,
  output logic      we_out,
  output note_idx_t index_out,
  output mag_t      mag_out
);
  note_idx_t idx;
  always_comb begin
    idx = '0;
    for (int n = 1; n < NOTES; n++)
      if (freq_in >= (F_W'(NOTE_WORD[n]) << bitshift)) idx = note_idx_t'(n);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      we_out    <= 1'b0;
      index_out <= '0;
      mag_out   <= '0;
    end else begin
      we_out <= we_in;
      if (we_in) begin
        index_out <= idx;
        mag_out   <= mag_in;
      end
    end
  end
endmodule
