// speed_counter: slows the note timer down to a user-set effect rate.
//
// For each of the 12 notes it keeps three small memories: a low-order
// counter, a high-order counter and the last t_in received from the note
// array. Every note update (we_in, once per 48 kHz frame per note) advances
// that note's low-order counter; when it reaches
//     count_max = (32 - speed) << 8      (256 .. 8192 updates)
// it returns to zero and the high-order counter, saturating at 255, steps
// by one. The high-order counter is t_out, the time base of the FX unit.
// When the note array restarts the note (t_in is 0, or smaller than the
// stored t_in) both counters return to zero, which restarts the bend,
// vibrato or arpeggio. Frequency, magnitude and index pass through
// unchanged. All outputs are registered: one clock from we_in to we_out.
//
// The three memories, the speed input, the (32 - speed) maximum shifted by
// 8 and the t_out width follow the document; the shift is taken as a left
// shift, so one step lasts 256 to 8192 audio samples (5 ms to 0.17 s). The
// restart test and the saturation are this design's choices.
module speed_counter
  import fxbox_pkg::*;
#(
  parameter int T_IN_W  = T_W,
  parameter int T_OUT_W = TS_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               we_in,
  input  note_idx_t          index_in,
  input  logic [T_IN_W-1:0]  t_in,
  input  freq_t              freq_in,
  input  mag_t               mag_in,
  input  logic [4:0]         speed,
  output logic               we_out,
  output note_idx_t          index_out,
  output freq_t              freq_out,
  output mag_t               mag_out,
  output logic [T_OUT_W-1:0] t_out
);
  localparam int LOW_W = 14;

  logic [LOW_W-1:0]   low   [NOTES];
  logic [T_OUT_W-1:0] high  [NOTES];
  logic [T_IN_W-1:0]  t_old [NOTES];

  logic [LOW_W-1:0]   count_max, low_next;
  logic               restart, wrap;
  logic [T_OUT_W-1:0] high_next;

  always_comb begin
    count_max = LOW_W'(6'd32 - 6'(speed)) << 8;
    restart   = (t_in == '0) || (t_in < t_old[index_in]);
    low_next  = low[index_in] + 1'b1;
    wrap      = (low_next >= count_max);
    if (restart)
      high_next = '0;
    else if (wrap && !(&high[index_in]))
      high_next = high[index_in] + 1'b1;
    else
      high_next = high[index_in];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < NOTES; n++) begin
        low[n]   <= '0;
        high[n]  <= '0;
        t_old[n] <= '0;
      end
      we_out    <= 1'b0;
      index_out <= '0;
      freq_out  <= '0;
      mag_out   <= '0;
      t_out     <= '0;
    end else begin
      we_out <= we_in && (32'(index_in) < NOTES);
      if (we_in && (32'(index_in) < NOTES)) begin
        low[index_in]   <= (restart || wrap) ? '0 : low_next;
        high[index_in]  <= high_next;
        t_old[index_in] <= t_in;
        index_out       <= index_in;
        freq_out        <= freq_in;
        mag_out         <= mag_in;
        t_out           <= high_next;
      end
    end
  end
endmodule
