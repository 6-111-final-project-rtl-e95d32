// note_array: turns one FFT frame of bins into twelve note updates.
//
// fft_mag is the bin magnitude already reduced to its top five bits.
// Each set's FFT is sized so that one octave, D..C#, lands on fixed bins
// (fxbox_pkg::NOTE_BIN_LO/HI). While the FFT unloads (fft_dv), every bin
// magnitude that belongs to a note is added into that
// note's accumulator; the bins arrive in bit-reversed order, so nothing is
// emitted until the frame's last bin (fft_last). Then the note array sweeps
// the twelve notes, one per clock, and for each raises we for one clock
// with:
//   index_out - the note, 0 (D) .. 11 (C#), which is also its DDS channel;
//   freq_out  - the note's DDS frequency word shifted left by bitshift,
//               i.e. moved to this set's octave;
//   mag_out   - the bin sum, saturated to 5 bits;
//   t_out     - the note's timer: reset to 0 when the new magnitude exceeds
//               the previous frame's by more than mag_tolerance (a new
//               onset), otherwise incremented (saturating). One frame is one
//               48 kHz sample, so t counts 48 kHz cycles since the onset.
// na_done pulses with the last note. The sweep takes 12 clocks and begins
// the clock after fft_last.
//
// Bin table, note words, 5-bit magnitudes and the onset rule follow the
// document; collecting the whole frame before the sweep, saturation of the
// sums and of the timer are this design's choices.
// An assertion flags FFT bins that arrive during the note sweep.
module note_array
  import fxbox_pkg::*;
#(
  parameter int TW = T_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [BIN_W-1:0] fft_index,
  input  mag_t             fft_mag,
  input  logic             fft_dv,
  input  logic             fft_last,
  input  logic [3:0]       bitshift,
  input  logic [3:0]       mag_tolerance,
  output logic             we,
  output note_idx_t        index_out,
  output freq_t            freq_out,
  output mag_t             mag_out,
  output logic [TW-1:0]    t_out,
  output logic             na_done
);
  logic [MAG_W:0]  acc     [NOTES];
  mag_t            old_mag [NOTES];
  logic [TW-1:0]   t       [NOTES];

  logic            sweeping;
  note_idx_t       sweep_n;

  // Saturated magnitude of the note being swept and its onset test.
  mag_t            new_mag;
  logic            onset;
  always_comb begin
    new_mag = acc[sweep_n][MAG_W] ? '1 : acc[sweep_n][MAG_W-1:0];
    onset   = ({1'b0, new_mag} > ({1'b0, old_mag[sweep_n]} + (MAG_W+1)'(mag_tolerance)));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < NOTES; n++) begin
        acc[n]     <= '0;
        old_mag[n] <= '0;
        t[n]       <= '0;
      end
      sweeping  <= 1'b0;
      sweep_n   <= '0;
      we        <= 1'b0;
      na_done   <= 1'b0;
      index_out <= '0;
      freq_out  <= '0;
      mag_out   <= '0;
      t_out     <= '0;
    end else begin
      we      <= 1'b0;
      na_done <= 1'b0;

      if (fft_dv) begin
        for (int n = 0; n < NOTES; n++) begin
          if (fft_index == NOTE_BIN_LO[n] ||
              (fft_index == NOTE_BIN_HI[n] && NOTE_BIN_HI[n] != NOTE_BIN_LO[n]))
            acc[n] <= acc[n] + (MAG_W+1)'(fft_mag);
        end
      end

      if (fft_last) begin
        sweeping <= 1'b1;
        sweep_n  <= '0;
      end else if (sweeping) begin
        we         <= 1'b1;
        index_out  <= sweep_n;
        freq_out   <= F_W'(NOTE_WORD[sweep_n]) << bitshift;
        mag_out    <= new_mag;
        old_mag[sweep_n] <= new_mag;
        acc[sweep_n]     <= '0;
        if (onset) begin
          t[sweep_n] <= '0;
          t_out      <= '0;
        end else begin
          t[sweep_n] <= (&t[sweep_n]) ? t[sweep_n] : t[sweep_n] + 1'b1;
          t_out      <= (&t[sweep_n]) ? t[sweep_n] : t[sweep_n] + 1'b1;
        end
        if (sweep_n == note_idx_t'(NOTES - 1)) begin
          sweeping <= 1'b0;
          na_done  <= 1'b1;
        end
        sweep_n <= sweep_n + 1'b1;
      end
    end
  end

  // The FFT must not deliver bins while the twelve notes are being swept.
  a_no_bins_in_sweep: assert property (@(posedge clk) disable iff (rst) sweeping |-> !fft_dv)
    else $error("note_array: FFT bin during the note sweep");
endmodule
