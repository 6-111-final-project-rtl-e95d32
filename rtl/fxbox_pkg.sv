// fxbox_pkg: types and constants shared by the guitar effects box.
//
// Holds the note tables used by the note array and the wet-graph indexer,
// the widths of the note data that flows from the note array through the
// speed counter and FX unit to the DDS, and the effect select encoding.
//
// Note frequency words: the DDS output frequency is f_clk/12 * word / 2^26
// with f_clk = 49.85 MHz, so word = f * 2^26 * 12 / 49.85e6. The twelve
// base words below are those of the notes D2..C#3 (73.42 Hz .. 138.59 Hz);
// a higher octave is the same word shifted left once per octave.
//
// Bin table: with a 128-point FFT whose frame buffer samples at 280 * 2^k Hz,
// bin b covers b * 2.1875 * 2^k Hz, so every octave set places the same note
// in the same bin(s). A note that falls between two bins takes both
// (lo, hi); one that sits close to a bin centre takes a single bin (lo == hi).
//
// The note words, the bin layout and the widths are the document's; packing
// them into one package with an enum and a struct is this design's choice.
package fxbox_pkg;

  localparam int NOTES    = 12;   // notes per octave / DDS channels
  localparam int F_W      = 26;   // DDS frequency word width
  localparam int MAG_W    = 5;    // note magnitude width
  localparam int T_W      = 20;   // note-array time (48 kHz cycles)
  localparam int TS_W     = 8;    // speed-counter time
  localparam int IDX_W    = 4;    // note index width
  localparam int SINE_W   = 17;   // DDS sine sample width
  localparam int PCM_W    = 20;   // AC97 sample width
  localparam int BIN_W    = 7;    // FFT bin index width

  typedef logic [IDX_W-1:0] note_idx_t;
  typedef logic [F_W-1:0]   freq_t;
  typedef logic [MAG_W-1:0] mag_t;

  // Effect select, as driven by the GUI.
  typedef enum logic [1:0] {
    FX_BEND     = 2'd0,
    FX_VIBRATO  = 2'd1,
    FX_ARPEGGIO = 2'd2,
    FX_NONE     = 2'd3
  } fx_mode_t;

  // One note travelling down the per-octave pipeline.
  typedef struct packed {
    note_idx_t index;
    freq_t     freq;
    mag_t      mag;
  } note_t;

  // Base frequency words, index 0 = D .. 11 = C#/Db.
  typedef logic [11:0] base_word_t [NOTES];
  localparam base_word_t NOTE_WORD = '{
    12'd1186, 12'd1257, 12'd1331, 12'd1410, 12'd1494, 12'd1583,
    12'd1677, 12'd1777, 12'd1883, 12'd1995, 12'd2113, 12'd2239
  };

  // FFT bins of each note.
  typedef logic [BIN_W-1:0] bin_tab_t [NOTES];
  localparam bin_tab_t NOTE_BIN_LO = '{
    7'd33, 7'd35, 7'd37, 7'd39, 7'd42, 7'd44,
    7'd47, 7'd50, 7'd53, 7'd56, 7'd59, 7'd63
  };
  localparam bin_tab_t NOTE_BIN_HI = '{
    7'd34, 7'd36, 7'd38, 7'd40, 7'd42, 7'd45,
    7'd48, 7'd51, 7'd54, 7'd57, 7'd60, 7'd63
  };

endpackage
