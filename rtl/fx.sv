// fx: applies the selected effect to the frequency of each note update.
//
// The slow time t_in from the speed counter drives all three effects:
//   FX_BEND     pitch bender:  f + (f >> 7) * t   (about +0.8 % per step,
//               restarting from f whenever the note restarts);
//   FX_VIBRATO  4-step warble on t mod 4: f, f + d, f, f - d, with
//               d = f >> (11 - intensity/4), plus f >> (18 - intensity/2)
//               when intensity mod 4 is 2 or 3 (finer steps in between);
//   FX_ARPEGGIO major-chord cycle on t mod 8: root, third (f + f/4),
//               fifth (f + f/2), octave (2f), tenth (2f + f/2), octave,
//               fifth, third;
//   FX_NONE     frequency unchanged.
// Results above the 26-bit range saturate. One register stage: dds_we,
// index_out, freq_out and mag_out follow we_in by one clock; magnitude and
// index pass through.
//
// The effects and their arithmetic follow the document; the bender step is
// f >> 7, about 0.8 % of the note per step. Writing
// the DDS on every valid note and the saturation are this design's choices.
module fx
  import fxbox_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            we_in,
  input  note_idx_t       index_in,
  input  freq_t           freq_in,
  input  mag_t            mag_in,
  input  logic [TS_W-1:0] t_in,
  input  fx_mode_t        mode,
  input  logic [4:0]      intensity,
  output logic            dds_we,
  output note_idx_t       index_out,
  output freq_t           freq_out,
  output mag_t            mag_out
);
  localparam int XW = F_W + TS_W + 1;

  function automatic freq_t sat(input logic [XW-1:0] v);
    return (v > XW'({F_W{1'b1}})) ? {F_W{1'b1}} : v[F_W-1:0];
  endfunction

  logic [XW-1:0] f, bend, vib_step, vib, arp;
  logic [3:0]    sh1;
  logic [4:0]    sh2;

  always_comb begin
    f = XW'(freq_in);

    // Pitch bender.
    bend = f + (f >> 7) * XW'(t_in);

    // Vibrato.
    sh1 = 4'(5'd11 - 5'(intensity >> 2));
    sh2 = 5'(6'd18 - 6'(intensity >> 1));
    vib_step = (intensity[1]) ? (f >> sh1) + (f >> sh2) : (f >> sh1);
    unique case (t_in[1:0])
      2'd1:    vib = f + vib_step;
      2'd3:    vib = f - vib_step;
      default: vib = f;
    endcase

    // Arpeggio.
    unique case (t_in[2:0])
      3'd0:       arp = f;
      3'd1, 3'd7: arp = f + (f >> 2);
      3'd2, 3'd6: arp = f + (f >> 1);
      3'd3, 3'd5: arp = f << 1;
      default:    arp = (f << 1) + (f >> 1);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dds_we    <= 1'b0;
      index_out <= '0;
      freq_out  <= '0;
      mag_out   <= '0;
    end else begin
      dds_we <= we_in;
      if (we_in) begin
        index_out <= index_in;
        mag_out   <= mag_in;
        unique case (mode)
          FX_BEND:     freq_out <= sat(bend);
          FX_VIBRATO:  freq_out <= sat(vib);
          FX_ARPEGGIO: freq_out <= sat(arp);
          default:     freq_out <= freq_in;
        endcase
      end
    end
  end
endmodule
