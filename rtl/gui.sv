// gui: effect control panel, driven by four direction buttons and a
// select button, and drawn on the 800 x 600 screen.
//
// Six sliders hold 5-bit settings:
//   0 bender speed, 1 vibrato speed, 2 vibrato intensity,
//   3 arpeggio speed, 4 delay time, 5 delay intensity.
// left/right move the current control (wrapping 0 <-> 5), up/down step its
// slider by one (saturating at 0 and 31), and select on control 0, 1/2 or
// 3 makes the bender, vibrato or arpeggio the active effect (fx). speed is
// the speed slider of the active effect, intensity the vibrato intensity;
// the delay settings are output as they are. Buttons act on their rising
// edge, one step per press. Reset selects the bender, control 1, and all
// sliders at 0.
//
// Drawing: a white border, a horizontal and a vertical line that divide
// the control area from the two spectrum graphs, six green bars with a
// slider each (red for the current control, blue otherwise) placed
// 4 pixels per step, and a red marker under the active effect. pixel is
// registered: it belongs to the (hcount, vcount) of the previous clock.
// Layout numbers, colours and the control-to-effect mapping follow the
// document; the saturating sliders are this design's choice and the
// on-screen text is not drawn.
module gui
  import fxbox_pkg::*;
#(
  parameter logic [9:0]  BAR_TOP       = 10'd100,
  parameter logic [10:0] BAR_WIDTH     = 11'd12,
  parameter logic [10:0] SLIDER_WIDTH  = 11'd16,
  parameter logic [9:0]  SLIDER_HEIGHT = 10'd5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        up,
  input  logic        down,
  input  logic        left,
  input  logic        right,
  input  logic        select,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [2:0]  pixel,
  output fx_mode_t    fx,
  output logic [4:0]  speed,
  output logic [4:0]  intensity,
  output logic [4:0]  delay_speed,
  output logic [4:0]  delay_int
);
  localparam int NCTRL = 6;
  localparam logic [9:0] BAR_HEIGHT = 10'd128 + SLIDER_HEIGHT;

  typedef logic [10:0] xpos_t [NCTRL];
  localparam xpos_t BAR_X = '{11'd57, 11'd120, 11'd175, 11'd270, 11'd342, 11'd390};

  logic [4:0] setting [NCTRL];
  logic [2:0] control;
  logic       up_q, down_q, left_q, right_q, select_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NCTRL; i++) setting[i] <= '0;
      control  <= 3'd1;
      fx       <= FX_BEND;
      up_q     <= 1'b0;
      down_q   <= 1'b0;
      left_q   <= 1'b0;
      right_q  <= 1'b0;
      select_q <= 1'b0;
    end else begin
      up_q     <= up;
      down_q   <= down;
      left_q   <= left;
      right_q  <= right;
      select_q <= select;

      if (left && !left_q)
        control <= (control == 3'd0) ? 3'(NCTRL - 1) : control - 1'b1;
      else if (right && !right_q)
        control <= (control == 3'(NCTRL - 1)) ? 3'd0 : control + 1'b1;

      if (select && !select_q) begin
        unique case (control)
          3'd0:       fx <= FX_BEND;
          3'd1, 3'd2: fx <= FX_VIBRATO;
          3'd3:       fx <= FX_ARPEGGIO;
          default:    fx <= fx;
        endcase
      end

      if (up && !up_q && setting[control] != 5'd31)
        setting[control] <= setting[control] + 1'b1;
      else if (down && !down_q && setting[control] != 5'd0)
        setting[control] <= setting[control] - 1'b1;
    end
  end

  always_comb begin
    unique case (fx)
      FX_VIBRATO:  speed = setting[1];
      FX_ARPEGGIO: speed = setting[3];
      default:     speed = setting[0];
    endcase
  end
  assign intensity   = setting[2];
  assign delay_speed = setting[4];
  assign delay_int   = setting[5];

  // Sprites.
  logic [2:0] bar_px    [NCTRL];
  logic [2:0] slider_px [NCTRL];
  logic [2:0] marker_px;
  logic [10:0] marker_x;

  for (genvar i = 0; i < NCTRL; i++) begin : g_ctrl
    blob u_bar (
      .x(BAR_X[i]), .y(BAR_TOP), .w(BAR_WIDTH), .h(BAR_HEIGHT),
      .hcount(hcount), .vcount(vcount), .color(3'b010), .pixel(bar_px[i])
    );
    blob u_slider (
      .x(BAR_X[i] + (BAR_WIDTH >> 1) - (SLIDER_WIDTH >> 1)),
      .y(BAR_HEIGHT + BAR_TOP - SLIDER_HEIGHT - {3'b000, setting[i], 2'b00}),
      .w(SLIDER_WIDTH), .h(SLIDER_HEIGHT),
      .hcount(hcount), .vcount(vcount),
      .color((control == 3'(i)) ? 3'b100 : 3'b001), .pixel(slider_px[i])
    );
  end

  always_comb begin
    unique case (fx)
      FX_VIBRATO:  marker_x = 11'd150;
      FX_ARPEGGIO: marker_x = 11'd258;
      default:     marker_x = 11'd44;
    endcase
  end

  blob u_marker (
    .x(marker_x), .y(10'd279), .w(11'd32), .h(10'd3),
    .hcount(hcount), .vcount(vcount), .color(3'b100), .pixel(marker_px)
  );

  logic [2:0] px;
  always_comb begin
    px = marker_px;
    for (int i = 0; i < NCTRL; i++) px |= bar_px[i] | slider_px[i];
    if (hcount == 11'd0 || hcount == 11'd798 || vcount == 10'd0 || vcount == 10'd599)
      px |= 3'b111;
    if (vcount > 10'd400 && vcount < 10'd407)
      px |= 3'b011;
    if (vcount > 10'd400 && hcount > 11'd397 && hcount < 11'd403)
      px |= 3'b011;
  end

  always_ff @(posedge clk) begin
    if (rst) pixel <= '0;
    else     pixel <= px;
  end
endmodule
