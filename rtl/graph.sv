// graph: spectrum bar graph of DATA_LENGTH magnitudes.
//
// Each (data_index, data) pair offered with we is stored in a small
// register array, one entry per bar. Bar i occupies the 8 pixel columns
// starting at LEFT + 8*i and rises from row BOTTOM by 4 pixels per
// magnitude step, so a full-scale 5-bit magnitude is 124 pixels tall.
// pixel is COLOR inside a bar and 0 elsewhere, registered: it belongs to
// the (hcount, vcount) of the previous clock. Indices of DATA_LENGTH or
// more are ignored; reset clears all bars.
//
// The geometry and register-array structure follow the document; the
// write enable, the index check and the reset are this design's.
module graph #(
  parameter logic [10:0] LEFT        = 11'd8,
  parameter logic [9:0]  BOTTOM      = 10'd550,
  parameter logic [2:0]  COLOR       = 3'b111,
  parameter int          DATA_LENGTH = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        we,
  input  logic [4:0]  data,
  input  logic [3:0]  data_index,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [2:0]  pixel
);
  logic [4:0]  bars [DATA_LENGTH];
  logic [10:0] rel_x;
  logic [6:0]  bar_sel;
  logic [4:0]  bar_val;
  logic        in_bar;

  always_comb begin
    rel_x   = hcount - LEFT;
    bar_sel = rel_x[9:3];
    bar_val = (32'(bar_sel) < DATA_LENGTH) ? bars[bar_sel[3:0]] : 5'd0;
    in_bar  = (hcount >= LEFT) && (32'(rel_x) < DATA_LENGTH * 8) && (vcount < BOTTOM) &&
              ({bar_val, 2'b00} > 7'(BOTTOM - vcount)) && ((BOTTOM - vcount) < 10'd128);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DATA_LENGTH; i++) bars[i] <= '0;
      pixel <= '0;
    end else begin
      pixel <= in_bar ? COLOR : 3'b000;
      if (we && (32'(data_index) < DATA_LENGTH)) bars[data_index] <= data;
    end
  end
endmodule
