// blob: rectangle sprite. pixel is color when (hcount, vcount) lies in the
// rectangle whose top-left corner is (x, y) and whose size is w x h, and 0
// elsewhere. Purely combinational; the caller registers the result.
//
// The sprite and its ports (position, size, colour) follow the document;
// the exact edge rule (x <= h < x + w) is this design's choice.
module blob (
  input  logic [10:0] x,
  input  logic [9:0]  y,
  input  logic [10:0] w,
  input  logic [9:0]  h,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [2:0]  color,
  output logic [2:0]  pixel
);
  logic in_x, in_y;
  assign in_x  = (hcount >= x) && ({1'b0, hcount} < ({1'b0, x} + {1'b0, w}));
  assign in_y  = (vcount >= y) && ({1'b0, vcount} < ({1'b0, y} + {1'b0, h}));
  assign pixel = (in_x && in_y) ? color : 3'b000;
endmodule
