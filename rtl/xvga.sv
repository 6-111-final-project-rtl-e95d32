// xvga: 800 x 600 video timing at a 50 MHz pixel clock (72 Hz frames).
//
// hcount runs 0..1039 and vcount 0..665. The visible area is hcount < 800,
// vcount < 600; blank is high elsewhere. hsync is low for hcount 856..975
// (56 front porch, 120 sync, 64 back porch) and vsync for vcount 637..642
// (37 front porch, 6 sync, 23 back porch). All outputs are registered.
// The 800 x 600 geometry is the document's; the porch and sync numbers
// are the standard ones for this mode and the active-low syncs follow the
// document's comments.
module xvga (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int H_VIS = 800, H_FP = 56, H_SYNC = 120, H_TOT = 1040;
  localparam int V_VIS = 600, V_FP = 37, V_SYNC = 6,  V_TOT = 666;

  logic        h_end, v_end;
  logic [10:0] h_nxt;
  logic [9:0]  v_nxt;

  always_comb begin
    h_end = (hcount == 11'(H_TOT - 1));
    v_end = (vcount == 10'(V_TOT - 1));
    h_nxt = h_end ? '0 : hcount + 1'b1;
    v_nxt = h_end ? (v_end ? '0 : vcount + 1'b1) : vcount;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_nxt;
      vcount <= v_nxt;
      hsync  <= !((32'(h_nxt) >= H_VIS + H_FP) && (32'(h_nxt) < H_VIS + H_FP + H_SYNC));
      vsync  <= !((32'(v_nxt) >= V_VIS + V_FP) && (32'(v_nxt) < V_VIS + V_FP + V_SYNC));
      blank  <= (32'(h_nxt) >= H_VIS) || (32'(v_nxt) >= V_VIS);
    end
  end
endmodule
