// frame_buffer_ram: the 128 x 8 two-port memory of one frame buffer.
//
// Port A writes (data_in at addr_a when we is high, on clk_a); port B reads
// (data_out <= mem[addr_b] when ce is high, on clk_b, one cycle latency).
// The two ports have their own clocks so the write side can follow the
// buffer's sample clock and the read side the FFT. Port names and size are
// the document's; the read latency is this design's choice. The contents
// are not reset; a frame read before 128 samples have been written holds
// whatever the memory powered up with.
module frame_buffer_ram #(
  parameter int DEPTH = 128,
  parameter int WIDTH = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk_a,
  input  logic             we,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] data_in,
  input  logic             clk_b,
  input  logic             ce,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] data_out
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_a)
    if (we) mem[addr_a] <= data_in;

  always_ff @(posedge clk_b)
    if (ce) data_out <= mem[addr_b];
endmodule
