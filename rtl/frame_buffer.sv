// frame_buffer: keeps the last DEPTH samples of one octave set and hands
// them to that set's FFT as a frame, oldest sample first.
//
// Write side: a clock divider counts system clocks 0..DIV-1 and pulses
// sample_we on the last count, so the buffer samples din at f_clk / DIV
// (DIV = 178036 gives 280 Hz at 49.85 MHz). Each write goes to the write
// pointer, which then advances by one, so the write pointer always names
// the oldest sample.
//
// Read side: fft_start (one cycle) copies the write pointer into the read
// base and the buffer then reads DEPTH consecutive addresses from there.
// Because the RAM read takes one cycle, xn/xn_valid appear one cycle after
// each read: DEPTH back-to-back valid samples, the first on the clock
// after the one that samples fft_start. A start that arrives while a frame is still streaming is
// ignored. A write that lands in the same cycle as fft_start is accounted
// for by starting one place further on.
//
// The divider, the 128 x 8 two-port RAM and the oldest-first order are the
// document's; the streaming hand-off to the FFT is this design's choice.
module frame_buffer #(
  parameter int DIV   = 178036,
  parameter int DEPTH = 128,
  parameter int WIDTH = 8,
  localparam int AW   = $clog2(DEPTH),
  localparam int CW   = $clog2(DIV)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  input  logic             fft_start,
  output logic             sample_we,
  output logic [WIDTH-1:0] xn,
  output logic             xn_valid
);
  logic [CW-1:0] div_cnt;
  logic [AW-1:0] wp, rd_base, rd_cnt;
  logic          rd_active;

  assign sample_we = (div_cnt == CW'(DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt <= '0;
      wp      <= '0;
    end else begin
      div_cnt <= sample_we ? '0 : div_cnt + 1'b1;
      if (sample_we) wp <= wp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_active <= 1'b0;
      rd_cnt    <= '0;
      rd_base   <= '0;
      xn_valid  <= 1'b0;
    end else begin
      xn_valid <= rd_active;
      if (!rd_active) begin
        if (fft_start) begin
          rd_active <= 1'b1;
          rd_cnt    <= '0;
          rd_base   <= sample_we ? wp + 1'b1 : wp;
        end
      end else begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == AW'(DEPTH - 1)) rd_active <= 1'b0;
      end
    end
  end

  frame_buffer_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_ram (
    .clk_a   (clk),
    .we      (sample_we),
    .addr_a  (wp),
    .data_in (din),
    .clk_b   (clk),
    .ce      (rd_active),
    .addr_b  (rd_base + rd_cnt),
    .data_out(xn)
  );

endmodule
