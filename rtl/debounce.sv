// debounce: push-button debouncer. The output takes the input's value once
// the input has held that value for CYCLES consecutive clocks (10 ms at
// 50 MHz by default); shorter bounces never reach the output. Reset sets
// the output to the current input. The button debouncers come from the
// document; their structure and the 10 ms interval are this design's choice.
module debounce #(
  parameter int CYCLES = 500000,
  localparam int CW    = $clog2(CYCLES + 1)
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      clean <= noisy;
      cnt   <= '0;
    end else if (noisy == clean) begin
      cnt <= '0;
    end else if (cnt == CW'(CYCLES - 1)) begin
      clean <= noisy;
      cnt   <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
