// tb_frame_buffer_ram: checks the 128 x 8 two-port memory.
//
// Random writes on port A and reads on port B run at the same time
// (the two clocks are driven separately, port B at a different rate).
// A model array kept here gives the expected data: a read returns,
// one clock_b edge later, the word stored at addr_b, and data_out holds
// while ce is low.
//
// The two-port 128 x 8 memory and its port names are the document's; the
// read latency checked here is this design's own.
module tb_frame_buffer_ram;
  logic clk_a = 0, clk_b = 0;
  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;

  logic we, ce;
  logic [6:0] addr_a, addr_b;
  logic [7:0] data_in, data_out;

  frame_buffer_ram dut (.clk_a, .we, .addr_a, .data_in, .clk_b, .ce, .addr_b, .data_out);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk_a);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] model [128];

  initial begin
    we = 0; addr_a = 0; data_in = 0;
    // fill every word first
    for (int i = 0; i < 128; i++) begin
      @(negedge clk_a);
      we = 1; addr_a = 7'(i); data_in = 8'($urandom);
      model[i] = data_in;
    end
    @(negedge clk_a);
    we = 0;
    fork
      // port A: random writes to the upper half
      for (int k = 0; k < 3000; k++) begin
        @(negedge clk_a);
        we = $urandom_range(0, 1);
        addr_a = 7'($urandom_range(64, 127));
        data_in = 8'($urandom);
        @(posedge clk_a);
        if (we) model[addr_a] = data_in;
      end
      // port B: reads of the lower half, which port A never changes
      begin
        logic [7:0] held;
        ce = 0; addr_b = 0;
        repeat (3) @(posedge clk_b);
        for (int k = 0; k < 2000; k++) begin
          @(negedge clk_b);
          ce = $urandom_range(0, 3) != 0;
          addr_b = 7'($urandom_range(0, 63));
          held = data_out;
          @(posedge clk_b); #1;
          if (ce) check(data_out == model[addr_b], $sformatf("read %0d", addr_b));
          else check(data_out == held, "hold while ce low");
        end
      end
    join
    // read back everything, including the words port A changed
    for (int i = 0; i < 128; i++) begin
      @(negedge clk_b);
      ce = 1; addr_b = 7'(i);
      @(posedge clk_b); #1;
      check(data_out == model[i], $sformatf("final read %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
