// tb_mag_memory: checks the 12-entry magnitude store.
//
// Random writes (with and without we, including out-of-range rows 12..15)
// are mirrored in a model array; after every clock all twelve rows are read
// back through the asynchronous channel port and compared, and rows 12..15
// must read 0. Reset must clear every row.
//
// The twelve rows and asynchronous read are the document's; the handling
// of rows 12..15 checked here is this design's own.
module tb_mag_memory;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic we;
  logic [3:0] index_in, channel;
  logic [4:0] mag_in, mag_out;

  mag_memory dut (.clk, .rst, .we, .index_in, .mag_in, .channel, .mag_out);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model [12];

  task automatic read_all();
    for (int c = 0; c < 16; c++) begin
      channel = 4'(c);
      #1;
      check(int'(mag_out) == ((c < 12) ? model[c] : 0), $sformatf("row %0d", c));
    end
  endtask

  initial begin
    we = 0; index_in = 0; mag_in = 0; channel = 0;
    foreach (model[i]) model[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      index_in = 4'($urandom_range(0, 15));
      mag_in = 5'($urandom);
      @(posedge clk);
      if (we && index_in < 12) model[index_in] = int'(mag_in);
      @(negedge clk);
      we = 0;
      read_all();
    end
    rst = 1;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
    foreach (model[i]) model[i] = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
