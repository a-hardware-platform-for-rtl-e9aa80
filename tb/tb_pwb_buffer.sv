// tb_pwb_buffer: random pushes and random bus back-pressure against a queue
// model of the PWB buffer. Checks every cycle that the write-back bus shows
// the oldest line with valid set exactly while lines are pending, so lines
// leave in the order they were pushed; also checks full.
// In-order write-back follows the platform's PWB buffer; the depth and
// the one-line-per-cycle drain are this design's choices.
module tb_pwb_buffer;
  import maple_pkg::*;
  localparam int DEPTH = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, wb_ready, full;
  dbus_t push_data, wb;
  pwb_buffer #(.DEPTH(DEPTH)) dut (.*);

  dbus_t model [$];
  int checks = 0, failures = 0;

  initial begin
    push = 0; wb_ready = 0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (wb.valid != (model.size() != 0) || full != (model.size() == DEPTH) ||
          (wb.valid && (wb.line != model[0].line || wb.data != model[0].data))) begin
        failures++;
        if (failures < 5) $display("FAIL: cycle %0d size %0d", i, model.size());
      end
      wb_ready = ($urandom_range(0, 3) == 0) || (i > 3500);
      push = !full && ($urandom_range(0, 1) == 1);
      push_data.valid = 1'b1;
      push_data.line  = laddr_t'($urandom);
      for (int w = 0; w < LINE_BITS / 32; w++) push_data.data[w*32 +: 32] = $urandom;
      @(posedge clk);
      if (wb_ready && model.size() != 0) void'(model.pop_front());
      if (push) model.push_back(push_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
