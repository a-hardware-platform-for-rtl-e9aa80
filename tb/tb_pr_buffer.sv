// tb_pr_buffer: random push/pop against a queue model of the PR buffer.
// Checks the offered head, req_valid and full every cycle.
// FIFO order follows the platform's PR buffer; depth and timing are this
// design's choices.
module tb_pr_buffer;
  import maple_pkg::*;
  localparam int DEPTH = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, req_valid, full;
  pr_entry_t push_data, req;
  pr_buffer #(.DEPTH(DEPTH)) dut (.*);

  pr_entry_t model [$];
  int checks = 0, failures = 0;

  initial begin
    push = 0; pop = 0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (req_valid != (model.size() != 0) || full != (model.size() == DEPTH) ||
          (req_valid && req != model[0])) begin
        failures++;
        if (failures < 5) $display("FAIL: cycle %0d size %0d", i, model.size());
      end
      pop  = req_valid && ($urandom_range(0, 1) == 1);
      push = (!full || pop) && ($urandom_range(0, 2) != 0);
      push_data.msg  = $urandom_range(0, 1) ? MSG_GETS : MSG_GETM;
      push_data.line = laddr_t'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
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
