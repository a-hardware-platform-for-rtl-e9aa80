// tb_main_memory: constant-latency main memory.
//
// Checks that the memory is not ready while it clears itself after reset
// (MEM_LINES cycles), that every line then reads as zero until written, that
// random reads return the last value written (model array), and that done
// comes exactly L_ACC cycles after each request is taken.
// The constant latency follows the platform's simulation memory; the
// self-clearing and the reduced sizes here are this design's choices.
module tb_main_memory;
  import maple_pkg::*;
  localparam int ML = 64, LA = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_we, req_ready, done;
  laddr_t req_line;
  line_t req_data, rdata;
  main_memory #(.MEM_LINES(ML), .L_ACC(LA)) dut (.*);

  line_t model [ML];
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", m); end
  endtask

  initial begin
    int t_rdy;
    req_valid = 0; req_we = 0; req_line = '0; req_data = '0;
    foreach (model[i]) model[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    t_rdy = cyc;
    while (!req_ready) @(negedge clk);
    chk(cyc - t_rdy >= ML, $sformatf("ready after %0d cycles, before clearing", cyc - t_rdy));
    for (int n = 0; n < 400; n++) begin
      int t0, ln;
      bit we;
      line_t d;
      ln = $urandom_range(0, ML - 1);
      we = $urandom_range(0, 1);
      for (int w = 0; w < LINE_BITS / 32; w++) d[w*32 +: 32] = $urandom;
      req_valid = 1; req_we = we; req_line = laddr_t'(ln); req_data = d;
      t0 = cyc;
      @(negedge clk);
      req_valid = 0;
      req_data = '1;   // taken at the request: later changes must not matter
      while (!done) @(negedge clk);
      chk(cyc - t0 == LA, $sformatf("latency %0d, want %0d", cyc - t0, LA));
      if (we) model[ln] = d;
      else chk(rdata == model[ln], $sformatf("read line %0d mismatch", ln));
      chk(req_ready, "ready after done");
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
