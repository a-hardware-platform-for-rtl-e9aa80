// tb_request_bus: requesters with queues of pending requests on a TDM bus.
//
// Each requester offers the head of its own queue and pops it when granted,
// like a PR buffer. Checks: a grant goes only to the owner of the current
// slot (slot k of SLOT_W cycles belongs to requester k mod N), at most once
// per slot; the broadcast appears exactly one cycle after the grant with the
// granted requester's id, type and line; nothing is broadcast otherwise;
// every request is broadcast within one TDM period (N*SLOT_W cycles) of
// reaching the head of its queue.
module tb_request_bus;
  import maple_pkg::*;
  localparam int N = 3, SLOT_W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req_valid, gnt;
  pr_entry_t req [N];
  bus_req_t bus;
  request_bus #(.N(N), .SLOT_W(SLOT_W), .POLICY(ARB_TDM)) dut (.*);

  pr_entry_t q [N][$];
  int head_since [N];
  int checks = 0, failures = 0, nbcast = 0;
  bit exp_valid; bus_req_t exp;

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", m); end
  endtask

  initial begin
    exp_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // new requests
      for (int i = 0; i < N; i++) if ($urandom_range(0, 9) == 0 && q[i].size() < 3) begin
        pr_entry_t e;
        e.msg = $urandom_range(0, 1) ? MSG_GETS : MSG_GETM;
        e.line = laddr_t'($urandom);
        if (q[i].size() == 0) head_since[i] = cyc;
        q[i].push_back(e);
      end
      for (int i = 0; i < N; i++) begin
        req_valid[i] = q[i].size() != 0;
        req[i] = req_valid[i] ? q[i][0] : '0;
      end
      #1;
      // broadcast of the previous cycle's grant
      chk(bus.valid == exp_valid, "broadcast valid");
      if (exp_valid) begin
        chk(bus.src == exp.src && bus.msg == exp.msg && bus.line == exp.line, "broadcast content");
        nbcast++;
      end
      // this cycle's grant
      exp_valid = 0;
      chk($countones(gnt) <= 1, "one-hot grant");
      for (int i = 0; i < N; i++) begin
        if (gnt[i]) begin
          chk(i == (cyc / SLOT_W) % N, "grant outside own slot");
          chk(req_valid[i], "grant without request");
          chk(cyc - head_since[i] <= N * SLOT_W, "request waited more than one period");
          exp_valid = 1; exp.src = cid_t'(i); exp.msg = q[i][0].msg; exp.line = q[i][0].line;
          void'(q[i].pop_front());
          head_since[i] = cyc + 1;
        end
      end
      @(negedge clk);
    end
    chk(nbcast > 100, "enough broadcasts");
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
