// tb_smc: shared memory controller with its main memory, directed scenarios.
//
//  1. GetS to a free line is answered on the requester's own response bus
//     with the memory contents, L_ACC + 2 cycles after the broadcast is
//     recorded (one memory read).
//  2. After a GetM, a GetS to the same line waits (blocked in the PRLUT)
//     until the new owner's write-back arrives, and is then answered with
//     the written-back data; a GetS to another line, broadcast later, is
//     answered first.
//  3. Two caches' write-backs offered in the same cycle are both accepted,
//     one after the other, and both reach memory.
//  4. Requests to one line are answered in broadcast order.
//  5. Random traffic: each cache issues GetS/GetM to a few lines, one at a
//     time; after a GetM it later writes the line back with fresh data, as
//     an owner giving the line up would. A reference model keeps the last
//     data written per line and the broadcast order per line. Every
//     response must carry that data, come in broadcast order for its line
//     and take at least L_ACC + 2 cycles.
// The scenarios follow the ordering rules of the platform's memory
// controller (broadcast order per line, write-backs taken round robin);
// the traffic mix is this test's own.
module tb_smc;
  import maple_pkg::*;
  localparam int NC = 3, ML = 64, LA = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t bus;
  dbus_t wb [NC], resp [NC];
  logic [NC-1:0] wb_ready;
  logic mem_req_valid, mem_req_we, mem_req_ready, mem_done;
  laddr_t mem_req_line;
  line_t mem_req_data, mem_rdata;

  smc #(.NC(NC), .MEM_LINES(ML)) dut (.*);
  main_memory #(.MEM_LINES(ML), .L_ACC(LA)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_we(mem_req_we), .req_line(mem_req_line),
    .req_data(mem_req_data), .req_ready(mem_req_ready), .done(mem_done), .rdata(mem_rdata));

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  // response log: order of (cache, line, data)
  int     rlog_c [$];
  laddr_t rlog_l [$];
  line_t  rlog_d [$];
  int     rlog_t [$];
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NC; i++) if (resp[i].valid) begin
      rlog_c.push_back(i); rlog_l.push_back(resp[i].line); rlog_d.push_back(resp[i].data);
      rlog_t.push_back(cyc);
    end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  // reference model for scenario 5
  localparam int RLINES = 6, RBASE = 40, ROPS = 150;
  bit    rnd_on = 0;
  line_t gold [ML];
  int    order [ML][$];
  int    bc_t [NC];
  int    n_rnd_resp = 0, n_rnd_blocked = 0;
  semaphore bus_sem = new(1);
  initial foreach (gold[i]) gold[i] = '0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NC; i++) if (wb[i].valid && wb_ready[i]) gold[wb[i].line] = wb[i].data;
    if (rnd_on) begin
      if (dut.blocked != '0) n_rnd_blocked++;
      for (int i = 0; i < NC; i++) if (resp[i].valid) begin
        n_rnd_resp++;
        chk(resp[i].data == gold[resp[i].line], $sformatf("random: cache %0d line %0d stale data", i, resp[i].line));
        chk(order[resp[i].line].size() > 0 && order[resp[i].line][0] == i,
            $sformatf("random: line %0d answered out of broadcast order (cache %0d)", resp[i].line, i));
        if (order[resp[i].line].size() > 0) void'(order[resp[i].line].pop_front());
        chk(cyc - bc_t[i] >= LA + 2, $sformatf("random: cache %0d answered after %0d cycles", i, cyc - bc_t[i]));
      end
    end
  end

  task automatic bcast(int src, msg_e m, int ln);
    @(negedge clk);
    bus.valid = 1; bus.msg = m; bus.src = cid_t'(src); bus.line = laddr_t'(ln);
    @(negedge clk);
    bus = '0;
  endtask

  task automatic wback(int c, int ln, line_t d);
    wb[c].valid = 1; wb[c].line = laddr_t'(ln); wb[c].data = d;
    @(posedge clk);
    while (!wb_ready[c]) @(posedge clk);
    @(negedge clk);
    wb[c] = '0;
  endtask

  function automatic line_t pat(int k);
    line_t d;
    for (int w = 0; w < LINE_BITS / 32; w++) d[w*32 +: 32] = 32'(k * 1000 + w);
    return d;
  endfunction

  initial begin
    int t0;
    bus = '0;
    foreach (wb[i]) wb[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (mem_req_ready);
    // 1. GetS to a free line
    bcast(0, MSG_GETS, 3);
    t0 = cyc;
    wait (rlog_c.size() == 1);
    chk(rlog_c[0] == 0 && rlog_l[0] == 3 && rlog_d[0] == '0, "scenario 1 response");
    chk(rlog_t[0] - t0 == LA + 2, $sformatf("scenario 1 latency %0d", rlog_t[0] - t0));
    // 2. GetM by 1, then GetS by 2 to the same line, then GetS by 0 to line 9
    bcast(1, MSG_GETM, 5);
    wait (rlog_c.size() == 2);
    chk(rlog_c[1] == 1 && rlog_l[1] == 5, "scenario 2 GetM answered");
    bcast(2, MSG_GETS, 5);
    bcast(0, MSG_GETS, 9);
    repeat (4 * LA) @(negedge clk);
    chk(rlog_c.size() == 3 && rlog_c[2] == 0 && rlog_l[2] == 9, "scenario 2 other line answered first");
    chk(dut.blocked != '0, "scenario 2 request blocked on owner");
    wback(1, 5, pat(5));
    wait (rlog_c.size() == 4);
    chk(rlog_c[3] == 2 && rlog_l[3] == 5 && rlog_d[3] == pat(5), "scenario 2 answered with written-back data");
    // 3. simultaneous write-backs (lines not owned: plain memory updates)
    fork
      wback(0, 20, pat(20));
      wback(2, 21, pat(21));
    join
    bcast(1, MSG_GETS, 20);
    bcast(1, MSG_GETS, 21);
    wait (rlog_c.size() == 6);
    chk(rlog_d[4] == pat(20) && rlog_d[5] == pat(21), "scenario 3 both write-backs in memory");
    // 4. per-line order
    bcast(0, MSG_GETS, 30);
    bcast(2, MSG_GETM, 30);
    bcast(1, MSG_GETS, 31);
    wait (rlog_c.size() == 8);
    chk(rlog_c[6] == 0 && rlog_c[7] == 2, "scenario 4 same-line order");
    repeat (3 * LA) @(negedge clk);
    chk(rlog_c.size() == 9 && rlog_c[8] == 1, "scenario 4 other line");
    // 5. random traffic against the reference model
    rnd_on = 1;
    for (int c = 0; c < NC; c++) begin
      automatic int cc = c;
      fork begin
        for (int k = 0; k < ROPS; k++) begin
          automatic int ln;
          automatic bit m;
          ln = RBASE + int'($urandom_range(RLINES - 1));
          m  = 1'($urandom_range(1));
          repeat ($urandom_range(3)) @(negedge clk);
          bus_sem.get(1);
          @(negedge clk);
          bus.valid = 1; bus.msg = m ? MSG_GETM : MSG_GETS; bus.src = cid_t'(cc); bus.line = laddr_t'(ln);
          order[ln].push_back(cc);
          bc_t[cc] = cyc + 1;
          @(negedge clk);
          bus = '0;
          bus_sem.put(1);
          @(posedge clk);
          while (!resp[cc].valid) @(posedge clk);
          @(negedge clk);
          if (m) begin
            repeat ($urandom_range(2 * LA)) @(negedge clk);
            wback(cc, ln, {16{$urandom}});
          end
        end
      end join_none
    end
    wait fork;
    rnd_on = 0;
    chk(n_rnd_resp == NC * ROPS, $sformatf("random: %0d responses", n_rnd_resp));
    chk(n_rnd_blocked > 0, "random: no request ever waited for an owner");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
