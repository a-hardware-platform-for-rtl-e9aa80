// tb_l1_cache: one data cache against a model of the bus and the memory.
//
// The testbench plays the arbiter (grants the PR head after a random wait and
// broadcasts it one cycle later), the shared memory (answers the cache's own
// GetS/GetM with the line from a model memory once the cache has no
// write-back pending, takes write-backs with random back-pressure) and a
// remote cache (random GetS/GetM broadcasts to the same lines, also timed to
// land while the cache waits for data). The remote side never writes, so
// every load must return the value of a golden byte memory that tracks the
// core's stores. Also checks: a hit answers in a fixed 2 cycles, a
// write-back caused by a remote request or a replacement carries the current
// line, and that hits, misses, upgrades, snoop and replacement write-backs
// and the IS_D_I / IM_D_S / IM_D_I paths all occurred.
module tb_l1_cache;
  import maple_pkg::*;
  localparam int SETS = 4, NLINES = 24, CIDX = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  core_req_t crq;  logic crq_ready;  core_resp_t crs;
  logic pr_valid, pr_gnt, wb_ready;
  pr_entry_t pr_req;
  bus_req_t bus;
  dbus_t wb, resp;

  l1_cache #(.CID(CIDX), .SETS(SETS), .WAYS(4)) dut (.*);

  line_t golden [NLINES];   // what the system's data is
  line_t memm   [NLINES];   // what the memory model holds
  int checks = 0, failures = 0, cyc = 0;
  int n_hit = 0, n_miss = 0, n_upg = 0, n_swb = 0, n_rwb = 0, n_isdi = 0, n_imds = 0, n_imdi = 0;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", m); end
  endtask

  // ---- arbiter, broadcast, remote requests, memory responses
  bit        own_pending;  // own request broadcast, waiting for data
  int        own_t;
  pr_entry_t own_req;
  bit        bus_busy;
  initial begin
    pr_gnt = 0; bus = '0; resp = '0; own_pending = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      pr_gnt = 0; bus = '0; resp = '0;
      if (pr_valid && !own_pending && $urandom_range(0, 3) == 0) begin
        pr_gnt = 1;                       // grant now, broadcast next cycle
        own_req = pr_req;
        @(negedge clk);
        pr_gnt = 0;
        bus.valid = 1; bus.msg = own_req.msg; bus.src = cid_t'(CIDX); bus.line = own_req.line;
        own_pending = 1; own_t = cyc;
      end else if ($urandom_range(0, 30) == 0 || (own_pending && $urandom_range(0, 6) == 0)) begin
        bus.valid = 1; bus.src = cid_t'(2);
        bus.msg   = $urandom_range(0, 1) ? MSG_GETS : MSG_GETM;
        bus.line  = own_pending && $urandom_range(0, 1) ? own_req.line : laddr_t'($urandom_range(0, NLINES - 1));
      end else if (own_pending && cyc - own_t > 6 && !wb.valid) begin
        resp.valid = 1; resp.line = own_req.line; resp.data = memm[own_req.line];
        own_pending = 0;
      end
    end
  end

  // ---- write-backs
  always @(negedge clk) wb_ready = rst_n && ($urandom_range(0, 2) == 0);
  always @(posedge clk) if (rst_n && wb.valid && wb_ready) begin
    chk(wb.data == golden[wb.line], $sformatf("write-back of line %0d stale", wb.line));
    memm[wb.line] = wb.data;
  end

  // ---- mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.snoop_act && dut.s_wback) n_swb++;
    if (dut.local_go && dut.l_miss && dut.r_wback) n_rwb++;
    if (dut.snoop_act && dut.s_next == ST_IS_D_I) n_isdi++;
    if (dut.snoop_act && dut.s_next == ST_IM_D_S) n_imds++;
    if (dut.snoop_act && dut.s_next == ST_IM_D_I) n_imdi++;
  end

  // ---- core
  initial begin
    crq = '0;
    foreach (golden[i]) begin golden[i] = '0; memm[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int ln, ws, t0, lat, defer;
      bit st, was_hit, was_s;
      word_t d;
      logic [7:0] strb;
      ln = $urandom_range(0, NLINES - 1);
      ws = $urandom_range(0, WORDS - 1);
      st = $urandom_range(0, 1);
      d  = {$urandom, $urandom};
      strb = $urandom_range(1, 255);
      @(negedge clk);
      while (!crq_ready) @(negedge clk);
      crq.valid = 1; crq.we = st; crq.addr = addr_t'(ln * LINE_BYTES + ws * 8);
      crq.wdata = d; crq.wstrb = strb;
      t0 = cyc;
      @(negedge clk);
      crq.valid = 0;
      #1;
      // state of the line as the lookup sees it (a snoop may delay the lookup)
      defer = 0;
      while (!dut.local_go) begin defer++; @(negedge clk); #1; end
      was_hit = dut.l_hit && (st ? dut.l_state == ST_M : 1'b1);
      was_s   = dut.l_hit && dut.l_state == ST_S && st;
      while (!crs.valid) begin @(negedge clk); #1; end
      lat = cyc - t0;
      if (was_hit) n_hit++;
      else begin n_miss++; if (was_s) n_upg++; end
      if (was_hit) chk(lat == 2 + defer, $sformatf("hit latency %0d (deferred %0d)", lat, defer));
      if (st) begin
        for (int b = 0; b < 8; b++) if (strb[b]) golden[ln][ws*64 + b*8 +: 8] = d[b*8 +: 8];
      end else begin
        chk(crs.rdata == golden[ln][ws*64 +: 64], $sformatf("load line %0d word %0d: %h want %h",
            ln, ws, crs.rdata, golden[ln][ws*64 +: 64]));
      end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_upg == 0 || n_swb == 0 || n_rwb == 0 || n_isdi == 0 ||
        n_imds == 0 || n_imdi == 0) begin
      failures++;
      $display("FAIL: mechanism missing hit=%0d miss=%0d upg=%0d swb=%0d rwb=%0d isdi=%0d imds=%0d imdi=%0d",
               n_hit, n_miss, n_upg, n_swb, n_rwb, n_isdi, n_imds, n_imdi);
    end
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
