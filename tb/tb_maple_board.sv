// tb_maple_board: end-to-end test of the coherent memory system.
//
// Small configuration (2 cores + host, short slots, short memory latency,
// 4-set caches so lines are evicted often). Every cache runs a random
// stream of accesses to a few shared lines, so lines bounce between caches.
// The data caches write only their own 64-bit word of each shared line
// (false sharing), with a per-writer increasing sequence number; that gives
// exact expectations without a full memory-order model:
//   * a read of the reader's own word returns the last value it stored;
//   * a read of another writer's word never goes back in time (per reader,
//     writer and line) and never shows a value not yet stored.
// It also counts each mechanism of the design (GetS, GetM, upgrade, snoop
// write-back, replacement write-back, remembered remote requests in the
// IS_D_I/IM_D_S/IM_D_I states, requests blocked on an owner in the PRLUT,
// simultaneous write-backs accepted round robin) and fails if one never
// happened. Latency of every access is checked against the closed-form
// worst-case bound of the dedicated-bus organisation plus a small constant
// for the cache pipeline.
module tb_maple_board;
  import maple_pkg::*;

  localparam int N_CORES = 2;
  localparam int NC      = 2 * N_CORES + 1;
  localparam int SLOT_W  = 16;
  localparam int L_ACC   = 10;
  localparam int SETS    = 4;
  localparam int NOPS    = 1500;
  localparam int NLINES  = 24;         // shared lines, 6 per set: evictions
  // Latency bound of this design at these sizes: one TDM period to reach
  // the own slot, then at most 4N+2 memory operations of L_ACC+2 cycles
  // (the closed-form bound's operations without its overlap credit), plus
  // cache pipeline cycles. The closed form itself is checked at full size.
  localparam int WCL = NC * SLOT_W + (4 * N_CORES + 2) * (L_ACC + 2) + 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  core_req_t        crq [NC];
  logic [NC-1:0]    crq_ready;
  core_resp_t       crs [NC];
  bus_req_t         bus_mon;

  maple_board #(.N_CORES(N_CORES), .SLOT_W(SLOT_W), .L_ACC(L_ACC), .SETS(SETS),
                .MEM_LINES(256)) dut (.*);

  int checks = 0, failures = 0;
  int n_gets = 0, n_getm = 0, n_snoop_wb = 0, n_repl_wb = 0, n_upgrade = 0;
  int n_isdi = 0, n_imds = 0, n_imdi = 0, n_blocked = 0, n_multi_wb = 0, n_hits = 0;
  int max_lat = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  int done_cnt = 0;

  // writer index of data caches (word slot in a line): D$ of core c -> c, host -> N_CORES
  function automatic int writer_of(int cid);
    return (cid == NC - 1) ? N_CORES : cid / 2;
  endfunction
  function automatic bit is_icache(int cid);
    return cid < 2 * N_CORES && (cid % 2) == 0;
  endfunction

  int unsigned issued [N_CORES+1];              // last sequence issued per writer
  int unsigned seen   [NC][N_CORES+1][NLINES];  // last sequence seen per reader

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  for (genvar g = 0; g < NC; g++) begin : g_drv
    initial begin
      int unsigned own_last [NLINES];
      int unsigned r;
      foreach (own_last[k]) own_last[k] = 0;
      crq[g] = '0;
      @(posedge rst_n);
      wait (dut.u_mem.req_ready);
      for (int op = 0; op < NOPS; op++) begin
        int ln, wsel, t0, lat;
        bit st;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        ln   = $urandom_range(0, NLINES - 1);
        st   = !is_icache(g) && ($urandom_range(0, 99) < 45);
        wsel = st ? writer_of(g) : $urandom_range(0, N_CORES);
        @(negedge clk);
        while (!crq_ready[g]) @(negedge clk);
        crq[g].valid = 1'b1;
        crq[g].we    = st;
        crq[g].addr  = addr_t'(ln * LINE_BYTES + wsel * 8);
        crq[g].wstrb = '1;
        if (st) begin
          issued[writer_of(g)]++;
          own_last[ln] = issued[writer_of(g)];
          crq[g].wdata = {32'(writer_of(g)), own_last[ln]};
        end else crq[g].wdata = '0;
        t0 = cyc;
        @(negedge clk);
        crq[g].valid = 1'b0;
        while (!crs[g].valid) @(negedge clk);
        lat = cyc - t0;
        if (lat > max_lat) max_lat = lat;
        check(lat <= WCL, $sformatf("cache %0d latency %0d above bound %0d", g, lat, WCL));
        if (!st) begin
          r = crs[g].rdata[31:0];
          if (crs[g].rdata == '0) begin
            check(seen[g][wsel][ln] == 0, $sformatf("cache %0d line %0d word %0d went back to 0", g, ln, wsel));
          end else begin
            check(int'(crs[g].rdata[63:32]) == wsel, $sformatf("cache %0d read word of wrong writer", g));
            if (!is_icache(g) && wsel == writer_of(g))
              check(r == own_last[ln], $sformatf("cache %0d own word line %0d: got %0d want %0d", g, ln, r, own_last[ln]));
            else begin
              check(r >= seen[g][wsel][ln], $sformatf("cache %0d line %0d writer %0d: %0d after %0d", g, ln, wsel, r, seen[g][wsel][ln]));
              check(r <= issued[wsel], $sformatf("cache %0d saw unissued value", g));
            end
            seen[g][wsel][ln] = r;
          end
        end
      end
      done_cnt++;
    end
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    int nwb;
    if (bus_mon.valid && bus_mon.msg == MSG_GETS) n_gets++;
    if (bus_mon.valid && bus_mon.msg == MSG_GETM) n_getm++;
    nwb = 0;
    for (int i = 0; i < NC; i++) nwb += int'(dut.u_smc.wb[i].valid);
    if (nwb > 1 && dut.u_smc.take_wb) n_multi_wb++;
    if (|(dut.u_smc.ent_valid & dut.u_smc.blocked)) n_blocked++;
  end

  for (genvar g = 0; g < NC; g++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_cache[g].u_cache.snoop_act && dut.g_cache[g].u_cache.s_wback) n_snoop_wb++;
      if (dut.g_cache[g].u_cache.snoop_act && dut.g_cache[g].u_cache.s_next == ST_IS_D_I &&
          dut.g_cache[g].u_cache.st_q[dut.g_cache[g].u_cache.s_idx][dut.g_cache[g].u_cache.s_way] != ST_IS_D_I) n_isdi++;
      if (dut.g_cache[g].u_cache.snoop_act && dut.g_cache[g].u_cache.s_next == ST_IM_D_S) n_imds++;
      if (dut.g_cache[g].u_cache.snoop_act && dut.g_cache[g].u_cache.s_next == ST_IM_D_I &&
          dut.g_cache[g].u_cache.st_q[dut.g_cache[g].u_cache.s_idx][dut.g_cache[g].u_cache.s_way] != ST_IM_D_I) n_imdi++;
      if (dut.g_cache[g].u_cache.local_go && dut.g_cache[g].u_cache.l_miss && dut.g_cache[g].u_cache.r_wback) n_repl_wb++;
      if (dut.g_cache[g].u_cache.local_go && dut.g_cache[g].u_cache.fsm_q == 2'd1 &&
          dut.g_cache[g].u_cache.l_hit && dut.g_cache[g].u_cache.l_respond) n_hits++;
      if (dut.g_cache[g].u_cache.local_go && dut.g_cache[g].u_cache.fsm_q == 2'd1 &&
          dut.g_cache[g].u_cache.l_state == ST_S && dut.g_cache[g].u_cache.l_ev == EV_STORE) n_upgrade++;
    end
  end

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: mechanism never happened: %s", what); end
  endtask

  initial begin
    foreach (issued[w]) issued[w] = 0;
    foreach (seen[a, b, c]) seen[a][b][c] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (done_cnt == NC);
    repeat (20) @(posedge clk);
    $display("GetS=%0d GetM=%0d hits=%0d upgrades=%0d snoop_wb=%0d repl_wb=%0d IS_D_I=%0d IM_D_S=%0d IM_D_I=%0d blocked_cycles=%0d multi_wb=%0d max_latency=%0d bound=%0d",
             n_gets, n_getm, n_hits, n_upgrade, n_snoop_wb, n_repl_wb, n_isdi, n_imds, n_imdi, n_blocked, n_multi_wb, max_lat, WCL);
    need(n_gets, "GetS");           need(n_getm, "GetM");
    need(n_hits, "cache hit");      need(n_upgrade, "store to S line");
    need(n_snoop_wb, "snoop write-back"); need(n_repl_wb, "replacement write-back");
    need(n_isdi, "IS_D_I");         need(n_imds, "IM_D_S");   need(n_imdi, "IM_D_I");
    need(n_blocked, "PRLUT request blocked on owner");
    need(n_multi_wb, "simultaneous write-backs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
