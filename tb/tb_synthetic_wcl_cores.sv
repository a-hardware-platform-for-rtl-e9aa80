// tb_synthetic_wcl_cores: synthetic worst-case workload at 2 and 8 cores.
//
// Two copies of the top run side by side, one built with 2 cores and one
// with 8 (plus the host cache in each), both with the default slot width of
// 256 cycles and 150-cycle memory. Each copy repeats the worst case of the
// dedicated-bus latency analysis, as the 4-core full-size test does:
//   1. every core's data cache stores to four fresh lines of one set, so the
//      set is full of dirty lines;
//   2. then, in the same cycle, every core's data cache stores to line A
//      (same set, so each miss evicts a dirty line) and every instruction
//      cache reads a fresh line B.
// The host cache stays off these lines. Every store to A must finish within
// the closed-form bound (2N+1)S + (4N - floor((2N+1)S/L) + 2) L, which is
// 1580 cycles for 2 cores and 5102 for 8. The worst observed latency must
// also exceed 2NL, to show that the write-backs really queued up. At the end
// the host reads A, whose words must hold what each core wrote last.
// The memory is made 8192 lines deep here so that the fill lines of the
// 8-core run stay distinct; the core count and memory depth are the only
// parameters changed from the top's defaults.
// The workload shape (all cores hit one line at the same time, the host
// staying away) follows the platform's synthetic benchmark; the dirty-set
// preload, the line numbers and the 2NL queueing check are this test's own.
module tb_synthetic_wcl_cores;
  import maple_pkg::*;

  localparam int S      = 256;
  localparam int L      = 150;
  localparam int SETS   = 64;
  localparam int ROUNDS = 2;
  localparam int SET_X  = 5;
  localparam int LINE_A = SET_X;
  localparam int ML     = 8192;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  logic [1:0] done = '0;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  for (genvar gi = 0; gi < 2; gi++) begin : g_cfg
    localparam int N   = (gi == 0) ? 2 : 8;
    localparam int NC  = 2 * N + 1;
    localparam int WCL = NC * S + (4 * N - (NC * S) / L + 2) * L;

    core_req_t     crq [NC];
    logic [NC-1:0] crq_ready;
    core_resp_t    crs [NC];
    bus_req_t      bus_mon;
    int max_lat = 0, n_repl_wb = 0, n_snoop_wb = 0;

    maple_board #(.N_CORES(N), .MEM_LINES(ML)) dut (.*);

    // one access on cache c; returns latency and read data
    task automatic access(int c, bit we, int line, int word, word_t wd, output int lat, output word_t rd);
      int t0;
      @(negedge clk);
      while (!crq_ready[c]) @(negedge clk);
      crq[c].valid = 1; crq[c].we = we; crq[c].addr = addr_t'(line * LINE_BYTES + word * 8);
      crq[c].wdata = wd; crq[c].wstrb = '1;
      t0 = cyc;
      @(negedge clk);
      crq[c].valid = 0;
      while (!crs[c].valid) @(negedge clk);
      lat = cyc - t0;
      rd = crs[c].rdata;
    endtask

    for (genvar g = 0; g < NC; g++) begin : g_mon
      always @(posedge clk) if (rst_n) begin
        if (dut.g_cache[g].u_cache.local_go && dut.g_cache[g].u_cache.l_miss && dut.g_cache[g].u_cache.r_wback) n_repl_wb++;
        if (dut.g_cache[g].u_cache.snoop_act && dut.g_cache[g].u_cache.s_wback) n_snoop_wb++;
      end
    end

    initial begin
      foreach (crq[i]) crq[i] = '0;
      wait (rst_n);
      wait (dut.u_mem.req_ready);
      for (int r = 1; r <= ROUNDS; r++) begin
        for (int c = 0; c < N; c++) begin
          automatic int cc = c;
          automatic int rr = r;
          fork begin
            int lat; word_t rd;
            for (int k = 0; k < 4; k++)
              access(2 * cc + 1, 1, SET_X + SETS * (1 + (rr - 1) * 4 * N + cc * 4 + k), 0, word_t'(k), lat, rd);
          end join_none
        end
        wait fork;
        for (int c = 0; c < N; c++) begin
          automatic int cc = c;
          automatic int rr = r;
          fork begin
            int lat; word_t rd;
            access(2 * cc + 1, 1, LINE_A, cc, {32'(cc), 32'(rr)}, lat, rd);
            if (lat > max_lat) max_lat = lat;
            chk(lat <= WCL, $sformatf("%0d cores: round %0d core %0d latency %0d above bound %0d", N, rr, cc, lat, WCL));
          end join_none
          fork begin
            int lat; word_t rd;
            access(2 * cc, 0, 2000 + rr * 8 + cc, 0, '0, lat, rd);
            chk(rd == '0, "instruction read of untouched line");
          end join_none
        end
        wait fork;
      end
      for (int c = 0; c < N; c++) begin
        int lat; word_t rd;
        access(NC - 1, 0, LINE_A, c, '0, lat, rd);
        chk(rd == {32'(c), 32'(ROUNDS)}, $sformatf("%0d cores: A word %0d = %h", N, c, rd));
      end
      chk(max_lat > 2 * N * L, $sformatf("%0d cores: worst latency %0d shows no queueing", N, max_lat));
      chk(n_repl_wb >= ROUNDS * N - N, $sformatf("%0d cores: dirty evictions %0d", N, n_repl_wb));
      chk(n_snoop_wb > 0, $sformatf("%0d cores: no write-backs on remote GetM", N));
      $display("%0d cores: max store latency %0d cycles, bound %0d, dirty evictions %0d, snoop write-backs %0d",
               N, max_lat, WCL, n_repl_wb, n_snoop_wb);
      done[gi] = 1'b1;
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
