// tb_synthetic_wcl: synthetic worst-case workload at full size.
//
// The top at its default parameters (4 cores + host, TDM slots of 256
// cycles, 150-cycle memory). Each round recreates the worst case of the
// dedicated-bus latency analysis:
//   1. every core's data cache stores to four fresh lines of one set, so the
//      set is full of dirty lines;
//   2. then, in the same cycle, every core's data cache stores to line A
//      (same set, so each miss evicts a dirty line) and every instruction
//      cache reads a fresh line B.
// The host cache stays off these lines, as in the document's synthetic
// runs. The latency of each store to A is measured and must not exceed the
// closed-form bound (2N+1)S + (4N - floor((2N+1)S/L) + 2) L = 2754 cycles.
// Each core writes its own word of A, so at the end the host reads A and
// every word must hold the last round number written by that core.
// The workload shape (all cores hit one line at the same time, the host
// staying away) follows the platform's synthetic benchmark; the dirty-set
// preload and the line numbers are this test's own. Line numbers stay below
// the memory depth, since the memory uses only the low line-address bits.
module tb_synthetic_wcl;
  import maple_pkg::*;

  localparam int N      = 4;      // the top's defaults
  localparam int NC     = 2 * N + 1;
  localparam int S      = 256;
  localparam int L      = 150;
  localparam int SETS   = 64;
  localparam int ROUNDS = 3;
  localparam int SET_X  = 5;
  localparam int LINE_A = SET_X;
  localparam int WCL    = NC * S + (4 * N - (NC * S) / L + 2) * L;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  core_req_t     crq [NC];
  logic [NC-1:0] crq_ready;
  core_resp_t    crs [NC];
  bus_req_t      bus_mon;

  maple_board dut (.*);

  int checks = 0, failures = 0, cyc = 0, max_lat = 0;
  int n_repl_wb = 0, n_snoop_wb = 0;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

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
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (dut.u_mem.req_ready);
    for (int r = 1; r <= ROUNDS; r++) begin
      // 1. fill the set with dirty lines
      for (int c = 0; c < N; c++) begin
        automatic int cc = c;
        automatic int rr = r;
        fork begin
          int lat; word_t rd;
          for (int k = 0; k < 4; k++)
            access(2 * cc + 1, 1, SET_X + SETS * (1 + (rr - 1) * 16 + cc * 4 + k), 0, word_t'(k), lat, rd);
        end join_none
      end
      wait fork;
      // 2. all data caches store to A, all instruction caches read B, same cycle
      for (int c = 0; c < N; c++) begin
        automatic int cc = c;
        automatic int rr = r;
        fork begin
          int lat; word_t rd;
          access(2 * cc + 1, 1, LINE_A, cc, {32'(cc), 32'(rr)}, lat, rd);
          if (lat > max_lat) max_lat = lat;
          chk(lat <= WCL, $sformatf("round %0d core %0d store latency %0d above bound %0d", rr, cc, lat, WCL));
        end join_none
        fork begin
          int lat; word_t rd;
          access(2 * cc, 0, 2000 + rr * 8 + cc, 0, '0, lat, rd);
          chk(rd == '0, "instruction read of untouched line");
        end join_none
      end
      wait fork;
    end
    // host reads every core's word of A
    for (int c = 0; c < N; c++) begin
      int lat; word_t rd;
      access(NC - 1, 0, LINE_A, c, '0, lat, rd);
      chk(rd == {32'(c), 32'(ROUNDS)}, $sformatf("A word %0d = %h", c, rd));
    end
    chk(n_repl_wb >= ROUNDS * N - N, $sformatf("dirty evictions %0d", n_repl_wb));
    chk(n_snoop_wb > 0, "write-backs on remote GetM");
    $display("synthetic workload: max store latency %0d cycles, bound %0d, dirty evictions %0d, snoop write-backs %0d",
             max_lat, WCL, n_repl_wb, n_snoop_wb);
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
