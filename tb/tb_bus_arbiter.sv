// tb_bus_arbiter: the four arbitration policies against a cycle model.
//
// Four arbiters (RR, TDM, weighted TDM, weighted TDM with round-robin slack
// slots) see the same random request vectors. A model written from the
// policy definitions predicts every cycle's grant: TDM slots of SLOT_W
// cycles, one grant per slot to the slot owner; the weighted table
// {0,1,0,2} gives requester 0 two of four slots; a slot whose owner has no
// request in its first cycle is slack and goes once to the round-robin
// winner. Also counts that each kind of grant occurred.
// The policy list follows the platform; their exact slot rules and the
// small sizes used here (3 requesters, 4-cycle slots) are this design's.
module tb_bus_arbiter;
  import maple_pkg::*;
  localparam int N = 3, SLOT_W = 4, NS_W = 4;
  localparam logic [NS_W*8-1:0] SCHED = 32'h02_00_01_00;  // slots: 0,1,0,2

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req;
  logic gv [4];
  cid_t gi [4];

  bus_arbiter #(.N(N), .SLOT_W(SLOT_W), .POLICY(ARB_RR))      u_rr   (.clk, .rst_n, .req, .gnt_valid(gv[0]), .gnt_idx(gi[0]));
  bus_arbiter #(.N(N), .SLOT_W(SLOT_W), .POLICY(ARB_TDM))     u_tdm  (.clk, .rst_n, .req, .gnt_valid(gv[1]), .gnt_idx(gi[1]));
  bus_arbiter #(.N(N), .SLOT_W(SLOT_W), .POLICY(ARB_WTDM), .NSLOTS(NS_W), .SCHED(SCHED))
                                                               u_wtdm (.clk, .rst_n, .req, .gnt_valid(gv[2]), .gnt_idx(gi[2]));
  bus_arbiter #(.N(N), .SLOT_W(SLOT_W), .POLICY(ARB_WTDM_RR), .NSLOTS(NS_W), .SCHED(SCHED))
                                                               u_wrr  (.clk, .rst_n, .req, .gnt_valid(gv[3]), .gnt_idx(gi[3]));

  int checks = 0, failures = 0;
  int sched_tab [NS_W] = '{0, 1, 0, 2};
  int last [4];
  bit used [4];
  bit slack;
  int n_slack_grants = 0, n_owner_grants = 0, n_rr_grants = 0;

  function automatic int rr_pick(int l, logic [N-1:0] r);
    for (int k = 1; k <= N; k++) if (r[(l + k) % N]) return (l + k) % N;
    return -1;
  endfunction

  task automatic cmp(int a, bit ev, int ei);
    checks++;
    if (gv[a] != ev || (ev && int'(gi[a]) != ei)) begin
      failures++;
      if (failures < 8) $display("FAIL: arbiter %0d got %0d/%0d want %0d/%0d", a, gv[a], gi[a], ev, ei);
    end
  endtask

  initial begin
    req = '0;
    foreach (last[a]) begin last[a] = N - 1; used[a] = 0; end
    slack = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int pos, ts, ws, own_t, own_w, p;
      bit e; int ei;
      req = N'($urandom_range(0, (1 << N) - 1));
      if ($urandom_range(0, 3) == 0) req = '0;
      pos = cyc % SLOT_W;
      ts  = (cyc / SLOT_W) % N;
      ws  = (cyc / SLOT_W) % NS_W;
      if (pos == 0) foreach (used[a]) used[a] = 0;
      #1;
      // RR
      p = rr_pick(last[0], req);
      cmp(0, p >= 0, p);
      if (p >= 0) begin last[0] = p; n_rr_grants++; end
      // TDM
      own_t = ts;
      e = req[own_t] && !used[1];
      cmp(1, e, own_t);
      if (e) used[1] = 1;
      // WTDM
      own_w = sched_tab[ws];
      e = req[own_w] && !used[2];
      cmp(2, e, own_w);
      if (e) begin used[2] = 1; n_owner_grants++; end
      // WTDM + RR slack
      if (pos == 0) slack = !req[own_w];
      p = rr_pick(last[3], req);
      if (!used[3] && !slack && req[own_w]) begin e = 1; ei = own_w; end
      else if (!used[3] && slack && p >= 0) begin e = 1; ei = p; n_slack_grants++; end
      else begin e = 0; ei = 0; end
      cmp(3, e, ei);
      if (e) begin used[3] = 1; last[3] = ei; end
      @(negedge clk);
    end
    checks++;
    if (n_slack_grants == 0 || n_owner_grants == 0 || n_rr_grants == 0) begin
      failures++; $display("FAIL: a grant kind never happened");
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
