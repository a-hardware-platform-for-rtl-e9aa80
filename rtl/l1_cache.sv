// l1_cache: private L1 cache with its coherence controller.
//
// A WAYS-way set-associative cache of 64-byte lines serving one requester
// (a core's instruction or data port, or the host) with 64-bit words. The
// cache is blocking: it holds one core access at a time in its one-entry
// MSHR (miss status holding register).
//
// How it works:
//   * Tags and coherence states sit in flip-flop arrays so that a snooped
//     bus request and the core access can both be looked up in one cycle;
//     line data sit in a memory array.
//   * A core access that hits (load in S/M, store in M) completes at once. A
//     miss picks a victim way (an invalid way first, else round robin); a
//     modified victim goes into the PWB buffer. The new tag is installed in
//     the victim way in a transient state (IS_AD/IM_AD) and a GetS/GetM goes
//     into the PR buffer. A store to a line in S is treated as a GetM miss on
//     the same way.
//   * The PR head waits for the cache's turn on the request bus. When the
//     own request is seen on the bus the line moves to IS_D/IM_D.
//   * Every bus broadcast is snooped: a remote GetS turns M into S, a remote
//     GetM invalidates S and M; a modified line given up is pushed into the
//     PWB buffer and leaves at once on the cache's own write-back bus (the
//     dedicated data bus needs no slot). Remote requests seen while waiting
//     for data are remembered in the transient state (IS_D_I, IM_D_S, IM_D_I).
//   * The data response arrives on the cache's own response bus, is latched,
//     and the coherence table decides the final state; for IM_D_S/IM_D_I the
//     store is merged and the line is written back right away.
//   * In a cycle where a snooped request hits a line, the core-side step
//     waits one cycle, so snoop and core never update a line together.
// The coherence rules and the per-cache PR and PWB buffers follow the
// predictable MSI scheme the platform uses; blocking operation, the victim
// choice and the one-cycle snoop priority are this design's choices.
//
// Interface and timing:
//   crq/crq_ready  core request, taken in a cycle where crq_ready is high
//   crs            core response, one cycle valid; a hit answers 3 cycles
//                  after the request is taken (lookup, then registered reply)
//   pr_valid/pr_req/pr_gnt   PR head offered to the request bus, popped on grant
//   bus            request-bus broadcast (snooped, including the own request)
//   wb/wb_ready    dedicated write-back data bus to shared memory
//   resp           dedicated data-response bus from shared memory
module l1_cache
  import maple_pkg::*;
#(
  parameter int CID       = 0,    // id of this cache on the request bus
  parameter int SETS      = 64,
  parameter int WAYS      = 4,
  parameter bit READ_ONLY = 1'b0, // instruction cache: loads only
  parameter int PWB_DEPTH = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  // core side
  input  core_req_t  crq,
  output logic       crq_ready,
  output core_resp_t crs,
  // request bus
  output logic       pr_valid,
  output pr_entry_t  pr_req,
  input  logic       pr_gnt,
  input  bus_req_t   bus,
  // dedicated data buses
  output dbus_t      wb,
  input  logic       wb_ready,
  input  dbus_t      resp
);

  localparam int IDX_W = $clog2(SETS);
  localparam int TAG_W = LADDR_W - IDX_W;
  localparam int WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [WAY_W-1:0] way_t;

  typedef enum logic [1:0] {C_IDLE, C_LOOKUP, C_WAIT, C_FILL} cfsm_e;

  // ---------------------------------------------------------------- storage
  tag_t    tag_q  [SETS][WAYS];
  cstate_e st_q   [SETS][WAYS];
  line_t   data_q [SETS*WAYS];

  // ---------------------------------------------------------------- MSHR
  cfsm_e     fsm_q;
  core_req_t mshr_q;
  way_t      mway_q;
  line_t     fill_q;
  way_t      vict_ptr_q;

  laddr_t l_line;
  idx_t   l_idx;
  tag_t   l_tag;
  assign l_line = mshr_q.addr[ADDR_W-1:OFFS_W];
  assign l_idx  = l_line[IDX_W-1:0];
  assign l_tag  = l_line[LADDR_W-1:IDX_W];

  function automatic int slot(idx_t i, way_t w);
    return int'(i) * WAYS + int'(w);
  endfunction

  // ---------------------------------------------------------------- snoop
  idx_t    s_idx;
  tag_t    s_tag;
  logic    s_hit;
  way_t    s_way;
  cevent_e s_ev;
  cstate_e s_next;
  logic    s_wback, s_legal;
  logic    s_respond, s_prins, s_fill, s_store;
  msg_e    s_prmsg;

  assign s_idx = bus.line[IDX_W-1:0];
  assign s_tag = bus.line[LADDR_W-1:IDX_W];

  always_comb begin
    s_hit = 1'b0;
    s_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!s_hit && st_q[s_idx][w] != ST_I && tag_q[s_idx][w] == s_tag) begin
        s_hit = 1'b1;
        s_way = way_t'(w);
      end
    end
  end

  always_comb begin
    if (32'(bus.src) == CID)       s_ev = EV_OWN;
    else if (bus.msg == MSG_GETS)  s_ev = EV_OTHER_S;
    else                           s_ev = EV_OTHER_M;
  end

  pmsi_cache_table u_snoop_tbl (
    .state(st_q[s_idx][s_way]), .event_i(s_ev), .next(s_next),
    .respond(s_respond), .pr_insert(s_prins), .pr_msg(s_prmsg),
    .fill(s_fill), .store(s_store), .wback(s_wback), .legal(s_legal)
  );

  logic snoop_act;
  assign snoop_act = bus.valid && (bus.msg != MSG_NONE) && s_hit;

  // ---------------------------------------------------------------- local
  logic l_hit;
  way_t l_hway;
  always_comb begin
    l_hit  = 1'b0;
    l_hway = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!l_hit && st_q[l_idx][w] != ST_I && tag_q[l_idx][w] == l_tag) begin
        l_hit  = 1'b1;
        l_hway = way_t'(w);
      end
    end
  end

  // victim: first invalid way, else the round-robin pointer
  logic v_free;
  way_t v_way;
  always_comb begin
    v_free = 1'b0;
    v_way  = vict_ptr_q;
    for (int w = 0; w < WAYS; w++) begin
      if (!v_free && st_q[l_idx][w] == ST_I) begin
        v_free = 1'b1;
        v_way  = way_t'(w);
      end
    end
  end

  way_t    l_way;
  cstate_e l_state;
  cevent_e l_ev;
  always_comb begin
    if (fsm_q == C_FILL) begin
      l_way   = mway_q;
      l_state = st_q[l_idx][mway_q];
      l_ev    = EV_DATA;
    end else begin
      l_way   = l_hit ? l_hway : v_way;
      l_state = l_hit ? st_q[l_idx][l_hway] : ST_I;
      l_ev    = mshr_q.we ? EV_STORE : EV_LOAD;
    end
  end

  cstate_e l_next;
  logic    l_respond, l_prins, l_fill, l_store, l_wback, l_legal;
  msg_e    l_prmsg;
  pmsi_cache_table u_local_tbl (
    .state(l_state), .event_i(l_ev), .next(l_next),
    .respond(l_respond), .pr_insert(l_prins), .pr_msg(l_prmsg),
    .fill(l_fill), .store(l_store), .wback(l_wback), .legal(l_legal)
  );

  // replacement of the victim on a miss
  cstate_e r_next;
  logic    r_respond, r_prins, r_fill, r_store, r_wback, r_legal;
  msg_e    r_prmsg;
  pmsi_cache_table u_repl_tbl (
    .state(st_q[l_idx][v_way]), .event_i(EV_REPLACE), .next(r_next),
    .respond(r_respond), .pr_insert(r_prins), .pr_msg(r_prmsg),
    .fill(r_fill), .store(r_store), .wback(r_wback), .legal(r_legal)
  );

  logic local_go, l_miss;
  assign local_go = (fsm_q == C_LOOKUP || fsm_q == C_FILL) && !snoop_act;
  assign l_miss   = (fsm_q == C_LOOKUP) && !l_hit;

  // new line contents: the arrived line (even when it is not kept, as in
  // IS_D_I) or the stored line, with the store merged
  line_t base_line, new_line;
  always_comb begin
    base_line = (fsm_q == C_FILL) ? fill_q : data_q[slot(l_idx, l_way)];
    new_line  = base_line;
    if (l_store) begin
      for (int b = 0; b < WORD_BITS/8; b++) begin
        if (mshr_q.wstrb[b])
          new_line[int'(mshr_q.addr[OFFS_W-1:3])*WORD_BITS + b*8 +: 8] = mshr_q.wdata[b*8 +: 8];
      end
    end
  end

  // ---------------------------------------------------------------- buffers
  logic      pr_push, pr_full;
  pr_entry_t pr_push_data;
  assign pr_push           = local_go && l_prins;
  assign pr_push_data.msg  = l_prmsg;
  assign pr_push_data.line = l_line;

  pr_buffer #(.DEPTH(2)) u_pr (
    .clk, .rst_n,
    .push(pr_push), .push_data(pr_push_data), .pop(pr_gnt),
    .req_valid(pr_valid), .req(pr_req), .full(pr_full)
  );

  logic  wb_push, pwb_full;
  dbus_t wb_data;
  always_comb begin
    wb_push = 1'b0;
    wb_data = '0;
    wb_data.valid = 1'b1;
    if (snoop_act && s_wback) begin
      wb_push      = 1'b1;
      wb_data.line = bus.line;
      wb_data.data = data_q[slot(s_idx, s_way)];
    end else if (local_go && l_miss && r_wback) begin
      wb_push      = 1'b1;
      wb_data.line = {tag_q[l_idx][v_way], l_idx};
      wb_data.data = data_q[slot(l_idx, v_way)];
    end else if (local_go && l_wback) begin
      wb_push      = 1'b1;
      wb_data.line = l_line;
      wb_data.data = new_line;
    end
  end

  pwb_buffer #(.DEPTH(PWB_DEPTH)) u_pwb (
    .clk, .rst_n,
    .push(wb_push), .push_data(wb_data),
    .wb_ready(wb_ready), .wb(wb), .full(pwb_full)
  );

  // ---------------------------------------------------------------- state
  assign crq_ready = (fsm_q == C_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fsm_q      <= C_IDLE;
      mshr_q     <= '0;
      mway_q     <= '0;
      vict_ptr_q <= '0;
      crs        <= '0;
      for (int i = 0; i < SETS; i++)
        for (int w = 0; w < WAYS; w++)
          st_q[i][w] <= ST_I;
    end else begin
      crs.valid <= 1'b0;
      // snooped request
      if (snoop_act) st_q[s_idx][s_way] <= s_next;
      // core side
      unique case (fsm_q)
        C_IDLE: if (crq.valid) begin
          mshr_q <= crq;
          fsm_q  <= C_LOOKUP;
        end
        C_LOOKUP: if (local_go) begin
          st_q[l_idx][l_way] <= l_next;
          if (l_miss) begin
            tag_q[l_idx][l_way] <= l_tag;
            if (!v_free) vict_ptr_q <= vict_ptr_q + 1'b1;
          end
          mway_q <= l_way;
          if (l_respond) begin
            crs.valid <= 1'b1;
            crs.rdata <= new_line[int'(mshr_q.addr[OFFS_W-1:3])*WORD_BITS +: WORD_BITS];
            fsm_q     <= C_IDLE;
          end else begin
            fsm_q     <= C_WAIT;
          end
        end
        C_WAIT: if (resp.valid) fsm_q <= C_FILL;
        C_FILL: if (local_go) begin
          st_q[l_idx][l_way] <= l_next;
          crs.valid <= 1'b1;
          crs.rdata <= new_line[int'(mshr_q.addr[OFFS_W-1:3])*WORD_BITS +: WORD_BITS];
          fsm_q     <= C_IDLE;
        end
        default: fsm_q <= C_IDLE;
      endcase
    end
  end

  // tag and data arrays: no reset, read only under a valid state
  always_ff @(posedge clk) begin
    if (fsm_q == C_WAIT && resp.valid) fill_q <= resp.data;
    if (local_go && (l_fill || l_store)) data_q[slot(l_idx, l_way)] <= new_line;
  end

  // ---------------------------------------------------------------- checks
  assert property (@(posedge clk) disable iff (!rst_n)
                   (bus.valid && 32'(bus.src) == CID) |-> s_hit)
    else $error("l1_cache %0d: own request seen without a transient line", CID);
  assert property (@(posedge clk) disable iff (!rst_n) snoop_act |-> s_legal)
    else $error("l1_cache %0d: undefined snoop transition", CID);
  assert property (@(posedge clk) disable iff (!rst_n) local_go |-> l_legal)
    else $error("l1_cache %0d: undefined local transition", CID);
  assert property (@(posedge clk) disable iff (!rst_n) resp.valid |-> fsm_q == C_WAIT)
    else $error("l1_cache %0d: unexpected data response", CID);
  assert property (@(posedge clk) disable iff (!rst_n)
                   (fsm_q == C_LOOKUP) |-> !(READ_ONLY && mshr_q.we))
    else $error("l1_cache %0d: store to a read-only cache", CID);
  assert property (@(posedge clk) disable iff (!rst_n) !(pr_push && pr_full))
    else $error("l1_cache %0d: PR buffer full", CID);
  assert property (@(posedge clk) disable iff (!rst_n) !(wb_push && pwb_full && !wb_ready))
    else $error("l1_cache %0d: PWB buffer full", CID);
  assert property (@(posedge clk) disable iff (!rst_n) (local_go && l_miss) |-> r_legal)
    else $error("l1_cache %0d: undefined replacement", CID);

endmodule
