// smc: shared memory controller for the dedicated-data-bus organisation.
//
// Sits between the request bus, the per-cache dedicated data buses and the
// main memory, and serialises all main-memory work, one operation of L_ACC
// cycles at a time:
//   * Every GetS/GetM broadcast on the request bus is recorded in the PRLUT.
//   * An owner table holds, per memory line, whether a cache holds it
//     modified and which one. Serving a GetM makes the requester the owner;
//     a write-back from the owner clears it. A pending request to an owned
//     line is blocked until the owner's write-back has reached memory, so
//     memory always answers with up-to-date data.
//   * Write-backs arrive on the caches' own write-back buses at any time.
//     When several are waiting they are accepted in round-robin order and
//     written in the order accepted; write-backs go before requests.
//   * Otherwise the oldest eligible PRLUT request is served: the line is read
//     and sent on the requester's own response bus.
// Accepting simultaneous write-backs round robin and in order follows the
// platform description; the owner table, write-back priority and the strict
// one-operation-at-a-time memory use are this design's choices, the last
// matching the analysis that charges L_ACC per write-back and per response.
// Interface and timing: wb[i]/wb_ready[i] per cache (ready pulses for one
// cycle when a line is taken); resp[i] is valid for one cycle, L_ACC + 2
// cycles after a request is picked; mem_* drives main_memory.
module smc
  import maple_pkg::*;
#(
  parameter int NC        = 9,
  parameter int MEM_LINES = 4096
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bus_req_t      bus,
  input  dbus_t         wb [NC],
  output logic [NC-1:0] wb_ready,
  output dbus_t         resp [NC],
  // main memory
  output logic          mem_req_valid,
  output logic          mem_req_we,
  output laddr_t        mem_req_line,
  output line_t         mem_req_data,
  input  logic          mem_req_ready,
  input  logic          mem_done,
  input  line_t         mem_rdata
);

  localparam int MW = $clog2(MEM_LINES);
  localparam int IW = (NC > 1) ? $clog2(NC) : 1;  // cache index width

  typedef enum logic [1:0] {E_IDLE, E_WB, E_RD} eng_e;

  logic [MEM_LINES-1:0] owned_q;
  cid_t           owner_q [MEM_LINES];
  eng_e           eng_q;
  bus_req_t       cur_q;       // request being served
  cid_t           wb_last_q;   // last write-back bus accepted

  // ---------------------------------------------------------------- PRLUT
  logic [NC-1:0] ent_valid, blocked;
  laddr_t        ent_line [NC];
  logic          sel_valid, deq, pr_full;
  bus_req_t      sel;

  prlut #(.ENTRIES(NC)) u_prlut (
    .clk, .rst_n,
    .ins_valid(bus.valid), .ins(bus),
    .ent_valid, .ent_line, .blocked,
    .sel_valid, .sel, .deq, .full(pr_full)
  );

  always_comb
    for (int i = 0; i < NC; i++)
      blocked[i] = owned_q[ent_line[i][MW-1:0]];

  // ---------------------------------------------------------------- write-back pick
  logic wb_any;
  cid_t wb_idx;
  always_comb begin
    wb_any = 1'b0;
    wb_idx = '0;
    for (int k = 1; k <= NC; k++) begin
      int c;
      c = (int'(wb_last_q) + k) % NC;
      if (!wb_any && wb[c].valid) begin
        wb_any = 1'b1;
        wb_idx = cid_t'(c);
      end
    end
  end

  logic take_wb, take_rd;
  assign take_wb = (eng_q == E_IDLE) && mem_req_ready && wb_any;
  assign take_rd = (eng_q == E_IDLE) && mem_req_ready && !wb_any && sel_valid;
  assign deq     = take_rd;

  always_comb begin
    wb_ready = '0;
    if (take_wb) wb_ready[IW'(wb_idx)] = 1'b1;
  end

  always_comb begin
    mem_req_valid = take_wb || take_rd;
    mem_req_we    = take_wb;
    mem_req_line  = take_wb ? wb[IW'(wb_idx)].line : sel.line;
    mem_req_data  = wb[IW'(wb_idx)].data;
  end

  logic [MW-1:0] wb_mline, rd_mline;
  assign wb_mline = wb[IW'(wb_idx)].line[MW-1:0];
  assign rd_mline = sel.line[MW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      eng_q     <= E_IDLE;
      cur_q     <= '0;
      wb_last_q <= cid_t'(NC-1);
      owned_q   <= '0;
    end else begin
      unique case (eng_q)
        E_IDLE: begin
          if (take_wb) begin
            wb_last_q <= wb_idx;
            if (owned_q[wb_mline] && owner_q[wb_mline] == wb_idx) owned_q[wb_mline] <= 1'b0;
            eng_q <= E_WB;
          end else if (take_rd) begin
            cur_q <= sel;
            if (sel.msg == MSG_GETM) owned_q[rd_mline] <= 1'b1;
            eng_q <= E_RD;
          end
        end
        E_WB: if (mem_done) eng_q <= E_IDLE;
        E_RD: if (mem_done) eng_q <= E_IDLE;
        default: eng_q <= E_IDLE;
      endcase
    end
  end

  // owner ids need no reset: read only while the owned bit is set
  always_ff @(posedge clk) begin
    if (take_rd && sel.msg == MSG_GETM) owner_q[rd_mline] <= sel.src;
  end

  // data response on the requester's dedicated bus
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NC; i++) resp[i] <= '0;
    end else begin
      for (int i = 0; i < NC; i++) begin
        resp[i].valid <= (eng_q == E_RD) && mem_done && (int'(cur_q.src) == i);
        resp[i].line  <= cur_q.line;
        resp[i].data  <= mem_rdata;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(bus.valid && pr_full && !deq))
    else $error("smc: PRLUT full");

endmodule
