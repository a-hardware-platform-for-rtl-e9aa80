// prlut: pending request lookup table of the shared memory controller.
//
// Records every GetS/GetM seen on the request bus, in broadcast order, and
// decides which one the shared memory serves next. A request is eligible
// when no older pending request targets the same line and its line is not
// blocked (the controller blocks a line while a cache holds it modified and
// its write-back has not arrived). The oldest eligible request is offered
// (sel_*); requests to different lines may thus be served out of order, but
// requests to one line are always served in the order they were broadcast,
// so no requester can be starved by later ones.
// Entries are kept packed in age order (entry 0 oldest); removing one shifts
// the younger ones down. ENTRIES defaults to one per cache, since a cache
// has at most one outstanding request. The packing and sizing are this
// design's choices; the ordering rule is the table's purpose.
// Interface and timing: ins_valid/ins inserts at the clock edge; ent_line and
// ent_valid expose the entries so the controller can compute blocked; sel_*
// is combinational; deq removes the offered entry at the clock edge. An
// insert and a dequeue may happen in the same cycle.
module prlut
  import maple_pkg::*;
#(
  parameter int ENTRIES = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ins_valid,
  input  bus_req_t       ins,
  output logic [ENTRIES-1:0] ent_valid,
  output laddr_t         ent_line [ENTRIES],
  input  logic [ENTRIES-1:0] blocked,
  output logic           sel_valid,
  output bus_req_t       sel,
  input  logic           deq,
  output logic           full
);

  localparam int IW = $clog2(ENTRIES + 1);

  bus_req_t      ent_q [ENTRIES];
  logic [IW-1:0] cnt_q;
  logic [IW-1:0] sel_idx;

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      ent_valid[i] = (i < int'(cnt_q));
      ent_line[i]  = ent_q[i].line;
    end
  end

  assign full = (cnt_q == IW'(ENTRIES));

  // oldest eligible entry
  always_comb begin
    sel_valid = 1'b0;
    sel_idx   = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      logic older_same;
      older_same = 1'b0;
      for (int j = 0; j < i; j++)
        if (ent_valid[j] && ent_q[j].line == ent_q[i].line) older_same = 1'b1;
      if (!sel_valid && ent_valid[i] && !older_same && !blocked[i]) begin
        sel_valid = 1'b1;
        sel_idx   = IW'(i);
      end
    end
  end
  assign sel = ent_q[sel_idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int i = 0; i < ENTRIES; i++) ent_q[i] <= '0;
    end else begin
      logic [IW-1:0] n;
      n = cnt_q;
      if (deq && sel_valid) begin
        for (int i = 0; i < ENTRIES - 1; i++)
          if (i >= int'(sel_idx)) ent_q[i] <= ent_q[i+1];
        n = n - 1'b1;
      end
      if (ins_valid && ins.msg != MSG_NONE) begin
        ent_q[n] <= ins;
        n = n + 1'b1;
      end
      cnt_q <= n;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   !(ins_valid && ins.msg != MSG_NONE && full && !(deq && sel_valid)))
    else $error("prlut overflow");

endmodule
