// bus_arbiter: predictable arbiter of the shared snooping request bus.
//
// Four policies, chosen by POLICY:
//   ARB_RR      work-conserving round robin: every cycle the first requester
//               after the last one granted wins.
//   ARB_TDM     time division multiplexing: time is cut into slots of SLOT_W
//               cycles, slot k belongs to requester k (NSLOTS = N slots). The
//               slot owner may be granted once, in any cycle of its slot.
//   ARB_WTDM    weighted TDM: like TDM, but slot k belongs to the requester
//               named in byte k of SCHED, so a requester may own several
//               slots of the NSLOTS-slot period.
//   ARB_WTDM_RR weighted TDM whose slack slots are shared: a slot whose owner
//               has nothing pending in the slot's first cycle is handed, once,
//               to the other requesters in round-robin order.
// The four policies, the fixed slot width and slack-slot reuse come from the
// platform description; the slot-table encoding (one byte per slot) and
// "at most one grant per slot" are this design's choices.
// Interface: req[i] is a pending request of requester i; gnt_valid/gnt_idx
// grant one of them in the same cycle (combinational from req).
module bus_arbiter
  import maple_pkg::*;
#(
  parameter int          N       = 9,
  parameter int          SLOT_W  = 256,
  parameter arb_policy_e POLICY  = ARB_TDM,
  parameter int          NSLOTS  = N,
  parameter logic [NSLOTS*8-1:0] SCHED = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic         gnt_valid,
  output cid_t         gnt_idx
);

  localparam int CW = (SLOT_W > 1) ? $clog2(SLOT_W) : 1;
  localparam int SW = (NSLOTS > 1) ? $clog2(NSLOTS) : 1;
  localparam int IW = (N > 1) ? $clog2(N) : 1;   // requester index width

  logic [CW-1:0] cyc_q;      // cycle within the current slot
  logic [SW-1:0] slot_q;     // current slot
  logic          used_q;     // the current slot has been used
  logic          slack_q;    // the current slot is a slack slot (WTDM_RR)
  cid_t          last_q;     // last requester granted (round robin)

  cid_t owner;
  always_comb begin
    if (POLICY == ARB_WTDM || POLICY == ARB_WTDM_RR)
      owner = cid_t'(SCHED[32'(slot_q)*8 +: 8]);
    else
      owner = cid_t'(slot_q);
  end

  // round robin pick: first requester after last_q
  logic rr_valid;
  cid_t rr_idx;
  always_comb begin
    rr_valid = 1'b0;
    rr_idx   = '0;
    for (int k = 1; k <= N; k++) begin
      int c;
      c = (int'(last_q) + k) % N;
      if (!rr_valid && req[c]) begin
        rr_valid = 1'b1;
        rr_idx   = cid_t'(c);
      end
    end
  end

  logic first_cyc, owner_req, slack_now;
  assign first_cyc = (cyc_q == '0);
  assign owner_req = req[IW'(owner)];
  // a slot becomes slack when its owner has nothing pending in its first cycle
  assign slack_now = first_cyc ? !owner_req : slack_q;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    unique case (POLICY)
      ARB_RR: begin
        gnt_valid = rr_valid;
        gnt_idx   = rr_idx;
      end
      ARB_TDM, ARB_WTDM: begin
        gnt_valid = owner_req && !used_q;
        gnt_idx   = owner;
      end
      default: begin  // ARB_WTDM_RR
        if (!used_q && !slack_now && owner_req) begin
          gnt_valid = 1'b1;
          gnt_idx   = owner;
        end else if (!used_q && slack_now && rr_valid) begin
          gnt_valid = 1'b1;
          gnt_idx   = rr_idx;
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc_q   <= '0;
      slot_q  <= '0;
      used_q  <= 1'b0;
      slack_q <= 1'b0;
      last_q  <= cid_t'(N-1);
    end else begin
      if (gnt_valid) last_q <= gnt_idx;
      if (cyc_q == CW'(SLOT_W-1)) begin
        cyc_q   <= '0;
        slot_q  <= (slot_q == SW'(NSLOTS-1)) ? '0 : slot_q + 1'b1;
        used_q  <= 1'b0;
        slack_q <= 1'b0;
      end else begin
        cyc_q   <= cyc_q + 1'b1;
        used_q  <= used_q | gnt_valid;
        slack_q <= slack_now;
      end
    end
  end

  // at most one grant per slot under the TDM policies
  assert property (@(posedge clk) disable iff (!rst_n)
                   (POLICY != ARB_RR && used_q) |-> !gnt_valid)
    else $error("bus_arbiter: second grant in one slot");
  assert property (@(posedge clk) disable iff (!rst_n) gnt_valid |-> req[IW'(gnt_idx)])
    else $error("bus_arbiter: grant without request");

endmodule
