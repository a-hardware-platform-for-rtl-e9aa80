// request_bus: the shared snooping request bus.
//
// Every cache offers the head of its PR buffer (req_valid/req). The bus
// arbiter picks one; that cache is told in the same cycle (gnt, one-hot) so
// it can pop its PR buffer, and the chosen request is broadcast, with the
// requester's id, to all caches and the shared memory controller in the next
// cycle (bus, registered, valid for exactly one cycle). All snoopers see the
// same broadcast in the same cycle, which gives one global request order.
// The registered one-cycle broadcast is this design's choice; the arbiter
// policy and slot width follow the platform (TDM, 256-cycle slots).
module request_bus
  import maple_pkg::*;
#(
  parameter int          N      = 9,
  parameter int          SLOT_W = 256,
  parameter arb_policy_e POLICY = ARB_TDM,
  parameter int          NSLOTS = N,
  parameter logic [NSLOTS*8-1:0] SCHED = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_valid,
  input  pr_entry_t    req [N],
  output logic [N-1:0] gnt,
  output bus_req_t     bus
);

  localparam int IW = (N > 1) ? $clog2(N) : 1;   // requester index width

  logic gnt_valid;
  cid_t gnt_idx;

  bus_arbiter #(
    .N(N), .SLOT_W(SLOT_W), .POLICY(POLICY), .NSLOTS(NSLOTS), .SCHED(SCHED)
  ) u_arb (
    .clk, .rst_n,
    .req      (req_valid),
    .gnt_valid(gnt_valid),
    .gnt_idx  (gnt_idx)
  );

  always_comb begin
    gnt = '0;
    if (gnt_valid) gnt[IW'(gnt_idx)] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus <= '0;
    end else begin
      bus.valid <= gnt_valid;
      bus.msg   <= gnt_valid ? req[IW'(gnt_idx)].msg : MSG_NONE;
      bus.src   <= gnt_idx;
      bus.line  <= req[IW'(gnt_idx)].line;
    end
  end

endmodule
