// pr_buffer: pending request (PR) buffer of one L1 cache.
//
// A small FIFO of coherence requests (GetS/GetM with line address) that wait
// for the cache's turn on the shared request bus. The head is offered to the
// bus arbiter (req_valid/req); it leaves the buffer in the cycle the arbiter
// grants it (pop). Keeping requests in a FIFO gives them a fixed service
// order, which the worst-case latency analysis relies on. Depth is this
// design's choice: the cache has at most one outstanding miss, so two
// entries are more than enough.
// Timing: push and pop take effect at the clock edge; the head is visible
// one cycle after its push. Push while full and pop while empty are errors.
module pr_buffer
  import maple_pkg::*;
#(
  parameter int DEPTH = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  pr_entry_t push_data,
  input  logic      pop,
  output logic      req_valid,
  output pr_entry_t req,
  output logic      full
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pr_entry_t       mem [DEPTH];
  logic [PW-1:0]   rd_q, wr_q;
  logic [PW:0]     cnt_q;

  assign req_valid = (cnt_q != '0);
  assign req       = mem[rd_q];
  assign full      = (cnt_q == (PW+1)'(DEPTH));

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= incr(wr_q);
      if (pop) rd_q <= incr(rd_q);
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  // storage has no reset: an entry is only read after it was written
  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= push_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("pr_buffer overflow");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && !req_valid))
    else $error("pr_buffer pop while empty");

endmodule
