// pwb_buffer: pending write-back (PWB) buffer of one L1 cache.
//
// A FIFO of dirty lines (line address and 64 bytes of data) that the cache
// must write back to shared memory: lines given up because another cache
// requested them, lines replaced on a miss, and lines handed on right after
// a completed access. The head drives the cache's dedicated write-back data
// bus (wb); it leaves the buffer when the shared memory controller accepts
// it (wb_ready). Write-backs thus leave in the order they were caused, so no
// later request can overtake an earlier write-back.
// Depth is this design's choice: every other cache has at most one
// outstanding request, and a miss adds at most one replacement, so
// NUM_CACHES+1 entries cannot overflow; an assertion checks it.
// Timing: a pushed line is on the bus the cycle after the push; with
// wb_ready high the bus can take one line per cycle.
module pwb_buffer
  import maple_pkg::*;
#(
  parameter int DEPTH = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  dbus_t push_data,
  input  logic      wb_ready,
  output dbus_t     wb,
  output logic      full
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  dbus_t       mem [DEPTH];
  logic [PW-1:0]   rd_q, wr_q;
  logic [PW:0]     cnt_q;

  logic  nonempty, pop;
  dbus_t head;

  assign nonempty = (cnt_q != '0);
  assign head     = mem[rd_q];
  assign pop      = nonempty && wb_ready;

  always_comb begin
    wb       = head;
    wb.valid = nonempty;
  end
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
    else $error("pwb_buffer overflow");

endmodule
