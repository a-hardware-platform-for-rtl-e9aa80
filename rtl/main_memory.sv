// main_memory: shared main memory with a constant access latency.
//
// Stands in for the board's memory module: every line read or write takes
// exactly L_ACC cycles, the fixed memory access latency L^acc that the
// worst-case analysis charges per shared-memory operation (150 cycles in
// the platform's analysis). One operation is in flight at a time.
// After reset the memory clears itself, one line per cycle, so that every
// line reads as zero until it is first written; req_ready stays low until
// this is done. The self-clearing and the memory size are this design's
// choices (on the board the memory is external DRAM).
// Interface: a request (req_valid with req_we, req_line, req_data) is taken
// when req_ready is high; done is high for one cycle L_ACC cycles later,
// with rdata holding the line for a read. A write takes effect when done.
module main_memory
  import maple_pkg::*;
#(
  parameter int MEM_LINES = 4096,
  parameter int L_ACC     = 150
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req_valid,
  input  logic   req_we,
  input  laddr_t req_line,
  input  line_t  req_data,
  output logic   req_ready,
  output logic   done,
  output line_t  rdata
);

  localparam int MW = $clog2(MEM_LINES);
  localparam int LW = $clog2(L_ACC + 1);

  line_t         mem [MEM_LINES];
  logic          init_q;        // clearing after reset
  logic [MW-1:0] init_addr_q;
  logic          busy_q;
  logic [LW-1:0] cnt_q;
  logic          we_q;
  logic [MW-1:0] addr_q;
  line_t         wdata_q;

  assign req_ready = !init_q && !busy_q;

  logic finish;
  assign finish = busy_q && (cnt_q == LW'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_q      <= 1'b1;
      init_addr_q <= '0;
      busy_q      <= 1'b0;
      cnt_q       <= '0;
      done        <= 1'b0;
      we_q        <= 1'b0;
      addr_q      <= '0;
    end else begin
      done <= 1'b0;
      if (init_q) begin
        init_addr_q <= init_addr_q + 1'b1;
        if (init_addr_q == MW'(MEM_LINES-1)) init_q <= 1'b0;
      end else if (!busy_q) begin
        if (req_valid) begin
          busy_q <= 1'b1;
          cnt_q  <= LW'(L_ACC - 1);
          we_q   <= req_we;
          addr_q <= req_line[MW-1:0];
        end
      end else begin
        cnt_q <= cnt_q - 1'b1;
        if (finish) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  // the array and its data path (no reset)
  always_ff @(posedge clk) begin
    if (req_ready && req_valid) wdata_q <= req_data;
    if (init_q)                 mem[init_addr_q] <= '0;
    else if (finish && we_q)    mem[addr_q] <= wdata_q;
    if (finish)                 rdata <= mem[addr_q];
  end

endmodule
