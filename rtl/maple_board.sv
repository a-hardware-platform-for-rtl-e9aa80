// maple_board: predictable coherent multicore memory system, dedicated data buses.
//
// The memory side of a real-time multicore: N_CORES cores, each with a
// private L1 instruction cache and L1 data cache, plus one data cache for the
// host that serves system calls, all kept coherent by a predictable MSI
// protocol over a snooping request bus.
//   * Request bus: one shared snooping bus carries GetS/GetM. Its arbiter
//     gives every cache its own slot (TDM by default, SLOT_W = 256 cycles,
//     NUM_CACHES = 2*N_CORES+1 slots per period), so a core's instruction and
//     data caches never compete for one slot and the host gets a slot too.
//   * Dedicated data buses: every cache has two point-to-point data buses to
//     the shared memory, one for write-backs and one for data responses.
//     They need no arbitration: a cache writes a dirty line back as soon as
//     a snooped request demands it, and memory answers whenever the data is
//     ready. This is what keeps the worst-case latency linear in N_CORES.
//   * Shared memory controller: orders requests per line through the PRLUT,
//     waits for owners' write-backs, and uses the constant-latency main
//     memory (L_ACC = 150 cycles per line operation).
// Cache numbering (request-bus id and port index): 2c is core c's
// instruction cache (read only), 2c+1 its data cache, 2*N_CORES the host's
// data cache. The cores and the host are not part of this design: each
// cache's core-side port is a port of this module.
// Interface and timing: crq/crq_ready/crs per cache as in l1_cache; bus_mon
// shows each request-bus broadcast. After reset the main memory clears
// itself (MEM_LINES cycles) before the first miss can be served.
// The organisation (split L1 caches per core, host data cache, TDM request
// bus, two dedicated data buses per cache, PRLUT at the shared memory, and
// the 256-cycle slot, 150-cycle memory and 4-way defaults) follows the
// platform; cache and memory sizes and all widths are this design's own.
module maple_board
  import maple_pkg::*;
#(
  parameter int          N_CORES    = 4,
  parameter int          NUM_CACHES = 2 * N_CORES + 1,
  parameter int          SLOT_W     = 256,
  parameter int          L_ACC      = 150,
  parameter arb_policy_e POLICY     = ARB_TDM,
  parameter int          NSLOTS     = NUM_CACHES,
  parameter logic [NSLOTS*8-1:0] SCHED = '0,
  parameter int          SETS       = 64,
  parameter int          WAYS       = 4,
  parameter int          MEM_LINES  = 4096
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  core_req_t             crq [NUM_CACHES],
  output logic [NUM_CACHES-1:0] crq_ready,
  output core_resp_t            crs [NUM_CACHES],
  output bus_req_t              bus_mon
);

  logic [NUM_CACHES-1:0] pr_valid, pr_gnt, wb_ready;
  pr_entry_t             pr_req [NUM_CACHES];
  bus_req_t              bus;
  dbus_t                 wb   [NUM_CACHES];   // dedicated buses, cache -> memory
  dbus_t                 resp [NUM_CACHES];   // dedicated buses, memory -> cache

  assign bus_mon = bus;

  for (genvar i = 0; i < NUM_CACHES; i++) begin : g_cache
    l1_cache #(
      .CID      (i),
      .SETS     (SETS),
      .WAYS     (WAYS),
      .READ_ONLY(i < 2 * N_CORES && (i % 2) == 0),
      .PWB_DEPTH(NUM_CACHES + 1)
    ) u_cache (
      .clk, .rst_n,
      .crq      (crq[i]),
      .crq_ready(crq_ready[i]),
      .crs      (crs[i]),
      .pr_valid (pr_valid[i]),
      .pr_req   (pr_req[i]),
      .pr_gnt   (pr_gnt[i]),
      .bus      (bus),
      .wb       (wb[i]),
      .wb_ready (wb_ready[i]),
      .resp     (resp[i])
    );
  end

  request_bus #(
    .N(NUM_CACHES), .SLOT_W(SLOT_W), .POLICY(POLICY), .NSLOTS(NSLOTS), .SCHED(SCHED)
  ) u_rbus (
    .clk, .rst_n,
    .req_valid(pr_valid),
    .req      (pr_req),
    .gnt      (pr_gnt),
    .bus      (bus)
  );

  logic   mem_req_valid, mem_req_we, mem_req_ready, mem_done;
  laddr_t mem_req_line;
  line_t  mem_req_data, mem_rdata;

  smc #(.NC(NUM_CACHES), .MEM_LINES(MEM_LINES)) u_smc (
    .clk, .rst_n,
    .bus, .wb, .wb_ready, .resp,
    .mem_req_valid, .mem_req_we, .mem_req_line, .mem_req_data,
    .mem_req_ready, .mem_done, .mem_rdata
  );

  main_memory #(.MEM_LINES(MEM_LINES), .L_ACC(L_ACC)) u_mem (
    .clk, .rst_n,
    .req_valid(mem_req_valid), .req_we(mem_req_we),
    .req_line (mem_req_line),  .req_data(mem_req_data),
    .req_ready(mem_req_ready), .done(mem_done), .rdata(mem_rdata)
  );

endmodule
