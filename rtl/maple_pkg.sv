// maple_pkg: types and constants shared by the predictable coherent memory system.
//
// The system is built around 64-byte cache lines (the default line size of the
// platform) that move as whole lines over point-to-point data buses, while
// requests and coherence messages travel on one shared snooping request bus.
// Cores access the caches with 64-bit words (the cores are 64-bit RISC-V).
// Address width (32 bits) and cache id width are this design's own choices.
package maple_pkg;

  localparam int ADDR_W     = 32;                 // byte address width (assumed)
  localparam int LINE_BYTES = 64;                 // cache line size
  localparam int LINE_BITS  = LINE_BYTES * 8;
  localparam int OFFS_W     = $clog2(LINE_BYTES);
  localparam int LADDR_W    = ADDR_W - OFFS_W;    // line address width
  localparam int WORD_BITS  = 64;
  localparam int WORDS      = LINE_BITS / WORD_BITS;
  localparam int CID_W      = 5;                  // cache id width: up to 32 caches

  typedef logic [ADDR_W-1:0]    addr_t;
  typedef logic [LADDR_W-1:0]   laddr_t;
  typedef logic [LINE_BITS-1:0] line_t;
  typedef logic [WORD_BITS-1:0] word_t;
  typedef logic [CID_W-1:0]     cid_t;

  // Coherence requests broadcast on the request bus.
  typedef enum logic [1:0] {
    MSG_NONE = 2'd0,
    MSG_GETS = 2'd1,   // read request, line wanted in S
    MSG_GETM = 2'd2    // write request, line wanted in M
  } msg_e;

  // Entry of a pending request (PR) buffer.
  typedef struct packed {
    msg_e   msg;
    laddr_t line;
  } pr_entry_t;

  // One request-bus broadcast.
  typedef struct packed {
    logic   valid;
    msg_e   msg;
    cid_t   src;
    laddr_t line;
  } bus_req_t;

  // Dedicated data bus, cache to shared memory (write-back) or shared memory
  // to cache (data response). A whole line per transfer.
  typedef struct packed {
    logic   valid;
    laddr_t line;
    line_t  data;
  } dbus_t;

  // Core-side request and response of an L1 cache.
  typedef struct packed {
    logic                   valid;
    logic                   we;
    addr_t                  addr;
    word_t                  wdata;
    logic [WORD_BITS/8-1:0] wstrb;
  } core_req_t;

  typedef struct packed {
    logic  valid;
    word_t rdata;
  } core_resp_t;

  // Private-cache coherence states: stable I, S, M and the transient states
  // of a line whose request waits for the bus (_AD) or for data (_D).
  // IS_D_I, IM_D_S and IM_D_I remember a remote request seen while waiting
  // for data: the access completes once, then the line is given up.
  typedef enum logic [3:0] {
    ST_I      = 4'd0,
    ST_S      = 4'd1,
    ST_M      = 4'd2,
    ST_IS_AD  = 4'd3,
    ST_IS_D   = 4'd4,
    ST_IS_D_I = 4'd5,
    ST_IM_AD  = 4'd6,
    ST_IM_D   = 4'd7,
    ST_IM_D_S = 4'd8,
    ST_IM_D_I = 4'd9
  } cstate_e;

  // Events seen by the private-cache coherence table.
  typedef enum logic [2:0] {
    EV_LOAD    = 3'd0,  // core load
    EV_STORE   = 3'd1,  // core store
    EV_OWN     = 3'd2,  // own request seen on the bus
    EV_OTHER_S = 3'd3,  // another cache's GetS seen on the bus
    EV_OTHER_M = 3'd4,  // another cache's GetM seen on the bus
    EV_DATA    = 3'd5,  // data response arrived
    EV_REPLACE = 3'd6   // line chosen as victim
  } cevent_e;

  // Request-bus arbitration policies.
  typedef enum logic [1:0] {
    ARB_RR      = 2'd0,  // round robin, one grant per cycle
    ARB_TDM     = 2'd1,  // one slot per requester, in index order
    ARB_WTDM    = 2'd2,  // slot table given by a parameter
    ARB_WTDM_RR = 2'd3   // slot table, slack slots shared round robin
  } arb_policy_e;

endpackage
