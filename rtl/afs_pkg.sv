// afs_pkg: types and constants shared by the adaptive-fetch-size (AFS) data
// cache. The cache geometry follows the evaluated configuration: a 16 KB,
// 4-way data cache of 32-byte physical cache lines (PCLs), fetch sizes of
// 32, 64 and 128 bytes (1, 2 or 4 PCLs per virtual cache line, VCL), and an
// 8-byte wide bus to the next memory level. The 32-bit byte address is split
// into tag (20 bits), index (7 bits) and offset (5 bits). The fetch size is
// carried as its log2 in PCLs, V, so V = 0, 1, 2 mean 32 B, 64 B, 128 B.
package afs_pkg;

  localparam int unsigned ADDR_W     = 32;   // byte address width
  localparam int unsigned BUS_BYTES  = 8;    // L1-memory bus width in bytes
  localparam int unsigned BUS_W      = BUS_BYTES * 8;
  localparam int unsigned CPU_W      = 32;   // load/store data width
  localparam int unsigned VW         = 2;    // width of the fetch size code V

  // Fetch size code: log2 of the number of PCLs in one VCL.
  typedef logic [VW-1:0] fsz_t;

  // Configuration register selector of the fetch size predictor.
  typedef enum logic [1:0] {
    CFG_INTERVAL   = 2'd0,  // interval length in memory accesses
    CFG_INC_THRESH = 2'd1,  // inc_thresh, unsigned fraction with 8 fraction bits
    CFG_DEC_THRESH = 2'd2,  // dec_thresh, unsigned fraction with 8 fraction bits
    CFG_FETCH_SIZE = 2'd3   // {adapt_enable, fetch size code V}
  } cfg_sel_e;

  // Load/store request from the processor.
  typedef struct packed {
    logic                 write;  // 1 = store, 0 = load
    logic [ADDR_W-1:0]    addr;   // byte address, word aligned
    logic [CPU_W-1:0]     wdata;
    logic [CPU_W/8-1:0]   be;     // byte enables of a store
  } cpu_req_t;

  // Request from the cache to the next memory level. A read asks for `beats`
  // consecutive bus beats starting at `addr`; a write carries one beat.
  typedef struct packed {
    logic                 write;
    logic [ADDR_W-1:0]    addr;   // bus-beat aligned byte address
    logic [7:0]           beats;  // number of beats of a read
    logic [BUS_W-1:0]     wdata;
    logic [BUS_BYTES-1:0] wstrb;
  } mem_req_t;

endpackage
