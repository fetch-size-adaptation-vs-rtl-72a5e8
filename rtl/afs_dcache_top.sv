// afs_dcache_top: L1 data cache with fetch size adaptation.
//
// The cache (afs_cache) fills a virtual line of 1, 2 or 4 physical 32-byte
// lines on each miss, so that it behaves like a cache with a 32, 64 or 128
// byte line. Which of the three is used is decided at run time by the fetch
// size predictor (fsz_predictor): it counts, over intervals of memory
// accesses, how many fetched virtual lines showed good spatial locality (the
// neighbouring virtual line of the same double-size block was already
// present) and how many showed poor locality (the replaced virtual line had a
// half that was never referenced), and at the end of each interval doubles,
// halves or keeps the fetch size.
//
// Ports: the processor load/store port (valid/ready request, response pulse
// one cycle after a hit), the port to the next memory level (valid/ready
// request, read beats on mem_rvalid), a configuration write port for the
// predictor's registers, and status outputs (current fetch size, interval end
// pulse, event pulses and the counters of the running interval). Default
// parameters give the evaluated configuration: 16 KB, 4 ways, 32-byte lines,
// fetch sizes 32-128 B, intervals of 200,000 accesses, thresholds 0.7.
module afs_dcache_top
  import afs_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned MAX_FSZ     = 2,
  parameter int unsigned INTERVAL    = 200000,
  parameter int unsigned INC_THRESH  = 179,     // 0.7 with 8 fraction bits
  parameter int unsigned DEC_THRESH  = 179
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor load/store port
  input  logic             cpu_req_valid,
  output logic             cpu_req_ready,
  input  cpu_req_t         cpu_req,
  output logic             cpu_resp_valid,
  output logic [CPU_W-1:0] cpu_resp_rdata,
  // next memory level
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output mem_req_t         mem_req,
  input  logic             mem_rvalid,
  input  logic [BUS_W-1:0] mem_rdata,
  // predictor configuration
  input  logic             cfg_we,
  input  cfg_sel_e         cfg_sel,
  input  logic [31:0]      cfg_wdata,
  // status
  output fsz_t             fsz,
  output logic             interval_end,
  output logic             ev_hit,
  output logic             ev_fetch,
  output logic             ev_good,
  output logic             ev_poor,
  output logic             ev_dup_inval,
  output logic [31:0]      good_cnt,
  output logic [31:0]      poor_cnt,
  output logic [31:0]      fetch_cnt
);

  logic ev_access;

  afs_cache #(
    .CACHE_BYTES (CACHE_BYTES),
    .WAYS        (WAYS),
    .LINE_BYTES  (LINE_BYTES),
    .MAX_FSZ     (MAX_FSZ)
  ) u_cache (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req, .cpu_resp_valid, .cpu_resp_rdata,
    .fsz,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rvalid, .mem_rdata,
    .ev_access, .ev_hit, .ev_fetch, .ev_good, .ev_poor, .ev_dup_inval
  );

  fsz_predictor #(
    .CNT_W              (32),
    .INTERVAL_DEFAULT   (INTERVAL),
    .INC_THRESH_DEFAULT (INC_THRESH),
    .DEC_THRESH_DEFAULT (DEC_THRESH),
    .MIN_FSZ            (0),
    .MAX_FSZ            (MAX_FSZ),
    .INIT_FSZ           (0)
  ) u_pred (
    .clk, .rst_n,
    .ev_access, .ev_fetch, .ev_good, .ev_poor,
    .cfg_we, .cfg_sel, .cfg_wdata,
    .fsz, .interval_end, .good_cnt, .poor_cnt, .fetch_cnt
  );

endmodule
