// afs_cache: set-associative data cache with an adaptive fetch size (AFS).
//
// The cache is built of equal physical cache lines (PCLs) of LINE_BYTES; tag
// and index are formed from the PCL size exactly as in a fixed-line-size
// cache. What changes is the miss-fetch: a miss fills a virtual cache line
// (VCL) of 2^V consecutive PCLs in one way, the PCLs whose index runs from
// base = index with its low V bits cleared up to base + 2^V - 1. All PCLs of a
// VCL share the tag of the missing address. V comes from the fetch size
// register outside (`fsz`) and is sampled when a miss starts.
//
// While a miss is served the cache also detects spatial locality (see
// locality_detector): on the cycle the miss is found it checks whether the
// VCL about to be replaced in the victim way had an unused half (ev_poor),
// and on the next cycle it reads the tags of the neighbouring VCL, the one
// at base XOR 2^V, and compares them with the missing tag (ev_good). Both use
// the tag port only during a miss, so hits are not slowed.
//
// Interface and timing:
//  * cpu_req_valid/ready handshake with a cpu_req_t. A load hit answers on
//    cpu_resp_valid in the clock after the request was accepted, and a new
//    request can be accepted in that same clock. A store answers once its
//    write has been handed to memory.
//  * A load miss takes: 1 lookup cycle, 1 neighbour-tag cycle, the memory
//    request handshake, the 4*2^V bus beats of the VCL (written to the data
//    array as they arrive), then one response cycle. The missing word is
//    taken from the beat stream.
//  * mem_req_valid/ready with a mem_req_t; read data returns on mem_rvalid,
//    one bus beat at a time, in address order from the VCL's first byte.
//  * ev_access/ev_fetch/ev_good/ev_poor are one-cycle event pulses for the
//    fetch size predictor.
//
// Choices of this design where the source is silent: stores are write-through
// without write-allocate (a store hit updates the line and memory, a store
// miss goes to memory only); replacement is true LRU, taking an invalid way
// first, with the LRU order and valid bits read at the VCL's base index and
// the whole VCL placed in the chosen way (at a constant fetch size this makes
// the cache hit and miss exactly as a fixed-line cache with a line as large
// as the fetch size, the equivalence the AFS scheme relies on); when a PCL of
// the new VCL is already present in another way (possible after the fetch
// size has grown) that other copy is invalidated so that no address is held
// twice; a PCL is marked used when it is hit, and the missing PCL is marked
// used when it is filled. The cache is blocking: one miss at a time.
// Assertions at the end state the handshake rules the cache keeps and
// expects on its memory port.
module afs_cache
  import afs_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned MAX_FSZ     = 2      // largest V: 128 B fetch
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // processor side
  input  logic                 cpu_req_valid,
  output logic                 cpu_req_ready,
  input  cpu_req_t             cpu_req,
  output logic                 cpu_resp_valid,
  output logic [CPU_W-1:0]     cpu_resp_rdata,
  // fetch size code V (log2 of PCLs per VCL)
  input  fsz_t                 fsz,
  // memory side
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output mem_req_t             mem_req,
  input  logic                 mem_rvalid,
  input  logic [BUS_W-1:0]     mem_rdata,
  // events
  output logic                 ev_access,
  output logic                 ev_hit,
  output logic                 ev_fetch,
  output logic                 ev_good,
  output logic                 ev_poor,
  output logic                 ev_dup_inval
);

  localparam int unsigned SETS    = CACHE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OFF_W   = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W   = $clog2(SETS);
  localparam int unsigned TAG_W   = ADDR_W - IDX_W - OFF_W;
  localparam int unsigned BPL     = LINE_BYTES / BUS_BYTES;    // beats per PCL
  localparam int unsigned BPL_W   = $clog2(BPL);
  localparam int unsigned BOFF_W  = $clog2(BUS_BYTES);
  localparam int unsigned MAXP    = 1 << MAX_FSZ;              // PCLs per largest VCL
  localparam int unsigned BEAT_W  = IDX_W + BPL_W + 1;
  localparam int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned DAW     = IDX_W + BPL_W;             // data array address

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [WAY_W-1:0] way_t;

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_NBR, S_MREQ, S_FILL, S_RESP, S_STORE
  } state_e;

  state_e   state_q, state_d;
  cpu_req_t req_q;

  // ---------------------------------------------------------------- arrays
  idx_t             tag_raddr;
  tag_t             tag_rd   [WAYS];
  logic [DAW-1:0]   data_raddr;
  logic [BUS_W-1:0] data_rd  [WAYS];
  logic [WAYS-1:0]  tag_we, data_we;
  idx_t             tag_waddr;
  logic [DAW-1:0]   data_waddr;
  logic [BUS_W-1:0] data_wdata, data_wmask;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    cache_sram #(.WIDTH(TAG_W), .DEPTH(SETS)) u_tag (
      .clk, .raddr(tag_raddr), .rdata(tag_rd[w]),
      .we(tag_we[w]), .waddr(tag_waddr), .wdata(req_q.addr[ADDR_W-1 -: TAG_W]),
      .wmask('1));
    cache_sram #(.WIDTH(BUS_W), .DEPTH(SETS * BPL)) u_data (
      .clk, .raddr(data_raddr), .rdata(data_rd[w]),
      .we(data_we[w]), .waddr(data_waddr), .wdata(data_wdata), .wmask(data_wmask));
  end

  // Line state kept in flip-flops: valid, used, LRU age.
  logic [WAYS-1:0] valid_q [SETS];
  logic [WAYS-1:0] used_q  [SETS];
  way_t            age_q   [SETS][WAYS];

  // -------------------------------------------------------- request fields
  tag_t            req_tag;
  idx_t            req_idx;
  logic [BPL_W-1:0] req_dw;
  assign req_tag = req_q.addr[ADDR_W-1 -: TAG_W];
  assign req_idx = req_q.addr[OFF_W +: IDX_W];
  assign req_dw  = req_q.addr[BOFF_W +: BPL_W];

  // Which CPU word of a bus beat the request addresses.
  localparam int unsigned CPU_B  = CPU_W / 8;
  localparam int unsigned WSEL_W = (BUS_W / CPU_W > 1) ? $clog2(BUS_W / CPU_W) : 1;
  logic [WSEL_W-1:0] req_wsel;
  assign req_wsel = req_q.addr[$clog2(CPU_B) +: WSEL_W];

  // ----------------------------------------------------------- hit compare
  logic [WAYS-1:0] hit_vec;
  logic            hit;
  way_t            hit_way;
  always_comb begin
    hit_vec = '0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[req_idx][w] && tag_rd[w] == req_tag) begin
        hit_vec[w] = 1'b1;
        hit_way    = way_t'(w);
      end
  end
  assign hit = |hit_vec;

  // ------------------------------------------------------- miss bookkeeping
  fsz_t  v_q;                 // fetch size of the miss in progress
  idx_t  base_q, nbr_q;       // first PCL of the VCL and of its neighbour
  way_t  victim_q;
  logic [BEAT_W-1:0] beat_q;  // beats received so far
  logic [CPU_W-1:0]  crit_q;  // the missing word

  idx_t  base_now, nbr_now;
  way_t  victim_now;
  assign base_now = req_idx & ~idx_t'((1 << fsz) - 1);
  assign nbr_now  = base_now ^ idx_t'(1 << fsz);

  // Replacement state is consulted and updated at the first PCL of the VCL
  // (the base index), so that with a constant fetch size every VCL-sized
  // group of sets shares one LRU order, exactly like one set of a cache whose
  // line is as large as the fetch size.
  always_comb begin
    logic found;
    found      = 1'b0;
    victim_now = '0;
    for (int w = 0; w < WAYS; w++)
      if (!found && !valid_q[base_now][w]) begin
        found      = 1'b1;
        victim_now = way_t'(w);
      end
    if (!found)
      for (int w = 0; w < WAYS; w++)
        if (age_q[base_now][w] == way_t'(WAYS - 1)) victim_now = way_t'(w);
  end

  // Valid/used bits of the VCL that the miss-fetch will replace.
  logic [MAXP-1:0] vic_valid, vic_used;
  always_comb begin
    for (int k = 0; k < MAXP; k++) begin
      vic_valid[k] = valid_q[idx_t'(base_now + idx_t'(k))][victim_now];
      vic_used[k]  = used_q [idx_t'(base_now + idx_t'(k))][victim_now];
    end
  end

  logic det_good, det_poor;
  locality_detector #(.WAYS(WAYS), .TAG_W(TAG_W), .MAXP(MAXP)) u_det (
    .fsz          (state_q == S_LOOKUP ? fsz : v_q),
    .req_tag      (req_tag),
    .nbr_tag      (tag_rd),
    .nbr_valid    (valid_q[nbr_q]),
    .victim_valid (vic_valid),
    .victim_used  (vic_used),
    .good         (det_good),
    .poor         (det_poor)
  );

  // ------------------------------------------------------------ fill path
  idx_t             fill_idx;
  logic [BPL_W-1:0] fill_dw;
  logic [BEAT_W-1:0] fill_beats;
  logic             fill_last_of_pcl, fill_last;
  assign fill_idx   = base_q + idx_t'(beat_q >> BPL_W);
  assign fill_dw    = beat_q[BPL_W-1:0];
  assign fill_beats = BEAT_W'(BPL) << v_q;
  assign fill_last_of_pcl = (fill_dw == BPL_W'(BPL - 1));
  assign fill_last  = (beat_q == fill_beats - 1'b1);

  // ------------------------------------------------------------- control
  logic load_hit, accept;
  assign load_hit       = (state_q == S_LOOKUP) && !req_q.write && hit;
  assign cpu_req_ready  = (state_q == S_IDLE) || load_hit;
  assign accept         = cpu_req_valid && cpu_req_ready;

  assign ev_access    = accept;
  assign ev_hit       = (state_q == S_LOOKUP) && hit;
  assign ev_fetch     = (state_q == S_LOOKUP) && !req_q.write && !hit;
  assign ev_poor      = ev_fetch && det_poor;
  assign ev_good      = (state_q == S_NBR) && det_good;

  logic [WAYS-1:0] dup_vec;
  always_comb begin
    dup_vec = '0;
    if (state_q == S_FILL && mem_rvalid && fill_last_of_pcl)
      for (int w = 0; w < WAYS; w++)
        if (way_t'(w) != victim_q && valid_q[fill_idx][w] && tag_rd[w] == req_tag)
          dup_vec[w] = 1'b1;
  end
  assign ev_dup_inval = |dup_vec;

  // Array addressing.
  always_comb begin
    tag_raddr  = cpu_req.addr[OFF_W +: IDX_W];
    data_raddr = cpu_req.addr[BOFF_W +: DAW];
    if (state_q == S_LOOKUP && !load_hit) tag_raddr = nbr_now;
    if (state_q == S_FILL)                tag_raddr = fill_idx;
  end

  always_comb begin
    tag_we     = '0;
    tag_waddr  = fill_idx;
    data_we    = '0;
    data_waddr = {fill_idx, fill_dw};
    data_wdata = mem_rdata;
    data_wmask = '1;
    if (state_q == S_LOOKUP && req_q.write && hit) begin
      data_we[hit_way] = 1'b1;
      data_waddr = {req_idx, req_dw};
      data_wdata = {(BUS_W / CPU_W){req_q.wdata}};
      for (int b = 0; b < BUS_BYTES; b++)
        data_wmask[b*8 +: 8] = ((b / CPU_B) == int'(req_wsel) && req_q.be[b % CPU_B]) ? 8'hff : 8'h00;
    end
    if (state_q == S_FILL && mem_rvalid) begin
      data_we[victim_q] = 1'b1;
      tag_we[victim_q]  = fill_last_of_pcl;
    end
  end

  // Memory requests.
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req       = '0;
    if (state_q == S_MREQ) begin
      mem_req_valid = 1'b1;
      mem_req.write = 1'b0;
      mem_req.addr  = {req_tag, base_q, {OFF_W{1'b0}}};
      mem_req.beats = 8'(fill_beats);
    end else if (state_q == S_STORE) begin
      mem_req_valid = 1'b1;
      mem_req.write = 1'b1;
      mem_req.addr  = {req_q.addr[ADDR_W-1:BOFF_W], {BOFF_W{1'b0}}};
      mem_req.beats = 8'd1;
      mem_req.wdata = {(BUS_W / CPU_W){req_q.wdata}};
      for (int b = 0; b < BUS_BYTES; b++)
        mem_req.wstrb[b] = ((b / CPU_B) == int'(req_wsel)) && req_q.be[b % CPU_B];
    end
  end

  // Responses.
  always_comb begin
    cpu_resp_valid = 1'b0;
    cpu_resp_rdata = '0;
    if (load_hit) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_rdata = data_rd[hit_way][req_wsel * CPU_W +: CPU_W];
    end else if (state_q == S_RESP) begin
      cpu_resp_valid = 1'b1;
      cpu_resp_rdata = req_q.write ? '0 : crit_q;
    end
  end

  // Next state.
  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:   if (accept) state_d = S_LOOKUP;
      S_LOOKUP: begin
        if (req_q.write)   state_d = S_STORE;
        else if (hit)      state_d = accept ? S_LOOKUP : S_IDLE;
        else               state_d = S_NBR;
      end
      S_NBR:    state_d = S_MREQ;
      S_MREQ:   if (mem_req_ready) state_d = S_FILL;
      S_FILL:   if (mem_rvalid && fill_last) state_d = S_RESP;
      S_RESP:   state_d = S_IDLE;
      S_STORE:  if (mem_req_ready) state_d = S_RESP;
      default:  state_d = S_IDLE;
    endcase
  end

  // LRU update helper: make way `w` the most recent in set `s`.
  task automatic touch(input idx_t s, input way_t w);
    for (int k = 0; k < WAYS; k++)
      if (age_q[s][k] < age_q[s][w]) age_q[s][k] <= age_q[s][k] + 1'b1;
    age_q[s][w] <= '0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      req_q    <= '0;
      v_q      <= '0;
      base_q   <= '0;
      nbr_q    <= '0;
      victim_q <= '0;
      beat_q   <= '0;
      crit_q   <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        used_q[s]  <= '0;
        for (int w = 0; w < WAYS; w++) age_q[s][w] <= way_t'(w);
      end
    end else begin
      state_q <= state_d;
      if (accept) req_q <= cpu_req;

      if (state_q == S_LOOKUP && hit) begin
        used_q[req_idx][hit_way] <= 1'b1;
        touch(base_now, hit_way);
      end

      if (ev_fetch) begin
        v_q      <= fsz;
        base_q   <= base_now;
        nbr_q    <= nbr_now;
        victim_q <= victim_now;
        beat_q   <= '0;
      end

      if (state_q == S_FILL && mem_rvalid) begin
        beat_q <= beat_q + 1'b1;
        if (fill_idx == req_idx && fill_dw == req_dw)
          crit_q <= mem_rdata[req_wsel * CPU_W +: CPU_W];
        if (fill_last_of_pcl) begin
          valid_q[fill_idx][victim_q] <= 1'b1;
          used_q[fill_idx][victim_q]  <= (fill_idx == req_idx);
          touch(fill_idx, victim_q);
          for (int w = 0; w < WAYS; w++)
            if (dup_vec[w]) valid_q[fill_idx][w] <= 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------------------ protocol
  // A memory request is held, unchanged, until memory accepts it.
  a_mem_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req));
  // Read beats are only expected while a VCL is being filled.
  a_rvalid_in_fill: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> state_q == S_FILL);
  // The fetch size never exceeds the largest VCL the cache is built for.
  a_fsz_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(fsz) <= int'(MAX_FSZ));
  // At most one response per accepted request.
  a_one_resp: assert property (@(posedge clk) disable iff (!rst_n)
    cpu_resp_valid && state_q != S_LOOKUP |-> !cpu_req_ready);

endmodule
