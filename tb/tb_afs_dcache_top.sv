// tb_afs_dcache_top: end-to-end test of the adaptive-fetch-size data cache
// at its default configuration (16 KB, 4 ways, 32-byte lines, fetch sizes
// 32-128 B, intervals of 200,000 accesses, thresholds 0.7), connected to a
// 30-cycle memory with an 8-byte bus.
//
// Workload phases:
//  1. streaming: sequential word loads over 256 KB with one store in 16.
//     Good spatial locality must raise the fetch size 32 B -> 64 B -> 128 B
//     at the end of the first two intervals.
//  2. scattered: loads of one word from random 128-byte blocks of 1 MB.
//     The fetched VCLs are mostly unused, so the fetch size must fall back
//     128 B -> 64 B -> 32 B over the next two intervals.
//  3. mixed: the interval is shortened to 3,000 accesses through the
//     configuration port, and random loads and stores alternate between a
//     streaming and a scattered pattern; then adaptation is switched off with
//     a fixed 64 B fetch size.
// Every load is checked against a shadow copy of memory and every access's
// latency against the expected one (hit 1, store 3, miss 32 + 2 * beats).
// Each interval end must come in the cycle after the interval's last access.
// Every mechanism must occur at least once: hit, miss-fetch of each size,
// good and poor locality, growth and shrink of the fetch size, invalidation
// of a duplicate PCL, store hit and store miss, configuration writes.
module tb_afs_dcache_top;
  import afs_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_req_valid, cpu_req_ready, cpu_resp_valid;
  cpu_req_t cpu_req;
  logic [CPU_W-1:0] cpu_resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_rvalid;
  mem_req_t mem_req;
  logic [BUS_W-1:0] mem_rdata;
  logic cfg_we; cfg_sel_e cfg_sel; logic [31:0] cfg_wdata;
  fsz_t fsz;
  logic interval_end, ev_hit, ev_fetch, ev_good, ev_poor, ev_dup_inval;
  logic [31:0] good_cnt, poor_cnt, fetch_cnt;
  int unsigned n_reads, n_writes, n_beats;

  afs_dcache_top dut (.*);

  mem_model u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rvalid(mem_rvalid), .rdata(mem_rdata), .n_reads, .n_writes, .n_beats);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  longint n_hit = 0, n_good = 0, n_poor = 0, n_dup = 0, n_end = 0, n_inc = 0, n_dec = 0;
  longint n_fetch [3] = '{0, 0, 0};
  longint n_st_hit = 0, n_st_miss = 0, n_cfg = 0;
  int unsigned cur_interval = 200000, acc_since = 0;
  fsz_t fsz_prev = 0;
  bit outstanding_store = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ev_hit) begin
      n_hit++;
      if (outstanding_store) n_st_hit++;
    end
    if (ev_fetch) n_fetch[fsz]++;
    if (ev_good) n_good++;
    if (ev_poor) n_poor++;
    if (ev_dup_inval) n_dup++;
    if (interval_end) begin
      n_end++;
      check(acc_since == cur_interval,
            $sformatf("interval end after %0d accesses, expected %0d", acc_since, cur_interval));
      acc_since = (cpu_req_valid && cpu_req_ready) ? 1 : 0;
    end else if (cpu_req_valid && cpu_req_ready) acc_since++;
    if (fsz > fsz_prev) n_inc++;
    if (fsz < fsz_prev) n_dec++;
    fsz_prev <= fsz;
  end

  localparam int unsigned REF_WORDS = 1 << 18;   // 1 MB shadow
  logic [31:0] shadow [REF_WORDS];
  initial for (int unsigned i = 0; i < REF_WORDS; i++) shadow[i] = i * 32'h9E3779B1 + 32'h01234567;

  task automatic access(input bit wr, input logic [31:0] addr, input logic [31:0] wdata,
                        input logic [3:0] be);
    int unsigned a; int lat; fsz_t v; bit h;
    @(negedge clk);
    cpu_req_valid = 1;
    cpu_req = '{write: wr, addr: addr, wdata: wdata, be: be};
    while (!cpu_req_ready) @(negedge clk);
    a = cyc; v = fsz;
    outstanding_store = wr;
    @(negedge clk);
    cpu_req_valid = 0;
    h = ev_hit;
    while (!cpu_resp_valid) @(negedge clk);
    lat = int'(cyc - a);
    if (wr) begin
      if (!h) n_st_miss++;
      for (int b = 0; b < 4; b++) if (be[b]) shadow[addr[19:2]][b*8 +: 8] = wdata[b*8 +: 8];
      check(lat == 3, $sformatf("store %h latency %0d", addr, lat));
    end else begin
      check(cpu_resp_rdata == shadow[addr[19:2]],
            $sformatf("load %h data %h exp %h", addr, cpu_resp_rdata, shadow[addr[19:2]]));
      check(ev_hit ? lat == 1 : lat == 32 + 2 * (4 << v),
            $sformatf("load %h latency %0d (fetch size code %0d)", addr, lat, v));
    end
  endtask

  task automatic cfg(input cfg_sel_e s, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_sel = s; cfg_wdata = d;
    @(negedge clk); cfg_we = 0; n_cfg++;
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sa;
    longint e0;
    cpu_req_valid = 0; cpu_req = '0; cfg_we = 0; cfg_sel = CFG_INTERVAL; cfg_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(fsz == 0, "starts at 32 B");

    // Phase 1: streaming.
    sa = 0;
    e0 = n_end;
    while (n_end < e0 + 2) begin
      if (sa[5:2] == 4'hf) access(1, sa, $urandom, 4'hf);
      else                 access(0, sa, 0, 0);
      sa = (sa + 4) & 32'h0003_fffc;
    end
    @(negedge clk);
    check(fsz == 2, $sformatf("streaming grows the fetch size to 128 B (code %0d)", fsz));
    $display("phase 1 done @%0d: fetch size code %0d", cyc, fsz);

    // Phase 2: scattered single-word loads.
    e0 = n_end;
    while (n_end < e0 + 2) begin
      logic [31:0] a;
      a = {12'h0, 13'($urandom), 5'($urandom_range(0, 31)), 2'b00} & 32'h000f_fffc;
      a[6:5] = 2'($urandom);
      access(0, a, 0, 0);
    end
    @(negedge clk);
    check(fsz == 0, $sformatf("scattered loads shrink the fetch size to 32 B (code %0d)", fsz));
    $display("phase 2 done @%0d: fetch size code %0d", cyc, fsz);

    // Phase 3: short intervals, mixed traffic.
    cfg(CFG_INTERVAL, 3000);
    // The running interval now closes once it has 3000 accesses.
    if (acc_since >= 3000) acc_since = 2999;
    cur_interval = 3000;
    for (int r = 0; r < 8; r++) begin
      e0 = n_end;
      while (n_end < e0 + 1) begin
        logic [31:0] a;
        if (r % 2 == 0) begin
          a = (sa + 4) & 32'h0003_fffc; sa = a;
        end else
          a = {12'h0, 18'($urandom), 2'b00} & 32'h000f_fffc;
        if ($urandom_range(0, 9) == 0) access(1, a, $urandom, 4'($urandom_range(1, 15)));
        else                           access(0, a, 0, 0);
      end
    end
    // Fixed 64 B fetch size.
    cfg(CFG_FETCH_SIZE, 32'h0000_0001);
    check(fsz == 1, "fixed fetch size written");
    for (int n = 0; n < 7000; n++) access(0, {12'h0, 18'($urandom), 2'b00} & 32'h000f_fffc, 0, 0);
    check(fsz == 1, "fixed fetch size kept with adaptation off");
    // A PCL fetched at 32 B, then covered by a 64 B fetch placed in another
    // way: the older copy must be dropped and the data still read correctly.
    for (int k = 0; k < 16; k++) begin
      logic [31:0] b;
      b = 32'h000c_0000 + 32'(k * 32'h1_0040);
      b &= 32'h000f_ffc0;
      cfg(CFG_FETCH_SIZE, 32'h0000_0000);
      access(0, b + 32'h20, 0, 0);
      access(0, b ^ 32'h0000_1000, 0, 0);
      cfg(CFG_FETCH_SIZE, 32'h0000_0001);
      access(0, b, 0, 0);
      access(0, b + 32'h24, 0, 0);
    end

    check(n_hit > 0, "hits seen");
    for (int v = 0; v < 3; v++) check(n_fetch[v] > 0, $sformatf("miss-fetch of code %0d seen", v));
    check(n_good > 0, "good locality seen");
    check(n_poor > 0, "poor locality seen");
    check(n_inc > 0, "fetch size increase seen");
    check(n_dec > 0, "fetch size decrease seen");
    check(n_dup > 0, "duplicate PCL invalidation seen");
    check(n_st_hit > 0, "store hit seen");
    check(n_st_miss > 0, "store miss seen");
    check(n_end >= 12, "interval ends seen");
    $display("cycles=%0d hits=%0d fetch32=%0d fetch64=%0d fetch128=%0d good=%0d poor=%0d dup=%0d",
             cyc, n_hit, n_fetch[0], n_fetch[1], n_fetch[2], n_good, n_poor, n_dup);
    $display("intervals=%0d grow=%0d shrink=%0d store_hit=%0d store_miss=%0d cfg=%0d mem_reads=%0d mem_writes=%0d",
             n_end, n_inc, n_dec, n_st_hit, n_st_miss, n_cfg, n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
