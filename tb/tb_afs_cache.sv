// tb_afs_cache: self-checking test of the adaptive-fetch-size cache with the
// fetch size driven directly. Every load is compared with a shadow copy of
// memory kept by the testbench, and every access's latency is compared with
// the expected timing: 1 cycle for a load hit, 3 cycles for a store, and
// 32 + 2 * (beats of the VCL) cycles for a load miss with a 30-cycle memory
// and 2 cycles per 8-byte beat. Directed cases check VCL fills of each size,
// good-locality detection (neighbour with equal tag), poor-locality detection
// (replaced VCL with an unused half), invalidation of a PCL held in another
// way, back-to-back hits, and store hit/miss handling; a random phase mixes
// loads, stores and fetch size changes. A last phase holds the fetch size
// constant and checks that every access hits or misses exactly as in a
// reference fixed-line-size cache with a line as large as the fetch size.
module tb_afs_cache;
  import afs_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_req_valid, cpu_req_ready, cpu_resp_valid;
  cpu_req_t cpu_req;
  logic [CPU_W-1:0] cpu_resp_rdata;
  fsz_t fsz;
  logic mem_req_valid, mem_req_ready, mem_rvalid;
  mem_req_t mem_req;
  logic [BUS_W-1:0] mem_rdata;
  logic ev_access, ev_hit, ev_fetch, ev_good, ev_poor, ev_dup_inval;
  int unsigned n_reads, n_writes, n_beats;

  afs_cache dut (.*);

  mem_model u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rvalid(mem_rvalid), .rdata(mem_rdata), .n_reads, .n_writes, .n_beats);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int good_n = 0, poor_n = 0, dup_n = 0, hit_n = 0, fetch_n = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ev_good) good_n++;
    if (ev_poor) poor_n++;
    if (ev_dup_inval) dup_n++;
    if (ev_hit) hit_n++;
    if (ev_fetch) fetch_n++;
  end

  // Shadow memory: 32-bit words of a 1 MB region.
  localparam int unsigned REF_WORDS = 1 << 18;
  logic [31:0] shadow [REF_WORDS];
  initial for (int unsigned i = 0; i < REF_WORDS; i++) shadow[i] = i * 32'h9E3779B1 + 32'h01234567;

  bit last_hit;

  // Reference fixed-line-size (FLS) cache: 4 ways, true LRU, invalid way
  // first, line of 32 << v bytes, write-through without write-allocate. It
  // only tracks tags, to predict hit or miss.
  logic [31:0] fls_tag   [128][4];
  bit          fls_valid [128][4];
  int          fls_age   [128][4];

  function automatic void fls_reset();
    for (int s = 0; s < 128; s++)
      for (int w = 0; w < 4; w++) begin fls_valid[s][w] = 0; fls_age[s][w] = w; end
  endfunction

  function automatic void fls_touch(int s, int w);
    for (int k = 0; k < 4; k++) if (fls_age[s][k] < fls_age[s][w]) fls_age[s][k]++;
    fls_age[s][w] = 0;
  endfunction

  function automatic bit fls_access(input logic [31:0] a, input bit wr, input int v);
    int sets, s, vic; logic [31:0] t;
    sets = 128 >> v;
    s = int'((a >> (5 + v)) % sets);
    t = (a >> (5 + v)) / sets;
    for (int w = 0; w < 4; w++)
      if (fls_valid[s][w] && fls_tag[s][w] == t) begin fls_touch(s, w); return 1; end
    if (!wr) begin
      vic = -1;
      for (int w = 0; w < 4; w++) if (vic < 0 && !fls_valid[s][w]) vic = w;
      if (vic < 0) for (int w = 0; w < 4; w++) if (fls_age[s][w] == 3) vic = w;
      fls_valid[s][vic] = 1; fls_tag[s][vic] = t;
      fls_touch(s, vic);
    end
    return 0;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // One access, issued from an idle cache; returns the data and latency.
  task automatic access(input bit wr, input logic [31:0] addr, input logic [31:0] wdata,
                        input logic [3:0] be, output logic [31:0] rdata, output int lat);
    int unsigned a;
    @(negedge clk);
    cpu_req_valid = 1;
    cpu_req = '{write: wr, addr: addr, wdata: wdata, be: be};
    while (!cpu_req_ready) @(negedge clk);
    a = cyc;
    @(negedge clk);
    cpu_req_valid = 0;
    last_hit = ev_hit;          // lookup cycle
    while (!cpu_resp_valid) @(negedge clk);
    lat   = int'(cyc - a);
    rdata = cpu_resp_rdata;
  endtask

  function automatic int miss_lat(input fsz_t v);
    return 32 + 2 * (4 << v);
  endfunction

  task automatic load(input logic [31:0] addr, input int exp_lat, input string tag);
    logic [31:0] d; int lat;
    access(0, addr, 0, 0, d, lat);
    check(d == shadow[addr[19:2]], $sformatf("%s: load %h data %h exp %h", tag, addr, d, shadow[addr[19:2]]));
    if (exp_lat >= 0)
      check(lat == exp_lat, $sformatf("%s: load %h latency %0d exp %0d", tag, addr, lat, exp_lat));
  endtask

  task automatic store(input logic [31:0] addr, input logic [31:0] wd, input logic [3:0] be);
    logic [31:0] d; int lat;
    access(1, addr, wd, be, d, lat);
    for (int b = 0; b < 4; b++) if (be[b]) shadow[addr[19:2]][b*8 +: 8] = wd[b*8 +: 8];
    check(lat == 3, $sformatf("store %h latency %0d exp 3", addr, lat));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g0, p0, d0, w0;
    cpu_req_valid = 0; cpu_req = '0; fsz = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // --- fetch size 32 B: one PCL per miss-fetch.
    fsz = 0;
    load(32'h0000_1000, miss_lat(0), "v0 first");
    load(32'h0000_1004, 1, "v0 same line");
    load(32'h0000_101c, 1, "v0 end of line");
    g0 = good_n;
    load(32'h0000_1020, miss_lat(0), "v0 neighbour");        // index 0x81, neighbour 0x80 has equal tag
    check(good_n == g0 + 1, "good locality detected for neighbouring VCL");
    load(32'h0000_1040, miss_lat(0), "v0 non-neighbour");    // index 0x82, neighbour 0x83 empty
    check(good_n == g0 + 1, "no good locality without neighbour");

    // --- fetch size 128 B: four PCLs per miss-fetch.
    fsz = 2;
    w0 = int'(n_beats);
    load(32'h0002_0200, miss_lat(2), "v2 miss");
    check(int'(n_beats) == w0 + 16, "128 B fetch moves 16 beats");
    load(32'h0002_0220, 1, "v2 pcl1");
    load(32'h0002_0240, 1, "v2 pcl2");
    load(32'h0002_0278, 1, "v2 pcl3");
    load(32'h0002_0280, miss_lat(2), "v2 next VCL");          // neighbour VCL (base 0x10) has equal tag
    check(good_n == g0 + 2, "good locality for 128 B neighbour");

    // --- back-to-back hits: 4 hits accepted on consecutive cycles.
    begin
      int unsigned first, last; int got;
      got = 0;
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        cpu_req_valid = 1;
        cpu_req = '{write: 0, addr: 32'h0002_0200 + 32'(i * 4), wdata: 0, be: 0};
        while (!cpu_req_ready) @(negedge clk);
        if (i == 0) first = cyc;
        @(negedge clk);
        if (cpu_resp_valid) begin
          check(cpu_resp_rdata == shadow[(32'h0002_0200 >> 2) + i], "pipelined hit data");
          got++; last = cyc;
        end
      end
      cpu_req_valid = 0;
      check(got == 4 && last - first == 4, $sformatf("4 pipelined hits in 5 cycles (got %0d)", got));
    end

    // --- poor locality: fetch size 64 B, use only the first PCL of a VCL,
    // then push it out of its set with four more VCLs of the same index.
    fsz = 1;
    p0 = poor_n;
    load(32'h0004_0400, miss_lat(1), "v1 fill");
    for (int i = 1; i <= 3; i++) load(32'h0004_0400 + 32'(i * 4096), miss_lat(1), "v1 fill ways");
    check(poor_n == p0, "no poor locality while ways are free");
    load(32'h0004_0400 + 32'(4 * 4096), miss_lat(1), "v1 evict");
    check(poor_n == p0 + 1, "poor locality on replaced VCL with unused half");
    // A VCL with both halves used is not poor.
    load(32'h0004_0400 + 32'(4 * 4096) + 32, 1, "v1 second half");
    for (int i = 5; i <= 8; i++) load(32'h0004_0400 + 32'(i * 4096), miss_lat(1), "v1 more");
    check(poor_n == p0 + 4, $sformatf("three more poor, none for the fully used VCL (poor %0d)", poor_n - p0));

    // --- duplicate PCL in another way after the fetch size grows.
    fsz = 0;
    d0 = dup_n;
    load(32'h0008_0800, miss_lat(0), "dup pre1");    // set 0x40 way 0 (other tag)
    load(32'h0008_1820, miss_lat(0), "dup pre2");    // set 0x41 way 0
    load(32'h0008_0800 + 32'h1000 * 2, miss_lat(0), "dup pre3");
    fsz = 1;
    load(32'h0008_1800, miss_lat(1), "dup fill");    // VCL sets 0x40-0x41, victim way != 0
    check(dup_n == d0 + 1, "copy in other way invalidated");
    load(32'h0008_1820, 1, "dup still hits");

    // --- stores: write-through, no write-allocate.
    fsz = 0;
    store(32'h0000_1004, 32'hdead_beef, 4'b1111);   // hit
    load(32'h0000_1004, 1, "store hit visible");
    store(32'h0003_3008, 32'h1234_5678, 4'b0101);   // miss
    load(32'h0003_3008, miss_lat(0), "store miss went to memory");
    store(32'h0003_300c, 32'hcafe_f00d, 4'b1000);   // hit, upper byte only
    load(32'h0003_300c, 1, "byte store");

    // --- random mix.
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a; int lat; logic [31:0] d; bit h;
      if ($urandom_range(0, 99) < 5) fsz = fsz_t'($urandom_range(0, 2));
      a = {12'h0, 4'($urandom_range(0, 3)), 2'b00, 12'($urandom_range(0, 4095))} & 32'hffff_fffc;
      if ($urandom_range(0, 99) < 20) begin
        store(a, $urandom, 4'($urandom_range(1, 15)));
      end else begin
        access(0, a, 0, 0, d, lat);
        h = ev_hit;   // still the response cycle
        check(d == shadow[a[19:2]], $sformatf("random load %h data %h exp %h", a, d, shadow[a[19:2]]));
        check(h ? lat == 1 : lat == miss_lat(fsz), $sformatf("random load %h latency %0d", a, lat));
      end
    end
    // --- equivalence with a fixed-line-size cache: at a constant fetch size
    // the cache must hit and miss exactly like an FLS cache whose line is as
    // large as the fetch size.
    for (int v = 0; v < 3; v++) begin
      int mism = 0;
      @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
      fsz = fsz_t'(v);
      fls_reset();
      for (int n = 0; n < 2000; n++) begin
        logic [31:0] a, d; int lat; bit wr, eh;
        a = {14'h0, 2'($urandom_range(0, 3)), 2'b00, 12'($urandom_range(0, 4095))} & 32'hffff_fffc;
        wr = ($urandom_range(0, 9) == 0);
        access(wr, a, $urandom, wr ? 4'hf : 4'h0, d, lat);
        if (wr) shadow[a[19:2]] = cpu_req.wdata;
        eh = fls_access(a, wr, v);
        checks++;
        if (last_hit != eh) begin
          mism++; failures++;
          if (mism < 5) $display("FAIL: v=%0d addr %h hit %0d, FLS cache says %0d", v, a, last_hit, eh);
        end
        if (!wr) check(d == shadow[a[19:2]], "FLS phase load data");
      end
    end
    check(good_n > 0 && poor_n > 0 && dup_n > 0, "all mechanisms seen");
    $display("hits=%0d fetches=%0d good=%0d poor=%0d dup=%0d reads=%0d writes=%0d",
             hit_n, fetch_n, good_n, poor_n, dup_n, n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
