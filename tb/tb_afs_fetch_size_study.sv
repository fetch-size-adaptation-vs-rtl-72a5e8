// tb_afs_fetch_size_study: compares fixed fetch sizes with fetch size
// adaptation on three synthetic address streams, the way the scheme is
// evaluated: the same stream is run with the fetch size fixed at 32 B, 64 B
// and 128 B (adaptation off) and then with adaptation on, and misses and
// total cycles are reported for each run.
//   stream    sequential word loads over 256 KB, one store in 16
//   chunks    all 16 words of random 64-byte aligned chunks of 1 MB
//   scatter   one word from random 128-byte blocks of 1 MB
// Expected outcome, checked: adaptation settles on the fixed size with the
// fewest cycles (128 B, 64 B and 32 B respectively), and its total cycle
// count is within 25% of that best fixed size (it starts at 32 B and needs a
// few intervals to get there). Every load's data is checked too. The interval
// is shortened to 20,000 accesses so that each run spans ten intervals.
module tb_afs_fetch_size_study;
  import afs_pkg::*;

  localparam int unsigned INTERVAL = 20000;
  localparam int unsigned N_ACC    = 200000;

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

  afs_dcache_top #(.INTERVAL(INTERVAL)) dut (.*);

  mem_model u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rvalid(mem_rvalid), .rdata(mem_rdata), .n_reads, .n_writes, .n_beats);

  int checks = 0, failures = 0;
  longint cyc = 0, misses = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ev_fetch) misses++;
  end

  localparam int unsigned REF_WORDS = 1 << 18;
  logic [31:0] shadow [REF_WORDS];
  initial for (int unsigned i = 0; i < REF_WORDS; i++) shadow[i] = i * 32'h9E3779B1 + 32'h01234567;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(input bit wr, input logic [31:0] addr, input logic [31:0] wdata);
    @(negedge clk);
    cpu_req_valid = 1;
    cpu_req = '{write: wr, addr: addr, wdata: wdata, be: 4'hf};
    while (!cpu_req_ready) @(negedge clk);
    @(negedge clk);
    cpu_req_valid = 0;
    while (!cpu_resp_valid) @(negedge clk);
    if (wr) shadow[addr[19:2]] = wdata;
    else if (cpu_resp_rdata != shadow[addr[19:2]]) begin
      failures++;
      $display("FAIL: load %h data %h exp %h", addr, cpu_resp_rdata, shadow[addr[19:2]]);
    end
  endtask

  task automatic cfg(input cfg_sel_e s, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_sel = s; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // Run one workload; mode 0..2 = fixed fetch size code, 3 = adaptive.
  task automatic run(input int wl, input int mode, output longint cycles, output longint miss,
                     output int final_v);
    longint c0, m0;
    logic [31:0] sa, chunk;
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    if (mode < 3) cfg(CFG_FETCH_SIZE, 32'(mode));
    c0 = cyc; m0 = misses;
    sa = 0; chunk = 0;
    for (int n = 0; n < N_ACC; n++) begin
      logic [31:0] a;
      case (wl)
        0: begin a = sa; sa = (sa + 4) & 32'h0003_fffc; end
        1: begin
             if (n % 16 == 0) chunk = {12'h0, 14'($urandom), 6'h0};
             a = chunk + 32'((n % 16) * 4);
           end
        default: a = {12'h0, 13'($urandom), 5'($urandom_range(0, 31)), 2'b00};
      endcase
      if (wl == 0 && a[5:2] == 4'hf) access(1, a, $urandom);
      else                           access(0, a, 0);
    end
    cycles  = cyc - c0;
    miss    = misses - m0;
    final_v = int'(fsz);
  endtask

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [3] = '{"stream", "chunks", "scatter"};
    int best_exp [3] = '{2, 1, 0};
    cpu_req_valid = 0; cpu_req = '0; cfg_we = 0; cfg_sel = CFG_INTERVAL; cfg_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    $display("workload  size    misses   miss-rate   cycles");
    for (int wl = 0; wl < 3; wl++) begin
      longint cyc_m [4], miss_m [4]; int fv; int best;
      for (int mode = 0; mode < 4; mode++) begin
        run(wl, mode, cyc_m[mode], miss_m[mode], fv);
        $display("%-8s  %-6s  %7d   %6.3f%%   %0d", names[wl],
                 mode == 3 ? "adapt" : (mode == 0 ? "32B" : (mode == 1 ? "64B" : "128B")),
                 miss_m[mode], 100.0 * real'(miss_m[mode]) / real'(N_ACC), cyc_m[mode]);
      end
      best = 0;
      for (int m = 1; m < 3; m++) if (cyc_m[m] < cyc_m[best]) best = m;
      check(best == best_exp[wl], $sformatf("%s: best fixed size code %0d, expected %0d", names[wl], best, best_exp[wl]));
      check(fv == best, $sformatf("%s: adaptation settled on code %0d, best fixed is %0d", names[wl], fv, best));
      check(real'(cyc_m[3]) <= 1.25 * real'(cyc_m[best]),
            $sformatf("%s: adaptive cycles %0d vs best fixed %0d", names[wl], cyc_m[3], cyc_m[best]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
