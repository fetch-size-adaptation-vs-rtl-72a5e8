// tb_fsz_predictor: self-checking test of the interval-based fetch size
// predictor. The testbench drives access / fetch / good / poor event pulses
// with a per-interval bias, keeps its own counts, and after each interval
// checks that interval_end pulses in the clock after the interval's last
// access and that the new fetch size follows the rule: double when
// 2*good/fetched > inc_thresh (a good detection credits two VCLs), else
// halve when poor/fetched > dec_thresh, with the size kept between 32 B and
// 128 B. The thresholds are compared as real
// numbers here. It also checks the reset interval length of 200,000
// accesses, the configuration writes, and that with adaptation disabled the
// written fetch size stays.
module tb_fsz_predictor;
  import afs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ev_access = 0, ev_fetch = 0, ev_good = 0, ev_poor = 0;
  logic cfg_we = 0; cfg_sel_e cfg_sel = CFG_INTERVAL; logic [31:0] cfg_wdata = 0;
  fsz_t fsz; logic interval_end;
  logic [31:0] good_cnt, poor_cnt, fetch_cnt;
  fsz_predictor dut (.*);

  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0, n_keep = 0, n_sat = 0;

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic cfg(input cfg_sel_e s, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_sel = s; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // Run one interval of `len` accesses; each access fetches with probability
  // pf and a fetch is good / poor with probabilities pg / pp (percent).
  task automatic run_interval(input int len, input int pf, input int pg, input int pp,
                              input real inc_t, input real dec_t);
    int f = 0, g = 0, p = 0; int exp_v; int v0;
    v0 = int'(fsz);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      ev_access = 1;
      ev_fetch  = ($urandom_range(0, 99) < pf);
      ev_good   = ev_fetch && ($urandom_range(0, 99) < pg);
      ev_poor   = ev_fetch && ($urandom_range(0, 99) < pp);
      f += int'(ev_fetch); g += 2 * int'(ev_good); p += int'(ev_poor);
      @(negedge clk);
      ev_access = 0; ev_fetch = 0; ev_good = 0; ev_poor = 0;
      if (i < len - 1) check(!interval_end, "no interval end inside the interval");
      else begin
        check(interval_end, $sformatf("interval_end after the last access len=%0d acc=%0d", len, dut.acc_cnt));
        check(fetch_cnt == 32'(f) && good_cnt == 32'(g) && poor_cnt == 32'(p), "event counters");
      end
    end
    exp_v = v0;
    if (f > 0 && real'(g) / real'(f) > inc_t) begin
      if (v0 < 2) begin exp_v = v0 + 1; n_inc++; end else n_sat++;
    end else if (f > 0 && real'(p) / real'(f) > dec_t) begin
      if (v0 > 0) begin exp_v = v0 - 1; n_dec++; end else n_sat++;
    end else n_keep++;
    @(negedge clk);
    check(int'(fsz) == exp_v, $sformatf("fetch size %0d exp %0d (f=%0d g=%0d p=%0d)", fsz, exp_v, f, g, p));
    check(fetch_cnt == 0 && good_cnt == 0 && poor_cnt == 0, "counters restart");
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(fsz == 0, "reset fetch size is 32 B");
    // Reset interval: 200,000 accesses with good locality everywhere.
    run_interval(200000, 50, 100, 0, 179.0 / 256.0, 179.0 / 256.0);
    check(fsz == 1, "grew to 64 B after the reset-length interval");

    cfg(CFG_INTERVAL, 64);
    for (int n = 0; n < 300; n++) begin
      int pg, pp;
      case ($urandom_range(0, 3))
        0: begin pg = 90; pp = 10; end
        1: begin pg = 10; pp = 90; end
        2: begin pg = 70; pp = 70; end
        default: begin pg = $urandom_range(0, 100); pp = $urandom_range(0, 100); end
      endcase
      run_interval(64, $urandom_range(0, 60), pg, pp, 179.0 / 256.0, 179.0 / 256.0);
    end

    // Other thresholds: 0.5 for both.
    cfg(CFG_INC_THRESH, 128);
    cfg(CFG_DEC_THRESH, 128);
    cfg(CFG_INTERVAL, 32);
    for (int n = 0; n < 100; n++)
      run_interval(32, 50, $urandom_range(30, 70), $urandom_range(30, 70), 0.5, 0.5);

    // Fixed fetch size: adaptation off, size 128 B written.
    cfg(CFG_FETCH_SIZE, 32'h0000_0002);
    check(fsz == 2, "fetch size written");
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); ev_access = 1; ev_fetch = 1; ev_poor = 1;
      @(negedge clk); ev_access = 0; ev_fetch = 0; ev_poor = 0;
    end
    @(negedge clk);
    check(fsz == 2, "fetch size held with adaptation off");
    cfg(CFG_FETCH_SIZE, 32'h0000_0100);  // adaptation on, 32 B
    check(fsz == 0, "fetch size 32 B written, adaptation on");

    check(n_inc > 0 && n_dec > 0 && n_keep > 0 && n_sat > 0,
          $sformatf("all outcomes seen inc=%0d dec=%0d keep=%0d sat=%0d", n_inc, n_dec, n_keep, n_sat));
    $display("inc=%0d dec=%0d keep=%0d saturated=%0d", n_inc, n_dec, n_keep, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
