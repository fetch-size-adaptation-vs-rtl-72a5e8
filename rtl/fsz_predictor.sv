// fsz_predictor: interval-based fetch size prediction of the adaptive-fetch-
// size cache, with the registers and counters that support it.
//
// Memory accesses are split into intervals of `interval` accesses. During an
// interval the fetch size register stays fixed while three counters record
// the number of VCLs fetched, the number of them with good spatial locality
// and the number with poor spatial locality. A good-locality detection
// involves two VCLs (the one fetched and its neighbour of equal tag), so it
// adds two to the good count; a poor-locality detection concerns the one
// replaced VCL and adds one. In the clock after the last
// access of an interval the fetch size of the next interval is chosen:
//   inc% > inc_thresh : double the fetch size unless it is already the largest
//   else dec% > dec_thresh : halve it unless it is already the smallest
// and the counters restart from zero. inc% and dec% are the good and poor
// counts divided by the number of fetched VCLs; to avoid a divider the test
// inc% > t is done as good * 2^FRAC > t * fetched, with the thresholds held as
// fractions with FRAC fraction bits (0.7 is 179/256). An interval with no
// miss-fetch leaves the fetch size alone. Events that arrive in the cycle that
// closes an interval are counted in the next one.
//
// Configuration writes (cfg_we, cfg_sel, cfg_wdata) set the interval length,
// the two thresholds, and the fetch size register with an adapt-enable bit
// (bit 8); with adaptation disabled the fetch size register keeps the value
// written, which gives a cache with one fixed fetch size. The fetch size is
// coded as V = log2(fetch size / PCL size). The interval length 200,000, the
// thresholds 0.7 and the fetch sizes 32 B to 128 B follow the evaluated
// configuration; the fixed-point thresholds, the configuration port, the
// adapt-enable bit and starting at the smallest fetch size are choices of
// this design.
module fsz_predictor
  import afs_pkg::*;
#(
  parameter int unsigned CNT_W            = 32,
  parameter int unsigned FRAC             = 8,
  parameter int unsigned INTERVAL_DEFAULT = 200000,
  parameter int unsigned INC_THRESH_DEFAULT = 179,  // 0.7 * 256
  parameter int unsigned DEC_THRESH_DEFAULT = 179,  // 0.7 * 256
  parameter int unsigned MIN_FSZ          = 0,      // 32 B = 1 PCL
  parameter int unsigned MAX_FSZ          = 2,      // 128 B = 4 PCLs
  parameter int unsigned INIT_FSZ         = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  // events from the cache
  input  logic             ev_access,   // one memory access accepted
  input  logic             ev_fetch,    // one VCL miss-fetch started
  input  logic             ev_good,     // fetched VCL has good spatial locality
  input  logic             ev_poor,     // replaced VCL has poor spatial locality
  // configuration
  input  logic             cfg_we,
  input  cfg_sel_e         cfg_sel,
  input  logic [31:0]      cfg_wdata,
  // outputs
  output fsz_t             fsz,         // current fetch size code V
  output logic             interval_end,// pulses in the cycle the decision is made
  output logic [CNT_W-1:0] good_cnt,
  output logic [CNT_W-1:0] poor_cnt,
  output logic [CNT_W-1:0] fetch_cnt
);

  logic [CNT_W-1:0] interval_q, acc_cnt;
  logic [FRAC:0]    inc_thresh_q, dec_thresh_q;   // up to 1.0
  logic             adapt_en_q;
  logic             end_q;
  fsz_t             fsz_next;

  // Products for the percentage tests.
  logic [CNT_W+FRAC:0] inc_lhs, inc_rhs, dec_lhs, dec_rhs;
  logic                inc_hit, dec_hit;

  assign inc_lhs = (CNT_W+FRAC+1)'(good_cnt) << FRAC;
  assign dec_lhs = (CNT_W+FRAC+1)'(poor_cnt) << FRAC;
  assign inc_rhs = (CNT_W+FRAC+1)'(fetch_cnt) * (CNT_W+FRAC+1)'(inc_thresh_q);
  assign dec_rhs = (CNT_W+FRAC+1)'(fetch_cnt) * (CNT_W+FRAC+1)'(dec_thresh_q);
  assign inc_hit = inc_lhs > inc_rhs;
  assign dec_hit = dec_lhs > dec_rhs;

  // Decision rule: grow first, otherwise shrink, otherwise keep.
  always_comb begin
    fsz_next = fsz;
    if (inc_hit) begin
      if (fsz < fsz_t'(MAX_FSZ)) fsz_next = fsz + 1'b1;
    end else if (dec_hit) begin
      if (fsz > fsz_t'(MIN_FSZ)) fsz_next = fsz - 1'b1;
    end
  end

  assign interval_end = end_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      interval_q   <= CNT_W'(INTERVAL_DEFAULT);
      inc_thresh_q <= (FRAC+1)'(INC_THRESH_DEFAULT);
      dec_thresh_q <= (FRAC+1)'(DEC_THRESH_DEFAULT);
      adapt_en_q   <= 1'b1;
      fsz          <= fsz_t'(INIT_FSZ);
      acc_cnt      <= '0;
      good_cnt     <= '0;
      poor_cnt     <= '0;
      fetch_cnt    <= '0;
      end_q        <= 1'b0;
    end else begin
      end_q <= 1'b0;
      if (end_q) begin
        // Decision cycle: update the fetch size and restart the counters.
        if (adapt_en_q) fsz <= fsz_next;
        acc_cnt   <= ev_access ? CNT_W'(1) : '0;
        good_cnt  <= ev_good  ? CNT_W'(2) : '0;
        poor_cnt  <= ev_poor  ? CNT_W'(1) : '0;
        fetch_cnt <= ev_fetch ? CNT_W'(1) : '0;
        if (ev_access && interval_q == CNT_W'(1)) end_q <= 1'b1;
      end else begin
        if (ev_good)  good_cnt  <= good_cnt + CNT_W'(2);
        if (ev_poor)  poor_cnt  <= poor_cnt + 1'b1;
        if (ev_fetch) fetch_cnt <= fetch_cnt + 1'b1;
        if (ev_access) begin
          acc_cnt <= acc_cnt + 1'b1;
          if (acc_cnt + 1'b1 >= interval_q) end_q <= 1'b1;
        end
      end
      if (cfg_we) begin
        unique case (cfg_sel)
          CFG_INTERVAL:   interval_q   <= (cfg_wdata[CNT_W-1:0] == '0) ? CNT_W'(1)
                                                                      : cfg_wdata[CNT_W-1:0];
          CFG_INC_THRESH: inc_thresh_q <= cfg_wdata[FRAC:0];
          CFG_DEC_THRESH: dec_thresh_q <= cfg_wdata[FRAC:0];
          CFG_FETCH_SIZE: begin
            adapt_en_q <= cfg_wdata[8];
            if (cfg_wdata[VW-1:0] > fsz_t'(MAX_FSZ))      fsz <= fsz_t'(MAX_FSZ);
            else if (int'(cfg_wdata[VW-1:0]) < int'(MIN_FSZ)) fsz <= fsz_t'(MIN_FSZ);
            else                                          fsz <= fsz_t'(cfg_wdata[VW-1:0]);
          end
          default: ;
        endcase
      end
    end
  end

endmodule
