// tb_cache_sram: self-checking test of the cache storage array. Random
// masked writes and reads are compared against a behavioural copy; it also
// checks the one-cycle read latency and that a read of an address written in
// the same cycle returns the old word.
module tb_cache_sram;
  localparam int W = 20, D = 128;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [6:0] raddr, waddr;
  logic [W-1:0] rdata, wdata, wmask;
  logic we;
  cache_sram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_q;
    // Fill every word.
    we = 1; wmask = '1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); waddr = 7'(i); wdata = W'($urandom); raddr = 0;
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      raddr = 7'($urandom_range(0, D-1));
      we    = $urandom_range(0, 1) == 1;
      waddr = ($urandom_range(0, 3) == 0) ? raddr : 7'($urandom_range(0, D-1));
      wdata = W'($urandom);
      wmask = W'($urandom);
      exp_q = model[raddr];               // old word even if written now
      if (we) model[waddr] = (model[waddr] & ~wmask) | (wdata & wmask);
      @(posedge clk); #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        $display("FAIL: raddr %0d got %h exp %h", raddr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
