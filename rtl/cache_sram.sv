// cache_sram: storage array of the cache (tag array or data array of one way).
// A plain memory of DEPTH words of WIDTH bits with one synchronous read port
// and one write port with a per-bit write mask. The word at `raddr` appears on
// `rdata` one clock after it is presented, which matches the one-cycle cache
// hit time of the evaluated configuration. A read and a write of the same
// address in the same cycle return the old word. The contents are not reset;
// the cache keeps the valid bits of its lines in flip-flops instead.
module cache_sram #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [WIDTH-1:0] wmask
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= (mem[waddr] & ~wmask) | (wdata & wmask);
  end

endmodule
