// mem_model: behavioural model of the next memory level and of the 8-byte
// L1-memory bus, used only by the testbenches. A read request accepted in
// cycle c returns its first 8-byte beat in cycle c + LATENCY and each further
// beat BEAT_CYCLES later (30 cycles and 2 cycles per transfer by default). A
// write carries one beat with byte strobes and is applied when accepted. The
// model takes one request at a time: req_ready is low while a read is being
// returned. It holds MEM_DWORDS 8-byte words, addressed modulo its size, and
// starts with word w (32-bit word address) holding w * 32'h9E3779B1 + 32'h01234567.
module mem_model
  import afs_pkg::*;
#(
  parameter int unsigned LATENCY     = 30,
  parameter int unsigned BEAT_CYCLES = 2,
  parameter int unsigned MEM_DWORDS  = 1 << 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  mem_req_t         req,
  output logic             rvalid,
  output logic [BUS_W-1:0] rdata,
  output int unsigned      n_reads,
  output int unsigned      n_writes,
  output int unsigned      n_beats
);

  localparam int unsigned AW = $clog2(MEM_DWORDS);

  logic [BUS_W-1:0] mem [MEM_DWORDS];
  logic             busy;
  int unsigned      timer, left;
  logic [AW-1:0]    ptr;

  initial
    for (int unsigned i = 0; i < MEM_DWORDS; i++)
      mem[i] = {(2*i+1) * 32'h9E3779B1 + 32'h01234567, (2*i) * 32'h9E3779B1 + 32'h01234567};

  assign req_ready = !busy;
  assign rvalid    = busy && timer == 0;
  assign rdata     = mem[ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; timer <= 0; left <= 0; ptr <= '0;
      n_reads <= 0; n_writes <= 0; n_beats <= 0;
    end else begin
      if (req_valid && req_ready) begin
        if (req.write) begin
          for (int b = 0; b < BUS_BYTES; b++)
            if (req.wstrb[b]) mem[req.addr[3 +: AW]][b*8 +: 8] <= req.wdata[b*8 +: 8];
          n_writes <= n_writes + 1;
        end else begin
          busy  <= 1'b1;
          timer <= LATENCY - 1;
          left  <= req.beats;
          ptr   <= req.addr[3 +: AW];
          n_reads <= n_reads + 1;
        end
      end
      if (busy) begin
        if (timer == 0) begin
          n_beats <= n_beats + 1;
          ptr     <= ptr + 1'b1;
          timer   <= BEAT_CYCLES - 1;
          left    <= left - 1;
          if (left == 1) busy <= 1'b0;
        end else begin
          timer <= timer - 1;
        end
      end
    end
  end

endmodule
