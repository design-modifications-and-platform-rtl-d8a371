// constant_memory: single-port 4096 x 32-bit table memory for the decoder's
// constant tables (quantiser codebooks, windows, filter coefficients).
//
// The decoder only reads it; the table contents are written into it through
// the same port before decoding starts (here by the host over the bus, via
// the constant memory controller).  One address serves both directions:
// with we high the word is stored at the clock edge; rdata always returns,
// one cycle later, the word that was at addr before that edge.
//
// Ports: clk, we, addr, wdata, rdata.  The port widths (two 1-bit, one
// 12-bit and one 32-bit input, one 32-bit output) follow the source design;
// the depth, synchronous read and loading by the host are choices of this
// design, since the table contents are not part of the source.
module constant_memory
  import dpr_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH
) (
  input  logic   clk,
  input  logic   we,
  input  maddr_t addr,
  input  mword_t wdata,
  output mword_t rdata
);

  mword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
