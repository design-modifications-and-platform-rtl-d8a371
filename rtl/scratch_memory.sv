// scratch_memory: the decoder's working memory, 4096 words of 32 bits.
//
// It holds the received frame (80 serial bit words at 2944), the decoded
// parameters (624), filter state and all intermediate buffers; every
// execution module reaches it through the scratch memory controller.  It
// has one write port and one read port, both synchronous: a word written
// with we high is stored at the clock edge, and rdata shows the word at
// raddr one cycle after the address is presented (block-RAM style).  A read
// of the address being written in the same cycle returns the old word.
//
// Ports: clk, we, waddr, wdata, raddr, rdata.  The port widths (two 1-bit,
// two 12-bit, one 32-bit input; one 32-bit output) follow the source design;
// the synchronous read and read-before-write are choices of this design.
// The contents are not reset; the host initialises what the decoder reads.
module scratch_memory
  import dpr_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH
) (
  input  logic   clk,
  input  logic   we,
  input  maddr_t waddr,
  input  mword_t wdata,
  input  maddr_t raddr,
  output mword_t rdata
);

  mword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
