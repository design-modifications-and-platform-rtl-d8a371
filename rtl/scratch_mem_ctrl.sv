// scratch_mem_ctrl: shares the scratch memory between the decoder and the
// host bus.
//
// While the decoder is busy (dec_busy high, from start until done) it owns
// both memory ports and its read address, write enable, write address and
// data go straight to the memory, so a decoder read returns data one cycle
// after the address.  A host access (host_req held high until host_ack) is
// served only while the decoder is idle; during decoding it is held off,
// which is how the processor loads a frame and reads results between
// frames.  A granted host access drives the memory for one cycle and is
// acknowledged in the next one, with host_rdata valid for reads.  The host
// must drop host_req in the cycle after host_ack.
//
// The source design has a scratch memory controller between the datapath
// and the memory and lets the bus reach that memory, but does not describe
// the controller's insides; the decoder-first arbitration is this design's.
//
// The read data outputs are the memory's read port wired straight through
// to both users; the controller only steers the address and write side.
module scratch_mem_ctrl
  import dpr_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // decoder side
  input  logic   dec_busy,
  input  maddr_t dec_raddr,
  input  logic   dec_we,
  input  maddr_t dec_waddr,
  input  mword_t dec_wdata,
  output mword_t dec_rdata,
  // host side
  input  logic   host_req,
  input  logic   host_we,
  input  maddr_t host_addr,
  input  mword_t host_wdata,
  output logic   host_ack,
  output mword_t host_rdata,
  // memory side
  output logic   mem_we,
  output maddr_t mem_waddr,
  output mword_t mem_wdata,
  output maddr_t mem_raddr,
  input  mword_t mem_rdata
);

  logic grant;
  logic pend;

  assign grant = host_req && !dec_busy && !pend;

  always_ff @(posedge clk) begin
    if (!rst_n) pend <= 1'b0;
    else        pend <= grant;
  end

  always_comb begin
    if (grant) begin
      mem_we    = host_we;
      mem_waddr = host_addr;
      mem_wdata = host_wdata;
      mem_raddr = host_addr;
    end else begin
      mem_we    = dec_we && dec_busy;
      mem_waddr = dec_waddr;
      mem_wdata = dec_wdata;
      mem_raddr = dec_raddr;
    end
  end

  assign host_ack   = pend;
  assign host_rdata = mem_rdata;
  assign dec_rdata  = mem_rdata;

endmodule
