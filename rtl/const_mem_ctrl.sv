// const_mem_ctrl: shares the single-port constant memory between the
// decoder (reads) and the host bus (table loading and read-back).
//
// While dec_busy is high the decoder's address drives the memory and
// dec_rdata returns the word one cycle later; the decoder never writes.
// While the decoder is idle a host access (host_req held until host_ack)
// is granted, drives the memory for one cycle and is acknowledged in the
// next, with host_rdata valid for reads.  The host must drop host_req in
// the cycle after host_ack.
//
// The source design names a constant memory controller in the datapath but
// does not describe it; the host load path and the arbitration are this
// design's, needed because the constant tables are not part of the source.
//
// The read data outputs are the memory's read port wired straight through
// to both users; the controller only steers the address and write side.
module const_mem_ctrl
  import dpr_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   dec_busy,
  input  maddr_t dec_addr,
  output mword_t dec_rdata,
  input  logic   host_req,
  input  logic   host_we,
  input  maddr_t host_addr,
  input  mword_t host_wdata,
  output logic   host_ack,
  output mword_t host_rdata,
  output logic   mem_we,
  output maddr_t mem_addr,
  output mword_t mem_wdata,
  input  mword_t mem_rdata
);

  logic grant;
  logic pend;

  assign grant = host_req && !dec_busy && !pend;

  always_ff @(posedge clk) begin
    if (!rst_n) pend <= 1'b0;
    else        pend <= grant;
  end

  assign mem_we     = grant && host_we;
  assign mem_addr   = grant ? host_addr : dec_addr;
  assign mem_wdata  = host_wdata;
  assign host_ack   = pend;
  assign host_rdata = mem_rdata;
  assign dec_rdata  = mem_rdata;

endmodule
