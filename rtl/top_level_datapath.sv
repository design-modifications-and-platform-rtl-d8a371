// top_level_datapath: the shared resources of the decoder.
//
// Holds one math unit per basic operator (19 basic_op_unit instances,
// indexed by dpr_pkg::op_e), the scratch memory and the constant memory,
// each behind its controller.  Because only the RM in the partition (or the
// control FSM) can drive requests, there is exactly one set of signals from
// the control block, and the datapath has no multiplexer bank choosing
// among execution modules: every unit's request goes straight to it.
//
// The host port reaches both memories while the decoder is idle (busy
// low): host_addr[12] selects the constant memory, host_addr[11:0] is the
// word address.  host_req is held until host_ack (one cycle after the grant).
//
// Ports: clk, rst_n, busy; math_req/math_rsp per operator; scratch read and
// write port and constant address/data for the decoder; host_* for the bus.
// Math results arrive one cycle after start, memory data one cycle after
// the address.  The list of units and memories and the removal of the
// multiplexer bank follow the source design; the host path and the address
// split are this design's.
//
// Outputs that are constant by design: the overflow bit of units that
// cannot overflow and the upper result bits of the 16-bit operators.
module top_level_datapath
  import dpr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        busy,
  input  math_req_t   math_req [NUM_OPS],
  output math_rsp_t   math_rsp [NUM_OPS],
  input  maddr_t      scr_raddr,
  input  logic        scr_we,
  input  maddr_t      scr_waddr,
  input  mword_t      scr_wdata,
  output mword_t      scr_rdata,
  input  maddr_t      cst_addr,
  output mword_t      cst_rdata,
  input  logic        host_req,
  input  logic        host_we,
  input  logic [12:0] host_addr,
  input  mword_t      host_wdata,
  output logic        host_ack,
  output mword_t      host_rdata
);

  for (genvar i = 0; i < NUM_OPS; i++) begin : g_math
    basic_op_unit #(.OP(op_e'(i))) u_unit (
      .clk   (clk),
      .rst_n (rst_n),
      .req   (math_req[i]),
      .rsp   (math_rsp[i])
    );
  end

  logic   s_req, s_ack, c_req, c_ack;
  mword_t s_hrdata, c_hrdata;
  logic   sm_we;
  maddr_t sm_waddr, sm_raddr;
  mword_t sm_wdata, sm_rdata;
  logic   cm_we;
  maddr_t cm_addr;
  mword_t cm_wdata, cm_rdata;

  assign s_req      = host_req && !host_addr[12];
  assign c_req      = host_req &&  host_addr[12];
  assign host_ack   = s_ack | c_ack;
  assign host_rdata = c_ack ? c_hrdata : s_hrdata;

  scratch_mem_ctrl u_scr_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .dec_busy   (busy),
    .dec_raddr  (scr_raddr),
    .dec_we     (scr_we),
    .dec_waddr  (scr_waddr),
    .dec_wdata  (scr_wdata),
    .dec_rdata  (scr_rdata),
    .host_req   (s_req),
    .host_we    (host_we),
    .host_addr  (host_addr[11:0]),
    .host_wdata (host_wdata),
    .host_ack   (s_ack),
    .host_rdata (s_hrdata),
    .mem_we     (sm_we),
    .mem_waddr  (sm_waddr),
    .mem_wdata  (sm_wdata),
    .mem_raddr  (sm_raddr),
    .mem_rdata  (sm_rdata)
  );

  scratch_memory u_scr_mem (
    .clk   (clk),
    .we    (sm_we),
    .waddr (sm_waddr),
    .wdata (sm_wdata),
    .raddr (sm_raddr),
    .rdata (sm_rdata)
  );

  const_mem_ctrl u_cst_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .dec_busy   (busy),
    .dec_addr   (cst_addr),
    .dec_rdata  (cst_rdata),
    .host_req   (c_req),
    .host_we    (host_we),
    .host_addr  (host_addr[11:0]),
    .host_wdata (host_wdata),
    .host_ack   (c_ack),
    .host_rdata (c_hrdata),
    .mem_we     (cm_we),
    .mem_addr   (cm_addr),
    .mem_wdata  (cm_wdata),
    .mem_rdata  (cm_rdata)
  );

  constant_memory u_cst_mem (
    .clk   (clk),
    .we    (cm_we),
    .addr  (cm_addr),
    .wdata (cm_wdata),
    .rdata (cm_rdata)
  );

endmodule
