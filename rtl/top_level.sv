// top_level: the reconfigurable G.729 decoder core.
//
// A control block (top_level_fsm: control FSM, port abstraction and the
// reconfigurable partition) and a datapath (top_level_datapath: 19 shared
// math units, scratch and constant memories) joined by a single set of
// signals.  Externally it offers the frame handshake (start in, done out,
// done held high while idle), the continue input that lets test pause
// states fall through, the reconfiguration handshake (rm_load out: RM
// needed next; rm_ready in: RM the host has put in the partition; cfg_id
// in: RM the configuration port has actually loaded), and a host memory
// port usable between frames (host_addr[12] selects the constant memory).
//
// Status outputs for the host registers: out_state (FSM state code),
// mux_sel (port abstraction selection), rm_done (the RM named
// by mux_sel finished), dbg_wdata (last word the decoder wrote to scratch memory).
// The two-block split and the external signal set follow the source
// design; dbg_wdata's meaning is this design's choice.
//
// Outputs that are constant by design: the upper bits of out_state.
module top_level
  import dpr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        cont,
  input  rm_id_t      rm_ready,
  input  rm_id_t      cfg_id,
  output logic        done,
  output rm_id_t      rm_load,
  output logic [7:0]  out_state,
  output rm_id_t      mux_sel,
  output logic        rm_done,
  output mword_t      dbg_wdata,
  input  logic        host_req,
  input  logic        host_we,
  input  logic [12:0] host_addr,
  input  mword_t      host_wdata,
  output logic        host_ack,
  output mword_t      host_rdata
);

  logic      busy;
  math_req_t math_req [NUM_OPS];
  math_rsp_t math_rsp [NUM_OPS];
  maddr_t    scr_raddr, scr_waddr, cst_addr;
  logic      scr_we;
  mword_t    scr_wdata, scr_rdata, cst_rdata;

  top_level_fsm u_fsm (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .cont       (cont),
    .rm_ready   (rm_ready),
    .cfg_id     (cfg_id),
    .done       (done),
    .busy       (busy),
    .rm_load    (rm_load),
    .out_state  (out_state),
    .mux_sel    (mux_sel),
    .rm_done    (rm_done),
    .math_req   (math_req),
    .math_rsp   (math_rsp),
    .scr_raddr  (scr_raddr),
    .scr_we     (scr_we),
    .scr_waddr  (scr_waddr),
    .scr_wdata  (scr_wdata),
    .scr_rdata  (scr_rdata),
    .cst_addr   (cst_addr),
    .cst_rdata  (cst_rdata)
  );

  top_level_datapath u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .busy       (busy),
    .math_req   (math_req),
    .math_rsp   (math_rsp),
    .scr_raddr  (scr_raddr),
    .scr_we     (scr_we),
    .scr_waddr  (scr_waddr),
    .scr_wdata  (scr_wdata),
    .scr_rdata  (scr_rdata),
    .cst_addr   (cst_addr),
    .cst_rdata  (cst_rdata),
    .host_req   (host_req),
    .host_we    (host_we),
    .host_addr  (host_addr),
    .host_wdata (host_wdata),
    .host_ack   (host_ack),
    .host_rdata (host_rdata)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)      dbg_wdata <= '0;
    else if (scr_we && busy) dbg_wdata <= scr_wdata;
  end

endmodule
