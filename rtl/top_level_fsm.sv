// top_level_fsm: the control block of the decoder.
//
// Joins the control FSM, the port abstraction and the reconfigurable
// partition.  The FSM sequences the frame and exchanges rm_load/rm_ready
// with the host; the partition holds whichever RM the configuration port
// has loaded (cfg_id); the port abstraction maps that RM's generalized
// ports, according to the RM the host has declared ready (rm_ready), onto
// the one set of signals that goes to the datapath.  mux_sel reports that
// selection and rm_done pulses when the RM finishes.
//
// Ports: clk, rst_n; start, cont, rm_ready, cfg_id in; done, busy, rm_load,
// out_state, mux_sel, rm_done out; math_req/math_rsp and the
// memory ports toward the datapath.  Structure as in the source design
// (control FSM, port abstraction, RM slot); see the submodules for timing.
//
// Outputs that are constant by design: the upper bits of out_state.
module top_level_fsm
  import dpr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       cont,
  input  rm_id_t     rm_ready,
  input  rm_id_t     cfg_id,
  output logic       done,
  output logic       busy,
  output rm_id_t     rm_load,
  output logic [7:0] out_state,
  output rm_id_t     mux_sel,
  output logic       rm_done,
  output math_req_t  math_req [NUM_OPS],
  input  math_rsp_t  math_rsp [NUM_OPS],
  output maddr_t     scr_raddr,
  output logic       scr_we,
  output maddr_t     scr_waddr,
  output mword_t     scr_wdata,
  input  mword_t     scr_rdata,
  output maddr_t     cst_addr,
  input  mword_t     cst_rdata
);

  logic    rm_start, mem_own, f_we;
  maddr_t  f_raddr, f_waddr;
  mword_t  f_wdata, f_rdata;
  rm_in_t  rin;
  rm_out_t rout;

  decoder_ctrl_fsm u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .cont      (cont),
    .rm_ready  (rm_ready),
    .done      (done),
    .busy      (busy),
    .rm_load   (rm_load),
    .out_state (out_state),
    .rm_start  (rm_start),
    .rm_done   (rm_done),
    .mem_own   (mem_own),
    .mem_raddr (f_raddr),
    .mem_rdata (f_rdata),
    .mem_we    (f_we),
    .mem_waddr (f_waddr),
    .mem_wdata (f_wdata)
  );

  port_abstraction u_pa (
    .sel          (rm_ready),
    .fsm_rm_start (rm_start),
    .fsm_rm_done  (rm_done),
    .fsm_mem_own  (mem_own),
    .fsm_raddr    (f_raddr),
    .fsm_we       (f_we),
    .fsm_waddr    (f_waddr),
    .fsm_wdata    (f_wdata),
    .fsm_rdata    (f_rdata),
    .rin          (rin),
    .rout         (rout),
    .math_req     (math_req),
    .math_rsp     (math_rsp),
    .scr_raddr    (scr_raddr),
    .scr_we       (scr_we),
    .scr_waddr    (scr_waddr),
    .scr_wdata    (scr_wdata),
    .scr_rdata    (scr_rdata),
    .cst_addr     (cst_addr),
    .cst_rdata    (cst_rdata)
  );

  rm_partition u_rp (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg_id (cfg_id),
    .rin    (rin),
    .rout   (rout)
  );

  assign mux_sel    = rm_ready;

endmodule
