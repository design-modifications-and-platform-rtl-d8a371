// port_abstraction: connects the generalized port set of the
// reconfigurable partition to the named signals of the static design.
//
// Every RM presents the same generalized ports (dpr_pkg::rm_in_t/rm_out_t),
// but what a port means may differ from RM to RM.  Ports whose meaning is
// the same for every RM are plain connections here: start, done, the
// scratch memory read/write ports and the constant memory address.  Ports
// whose meaning depends on the RM go through a multiplexer steered by sel,
// the RM currently on the chip (rm_ready): generalized math unit A is the
// shl unit for b1 (bits2prm_ld8k) and the shr unit for b3
// (CheckParityPitch); unit B is the add unit for both.  With no known RM
// (sel = 0 while the partition is being rewritten) no math unit is started
// and the RM's done is ignored.
//
// The memory ports are also shared with the control FSM: while fsm_mem_own
// is high the FSM's own accesses drive the scratch memory, otherwise the
// RM's.  Math units the current RM does not use get an idle request.
//
// Combinational.  Ports: sel; fsm_* from the control FSM; rin/rout to and
// from the partition; math_req/math_rsp (one per operator, indexed by
// dpr_pkg::op_e) and the memory ports toward the datapath.  The subset
// port naming and the assign-or-multiplex rule follow the source design;
// the concrete index assignment is this design's.
//
// Outputs that are constant by design: the requests of the 17 math units
// neither built module uses are held idle, and the 32-bit operand fields of
// units A and B are 0 (both use 16-bit operators).
module port_abstraction
  import dpr_pkg::*;
(
  input  rm_id_t    sel,
  // control FSM
  input  logic      fsm_rm_start,
  output logic      fsm_rm_done,
  input  logic      fsm_mem_own,
  input  maddr_t    fsm_raddr,
  input  logic      fsm_we,
  input  maddr_t    fsm_waddr,
  input  mword_t    fsm_wdata,
  output mword_t    fsm_rdata,
  // reconfigurable partition
  output rm_in_t    rin,
  input  rm_out_t   rout,
  // datapath
  output math_req_t math_req [NUM_OPS],
  input  math_rsp_t math_rsp [NUM_OPS],
  output maddr_t    scr_raddr,
  output logic      scr_we,
  output maddr_t    scr_waddr,
  output mword_t    scr_wdata,
  input  mword_t    scr_rdata,
  output maddr_t    cst_addr,
  input  mword_t    cst_rdata
);

  logic known;
  op_e  op_a;

  assign known = (sel == RM_B1) || (sel == RM_B3);
  assign op_a  = (sel == RM_B3) ? OP_SHR : OP_SHL;

  // memories: RM and FSM share, the FSM wins while it owns the port
  assign scr_raddr = fsm_mem_own ? fsm_raddr : rout.out_12[0];
  assign scr_we    = fsm_mem_own ? fsm_we    : rout.out_1[1];
  assign scr_waddr = fsm_mem_own ? fsm_waddr : rout.out_12[1];
  assign scr_wdata = fsm_mem_own ? fsm_wdata : rout.out_32[0];
  assign cst_addr  = rout.out_12[2];
  assign fsm_rdata = scr_rdata;

  assign fsm_rm_done = known && rout.out_1[0];

  always_comb begin
    for (int i = 0; i < NUM_OPS; i++) math_req[i] = '0;
    // unit A: operands on out_16[0..1]
    math_req[op_a].start = known && rout.out_1[2];
    math_req[op_a].c     = rout.out_16[0];
    math_req[op_a].d     = rout.out_16[1];
    // unit B: the add unit, operands on out_16[2..3]
    math_req[OP_ADD].start = known && rout.out_1[3];
    math_req[OP_ADD].c     = rout.out_16[2];
    math_req[OP_ADD].d     = rout.out_16[3];
  end

  always_comb begin
    rin          = '0;
    rin.in_1[0]  = fsm_rm_start;
    rin.in_1[1]  = math_rsp[op_a].done;
    rin.in_1[2]  = math_rsp[OP_ADD].done;
    rin.in_16[0] = math_rsp[op_a].res[15:0];
    rin.in_16[1] = math_rsp[OP_ADD].res[15:0];
    rin.in_32[0] = scr_rdata;
    rin.in_32[1] = cst_rdata;
  end

endmodule
