// basic_op_unit: one of the 19 shared math units of the decoder datapath.
//
// The datapath keeps one instance per G.729 basic operator (add, L_add, sub,
// L_sub, mult, L_mult, shl, L_shl, shr, L_shr, norm_l, norm_s, L_abs,
// L_negate, L_mac, L_msu, mpy_32_16, Mpy_32, div_s); the operator is chosen
// by the OP parameter.  All execution modules share these units, so each
// unit is called with a start/done handshake: operands are taken in the
// cycle start is high, and one cycle later done pulses for one cycle with
// the registered result.  The result and overflow stay valid until the next
// start.  Arithmetic is bit-exact saturating fixed point (dpr_pkg::eval_op).
//
// Ports: clk, rst_n (active low, synchronous), req (start and operands, see
// dpr_pkg::math_req_t for how each operator uses a, b, c, d), rsp (done,
// overflow, 32-bit result; 16-bit results are sign-extended).
//
// The operator list and the fact that the units are shared and instantiated
// in the datapath follow the source design; the handshake, the one-cycle
// latency and the operand packing are choices of this implementation.
module basic_op_unit
  import dpr_pkg::*;
#(
  parameter op_e OP = OP_ADD
) (
  input  logic      clk,
  input  logic      rst_n,
  input  math_req_t req,
  output math_rsp_t rsp
);

  op_result_t r;

  always_comb r = eval_op(OP, req);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp <= '0;
    end else begin
      rsp.done <= req.start;
      if (req.start) begin
        rsp.res      <= r.val;
        rsp.overflow <= r.ovf;
      end
    end
  end

endmodule
