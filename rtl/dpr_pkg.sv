// dpr_pkg: types and constants shared by the dynamically partially
// reconfigurable G.729 decoder.
//
// The decoder is split into a static part (control FSM, port abstraction,
// shared math units, memories, bus peripheral) and one reconfigurable
// partition that holds one reconfigurable module (RM) at a time.  Every RM
// that can occupy the partition must present the same port list, so this
// package defines that list as two structs built with the "subset" method:
// for each port width, the largest count any RM of the set needs.  For the
// RM set {b1 bits2prm_ld8k, b3 CheckParityPitch} the port-width counts give
//   inputs : 5 x 1 bit (clk and reset are carried outside the struct),
//            2 x 16 bit, 2 x 32 bit
//   outputs: 4 x 1 bit, 3 x 12 bit, 4 x 16 bit, 1 x 32 bit.
// RM identifiers are 5 bits wide (enough for the 24 modules of the full
// design); b1 is 1 and b3 is 3, the numbers the host software uses.
//
// Also here: the opcode set and request/response bundles of the 19 shared
// basic operators, their bit-exact fixed-point arithmetic (saturating
// 16/32-bit operators of ITU-T G.729), and the scratch memory layout.
package dpr_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned RM_ID_W   = 5;     // width of rm_load / rm_ready
  localparam int unsigned ADDR_W    = 12;    // decoder memory address width
  localparam int unsigned DATA_W    = 32;    // memory word width
  localparam int unsigned MEM_DEPTH = 4096;  // words per memory

  typedef logic [RM_ID_W-1:0] rm_id_t;
  typedef logic [ADDR_W-1:0]  maddr_t;
  typedef logic [DATA_W-1:0]  mword_t;

  localparam rm_id_t RM_NONE = 5'd0;  // partition blank / being rewritten
  localparam rm_id_t RM_B1   = 5'd1;  // bits2prm_ld8k
  localparam rm_id_t RM_B3   = 5'd3;  // CheckParityPitch

  // ------------------------------------------------ scratch memory layout
  localparam maddr_t SERIAL_OFFSET = 12'd2944; // 80 received bit words
  localparam maddr_t PARM_OFFSET   = 12'd624;  // parm[0] erasure, parm[1..11]
  localparam int unsigned SERIAL_SIZE = 80;    // bits per 10 ms frame
  localparam int unsigned PRM_SIZE    = 11;    // parameters per frame

  // Serial bit encoding of the G.729 bitstream format.
  localparam logic [15:0] BIT_0 = 16'h007F;
  localparam logic [15:0] BIT_1 = 16'h0081;

  // Bits per parameter, MSB first: L0+L1, L2, L3, P1, P0, C1, S1, GA1+GB1,
  // P2, C2, S2, GA2+GB2 (80 bits in total).  Index i is parameter parm[i+1].
  function automatic logic [3:0] bitsno(input int unsigned i);
    case (i)
      0: return 4'd8;   1: return 4'd10;  2: return 4'd8;   3: return 4'd1;
      4: return 4'd13;  5: return 4'd4;   6: return 4'd7;   7: return 4'd5;
      8: return 4'd13;  9: return 4'd4;   default: return 4'd7;
    endcase
  endfunction

  // ------------------------------------------- reconfigurable module ports
  localparam int unsigned RM_IN1   = 3;  // 5 one-bit inputs minus clk, rst_n
  localparam int unsigned RM_IN16  = 2;
  localparam int unsigned RM_IN32  = 2;
  localparam int unsigned RM_OUT1  = 4;
  localparam int unsigned RM_OUT12 = 3;
  localparam int unsigned RM_OUT16 = 4;
  localparam int unsigned RM_OUT32 = 1;

  // Generalized input set of the partition (input_<width>_<n>).
  typedef struct packed {
    logic [RM_IN1-1:0]         in_1;
    logic [RM_IN16-1:0][15:0]  in_16;
    logic [RM_IN32-1:0][31:0]  in_32;
  } rm_in_t;

  // Generalized output set of the partition (output_<width>_<n>).
  typedef struct packed {
    logic [RM_OUT1-1:0]        out_1;
    logic [RM_OUT12-1:0][11:0] out_12;
    logic [RM_OUT16-1:0][15:0] out_16;
    logic [RM_OUT32-1:0][31:0] out_32;
  } rm_out_t;

  // Index assignment inside the generalized sets, shared by both RMs.
  //   in_1[0]  start          out_1[0]  done
  //   in_1[1]  unit A done    out_1[1]  scratch write enable
  //   in_1[2]  unit B done    out_1[2]  unit A start
  //   in_16[0] unit A result  out_1[3]  unit B start
  //   in_16[1] unit B result  out_12[0] scratch read address
  //   in_32[0] scratch data   out_12[1] scratch write address
  //   in_32[1] constant data  out_12[2] constant memory address
  //                           out_16[0..1] unit A var1, var2
  //                           out_16[2..3] unit B var1, var2
  //                           out_32[0] scratch write data
  // Unit A is shl for b1 and shr for b3; unit B is add for both.  The port
  // abstraction resolves these per RM.

  // ------------------------------------------------------- basic operators
  typedef enum logic [4:0] {
    OP_ADD, OP_L_ADD, OP_SUB, OP_L_SUB, OP_MULT, OP_L_MULT, OP_SHL, OP_L_SHL,
    OP_SHR, OP_L_SHR, OP_NORM_L, OP_NORM_S, OP_L_ABS, OP_L_NEGATE, OP_L_MAC,
    OP_L_MSU, OP_MPY_32_16, OP_MPY_32, OP_DIV_S
  } op_e;
  localparam int unsigned NUM_OPS = 19;

  // Operand bundle of one math unit.  16-bit operands: var1 = c, var2 = d.
  // 32-bit operands: L_var1 = a, L_var2 = b (L_add, L_sub), L_var1 = a with
  // shift count d (L_shl, L_shr), L_var3 = a with var1 = c, var2 = d
  // (L_mac, L_msu).  mpy_32_16(hi, lo, n): c = hi, d = lo, b[15:0] = n.
  // Mpy_32(hi1, lo1, hi2, lo2): c = hi1, d = lo1, b[31:16] = hi2,
  // b[15:0] = lo2.
  typedef struct packed {
    logic        start;
    logic [31:0] a;
    logic [31:0] b;
    logic [15:0] c;
    logic [15:0] d;
  } math_req_t;

  // Result bundle: done pulses one cycle after start; 16-bit results are
  // sign-extended to 32 bits; overflow reports a saturation.
  typedef struct packed {
    logic        done;
    logic        overflow;
    logic [31:0] res;
  } math_rsp_t;

  typedef struct packed {
    logic        ovf;
    logic [31:0] val;
  } op_result_t;

  localparam logic signed [31:0] MAX_32 = 32'sh7FFF_FFFF;
  localparam logic signed [31:0] MIN_32 = 32'sh8000_0000;

  function automatic op_result_t sat16(input logic signed [32:0] x);
    op_result_t r;
    r.ovf = 1'b0;
    if (x > 33'sd32767) begin
      r.ovf = 1'b1; r.val = 32'sd32767;
    end else if (x < -33'sd32768) begin
      r.ovf = 1'b1; r.val = -32'sd32768;
    end else begin
      r.val = x[31:0];
    end
    return r;
  endfunction

  function automatic op_result_t f_add(input logic signed [15:0] v1, v2);
    return sat16(33'(v1) + 33'(v2));
  endfunction

  function automatic op_result_t f_sub(input logic signed [15:0] v1, v2);
    return sat16(33'(v1) - 33'(v2));
  endfunction

  function automatic op_result_t f_mult(input logic signed [15:0] v1, v2);
    logic signed [31:0] p;
    p = 32'(v1) * 32'(v2);
    return sat16(33'(p >>> 15));
  endfunction

  function automatic op_result_t f_l_mult(input logic signed [15:0] v1, v2);
    op_result_t r;
    logic signed [31:0] p;
    p = 32'(v1) * 32'(v2);
    r.ovf = (p == 32'sh4000_0000);
    r.val = r.ovf ? MAX_32 : (p <<< 1);
    return r;
  endfunction

  function automatic op_result_t f_l_add(input logic signed [31:0] a, b);
    op_result_t r;
    logic signed [32:0] s;
    s = 33'(a) + 33'(b);
    r.ovf = (s[32] != s[31]);
    r.val = r.ovf ? (a[31] ? MIN_32 : MAX_32) : s[31:0];
    return r;
  endfunction

  function automatic op_result_t f_l_sub(input logic signed [31:0] a, b);
    op_result_t r;
    logic signed [32:0] s;
    s = 33'(a) - 33'(b);
    r.ovf = (s[32] != s[31]);
    r.val = r.ovf ? (a[31] ? MIN_32 : MAX_32) : s[31:0];
    return r;
  endfunction

  // Arithmetic right shift of a 16-bit value by a non-negative count.
  function automatic logic signed [15:0] shr16_pos(input logic signed [15:0] v,
                                                    input logic [15:0] n);
    if (n >= 16'd15) return v[15] ? -16'sd1 : 16'sd0;
    return v >>> n[3:0];
  endfunction

  // Left shift of a 16-bit value by a non-negative count, saturating.
  function automatic op_result_t shl16_pos(input logic signed [15:0] v,
                                           input logic [15:0] n);
    op_result_t r;
    logic signed [47:0] w;
    r.ovf = 1'b0;
    if (v == 16'sd0) begin
      r.val = 32'd0;
    end else if (n > 16'd15) begin
      r.ovf = 1'b1;
      r.val = v[15] ? -32'sd32768 : 32'sd32767;
    end else begin
      w = 48'(v) <<< n[3:0];
      if (w > 48'sd32767 || w < -48'sd32768) begin
        r.ovf = 1'b1;
        r.val = v[15] ? -32'sd32768 : 32'sd32767;
      end else begin
        r.val = w[31:0];
      end
    end
    return r;
  endfunction

  function automatic op_result_t f_shl(input logic signed [15:0] v1, v2);
    op_result_t r;
    if (v2 < 0) begin
      r.ovf = 1'b0;
      r.val = 32'(shr16_pos(v1, 16'(-v2)));
    end else begin
      r = shl16_pos(v1, v2);
    end
    return r;
  endfunction

  function automatic op_result_t f_shr(input logic signed [15:0] v1, v2);
    op_result_t r;
    if (v2 < 0) begin
      r = shl16_pos(v1, 16'(-v2));
    end else begin
      r.ovf = 1'b0;
      r.val = 32'(shr16_pos(v1, v2));
    end
    return r;
  endfunction

  function automatic logic signed [31:0] shr32_pos(input logic signed [31:0] v,
                                                   input logic [15:0] n);
    if (n >= 16'd31) return v[31] ? -32'sd1 : 32'sd0;
    return v >>> n[4:0];
  endfunction

  function automatic op_result_t shl32_pos(input logic signed [31:0] v,
                                           input logic [15:0] n);
    op_result_t r;
    logic signed [63:0] w;
    r.ovf = 1'b0;
    if (v == 32'sd0) begin
      r.val = 32'd0;
    end else if (n > 16'd31) begin
      r.ovf = 1'b1;
      r.val = v[31] ? MIN_32 : MAX_32;
    end else begin
      w = 64'(v) <<< n[4:0];
      if (w > 64'(MAX_32) || w < 64'(MIN_32)) begin
        r.ovf = 1'b1;
        r.val = v[31] ? MIN_32 : MAX_32;
      end else begin
        r.val = w[31:0];
      end
    end
    return r;
  endfunction

  function automatic op_result_t f_l_shl(input logic signed [31:0] v,
                                         input logic signed [15:0] n);
    op_result_t r;
    if (n <= 0) begin
      r.ovf = 1'b0;
      r.val = shr32_pos(v, 16'(-n));
    end else begin
      r = shl32_pos(v, n);
    end
    return r;
  endfunction

  function automatic op_result_t f_l_shr(input logic signed [31:0] v,
                                         input logic signed [15:0] n);
    op_result_t r;
    if (n < 0) begin
      r = shl32_pos(v, 16'(-n));
    end else begin
      r.ovf = 1'b0;
      r.val = shr32_pos(v, n);
    end
    return r;
  endfunction

  // Number of left shifts that normalise a 16-bit value (count of redundant
  // sign bits); 0 for 0, 15 for -1.
  function automatic logic [15:0] f_norm_s(input logic signed [15:0] v);
    logic [15:0] x;
    logic [15:0] n;
    if (v == 16'sd0)  return 16'd0;
    if (v == -16'sd1) return 16'd15;
    x = v[15] ? ~v : v;
    n = 16'd0;
    for (int i = 14; i >= 0; i--) begin
      if (x[i]) break;
      n = n + 16'd1;
    end
    return n;
  endfunction

  function automatic logic [15:0] f_norm_l(input logic signed [31:0] v);
    logic [31:0] x;
    logic [15:0] n;
    if (v == 32'sd0)  return 16'd0;
    if (v == -32'sd1) return 16'd31;
    x = v[31] ? ~v : v;
    n = 16'd0;
    for (int i = 30; i >= 0; i--) begin
      if (x[i]) break;
      n = n + 16'd1;
    end
    return n;
  endfunction

  function automatic op_result_t f_l_abs(input logic signed [31:0] v);
    op_result_t r;
    r.ovf = (v == MIN_32);
    r.val = r.ovf ? MAX_32 : (v[31] ? -v : v);
    return r;
  endfunction

  function automatic op_result_t f_l_negate(input logic signed [31:0] v);
    op_result_t r;
    r.ovf = (v == MIN_32);
    r.val = r.ovf ? MAX_32 : -v;
    return r;
  endfunction

  function automatic op_result_t f_l_mac(input logic signed [31:0] l3,
                                         input logic signed [15:0] v1, v2);
    op_result_t p, s;
    p = f_l_mult(v1, v2);
    s = f_l_add(l3, p.val);
    s.ovf = s.ovf | p.ovf;
    return s;
  endfunction

  function automatic op_result_t f_l_msu(input logic signed [31:0] l3,
                                         input logic signed [15:0] v1, v2);
    op_result_t p, s;
    p = f_l_mult(v1, v2);
    s = f_l_sub(l3, p.val);
    s.ovf = s.ovf | p.ovf;
    return s;
  endfunction

  // 32 x 16 bit multiply of a double-precision (hi, lo) value.
  function automatic op_result_t f_mpy_32_16(input logic signed [15:0] hi, lo, n);
    op_result_t p, q, s;
    p = f_l_mult(hi, n);
    q = f_mult(lo, n);
    s = f_l_mac(p.val, q.val[15:0], 16'sd1);
    s.ovf = s.ovf | p.ovf | q.ovf;
    return s;
  endfunction

  // 32 x 32 bit multiply of two double-precision (hi, lo) values.
  function automatic op_result_t f_mpy_32(input logic signed [15:0] hi1, lo1,
                                          hi2, lo2);
    op_result_t p, q1, q2, s1, s2;
    p  = f_l_mult(hi1, hi2);
    q1 = f_mult(hi1, lo2);
    s1 = f_l_mac(p.val, q1.val[15:0], 16'sd1);
    q2 = f_mult(lo1, hi2);
    s2 = f_l_mac(s1.val, q2.val[15:0], 16'sd1);
    s2.ovf = p.ovf | q1.ovf | s1.ovf | q2.ovf | s2.ovf;
    return s2;
  endfunction

  // Fractional division var1/var2 with 0 <= var1 <= var2, var2 > 0, 15
  // quotient bits by restoring division.  Operands outside that range give
  // 0 with the overflow flag set.
  function automatic op_result_t f_div_s(input logic signed [15:0] v1, v2);
    op_result_t r;
    logic [16:0] num;
    logic [16:0] den;
    logic [15:0] q;
    r.ovf = 1'b0;
    if (v1 < 0 || v2 <= 0 || v1 > v2) begin
      r.ovf = 1'b1; r.val = 32'd0;
    end else if (v1 == 16'sd0) begin
      r.val = 32'd0;
    end else if (v1 == v2) begin
      r.val = 32'sd32767;
    end else begin
      num = 17'(v1);
      den = 17'(v2);
      q   = 16'd0;
      for (int i = 0; i < 15; i++) begin
        q   = q << 1;
        num = num << 1;
        if (num >= den) begin
          num = num - den;
          q   = q + 16'd1;
        end
      end
      r.val = 32'(q);
    end
    return r;
  endfunction

  // Evaluate operator op on a request bundle.
  function automatic op_result_t eval_op(input op_e op, input math_req_t q);
    op_result_t r;
    r.ovf = 1'b0;
    r.val = 32'd0;
    case (op)
      OP_ADD:       r = f_add(q.c, q.d);
      OP_L_ADD:     r = f_l_add(q.a, q.b);
      OP_SUB:       r = f_sub(q.c, q.d);
      OP_L_SUB:     r = f_l_sub(q.a, q.b);
      OP_MULT:      r = f_mult(q.c, q.d);
      OP_L_MULT:    r = f_l_mult(q.c, q.d);
      OP_SHL:       r = f_shl(q.c, q.d);
      OP_L_SHL:     r = f_l_shl(q.a, q.d);
      OP_SHR:       r = f_shr(q.c, q.d);
      OP_L_SHR:     r = f_l_shr(q.a, q.d);
      OP_NORM_L:    r.val = 32'(f_norm_l(q.a));
      OP_NORM_S:    r.val = 32'(f_norm_s(q.c));
      OP_L_ABS:     r = f_l_abs(q.a);
      OP_L_NEGATE:  r = f_l_negate(q.a);
      OP_L_MAC:     r = f_l_mac(q.a, q.c, q.d);
      OP_L_MSU:     r = f_l_msu(q.a, q.c, q.d);
      OP_MPY_32_16: r = f_mpy_32_16(q.c, q.d, q.b[15:0]);
      OP_MPY_32:    r = f_mpy_32(q.c, q.d, q.b[31:16], q.b[15:0]);
      OP_DIV_S:     r = f_div_s(q.c, q.d);
      default:      r.val = 32'd0;
    endcase
    return r;
  endfunction

endpackage
