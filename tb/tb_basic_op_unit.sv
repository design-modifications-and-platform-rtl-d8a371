// tb_basic_op_unit: checks all 19 math units against the independent
// reference arithmetic of g729_ref_pkg, with random and corner operands,
// and checks the one-cycle start-to-done latency.
module tb_basic_op_unit;
  import dpr_pkg::*;
  import g729_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  math_req_t req [NUM_OPS];
  math_rsp_t rsp [NUM_OPS];

  for (genvar i = 0; i < NUM_OPS; i++) begin : g_u
    basic_op_unit #(.OP(op_e'(i))) dut (.clk(clk), .rst_n(rst_n), .req(req[i]), .rsp(rsp[i]));
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] pick16();
    case ($urandom_range(0, 7))
      0: return 16'h8000;
      1: return 16'h7FFF;
      2: return 16'hFFFF;
      3: return 16'h0000;
      4: return 16'($urandom_range(0, 40)) - 16'd20;
      default: return 16'($urandom);
    endcase
  endfunction

  function automatic logic [31:0] pick32();
    case ($urandom_range(0, 7))
      0: return 32'h8000_0000;
      1: return 32'h7FFF_FFFF;
      2: return 32'hFFFF_FFFF;
      3: return 32'h0000_0000;
      4: return 32'($urandom_range(0, 1000)) - 32'd500;
      default: return $urandom;
    endcase
  endfunction

  // expected result and overflow (chk_ovf = 0 where the reference does not
  // model the overflow flag)
  task automatic expect_op(input int op, input math_req_t q,
                           output longint ev, output bit eo, output bit chk_ovf);
    ref_t r;
    longint c, d, a, b;
    c = s16(q.c); d = s16(q.d); a = s32(q.a); b = s32(q.b);
    chk_ovf = 1;
    case (op_e'(op))
      OP_ADD:      r = clamp(c + d, 16);
      OP_SUB:      r = clamp(c - d, 16);
      OP_L_ADD:    r = clamp(a + b, 32);
      OP_L_SUB:    r = clamp(a - b, 32);
      OP_MULT:     r = clamp((c * d) >>> 15, 16);
      OP_L_MULT:   r = clamp(2 * c * d, 32);
      OP_SHL:      r = r_shl(c, d);
      OP_SHR:      r = r_shr(c, d);
      OP_L_SHL:    r = r_l_shl(a, d);
      OP_L_SHR:    r = r_l_shr(a, d);
      OP_NORM_S:   begin r.val = r_norm(c, 16); r.ovf = 0; end
      OP_NORM_L:   begin r.val = r_norm(a, 32); r.ovf = 0; end
      OP_L_ABS:    r = clamp(a < 0 ? -a : a, 32);
      OP_L_NEGATE: r = clamp(-a, 32);
      OP_L_MAC:    begin r.val = r_lmac(a, c, d); chk_ovf = 0; end
      OP_L_MSU:    begin r = clamp(a - r_lmult(c, d), 32); chk_ovf = 0; end
      OP_MPY_32_16: begin
        r.val = r_lmac(r_lmult(c, s16(q.b[15:0])), r_mult(d, s16(q.b[15:0])), 1);
        chk_ovf = 0;
      end
      OP_MPY_32: begin
        r.val = r_lmac(r_lmac(r_lmult(c, s16(q.b[31:16])), r_mult(c, s16(q.b[15:0])), 1),
                       r_mult(d, s16(q.b[31:16])), 1);
        chk_ovf = 0;
      end
      OP_DIV_S: begin
        if (c < 0 || d <= 0 || c > d) begin r.val = 0; r.ovf = 1; end
        else if (c == d) begin r.val = 32767; r.ovf = 0; end
        else begin r.val = (c * 32768) / d; r.ovf = 0; end
      end
      default: begin r.val = 0; r.ovf = 0; end
    endcase
    ev = r.val;
    eo = r.ovf;
  endtask

  int n_ovf = 0;

  initial begin
    math_req_t q [NUM_OPS];
    longint ev; bit eo, co;
    for (int i = 0; i < NUM_OPS; i++) req[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int it = 0; it < 3000; it++) begin
      for (int i = 0; i < NUM_OPS; i++) begin
        q[i] = '0;
        q[i].start = 1'b1;
        q[i].a = pick32(); q[i].b = pick32(); q[i].c = pick16(); q[i].d = pick16();
        if (op_e'(i) inside {OP_SHL, OP_SHR, OP_L_SHL, OP_L_SHR} && $urandom_range(0, 3) != 0)
          q[i].d = 16'($urandom_range(0, 70)) - 16'd35;
        if (op_e'(i) == OP_DIV_S && $urandom_range(0, 7) != 0) begin
          q[i].d = 16'($urandom_range(1, 32767));
          q[i].c = 16'($urandom_range(0, int'(q[i].d)));
        end
        req[i] <= q[i];
      end
      @(posedge clk);
      for (int i = 0; i < NUM_OPS; i++) req[i].start <= 1'b0;
      #1;
      for (int i = 0; i < NUM_OPS; i++) begin
        expect_op(i, q[i], ev, eo, co);
        checks++;
        if (!rsp[i].done) begin
          failures++;
          $display("op %0d: done not one cycle after start", i);
        end
        if (s32(rsp[i].res) != ev || (co && rsp[i].overflow != eo)) begin
          failures++;
          if (failures < 20)
            $display("op %s a=%h b=%h c=%h d=%h: got %h ovf %b, expected %0d ovf %b",
                     op_e'(i), q[i].a, q[i].b, q[i].c, q[i].d, rsp[i].res, rsp[i].overflow, ev, eo);
        end
        if (eo) n_ovf++;
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < NUM_OPS; i++) begin
        checks++;
        if (rsp[i].done) begin failures++; $display("op %0d: done longer than one cycle", i); end
      end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("no saturation case was exercised"); end
    $display("saturating cases: %0d", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
