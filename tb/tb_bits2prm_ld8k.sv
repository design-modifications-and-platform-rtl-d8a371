// tb_bits2prm_ld8k: reconfigurable module b1 with a scratch memory and the
// shl/add units wired as the port abstraction wires them for b1.  Random
// frames are unpacked and parm[1..11] compared with the fields cut directly
// from the bit array; the other scratch words must be untouched, and the
// latency must be 354 cycles plus one per one bit.
module tb_bits2prm_ld8k;
  import dpr_pkg::*;
  import g729_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  rm_in_t    rin;
  rm_out_t   rout;
  logic      start = 1'b0;
  math_req_t qa, qb;
  math_rsp_t ra, rb;
  mword_t    rdata;
  int checks = 0, failures = 0;

  bits2prm_ld8k dut (.clk(clk), .rst_n(rst_n), .rin(rin), .rout(rout));

  always_comb begin
    qa = '0; qb = '0;
    qa.start = rout.out_1[2]; qa.c = rout.out_16[0]; qa.d = rout.out_16[1];
    qb.start = rout.out_1[3]; qb.c = rout.out_16[2]; qb.d = rout.out_16[3];
    rin = '0;
    rin.in_1 = {rb.done, ra.done, start};
    rin.in_16 = {rb.res[15:0], ra.res[15:0]};
    rin.in_32[0] = rdata;
  end

  basic_op_unit #(.OP(OP_SHL)) u_shl (.clk(clk), .rst_n(rst_n), .req(qa), .rsp(ra));
  basic_op_unit #(.OP(OP_ADD)) u_add (.clk(clk), .rst_n(rst_n), .req(qb), .rsp(rb));
  scratch_memory u_mem (.clk(clk), .we(rout.out_1[1]), .waddr(rout.out_12[1]),
                        .wdata(rout.out_32[0]), .raddr(rout.out_12[0]), .rdata(rdata));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      bit b [80];
      int ones, lat;
      ones = 0;
      for (int k = 0; k < 80; k++) begin
        b[k] = (t == 0) ? 1'b1 : (t == 1) ? 1'b0 : 1'($urandom);
        ones += int'(b[k]);
        u_mem.mem[SERIAL_OFFSET + maddr_t'(k)] = bit_word(b[k]);
      end
      for (int k = 0; k < 13; k++) u_mem.mem[PARM_OFFSET + maddr_t'(k)] = 32'hA5A5_0000 + 32'(k);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      lat = 1;
      while (!rout.out_1[0]) begin @(negedge clk); lat++; end
      @(negedge clk);
      for (int i = 0; i < PRM_SIZE; i++) begin
        checks++;
        if (u_mem.mem[PARM_OFFSET + maddr_t'(i + 1)] !== 32'(field_value(b, i))) begin
          failures++;
          $display("frame %0d parm[%0d] = %0d expected %0d", t, i + 1,
                   u_mem.mem[PARM_OFFSET + maddr_t'(i + 1)], field_value(b, i));
        end
      end
      checks += 3;
      if (u_mem.mem[PARM_OFFSET] !== 32'hA5A5_0000) begin failures++; $display("parm[0] overwritten"); end
      if (u_mem.mem[PARM_OFFSET + 12] !== 32'hA5A5_000C) begin failures++; $display("parm[12] overwritten"); end
      if (lat != 354 + ones) begin
        failures++;
        $display("frame %0d: latency %0d expected %0d", t, lat, 354 + ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
