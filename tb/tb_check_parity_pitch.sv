// tb_check_parity_pitch: reconfigurable module b3 with a scratch memory and
// the shr/add units wired as the port abstraction wires them for b3.  For
// every 8-bit pitch index and both parity bits the flag written to parm[4]
// is compared with the parity computed from the index bits; parm[3] must be
// left alone and the latency is 33 cycles.
module tb_check_parity_pitch;
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
  int checks = 0, failures = 0, n_err = 0;

  check_parity_pitch dut (.clk(clk), .rst_n(rst_n), .rin(rin), .rout(rout));

  always_comb begin
    qa = '0; qb = '0;
    qa.start = rout.out_1[2]; qa.c = rout.out_16[0]; qa.d = rout.out_16[1];
    qb.start = rout.out_1[3]; qb.c = rout.out_16[2]; qb.d = rout.out_16[3];
    rin = '0;
    rin.in_1 = {rb.done, ra.done, start};
    rin.in_16 = {rb.res[15:0], ra.res[15:0]};
    rin.in_32[0] = rdata;
  end

  basic_op_unit #(.OP(OP_SHR)) u_shr (.clk(clk), .rst_n(rst_n), .req(qa), .rsp(ra));
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
    for (int p = 0; p < 256; p++) begin
      for (int par = 0; par < 2; par++) begin
        int lat, expf;
        u_mem.mem[PARM_OFFSET + 12'd3] = 32'(p);
        u_mem.mem[PARM_OFFSET + 12'd4] = 32'(par);
        expf = parity_flag(p, par);
        @(negedge clk) start = 1'b1;
        @(negedge clk) start = 1'b0;
        lat = 1;
        while (!rout.out_1[0]) begin @(negedge clk); lat++; end
        @(negedge clk);
        checks += 3;
        if (u_mem.mem[PARM_OFFSET + 12'd4] !== 32'(expf)) begin
          failures++;
          $display("index %0d parity %0d: flag %0d expected %0d", p, par,
                   u_mem.mem[PARM_OFFSET + 12'd4], expf);
        end
        if (u_mem.mem[PARM_OFFSET + 12'd3] !== 32'(p)) begin failures++; $display("parm[3] changed"); end
        if (lat != 33) begin failures++; $display("latency %0d expected 33", lat); end
        n_err += expf;
      end
    end
    checks++;
    if (n_err != 256) begin failures++; $display("%0d parity errors, expected 256", n_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
