// tb_bin2int: bin2int with a scratch memory and real shl/add units.  Random
// bit fields of 1..15 bits at random addresses are packed and compared with
// the value built from the bits, and the latency from start to done is
// checked against 1 + 4 cycles per bit + 1 per one bit.
module tb_bin2int;
  import dpr_pkg::*;
  import g729_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start = 1'b0, done;
  logic [3:0]  nbits = '0;
  maddr_t      base = '0, raddr;
  logic [15:0] value;
  mword_t      rdata;
  math_req_t   qa, qb;
  math_rsp_t   ra, rb;
  int checks = 0, failures = 0;

  bin2int dut (
    .clk(clk), .rst_n(rst_n), .start(start), .nbits(nbits), .base(base),
    .done(done), .value(value), .raddr(raddr), .rdata(rdata),
    .a_start(qa.start), .a_var1(qa.c), .a_var2(qa.d), .a_done(ra.done), .a_res(ra.res[15:0]),
    .b_start(qb.start), .b_var1(qb.c), .b_var2(qb.d), .b_done(rb.done), .b_res(rb.res[15:0])
  );
  assign qa.a = '0; assign qa.b = '0;
  assign qb.a = '0; assign qb.b = '0;
  basic_op_unit #(.OP(OP_SHL)) u_shl (.clk(clk), .rst_n(rst_n), .req(qa), .rsp(ra));
  basic_op_unit #(.OP(OP_ADD)) u_add (.clk(clk), .rst_n(rst_n), .req(qb), .rsp(rb));
  scratch_memory u_mem (.clk(clk), .we(1'b0), .waddr('0), .wdata('0), .raddr(raddr), .rdata(rdata));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int n, ones, expv, lat;
      maddr_t b;
      n = $urandom_range(1, 15);
      b = maddr_t'($urandom_range(0, MEM_DEPTH - 16));
      ones = 0; expv = 0;
      for (int k = 0; k < n; k++) begin
        bit x;
        x = 1'($urandom);
        u_mem.mem[b + maddr_t'(k)] = bit_word(x);
        expv = expv * 2 + int'(x);
        ones += int'(x);
      end
      @(negedge clk);
      start = 1'b1; nbits = 4'(n); base = b;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks += 2;
      if (int'(value) != expv) begin
        failures++;
        $display("n=%0d: value %0d expected %0d", n, value, expv);
      end
      if (lat != 1 + 4 * n + ones) begin
        failures++;
        $display("n=%0d ones=%0d: latency %0d expected %0d", n, ones, lat, 1 + 4 * n + ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
